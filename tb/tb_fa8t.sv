// tb_fa8t: exhaustive check of the 8T full adder against the count of ones
// in {a, b, c}: sum is its LSB, carry is 1 when at least two inputs are 1.
module tb_fa8t;
  logic a, b, c, sum, carry;
  int checks = 0, failures = 0;

  fa8t dut (.a(a), .b(b), .c(c), .sum(sum), .carry(carry));

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ones;
    for (int i = 0; i < 8; i++) begin
      {a, b, c} = 3'(i);
      #1;
      ones = int'(a) + int'(b) + int'(c);
      checks += 2;
      if (sum !== ones[0]) begin
        failures++;
        $display("FAIL sum a=%0b b=%0b c=%0b sum=%0b", a, b, c, sum);
      end
      if (carry !== (ones >= 2)) begin
        failures++;
        $display("FAIL carry a=%0b b=%0b c=%0b carry=%0b", a, b, c, carry);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
