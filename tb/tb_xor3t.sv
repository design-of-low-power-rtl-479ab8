// tb_xor3t: exhaustive check of the 3T XOR model against a xor b.
// All four input pairs are applied; y is compared after each settles.
module tb_xor3t;
  logic a, b, y;
  int checks = 0, failures = 0;

  xor3t dut (.a(a), .b(b), .y(y));

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      {a, b} = 2'(i);
      #1;
      checks++;
      if (y !== (i == 1 || i == 2)) begin
        failures++;
        $display("FAIL a=%0b b=%0b y=%0b", a, b, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
