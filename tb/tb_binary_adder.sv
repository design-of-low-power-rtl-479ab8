// tb_binary_adder: exhaustive check of the binary adder at its default
// width N = 4 and at N = 2: {cout, s} must equal p + cin. Also counts the
// cases where the carry leaves the top (p all ones with cin = 1) and fails
// if they never occurred.
module tb_binary_adder;
  logic [3:0] p4, s4;
  logic [1:0] p2, s2;
  logic       cin, c4, c2;
  int checks = 0, failures = 0, overflows = 0;

  binary_adder          dut4 (.p(p4), .cin(cin), .s(s4), .cout(c4));
  binary_adder #(.N(2)) dut2 (.p(p2), .cin(cin), .s(s2), .cout(c2));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int ci = 0; ci < 2; ci++) begin
      for (int i = 0; i < 16; i++) begin
        p4 = 4'(i); p2 = 2'(i); cin = 1'(ci);
        #1;
        checks++;
        if ({c4, s4} !== 5'(i + ci)) begin
          failures++;
          $display("FAIL N=4 %0d+%0d -> %0d", i, ci, {c4, s4});
        end
        checks++;
        if ({c2, s2} !== 3'((i % 4) + ci)) begin
          failures++;
          $display("FAIL N=2 %0d+%0d -> %0d", i % 4, ci, {c2, s2});
        end
        if (i + ci == 16) overflows++;
      end
    end
    if (overflows == 0) failures++;
    $display("carry-out cases: %0d", overflows);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
