// tb_csla_ba_stage: exhaustive check of one carry-select stage at N = 3
// (default) and N = 2: {cout, sum} must equal a + b + cin. It also counts
// how often the stage carry comes from the ripple adder (a + b overflows on
// its own) and from the binary adder (a + b is all ones and cin = 1), and
// fails if either path never produced a carry.
module tb_csla_ba_stage;
  logic [2:0] a3, b3, s3;
  logic [1:0] a2, b2, s2;
  logic       cin, c3, c2;
  int checks = 0, failures = 0;
  int rca_carries = 0, ba_carries = 0;

  csla_ba_stage          dut3 (.a(a3), .b(b3), .cin(cin), .sum(s3), .cout(c3));
  csla_ba_stage #(.N(2)) dut2 (.a(a2), .b(b2), .cin(cin), .sum(s2), .cout(c2));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int ci = 0; ci < 2; ci++) begin
      for (int i = 0; i < 8; i++) begin
        for (int j = 0; j < 8; j++) begin
          a3 = 3'(i); b3 = 3'(j); a2 = 2'(i); b2 = 2'(j); cin = 1'(ci);
          #1;
          checks++;
          if ({c3, s3} !== 4'(i + j + ci)) begin
            failures++;
            $display("FAIL N=3 %0d+%0d+%0d -> %0d", i, j, ci, {c3, s3});
          end
          if (i + j >= 8) rca_carries++;
          if (i + j == 7 && ci == 1) ba_carries++;
          if (i < 4 && j < 4) begin
            checks++;
            if ({c2, s2} !== 3'(i + j + ci)) begin
              failures++;
              $display("FAIL N=2 %0d+%0d+%0d -> %0d", i, j, ci, {c2, s2});
            end
          end
        end
      end
    end
    $display("carry from ripple adder: %0d, from binary adder: %0d", rca_carries, ba_carries);
    if (rca_carries == 0) failures++;
    if (ba_carries == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
