// tb_rca_cin0: exhaustive check of the carry-in-0 ripple adder at the two
// widths the 8-bit adder uses (N = 3, the default, and N = 2):
// {cout, sum} must equal a + b.
module tb_rca_cin0;
  logic [2:0] a3, b3, s3;
  logic       c3;
  logic [1:0] a2, b2, s2;
  logic       c2;
  int checks = 0, failures = 0;

  rca_cin0           dut3 (.a(a3), .b(b3), .sum(s3), .cout(c3));
  rca_cin0 #(.N(2))  dut2 (.a(a2), .b(b2), .sum(s2), .cout(c2));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      for (int j = 0; j < 8; j++) begin
        a3 = 3'(i); b3 = 3'(j);
        a2 = 2'(i); b2 = 2'(j);
        #1;
        checks++;
        if ({c3, s3} !== 4'(i + j)) begin
          failures++;
          $display("FAIL N=3 %0d+%0d -> %0d", i, j, {c3, s3});
        end
        if (i < 4 && j < 4) begin
          checks++;
          if ({c2, s2} !== 3'(i + j)) begin
            failures++;
            $display("FAIL N=2 %0d+%0d -> %0d", i, j, {c2, s2});
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
