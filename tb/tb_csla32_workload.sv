// tb_csla32_workload: 32-bit additions built from four 8-bit carry select
// adders in ripple, each slice's co feeding the next slice's cin.
//
// It applies the operand pairs of the published 32-bit waveform (15 + 15
// with cin 0 and 1, 255 + 255, 4095 + 4095, 65535 + 65535) and then random
// 32-bit operands, comparing {co, sum} with a 33-bit reference sum. It counts
// additions whose carry crosses a slice boundary and fails if none did.
module tb_csla32_workload;
  logic [31:0] a, b, sum;
  logic        cin;
  logic [4:0]  cy;
  int checks = 0, failures = 0, crossings = 0;

  assign cy[0] = cin;
  for (genvar i = 0; i < 4; i++) begin : g_slice
    eightbitCSLABA u_slice (
      .a(a[8*i +: 8]), .b(b[8*i +: 8]), .cin(cy[i]),
      .sum(sum[8*i +: 8]), .co(cy[i+1])
    );
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [31:0] ai, input logic [31:0] bi, input logic ci);
    logic [32:0] expected;
    a = ai; b = bi; cin = ci;
    #1;
    expected = {1'b0, ai} + {1'b0, bi} + {32'd0, ci};
    checks++;
    if ({cy[4], sum} !== expected) begin
      failures++;
      $display("FAIL %0d + %0d + %0d -> %0d", ai, bi, ci, {cy[4], sum});
    end
    if (cy[3:1] != 3'b000) crossings++;
  endtask

  initial begin
    apply(32'd15, 32'd15, 1'b0);
    apply(32'd15, 32'd15, 1'b1);
    apply(32'd255, 32'd255, 1'b1);
    apply(32'd255, 32'd255, 1'b0);
    apply(32'd4095, 32'd4095, 1'b0);
    apply(32'd65535, 32'd65535, 1'b0);
    checks++;
    if (sum !== 32'd131070) failures++;
    for (int n = 0; n < 20000; n++)
      apply($urandom, $urandom, 1'($urandom));
    $display("slice-boundary carries: %0d", crossings);
    if (crossings == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
