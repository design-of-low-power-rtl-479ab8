// tb_eightbitCSLABA: end-to-end test of the 8-bit carry select adder with
// binary adders, at its only (default) configuration.
//
// First the two vectors of the reference waveform (50 + 40 with cin 0 and 1,
// giving 90 and 91) are applied. Then every one of the 2^17 combinations of
// a, b and cin is applied and {co, sum} is compared with a + b + cin.
//
// For each carry-select stage (bits 2:1, 4:3, 7:5) the bench counts, from the
// operands alone: the mux choosing the carry-in-0 sum (incoming carry 0), the
// mux choosing the binary adder sum (incoming carry 1), a stage carry made
// by the ripple adder, and a stage carry made by the binary adder (slice sum
// all ones and incoming carry 1). Any mechanism that never happened counts
// as a failure.
module tb_eightbitCSLABA;
  logic [7:0] a, b, sum;
  logic       cin, co;
  int checks = 0, failures = 0;

  localparam int LO[3] = '{1, 3, 5};
  localparam int W[3]  = '{2, 2, 3};
  int sel0[3], sel1[3], rca_cy[3], ba_cy[3];

  eightbitCSLABA dut (.a(a), .b(b), .cin(cin), .sum(sum), .co(co));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input int ai, input int bi, input int ci);
    int total, carry_in, slice_sum, mask;
    a = 8'(ai); b = 8'(bi); cin = 1'(ci);
    #1;
    total = ai + bi + ci;
    checks++;
    if ({co, sum} !== 9'(total)) begin
      failures++;
      $display("FAIL %0d + %0d + %0d -> co=%0b sum=%0d", ai, bi, ci, co, sum);
    end
    for (int k = 0; k < 3; k++) begin
      // carry into bit LO[k]: bits below it, added with cin
      mask      = (1 << LO[k]) - 1;
      carry_in  = ((ai & mask) + (bi & mask) + ci) >> LO[k];
      slice_sum = ((ai >> LO[k]) & ((1 << W[k]) - 1)) + ((bi >> LO[k]) & ((1 << W[k]) - 1));
      if (carry_in == 0) sel0[k]++; else sel1[k]++;
      if (slice_sum >= (1 << W[k])) rca_cy[k]++;
      if (carry_in == 1 && slice_sum == (1 << W[k]) - 1) ba_cy[k]++;
    end
  endtask

  initial begin
    for (int k = 0; k < 3; k++) begin
      sel0[k] = 0; sel1[k] = 0; rca_cy[k] = 0; ba_cy[k] = 0;
    end
    // reference waveform vectors
    apply(50, 40, 0);
    if (sum !== 8'd90) failures++;
    apply(50, 40, 1);
    if (sum !== 8'd91) failures++;
    checks += 2;
    // exhaustive
    for (int ci = 0; ci < 2; ci++)
      for (int ai = 0; ai < 256; ai++)
        for (int bi = 0; bi < 256; bi++)
          apply(ai, bi, ci);
    for (int k = 0; k < 3; k++) begin
      $display("stage %0d: select rca=%0d select ba=%0d carry by rca=%0d carry by ba=%0d",
               k + 2, sel0[k], sel1[k], rca_cy[k], ba_cy[k]);
      if (sel0[k] == 0 || sel1[k] == 0 || rca_cy[k] == 0 || ba_cy[k] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
