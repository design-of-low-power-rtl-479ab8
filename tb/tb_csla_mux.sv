// tb_csla_mux: exhaustive check of the 6:3 stage mux (N = 3): y must be d0
// when sel is 0 and d1 when sel is 1.
module tb_csla_mux;
  logic [2:0] d0, d1, y;
  logic       sel;
  int checks = 0, failures = 0;

  csla_mux dut (.d0(d0), .d1(d1), .sel(sel), .y(y));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 128; i++) begin
      {sel, d1, d0} = 7'(i);
      #1;
      checks++;
      if (y !== (sel ? d1 : d0)) begin
        failures++;
        $display("FAIL sel=%0b d0=%0d d1=%0d y=%0d", sel, d0, d1, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
