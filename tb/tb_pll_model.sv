`timescale 1ps/1fs
// Testbench for the behavioural PLL model (40 MHz reference, division by
// 32). After reset the loop must lock: the divided clock follows the
// reference within 20 ps for 20 reference periods in a row, the VCO runs
// at 1.28 GHz (781.25 ps, measured between reference edges, away from the
// pump pulse), and over 100 reference periods 3200 VCO rising
// edges are counted (plus or minus one for the phase error at the ends).
module tb_pll_model;
  localparam real TREF = 25000.0;
  logic ref_clk = 0, rst_n = 1, clk_vco, clk_div;
  // a reset edge at the start, so that the asynchronous resets act
  initial #1 rst_n = 0;
  int checks = 0, failures = 0, nvco = 0;
  realtime t_ref, t_div;
  pll_model dut (.*);
  always #(TREF / 2) ref_clk = !ref_clk;
  always @(posedge clk_vco) nvco++;
  always @(posedge ref_clk) t_ref = $realtime;
  always @(posedge clk_div) t_div = $realtime;
  initial begin
    #1_000_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    int n;
    real ph;
    #(TREF * 2.2) rst_n = 1;
    // lock: phase error below 20 ps for 20 consecutive reference edges
    n = 0;
    for (int i = 0; i < 2000 && n < 20; i++) begin
      @(posedge ref_clk);
      #(TREF / 4);
      ph = t_div - t_ref;
      if (ph < 0) ph = -ph;
      if (ph > TREF / 2) ph = TREF - ph;
      n = (ph < 20.0) ? n + 1 : 0;
      if (i == 1999) begin failures++; $display("no lock"); end
    end
    checks++;
    $display("locked at %0t", $time);
    for (int r = 0; r < 20; r++) begin
      int n0;
      realtime t0;
      @(posedge ref_clk);
      n0 = nvco; t0 = $realtime;
      repeat (100) @(posedge ref_clk);
      checks++;
      if (nvco - n0 < 3199 || nvco - n0 > 3201) begin failures++; $display("%0d VCO edges in 100 periods", nvco - n0); end
      #(TREF / 2);
      begin
        realtime a, b;
        @(posedge clk_vco) a = $realtime;
        @(posedge clk_vco) b = $realtime;
        checks++;
        if (b - a < 781.25 - 20.0 || b - a > 781.25 + 20.0) begin
          failures++; $display("VCO period %0.2f ps", b - a);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
