`timescale 1ps/1fs
// Testbench for the two-flop phase-frequency detector. The reference and
// divided clocks are given random phase offsets. When the reference edge
// comes first, late must be high for the time between the two edges and
// early must stay low (apart from the short reset overlap); the other way
// round for early. The pulse width is measured and compared with the offset.
module tb_pfd;
  logic ref_clk = 0, div_clk = 0, rst = 1, late, early;
  int checks = 0, failures = 0;
  realtime t_rise_l, t_rise_e, w_l, w_e;

  pfd dut (.*);

  always @(posedge late)  t_rise_l = $realtime;
  always @(negedge late)  w_l = $realtime - t_rise_l;
  always @(posedge early) t_rise_e = $realtime;
  always @(negedge early) w_e = $realtime - t_rise_e;

  initial begin
    #100_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000 rst = 0;
    for (int i = 0; i < 400; i++) begin
      int d;
      logic ref_first;
      d = $urandom_range(50, 20000);
      ref_first = $urandom_range(0, 1);
      w_l = 0; w_e = 0;
      #5000;
      if (ref_first) begin ref_clk = 1; #(d); div_clk = 1; end
      else           begin div_clk = 1; #(d); ref_clk = 1; end
      #5000;
      checks++;
      if (late || early) begin failures++; $display("not reset: late %b early %b", late, early); end
      checks++;
      if (ref_first ? (w_l != d || w_e != 0) : (w_e != d || w_l != 0)) begin
        failures++;
        $display("d=%0d ref_first=%b late width %0t early width %0t", d, ref_first, w_l, w_e);
      end
      ref_clk = 0; div_clk = 0;
    end
    // reset clears a pending pulse
    #1000 ref_clk = 1;
    #1000 rst = 1;
    #1;
    checks++;
    if (late) begin failures++; $display("rst did not clear late"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
