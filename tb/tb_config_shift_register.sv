`timescale 1ps/1fs
// Testbench for the two-stage configuration register (102 bits). Checks the
// reset value, that shifting does not disturb the active configuration
// until the update clock, that the update copies the shifted word, and that
// the active word can be read back serially, bit 0 first.
module tb_config_shift_register;
  import tdc_pkg::*;
  localparam int W = PROTO_CFG_W;
  localparam logic [W-1:0] DEF = {{(W-8){1'b0}}, 8'hA5};
  logic shift_clk = 0, upd_clk = 0, rst_n = 1, sin = 0, upd_shift = 0, sout;
  logic [W-1:0] cfg, word;
  int checks = 0, failures = 0;
  config_shift_register #(.DEFAULT(DEF)) dut (.*);
  task automatic pulse_shift(); #5 shift_clk = 1; #5 shift_clk = 0; endtask
  task automatic pulse_upd();   #5 upd_clk = 1;   #5 upd_clk = 0;   endtask
  initial begin
    #100_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #2 rst_n = 0;
    #8;
    checks++;
    if (cfg !== DEF) begin failures++; $display("reset value"); end
    rst_n = 1;
    for (int r = 0; r < 20; r++) begin
      logic [W-1:0] old;
      for (int i = 0; i < W; i++) word[i] = 1'($urandom);
      old = cfg;
      for (int i = 0; i < W; i++) begin sin = word[i]; pulse_shift(); end
      checks++;
      if (cfg !== old) begin failures++; $display("active word changed while shifting"); end
      pulse_upd();
      checks++;
      if (cfg !== word) begin failures++; $display("update: %h vs %h", cfg, word); end
      if (r % 4 == 0) begin
        upd_shift = 1;
        for (int i = 0; i < W; i++) begin
          checks++;
          if (sout !== word[i]) begin failures++; $display("readback bit %0d", i); end
          pulse_upd();
        end
        upd_shift = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
