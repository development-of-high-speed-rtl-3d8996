`timescale 1ps/1fs
// Testbench for hit_controller: for each edge selection, the store pulse
// must rise on exactly the selected edges, report which edge it was, ignore
// further edges until released, fall on ack, and never rise when disabled.
module tb_hit_controller;
  import tdc_pkg::*;
  logic hit_in = 0, rst = 1, enable = 1, ack = 0, ctrl, trailing;
  edge_sel_e edge_sel = EDGE_LEADING;
  int checks = 0, failures = 0;

  hit_controller dut (.hit_in, .rst, .enable, .edge_sel, .ack, .ctrl, .trailing);

  task automatic expect_state(logic c, logic t, string what);
    checks++;
    if (ctrl !== c || (c && trailing !== t)) begin
      failures++; $display("%s: ctrl=%b trailing=%b exp %b %b", what, ctrl, trailing, c, t);
    end
  endtask

  task automatic release_hit();
    ack = 1; #5; ack = 0; #5;
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10 rst = 0; #10;
    expect_state(0, 0, "idle after reset");
    // leading
    edge_sel = EDGE_LEADING;
    hit_in = 1; #5; expect_state(1, 0, "leading: rise");
    hit_in = 0; #5; expect_state(1, 0, "leading: fall ignored");
    release_hit(); expect_state(0, 0, "leading: ack");
    hit_in = 1; #5; hit_in = 0; #5; hit_in = 1; #5;
    expect_state(1, 0, "leading: second hit held");
    release_hit(); expect_state(0, 0, "leading: ack 2");
    hit_in = 0; #5; expect_state(0, 0, "leading: trailing edge not selected");
    // trailing
    edge_sel = EDGE_TRAILING;
    hit_in = 1; #5; expect_state(0, 0, "trailing: rise ignored");
    hit_in = 0; #5; expect_state(1, 1, "trailing: fall");
    release_hit(); expect_state(0, 0, "trailing: ack");
    // both
    edge_sel = EDGE_BOTH;
    hit_in = 1; #5; expect_state(1, 0, "both: rise");
    release_hit();
    hit_in = 0; #5; expect_state(1, 1, "both: fall");
    release_hit(); expect_state(0, 0, "both: ack");
    // none
    edge_sel = EDGE_NONE;
    hit_in = 1; #5; hit_in = 0; #5; expect_state(0, 0, "none");
    // disabled
    edge_sel = EDGE_BOTH; enable = 0;
    hit_in = 1; #5; expect_state(0, 0, "disabled rise");
    hit_in = 0; #5; expect_state(0, 0, "disabled fall");
    enable = 1;
    // random sequence against a reference
    for (int i = 0; i < 200; i++) begin
      logic exp_c, exp_t, h;
      edge_sel = edge_sel_e'($urandom_range(0, 3));
      release_hit();
      h = !hit_in;
      exp_c = (h && (edge_sel == EDGE_LEADING || edge_sel == EDGE_BOTH)) ||
              (!h && (edge_sel == EDGE_TRAILING || edge_sel == EDGE_BOTH));
      exp_t = !h;
      hit_in = h; #5;
      expect_state(exp_c, exp_t, "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
