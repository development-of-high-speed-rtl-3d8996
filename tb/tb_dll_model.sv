`timescale 1ps/1fs
// Testbench for the behavioural DLL model together with the start-up state
// machine, driven by an ideal 1.28 GHz clock. After reset the delay line is
// precharged to its shortest delay; the state machine must reach tracking
// and the line must then delay the clock by one full period (781.25 ps),
// which makes each of the 32 taps 24.4 ps apart. The bang-bang loop dithers
// around lock by about two pump steps (a step moves the whole line by
// 5.6 ps times 2^icp_sel). Checked: tracking within 2000 clock cycles, total
// delay within two steps plus 4 ps of a period, and every tap spacing within
// a 32nd of that plus 1 ps of 24.414 ps, repeated for all pump settings
// and with a calibration setting that speeds up some elements (the
// remaining elements then take up the difference).
module tb_dll_model;
  localparam real T = 781.25;
  logic clk_in = 0, rst_n = 1;
  // a reset edge at the start, so that the asynchronous resets act
  initial #1 rst_n = 0;
  logic precharge, cp_up, cp_dn, late, early, tracking, clk_out;
  logic [1:0] icp_sel = 0;
  logic [95:0] cal = '0;
  logic [31:0] taps;
  int checks = 0, failures = 0;
  realtime t_in, t_tap [32], t_out;

  dll_model dut (.clk_in, .precharge, .cp_up, .cp_dn, .icp_sel, .cal, .taps, .clk_out, .late, .early);
  dll_startup_fsm u_fsm (.clk(clk_out), .rst_n, .late, .force_en(1'b0), .force_dn(1'b0),
                         .precharge, .cp_up, .cp_dn, .tracking);

  always #(T / 2) clk_in = !clk_in;

  always @(posedge clk_in) t_in = $realtime;
  for (genvar k = 1; k < 32; k++) begin : g_t
    always @(posedge taps[k]) t_tap[k] = $realtime;
  end
  always @(posedge clk_out) t_out = $realtime;

  initial begin
    #100_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int isel, input logic [95:0] c, input logic cal_run);
    int n;
    real d, dt, tol;
    icp_sel = 2'(isel);
    // two pump steps of the whole line plus 4 ps
    tol = 4.0 + 2.0 * 32.0 * 87.9 * 0.002 * real'(1 << isel);
    cal = c;
    rst_n = 0;
    #(3 * T);
    rst_n = 1;
    n = 0;
    while (!tracking && n < 5000) begin @(posedge clk_in); n++; end
    checks++;
    if (n > 2000) begin failures++; $display("icp %0d: tracking after %0d cycles", isel, n); end
    repeat (600) @(posedge clk_in);
    // measure well after lock; the delay is one period, so the output edge
    // coincides with an input edge and is compared modulo the period
    @(posedge clk_in);
    #(T * 0.25);
    @(posedge clk_out);
    #(T * 0.5);
    dt = t_out - t_in;
    while (dt < 0) dt += T;
    while (dt >= T) dt -= T;
    d = (dt > T / 2) ? T + dt - T : T + dt;
    checks++;
    if (d < T - tol || d > T + tol) begin failures++; $display("icp %0d: total delay %0.2f ps", isel, d); end
    // all taps of one edge are recorded once the last tap has risen
    @(posedge taps[31]);
    #1;
    for (int k = 2; k < 32; k++) begin
      dt = t_tap[k] - t_tap[k-1];
      if (!cal_run || c[3*(k-1) +: 3] == 0) begin
        checks++;
        if (dt < T / 32 - tol / 32 - 1.0 || dt > T / 32 + tol / 32 + 1.0 + (cal_run ? 3.0 : 0.0)) begin
          failures++; $display("icp %0d: tap %0d spacing %0.2f ps", isel, k, dt);
        end
      end
    end
    $display("icp_sel %0d cal %b: tracking after %0d cycles, total delay %0.2f ps, tap 1-2 %0.2f ps",
             isel, cal_run, n, d, t_tap[2] - t_tap[1]);
  endtask

  initial begin
    for (int i = 0; i < 4; i++) run(i, '0, 0);
    run(0, {{90{1'b0}}, 3'b100, 3'b010}, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
