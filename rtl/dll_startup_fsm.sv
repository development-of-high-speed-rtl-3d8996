`timescale 1ps/1fs
// dll_startup_fsm: start-up state machine of the DLL.
//
// A DLL whose phase detector sees only the two ends of the delay line can
// lock to two or more clock periods, and if the line is much too fast the
// detector can report "late" for ever. The document avoids both: at reset
// the loop filter is charged to the supply (smallest delay), so the first
// lock point reached is the right one; and since a line that starts at
// minimum delay must be early, a "late" right after reset means the line is
// far too fast, so the delay is forced up (charge pump down) until the
// detector consistently says "early". Only then does the detector drive the
// charge pump. A configuration override can force the pump down by hand, as
// the document foresees in case this machine misbehaves.
//
// States: PRE (in reset: precharge), SETTLE (SETTLE_CYCLES cycles for the
// line to fill with clock edges), CHECK (sample the detector), SLOW (pump
// down until CONSIST consecutive early decisions), TRACK (cp_up = late,
// cp_dn = early). The document's state diagram is not available to this
// design; the settle time, the count of consecutive decisions and the
// state encoding are this design's.
//
// Interface: clk is the VCDL output clock (one decision per cycle); rst_n
// asynchronous. cp_up/cp_dn are combinational from late in TRACK.
module dll_startup_fsm #(
  parameter int unsigned SETTLE_CYCLES = 4,
  parameter int unsigned CONSIST       = 8
) (
  input  logic clk,
  input  logic rst_n,
  input  logic late,
  input  logic force_en,    // configuration override
  input  logic force_dn,    // with force_en: pump down (more delay)
  output logic precharge,
  output logic cp_up,
  output logic cp_dn,
  output logic tracking
);

  typedef enum logic [2:0] { S_PRE, S_SETTLE, S_CHECK, S_SLOW, S_TRACK } state_e;

  localparam int unsigned CNT_W = $clog2(((SETTLE_CYCLES > CONSIST) ? SETTLE_CYCLES : CONSIST) + 1);

  state_e           state_q;
  logic [CNT_W-1:0] cnt_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_PRE;
      cnt_q   <= '0;
    end else begin
      unique case (state_q)
        S_PRE:    begin state_q <= S_SETTLE; cnt_q <= '0; end
        S_SETTLE: begin
          cnt_q <= cnt_q + 1'b1;
          if (cnt_q == CNT_W'(SETTLE_CYCLES - 1)) state_q <= S_CHECK;
        end
        S_CHECK:  begin
          cnt_q   <= '0;
          state_q <= late ? S_SLOW : S_TRACK;
        end
        S_SLOW:   begin
          if (late)                               cnt_q <= '0;
          else if (cnt_q == CNT_W'(CONSIST - 1))  state_q <= S_TRACK;
          else                                    cnt_q <= cnt_q + 1'b1;
        end
        S_TRACK:  state_q <= S_TRACK;
        default:  state_q <= S_PRE;
      endcase
    end
  end

  always_comb begin
    precharge = (state_q == S_PRE);
    tracking  = (state_q == S_TRACK);
    cp_up     = 1'b0;
    cp_dn     = 1'b0;
    if (force_en) begin
      cp_dn = force_dn;
    end else if (state_q == S_SLOW) begin
      cp_dn = 1'b1;
    end else if (state_q == S_TRACK) begin
      cp_up = late;
      cp_dn = !late;
    end
  end

endmodule
