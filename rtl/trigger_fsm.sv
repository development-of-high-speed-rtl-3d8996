`timescale 1ps/1fs
// trigger_fsm: the per-channel trigger state machine.
//
// Every hit is written to the channel's level-1 buffer; this state machine
// decides which of them leave the chip. A trigger arrives a fixed latency
// after the event it refers to and selects the hits whose timestamps lie in
// a window [start, start + window) with start = trigger arrival - latency
// (computed by trigger_gen). Because each channel has its own buffer, the
// words are in time order and the decision is a scan from the oldest word:
//   - a word older than the window start of the oldest pending trigger can
//     not be selected by it or by any later trigger: it is dropped (pop);
//   - a word inside the window is sent to the channel merger, waiting for
//     the merger to take it, but stays in the buffer (only the scan offset
//     moves), so an overlapping later trigger can read it again;
//   - a word at or after the window end, or an empty buffer once the window
//     has ended, completes the trigger; the next trigger scans again from
//     the oldest word;
//   - with no trigger pending, a word is dropped once it is older than the
//     latency: its trigger would have arrived already. A newer word waits.
// In pairing mode a selected leading edge is sent together with the word
// after it when that is a trailing edge, even if outside the window; the
// pulse width is formed later in the readout buffer. If the oldest word is
// later than its successor, the time order is broken by a corrupted word:
// both are skipped, so that one bad word cannot block the machine. Words
// with a parity error are skipped as well. When the buffer has overflowed
// or a trigger could not be queued, a loss marker is sent for the event
// being completed. All of this behaviour is the document's, except the
// parity check, the handling of a lone trailing edge in pairing mode (it is
// skipped), the margins and the trigger queue, which are this design's.
//
// Triggers are queued (TQ_DEPTH) so that overlapping windows are served in
// turn. In untriggered mode (cfg.triggered = 0) every word is sent.
// Timestamps are compared modulo 2^27, so the counter may wrap.
//
// Interface: all on clk. now is the current coarse time (binary, logic
// domain). trig_* is a one-cycle trigger announcement. out_* is a
// valid/ready stream; out_last is low only on the leading word of a pair.
// One decision per cycle; a sent word takes at least one cycle.
module trigger_fsm
  import tdc_pkg::*;
#(
  parameter int unsigned L1_DEPTH       = 32,
  parameter int unsigned TQ_DEPTH       = 4,
  parameter int unsigned DONE_MARGIN    = 16,  // coarse counts after window end
  parameter int unsigned DISCARD_MARGIN = 4    // coarse counts beyond latency
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  trig_cfg_t                    cfg,
  input  logic [COARSE_W-1:0]          now,
  input  logic                         trig_valid,
  input  logic [COARSE_W-1:0]          trig_start,
  input  logic [EVT_W-1:0]             trig_evt,
  // level-1 buffer
  input  logic [$clog2(L1_DEPTH+1)-1:0] l1_count,
  input  l1_word_t                     l1_data0,
  input  l1_word_t                     l1_data1,
  output logic [$clog2(L1_DEPTH+1)-1:0] l1_off0,
  output logic [$clog2(L1_DEPTH+1)-1:0] l1_off1,
  output logic [1:0]                   l1_pop,
  input  logic                         l1_lost,
  output logic                         l1_lost_clr,
  // to the channel merger
  output logic                         out_valid,
  input  logic                         out_ready,
  output trig_word_t                   out_word,
  output logic                         out_last,
  // event pulses, for monitoring
  output logic                         ev_discard,
  output logic                         ev_corrupt,
  output logic                         ev_done
);

  localparam int unsigned CW  = $clog2(L1_DEPTH + 1);
  localparam int unsigned TQW = $clog2(TQ_DEPTH);

  typedef enum logic [1:0] { S_RUN, S_SEND, S_PAIR, S_LOSS } state_e;

  state_e          state_q, state_d;
  logic [CW-1:0]   scan_q, scan_d;

  // trigger queue
  logic [COARSE_W-1:0] tq_start [TQ_DEPTH];
  logic [EVT_W-1:0]    tq_evt   [TQ_DEPTH];
  logic [TQW-1:0]      tq_head_q, tq_tail_q;
  logic [TQW:0]        tq_cnt_q;
  logic                tq_pop, tq_lost_q;

  function automatic logic older(ts_t a, ts_t b);
    ts_t d;
    d = a - b;
    return d[TS_W-1];
  endfunction

  ts_t  s_ts, e_ts, now_ts, w_ts;
  logic have_w, have_nxt, tq_any, lost_any, w_perr, order_err, pairing_lead;
  l1_word_t w, nxt;

  always_comb begin
    w        = l1_data0;
    nxt      = l1_data1;
    have_w   = scan_q < l1_count;
    have_nxt = (scan_q + 1'b1) < l1_count;
    tq_any   = tq_cnt_q != 0;
    lost_any = l1_lost || tq_lost_q;
    s_ts     = {tq_start[tq_head_q], {FINE_W{1'b0}}};
    e_ts     = s_ts + {cfg.window, {FINE_W{1'b0}}};
    now_ts   = {now, {FINE_W{1'b0}}};
    w_perr   = l1_parity(w.trailing, w.ts) != w.par;
    order_err = have_nxt && (scan_q == 0) && older(nxt.ts, w.ts);
    pairing_lead = cfg.pairing && !w.trailing;
    w_ts     = (cfg.triggered && cfg.relative) ? w.ts - s_ts : w.ts;
  end

  always_comb begin
    state_d     = state_q;
    scan_d      = scan_q;
    l1_pop      = 2'd0;
    l1_lost_clr = 1'b0;
    tq_pop      = 1'b0;
    out_valid   = 1'b0;
    out_last    = 1'b1;
    out_word    = '{evt: '0, trailing: w.trailing, loss: 1'b0, ts: w_ts};
    ev_discard  = 1'b0;
    ev_corrupt  = 1'b0;
    ev_done     = 1'b0;

    unique case (state_q)
      S_RUN: begin
        if (!cfg.triggered) begin
          if (lost_any)                 state_d = S_LOSS;
          else if (have_w && w_perr)  begin l1_pop = 2'd1; ev_corrupt = 1'b1; end
          else if (have_w)              state_d = S_SEND;
        end else if (tq_any) begin
          if (!have_w) begin
            if (older(e_ts + {COARSE_W'(DONE_MARGIN), {FINE_W{1'b0}}}, now_ts)) begin
              if (lost_any) state_d = S_LOSS;
              else begin tq_pop = 1'b1; scan_d = '0; ev_done = 1'b1; end
            end
          end else if (w_perr || order_err) begin
            ev_corrupt = 1'b1;
            if (scan_q != 0)    scan_d = scan_q + 1'b1;
            else if (order_err) l1_pop = 2'd2;
            else                l1_pop = 2'd1;
          end else if (older(w.ts, s_ts)) begin
            if (scan_q == 0) begin l1_pop = 2'd1; ev_discard = 1'b1; end
            else scan_d = scan_q + 1'b1;
          end else if (older(w.ts, e_ts)) begin
            if (cfg.pairing && w.trailing) scan_d = scan_q + 1'b1;
            else                           state_d = S_SEND;
          end else begin
            if (lost_any) state_d = S_LOSS;
            else begin tq_pop = 1'b1; scan_d = '0; ev_done = 1'b1; end
          end
        end else if (lost_any) begin
          state_d = S_LOSS;
        end else if (have_w) begin
          if (w_perr || order_err) begin
            ev_corrupt = 1'b1;
            l1_pop = order_err ? 2'd2 : 2'd1;
          end else if (older(w.ts + {cfg.latency, {FINE_W{1'b0}}}
                               + {COARSE_W'(DISCARD_MARGIN), {FINE_W{1'b0}}}, now_ts)) begin
            l1_pop = 2'd1;
            ev_discard = 1'b1;
          end
        end
      end

      S_SEND: begin
        // A leading edge in pairing mode waits for its successor.
        if (!(pairing_lead && !have_nxt)) begin
          out_valid     = 1'b1;
          out_word.evt  = cfg.triggered ? tq_evt[tq_head_q] : '0;
          out_last      = !(pairing_lead && nxt.trailing &&
                          l1_parity(nxt.trailing, nxt.ts) == nxt.par);
          if (out_ready) begin
            if (!out_last)             state_d = S_PAIR;
            else begin
              state_d = S_RUN;
              if (cfg.triggered) scan_d = scan_q + 1'b1;
              else               l1_pop = 2'd1;
            end
          end
        end
      end

      S_PAIR: begin
        out_valid         = 1'b1;
        out_word.evt      = cfg.triggered ? tq_evt[tq_head_q] : '0;
        out_word.trailing = 1'b1;
        out_word.ts       = (cfg.triggered && cfg.relative) ? nxt.ts - s_ts : nxt.ts;
        if (out_ready) begin
          state_d = S_RUN;
          if (cfg.triggered) scan_d = scan_q + CW'(2);
          else               l1_pop = 2'd2;
        end
      end

      S_LOSS: begin
        out_valid     = 1'b1;
        out_word.loss = 1'b1;
        out_word.ts   = now_ts;
        out_word.evt  = (cfg.triggered && tq_any) ? tq_evt[tq_head_q] : '0;
        if (out_ready) begin
          l1_lost_clr = 1'b1;
          state_d     = S_RUN;
          if (cfg.triggered && tq_any) begin
            tq_pop = 1'b1; scan_d = '0; ev_done = 1'b1;
          end
        end
      end

      default: state_d = S_RUN;
    endcase
  end

  assign l1_off0 = scan_q;
  assign l1_off1 = scan_q + 1'b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q   <= S_RUN;
      scan_q    <= '0;
      tq_head_q <= '0;
      tq_tail_q <= '0;
      tq_cnt_q  <= '0;
      tq_lost_q <= 1'b0;
    end else begin
      state_q <= state_d;
      scan_q  <= scan_d;
      if (trig_valid && cfg.triggered && tq_cnt_q != (TQW+1)'(TQ_DEPTH))
        tq_tail_q <= TQW'((32'(tq_tail_q) + 1) % TQ_DEPTH);
      if (tq_pop) tq_head_q <= TQW'((32'(tq_head_q) + 1) % TQ_DEPTH);
      tq_cnt_q <= tq_cnt_q
                + (TQW+1)'(trig_valid && cfg.triggered && tq_cnt_q != (TQW+1)'(TQ_DEPTH))
                - (TQW+1)'(tq_pop);
      if (trig_valid && cfg.triggered && tq_cnt_q == (TQW+1)'(TQ_DEPTH))
        tq_lost_q <= 1'b1;
      else if (l1_lost_clr)
        tq_lost_q <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (trig_valid && cfg.triggered && tq_cnt_q != (TQW+1)'(TQ_DEPTH)) begin
      tq_start[tq_tail_q] <= trig_start;
      tq_evt[tq_tail_q]   <= trig_evt;
    end
  end

endmodule
