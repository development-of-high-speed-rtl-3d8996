`timescale 1ps/1fs
// tdc_pkg: types and constants shared by the TDC130 channel pipeline.
//
// A hit timestamp is 27 bits: a 22-bit coarse count of the 1.28 GHz time-base
// clock (one count = 781.25 ps) above a 5-bit fine field that numbers the 32
// DLL bins (one bin = 24.4 ps). The 27-bit width is the document's; the 22/5
// split follows from its 32-element DLL. Everything else here (the edge flag,
// the parity bit, the readout word layout, the configuration record) is this
// design's own choice, since the readout format was left open.
package tdc_pkg;

  localparam int unsigned TAPS      = 32;               // DLL elements
  localparam int unsigned FINE_W    = $clog2(TAPS);     // 5
  localparam int unsigned TS_W      = 27;               // timestamp width
  localparam int unsigned COARSE_W  = TS_W - FINE_W;    // 22
  localparam int unsigned N_CH      = 32;               // channels, target chip
  localparam int unsigned CH_W      = $clog2(N_CH);     // channel identifier, 5 b
  localparam int unsigned EVT_W     = 8;                // event (trigger) number
  localparam int unsigned WIDTH_W   = 16;               // pulse width field

  typedef logic [TS_W-1:0]     ts_t;
  typedef logic [COARSE_W-1:0] coarse_t;

  // Which edges of the hit input the hit controller turns into a measurement.
  typedef enum logic [1:0] {
    EDGE_LEADING  = 2'd0,
    EDGE_TRAILING = 2'd1,
    EDGE_BOTH     = 2'd2,
    EDGE_NONE     = 2'd3
  } edge_sel_e;

  // One level-1 buffer word: timestamp, which edge it was, even parity.
  typedef struct packed {
    logic par;       // parity over {trailing, ts}
    logic trailing;  // 1 = trailing edge
    ts_t  ts;
  } l1_word_t;

  // Kind of a word leaving the chip.
  typedef enum logic [1:0] {
    RO_HIT  = 2'd0,  // single timestamp
    RO_PAIR = 2'd1,  // leading timestamp plus pulse width
    RO_LOSS = 2'd2   // data of this event were lost on this channel
  } ro_kind_e;

  // Word handed from a channel's trigger logic to the channel merger.
  typedef struct packed {
    logic [EVT_W-1:0] evt;
    logic             trailing;
    logic             loss;      // loss marker instead of a hit
    ts_t              ts;
  } trig_word_t;

  // Word of the channel merger: a trigger word tagged with its channel.
  typedef struct packed {
    logic [CH_W-1:0] ch;
    trig_word_t      w;
  } merge_word_t;

  // Word in the readout buffer and at the chip's readout port.
  typedef struct packed {
    ro_kind_e         kind;
    logic [CH_W-1:0]  ch;
    logic [EVT_W-1:0] evt;
    logic             trailing;
    ts_t              ts;
    logic [WIDTH_W-1:0] width;   // pulse width in bins for RO_PAIR
  } ro_word_t;

  // Run-time configuration of the target chip (common to all channels,
  // except the per-channel enable mask and edge selection).
  typedef struct packed {
    logic             triggered;    // 1: trigger matching, 0: every hit read out
    logic             pairing;      // read leading+trailing as a pair, report width
    logic             relative;     // timestamps relative to the window start
    logic [COARSE_W-1:0] latency;   // trigger latency, coarse counts
    logic [COARSE_W-1:0] window;    // trigger window width, coarse counts
  } trig_cfg_t;

  // Configuration word of the TDC130-0820 prototype, loaded through the
  // configuration shift register (bit 0 is the first bit shifted in).
  typedef struct packed {
    logic [1:0]        test_sel;  // test output: 0 PLL input, 1 divider, 2 late, 3 tracking
    logic              force_dn;  // with force_en: charge pump forced down
    logic              force_en;  // override the DLL start-up state machine
    logic [1:0]        icp_sel;   // DLL charge pump current, x1 .. x8
    logic [3*TAPS-1:0] cal;       // 3 calibration enables per delay element
  } proto_cfg_t;

  localparam int unsigned PROTO_CFG_W = $bits(proto_cfg_t);   // 102

  // Even parity of a level-1 word's payload.
  function automatic logic l1_parity(logic trailing, ts_t ts);
    return ^{trailing, ts};
  endfunction

  // Gray code conversions for the coarse counter.
  function automatic coarse_t bin2gray(coarse_t b);
    return b ^ (b >> 1);
  endfunction

  function automatic coarse_t gray2bin(coarse_t g);
    coarse_t b;
    b[COARSE_W-1] = g[COARSE_W-1];
    for (int i = COARSE_W - 2; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

endpackage
