// tgc_clk_pkg: constants and types shared by the TGC clock-distribution RTL.
//
// The Sector Logic (SL) sends one frame of WORDS_PER_BC 32-bit words per
// 25 ns LHC bunch crossing over an 8b/10b link running with a 200 MHz word
// clock (40 bits per word, 8 Gb/s). The first word of each frame is the
// header: a K28.5 comma in byte 0, the timing (TTC) byte in byte 1 and 16
// user bits. Words 1..4 carry 128 payload bits. The frame layout and the TTC
// bit assignment are this design's choice; the 5-word frame follows from
// the 200 MHz / 40 MHz clock ratio.
package tgc_clk_pkg;

  localparam int WORDS_PER_BC = 5;        // 200 MHz words per 40 MHz crossing

  localparam logic [7:0] K28_5     = 8'hBC;

  // TTC byte bit positions.
  localparam int TTC_BCR  = 0;            // bunch counter reset, once per orbit
  localparam int TTC_T200 = 1;            // 200 kHz test clock level

  // MMCM fine phase shift: 1/56 of a 1 GHz VCO period = 17.86 ps, so one
  // 25 ns UI of the 40 MHz clock is 1400 steps.
  localparam int FINE_STEPS_PER_UI = 1400;
  localparam int FINE_W            = 11;

  typedef enum logic [1:0] {
    DEC_RESET  = 2'd0,
    DEC_SEARCH = 2'd1,
    DEC_WAIT   = 2'd2,
    DEC_LOCKED = 2'd3
  } dec_state_e;

endpackage
