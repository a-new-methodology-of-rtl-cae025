// ps_clock_path: fixed-latency clock reconstruction and delay of one PS
// board or TAM.
//
// The 40-bit words from the board's transceiver are decoded and aligned by
// fl_8b10b_decoder (which steers the transceiver's bit slide), and
// rx_packet_deformer rebuilds the 40 MHz LHC clock from the frame header.
// That clock (rec_clk40) leaves the FPGA logic for an MMCM whose output
// phase is set in fine steps (about 18 ps) by fine_delay_ctrl, and then for
// the board's jitter cleaner; the delayed clock returns as clk40_fine.
// The timing byte is delayed by whole bunch crossings in coarse_delay. The
// 200 kHz test clock in the delayed timing byte is retimed to clk40_fine
// and sent to the JATHub as mon_200k, the clock used for the coarse scan.
// The two delay parameters come from the board's configuration flash,
// which the Sector Logic rewrites after a scan.
//
// Clocks: rx_clk (the transceiver's 200 MHz RXUSRCLK2, also used as the
// MMCM phase-shift clock) and clk40_fine. rst is synchronous to rx_clk.
// Latency from the header word at rx_word to the rising edge of rec_clk40
// is a fixed 3 rx_clk cycles. The chain GTX -> decoder -> deformer -> delay
// -> jitter cleaner follows the design's description; retiming the 200 kHz
// clock on clk40_fine is this design's choice.
module ps_clock_path
  import tgc_clk_pkg::*;
#(
  parameter int COARSE_DEPTH = 32,
  localparam int DW = $clog2(COARSE_DEPTH)
) (
  input  logic              rx_clk,
  input  logic              rst,
  input  logic [39:0]       rx_word,
  output logic              rx_slide,
  input  logic [DW-1:0]     coarse_dly,
  input  logic [FINE_W-1:0] fine_dly,
  output logic              rec_clk40,
  input  logic              mmcm_locked,
  output logic              psen,
  output logic              psincdec,
  input  logic              psdone,
  output logic              fine_ok,
  output logic [FINE_W-1:0] fine_pos,
  input  logic              clk40_fine,
  output logic              mon_200k,
  output logic              aligned,
  output logic [3:0]        code_err,
  output logic              locked,
  output logic              bc_strobe,
  output logic [7:0]        ttc_dly,
  output logic [15:0]       user16,
  output logic [127:0]      payload
);

  logic [31:0] dec_data;
  logic [3:0]  dec_k;
  logic [7:0]  ttc;

  fl_8b10b_decoder u_dec (
    .clk     (rx_clk),
    .rst     (rst),
    .rx_word (rx_word),
    .rx_slide(rx_slide),
    .aligned (aligned),
    .data    (dec_data),
    .is_k    (dec_k),
    .code_err(code_err)
  );

  rx_packet_deformer u_deform (
    .clk      (rx_clk),
    .rst      (rst),
    .aligned  (aligned),
    .data     (dec_data),
    .is_k     (dec_k),
    .locked   (locked),
    .clk40    (rec_clk40),
    .bc_strobe(bc_strobe),
    .ttc      (ttc),
    .user16   (user16),
    .payload  (payload)
  );

  coarse_delay #(.W(8), .DEPTH(COARSE_DEPTH)) u_coarse (
    .clk      (rx_clk),
    .rst      (rst),
    .bc_strobe(bc_strobe),
    .delay    (coarse_dly),
    .din      (ttc),
    .dout     (ttc_dly)
  );

  fine_delay_ctrl #(.STEPS_PER_UI(FINE_STEPS_PER_UI)) u_fine (
    .clk        (rx_clk),
    .rst        (rst),
    .mmcm_locked(mmcm_locked),
    .target     (fine_dly),
    .psen       (psen),
    .psincdec   (psincdec),
    .psdone     (psdone),
    .position   (fine_pos),
    .at_target  (fine_ok)
  );

  always_ff @(posedge clk40_fine) mon_200k <= ttc_dly[TTC_T200];

endmodule
