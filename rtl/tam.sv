// tam: Timing Alignment Master of one 1/12 sector.
//
// The TAM receives the Sector Logic link like a PS board (ps_clock_path)
// and so holds a reconstructed, coarse- and fine-delayed copy of the LHC
// clock. It has two jobs in the phase alignment:
//  * Between sectors: it scans the clock of the TAM of the next sector
//    (nb_clk, and nb_200k for the coarse scan) against a phase-shifted copy
//    of its own clock (scan_clk, from a second MMCM driven through scan_ps*),
//    using a one-channel phase_monitor. The TAMs' delays are then set so
//    that all sectors share one clock phase.
//  * Within the sector: its aligned clock and 200 kHz clock are fanned out
//    to NJAT JATHubs as their reference, so all JATHubs measure their PS
//    boards against the same phase.
// Clock domains: rx_clk (link, 200 MHz), clk40_fine (own clock after the
// fine delay and jitter cleaner), scan_clk (scan reference). rst must be
// held for several cycles of each clock. Fan-out as plain wires is this
// design's choice; the board uses clock buffers there.
module tam
  import tgc_clk_pkg::*;
#(
  parameter int NJAT         = 6,
  parameter int COARSE_DEPTH = 32,
  parameter int NSAMPLES     = 1000,
  localparam int DW = $clog2(COARSE_DEPTH),
  localparam int SW = $clog2(FINE_STEPS_PER_UI + 1),
  localparam int CW = $clog2(NSAMPLES + 1)
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
  input  logic              clk40_fine,
  output logic              aligned,
  output logic              locked,
  output logic              fine_ok,
  output logic [7:0]        ttc_dly,
  // neighbour-sector monitor
  input  logic              scan_clk,
  input  logic              scan_mmcm_locked,
  output logic              scan_psen,
  output logic              scan_psincdec,
  input  logic              scan_psdone,
  input  logic              nb_clk,
  input  logic              nb_200k,
  input  logic              scan_start,
  input  logic              scan_coarse,
  input  logic [SW-1:0]     scan_n_steps,
  output logic              scan_busy,
  output logic              scan_done,
  input  logic [SW-1:0]     rd_step,
  output logic [CW-1:0]     rd_count,
  // reference for the JATHubs
  output logic [NJAT-1:0]   ref_clk_out,
  output logic [NJAT-1:0]   ref_200k_out
);

  logic              mon_200k;
  logic              bc_strobe;
  logic [3:0]        code_err;
  logic [FINE_W-1:0] fine_pos;
  logic [15:0]       user16;
  logic [127:0]      payload;

  ps_clock_path #(.COARSE_DEPTH(COARSE_DEPTH)) u_path (
    .rx_clk     (rx_clk),
    .rst        (rst),
    .rx_word    (rx_word),
    .rx_slide   (rx_slide),
    .coarse_dly (coarse_dly),
    .fine_dly   (fine_dly),
    .rec_clk40  (rec_clk40),
    .mmcm_locked(mmcm_locked),
    .psen       (psen),
    .psincdec   (psincdec),
    .psdone     (psdone),
    .fine_ok    (fine_ok),
    .fine_pos   (fine_pos),
    .clk40_fine (clk40_fine),
    .mon_200k   (mon_200k),
    .aligned    (aligned),
    .code_err   (code_err),
    .locked     (locked),
    .bc_strobe  (bc_strobe),
    .ttc_dly    (ttc_dly),
    .user16     (user16),
    .payload    (payload)
  );

  phase_monitor #(
    .NCH      (1),
    .NSAMPLES (NSAMPLES),
    .MAX_STEPS(FINE_STEPS_PER_UI)
  ) u_nb_mon (
    .clk_ref    (scan_clk),
    .rst        (rst),
    .mon_clk    (nb_clk),
    .mon_200k   (nb_200k),
    .ref_200k   (mon_200k),
    .start      (scan_start),
    .coarse     (scan_coarse),
    .n_steps    (scan_n_steps),
    .busy       (scan_busy),
    .done       (scan_done),
    .mmcm_locked(scan_mmcm_locked),
    .psen       (scan_psen),
    .psincdec   (scan_psincdec),
    .psdone     (scan_psdone),
    .rd_step    (rd_step),
    .rd_ch      (1'b0),
    .rd_count   (rd_count)
  );

  assign ref_clk_out  = {NJAT{clk40_fine}};
  assign ref_200k_out = {NJAT{mon_200k}};

endmodule
