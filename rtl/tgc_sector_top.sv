// tgc_sector_top: clock distribution and phase alignment of one 1/12
// sector of the TGC front-end system.
//
// The Sector Logic builds one frame per bunch crossing (sl_packet_former)
// and 8b/10b-encodes it (enc8b10b_word); the same 40-bit word stream goes
// to every PS board and to the TAM over its own fibre (tx_word is that
// stream; the transceivers and fibres are outside). Each of the NPS PS
// boards and the TAM rebuild the LHC clock with fixed latency
// (ps_clock_path) and delay it by their coarse/fine parameters. The TAM
// hands its aligned clock and 200 kHz clock to the JATHub as reference;
// the JATHub's phase_monitor scans the NPS PS-board clocks against it.
// Software reads the scan, finds each board's clock edge and writes new
// delay parameters, closing the loop.
//
// Outside this module, and reached through its ports: the transceivers
// (rx_word/rx_slide, one rx_clk per board), the MMCMs (rec_clk40 out,
// clk40_fine back, *_ps* phase-shift ports), jitter cleaners, the cables
// carrying the PS-board clocks to the JATHub (jat_mon_clk/jat_mon_200k)
// and the JATHub's reference MMCM (jat_clk_ref, driven from
// tam_ref_clk_out[0]). Only one of the NJAT JATHubs served by the TAM is
// instantiated; the other reference outputs are ports. rst must be held
// for several cycles of every clock.
module tgc_sector_top
  import tgc_clk_pkg::*;
#(
  parameter int NPS          = 11,
  parameter int NJAT         = 6,
  parameter int COARSE_DEPTH = 32,
  parameter int NSAMPLES     = 1000,
  localparam int DW = $clog2(COARSE_DEPTH),
  localparam int SW = $clog2(FINE_STEPS_PER_UI + 1),
  localparam int CW = $clog2(NSAMPLES + 1),
  localparam int HW = (NPS > 1) ? $clog2(NPS) : 1
) (
  input  logic                         rst,
  // Sector Logic transmit side
  input  logic                         clk_sl,
  input  logic [127:0]                 sl_payload,
  input  logic [15:0]                  sl_user16,
  output logic [39:0]                  tx_word,
  // PS boards
  input  logic [NPS-1:0]               ps_rx_clk,
  input  logic [NPS-1:0][39:0]         ps_rx_word,
  output logic [NPS-1:0]               ps_rx_slide,
  input  logic [NPS-1:0][DW-1:0]       ps_coarse_dly,
  input  logic [NPS-1:0][FINE_W-1:0]   ps_fine_dly,
  output logic [NPS-1:0]               ps_rec_clk40,
  input  logic [NPS-1:0]               ps_mmcm_locked,
  output logic [NPS-1:0]               ps_psen,
  output logic [NPS-1:0]               ps_psincdec,
  input  logic [NPS-1:0]               ps_psdone,
  output logic [NPS-1:0]               ps_fine_ok,
  input  logic [NPS-1:0]               ps_clk40_fine,
  output logic [NPS-1:0]               ps_mon_200k,
  output logic [NPS-1:0]               ps_locked,
  output logic [NPS-1:0][7:0]          ps_ttc_dly,
  // TAM
  input  logic                         tam_rx_clk,
  input  logic [39:0]                  tam_rx_word,
  output logic                         tam_rx_slide,
  input  logic [DW-1:0]                tam_coarse_dly,
  input  logic [FINE_W-1:0]            tam_fine_dly,
  output logic                         tam_rec_clk40,
  input  logic                         tam_mmcm_locked,
  output logic                         tam_psen,
  output logic                         tam_psincdec,
  input  logic                         tam_psdone,
  input  logic                         tam_clk40_fine,
  output logic                         tam_locked,
  output logic                         tam_fine_ok,
  input  logic                         tam_scan_clk,
  input  logic                         tam_scan_mmcm_locked,
  output logic                         tam_scan_psen,
  output logic                         tam_scan_psincdec,
  input  logic                         tam_scan_psdone,
  input  logic                         tam_nb_clk,
  input  logic                         tam_nb_200k,
  input  logic                         tam_scan_start,
  input  logic                         tam_scan_coarse,
  input  logic [SW-1:0]                tam_scan_n_steps,
  output logic                         tam_scan_busy,
  output logic                         tam_scan_done,
  input  logic [SW-1:0]                tam_rd_step,
  output logic [CW-1:0]                tam_rd_count,
  output logic [NJAT-1:0]              tam_ref_clk_out,
  output logic [NJAT-1:0]              tam_ref_200k_out,
  // JATHub
  input  logic                         jat_clk_ref,
  input  logic                         jat_mmcm_locked,
  output logic                         jat_psen,
  output logic                         jat_psincdec,
  input  logic                         jat_psdone,
  input  logic [NPS-1:0]               jat_mon_clk,
  input  logic [NPS-1:0]               jat_mon_200k,
  input  logic                         jat_start,
  input  logic                         jat_coarse,
  input  logic [SW-1:0]                jat_n_steps,
  output logic                         jat_busy,
  output logic                         jat_done,
  input  logic [SW-1:0]                jat_rd_step,
  input  logic [HW-1:0]                jat_rd_ch,
  output logic [CW-1:0]                jat_rd_count
);

  // ---------------- Sector Logic ----------------
  logic [31:0] sl_word;
  logic [3:0]  sl_k;
  logic [2:0]  sl_idx;
  logic        sl_bc;

  sl_packet_former u_sl_frame (
    .clk      (clk_sl),
    .rst      (rst),
    .payload  (sl_payload),
    .user16   (sl_user16),
    .word     (sl_word),
    .is_k     (sl_k),
    .word_idx (sl_idx),
    .bc_strobe(sl_bc)
  );

  enc8b10b_word u_sl_enc (
    .clk (clk_sl),
    .rst (rst),
    .data(sl_word),
    .is_k(sl_k),
    .code(tx_word)
  );

  // ---------------- PS boards ----------------
  for (genvar i = 0; i < NPS; i++) begin : g_ps
    logic         aligned, bc_strobe;
    logic [3:0]   code_err;
    logic [FINE_W-1:0] fine_pos;
    logic [15:0]  user16;
    logic [127:0] payload;

    ps_clock_path #(.COARSE_DEPTH(COARSE_DEPTH)) u_path (
      .rx_clk     (ps_rx_clk[i]),
      .rst        (rst),
      .rx_word    (ps_rx_word[i]),
      .rx_slide   (ps_rx_slide[i]),
      .coarse_dly (ps_coarse_dly[i]),
      .fine_dly   (ps_fine_dly[i]),
      .rec_clk40  (ps_rec_clk40[i]),
      .mmcm_locked(ps_mmcm_locked[i]),
      .psen       (ps_psen[i]),
      .psincdec   (ps_psincdec[i]),
      .psdone     (ps_psdone[i]),
      .fine_ok    (ps_fine_ok[i]),
      .fine_pos   (fine_pos),
      .clk40_fine (ps_clk40_fine[i]),
      .mon_200k   (ps_mon_200k[i]),
      .aligned    (aligned),
      .code_err   (code_err),
      .locked     (ps_locked[i]),
      .bc_strobe  (bc_strobe),
      .ttc_dly    (ps_ttc_dly[i]),
      .user16     (user16),
      .payload    (payload)
    );
  end

  // ---------------- TAM ----------------
  logic tam_aligned;
  logic [7:0] tam_ttc_dly;

  tam #(
    .NJAT(NJAT), .COARSE_DEPTH(COARSE_DEPTH), .NSAMPLES(NSAMPLES)
  ) u_tam (
    .rx_clk          (tam_rx_clk),
    .rst             (rst),
    .rx_word         (tam_rx_word),
    .rx_slide        (tam_rx_slide),
    .coarse_dly      (tam_coarse_dly),
    .fine_dly        (tam_fine_dly),
    .rec_clk40       (tam_rec_clk40),
    .mmcm_locked     (tam_mmcm_locked),
    .psen            (tam_psen),
    .psincdec        (tam_psincdec),
    .psdone          (tam_psdone),
    .clk40_fine      (tam_clk40_fine),
    .aligned         (tam_aligned),
    .locked          (tam_locked),
    .fine_ok         (tam_fine_ok),
    .ttc_dly         (tam_ttc_dly),
    .scan_clk        (tam_scan_clk),
    .scan_mmcm_locked(tam_scan_mmcm_locked),
    .scan_psen       (tam_scan_psen),
    .scan_psincdec   (tam_scan_psincdec),
    .scan_psdone     (tam_scan_psdone),
    .nb_clk          (tam_nb_clk),
    .nb_200k         (tam_nb_200k),
    .scan_start      (tam_scan_start),
    .scan_coarse     (tam_scan_coarse),
    .scan_n_steps    (tam_scan_n_steps),
    .scan_busy       (tam_scan_busy),
    .scan_done       (tam_scan_done),
    .rd_step         (tam_rd_step),
    .rd_count        (tam_rd_count),
    .ref_clk_out     (tam_ref_clk_out),
    .ref_200k_out    (tam_ref_200k_out)
  );

  // ---------------- JATHub ----------------
  phase_monitor #(
    .NCH      (NPS),
    .NSAMPLES (NSAMPLES),
    .MAX_STEPS(FINE_STEPS_PER_UI)
  ) u_jathub_mon (
    .clk_ref    (jat_clk_ref),
    .rst        (rst),
    .mon_clk    (jat_mon_clk),
    .mon_200k   (jat_mon_200k),
    .ref_200k   (tam_ref_200k_out[0]),
    .start      (jat_start),
    .coarse     (jat_coarse),
    .n_steps    (jat_n_steps),
    .busy       (jat_busy),
    .done       (jat_done),
    .mmcm_locked(jat_mmcm_locked),
    .psen       (jat_psen),
    .psincdec   (jat_psincdec),
    .psdone     (jat_psdone),
    .rd_step    (jat_rd_step),
    .rd_ch      (jat_rd_ch),
    .rd_count   (jat_rd_count)
  );

endmodule
