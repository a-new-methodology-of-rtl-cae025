// phase_monitor: clock phase scan of NCH monitored clocks against a
// phase-shifted reference (JATHub phase monitor; also used in the TAM).
//
// Measurement principle: each monitored clock is latched on the rising
// edge of the reference clock NSAMPLES times and the number of highs is
// counted. Where the reference edge falls in the high half of the
// monitored clock the count is NSAMPLES, in the low half 0, and near an
// edge of the monitored clock it lies in between (jitter), so about
// NSAMPLES/2 marks the edge. The reference phase is then moved one step and
// the measurement repeated, scanning one unit interval:
//   fine mode   (coarse = 0): the 40 MHz monitored clock; each step moves the
//               reference MMCM by one fine step (18 ps) through the
//               PSEN/PSINCDEC/PSDONE port, for n_steps steps from 0.
//   coarse mode (coarse = 1): the 200 kHz monitor clock; one sample is taken
//               per 200 kHz period, 'step' reference cycles after the rising
//               edge of ref_200k, so each step is 25 ns; n_steps up to
//               COARSE_UI covers the 5 us unit interval.
// All channels are counted in parallel. After SETTLE cycles at each new
// phase, the NCH counts are written as one row of a MAX_STEPS-row result
// array, which the processor reads through rd_step/rd_ch (rd_count valid one
// cycle after rd_step, rd_ch selects combinationally). The edge search is
// left to software.
//
// Every monitored input is latched by one flip-flop (the measuring latch)
// and passed through a second one before counting. The latch count, the
// step sizes and the scan follow the design's description; the coarse
// sampling scheme, the result array and the handshake are this design's
// choices. start is sampled while idle or done and launches a scan; done
// stays high from the end of a scan until the next start. Coarse mode needs
// ref_200k to toggle, or the scan waits. Everything runs on clk_ref,
// which also serves as the MMCM's phase-shift clock; rst is synchronous to
// it, and the monitor also stays in reset while mmcm_locked is low.
module phase_monitor #(
  parameter int NCH       = 11,
  parameter int NSAMPLES  = 1000,
  parameter int MAX_STEPS = 1400,
  parameter int COARSE_UI = 200,
  parameter int SETTLE    = 16,
  localparam int CW = $clog2(NSAMPLES + 1),
  localparam int SW = $clog2(MAX_STEPS + 1),
  localparam int HW = (NCH > 1) ? $clog2(NCH) : 1
) (
  input  logic            clk_ref,
  input  logic            rst,
  input  logic [NCH-1:0]  mon_clk,
  input  logic [NCH-1:0]  mon_200k,
  input  logic            ref_200k,
  // scan command
  input  logic            start,
  input  logic            coarse,
  input  logic [SW-1:0]   n_steps,
  output logic            busy,
  output logic            done,
  // reference MMCM phase shift
  input  logic            mmcm_locked,
  output logic            psen,
  output logic            psincdec,
  input  logic            psdone,
  // result read port
  input  logic [SW-1:0]   rd_step,
  input  logic [HW-1:0]   rd_ch,
  output logic [CW-1:0]   rd_count
);

  typedef enum logic [2:0] {
    S_IDLE, S_SHIFT, S_SETTLE, S_MEASURE, S_WRITE, S_DONE
  } state_e;

  state_e state;

  // The reference clock may only start after the board's reset, so the
  // monitor is also held in reset while its reference MMCM is unlocked.
  logic rst_mon;
  assign rst_mon = rst || !mmcm_locked;

  // Measuring latch and second stage.
  logic [NCH-1:0] lat_clk, syn_clk, lat_200k, syn_200k;
  logic [2:0]     ref_sync;
  logic           ref_rise;

  always_ff @(posedge clk_ref) begin
    lat_clk  <= mon_clk;
    syn_clk  <= lat_clk;
    lat_200k <= mon_200k;
    syn_200k <= lat_200k;
    ref_sync <= {ref_sync[1:0], ref_200k};
  end

  assign ref_rise = ref_sync[1] && !ref_sync[2];

  // Reference cycles since the last 200 kHz reference edge.
  logic [$clog2(COARSE_UI+1)-1:0] ref_phase;

  always_ff @(posedge clk_ref) begin
    if (rst_mon || ref_rise) ref_phase <= '0;
    else if (int'(ref_phase) < COARSE_UI) ref_phase <= ref_phase + 1'b1;
  end

  // Reference MMCM phase follows the current step in fine mode.
  logic [SW-1:0] step;
  logic [$clog2(MAX_STEPS)-1:0] fine_target, fine_pos;
  logic          fine_ok;
  logic          coarse_q;

  assign fine_target = coarse_q ? '0 : step[$clog2(MAX_STEPS)-1:0];

  fine_delay_ctrl #(.STEPS_PER_UI(MAX_STEPS)) u_ref_shift (
    .clk        (clk_ref),
    .rst        (rst_mon),
    .mmcm_locked(mmcm_locked),
    .target     (fine_target),
    .psen       (psen),
    .psincdec   (psincdec),
    .psdone     (psdone),
    .position   (fine_pos),
    .at_target  (fine_ok)
  );

  logic [CW-1:0]              nsamp;
  logic [CW-1:0]              cnt [NCH];
  logic [$clog2(SETTLE+1)-1:0] wait_cnt;
  logic [SW-1:0]              nsteps_q;
  logic                       sample_en;

  // Fine mode samples every cycle; coarse mode once per 200 kHz period,
  // 'step' cycles after the reference edge.
  assign sample_en = (state == S_MEASURE) &&
                     (!coarse_q || int'(ref_phase) == int'(step));

  // Result array: one row of NCH counts per step.
  logic [NCH*CW-1:0] mem [MAX_STEPS];
  logic [NCH*CW-1:0] row;
  logic [NCH*CW-1:0] rd_row;

  always_comb begin
    for (int c = 0; c < NCH; c++) row[c*CW +: CW] = cnt[c];
  end

  always_ff @(posedge clk_ref) begin
    if (state == S_WRITE) mem[step] <= row;
    rd_row <= mem[rd_step];
  end

  assign rd_count = rd_row[rd_ch*CW +: CW];

  always_ff @(posedge clk_ref) begin
    if (rst_mon) begin
      state    <= S_IDLE;
      step     <= '0;
      nsamp    <= '0;
      wait_cnt <= '0;
      nsteps_q <= '0;
      coarse_q <= 1'b0;
      for (int c = 0; c < NCH; c++) cnt[c] <= '0;
    end else begin
      unique case (state)
        S_IDLE, S_DONE: if (start && n_steps != '0) begin
          step     <= '0;
          nsteps_q <= (int'(n_steps) > MAX_STEPS) ? SW'(MAX_STEPS) : n_steps;
          coarse_q <= coarse;
          state    <= S_SHIFT;
        end
        S_SHIFT: if (fine_ok && fine_pos == fine_target) begin
          wait_cnt <= '0;
          state    <= S_SETTLE;
        end
        S_SETTLE: if (int'(wait_cnt) == SETTLE) begin
          nsamp <= '0;
          for (int c = 0; c < NCH; c++) cnt[c] <= '0;
          state <= S_MEASURE;
        end else begin
          wait_cnt <= wait_cnt + 1'b1;
        end
        S_MEASURE: begin
          if (int'(nsamp) == NSAMPLES) begin
            state <= S_WRITE;
          end else if (sample_en) begin
            nsamp <= nsamp + 1'b1;
            for (int c = 0; c < NCH; c++)
              cnt[c] <= cnt[c] + CW'(coarse_q ? syn_200k[c] : syn_clk[c]);
          end
        end
        S_WRITE: begin
          if (step == nsteps_q - 1'b1) begin
            state <= S_DONE;
          end else begin
            step  <= step + 1'b1;
            state <= S_SHIFT;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE) && (state != S_DONE);
  assign done = (state == S_DONE);

endmodule
