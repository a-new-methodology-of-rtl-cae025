// rx_packet_deformer: rebuilds the 40 MHz LHC clock from the frame header.
//
// A word counter (0..WORDS_PER_BC-1) runs on the 200 MHz word clock and is
// reloaded to 0 by a header word (K28.5 in byte 0). The first header only
// starts the counter; after LOCK_FRAMES further consecutive headers that
// arrive exactly where the counter expects them, the deformer is locked; UNLOCK_FRAMES consecutive frames
// with a missing header unlock it. While locked, clk40 is high during words
// 0, 1 and 2 of each frame and low during words 3 and 4, so its rising edge
// always sits a fixed number of word-clock cycles after the header: the
// clock phase depends only on where the sender put the header. Only the
// rising edge is meant to be used; the MMCM and jitter cleaner downstream
// restore a 50% duty cycle. bc_strobe pulses for one cycle once the last
// word of a frame is in, with ttc (header byte 1), user16 and the 128-bit
// payload of words 1..4 valid from then until the next strobe.
//
// Timing: clk40 rises 1 cycle after the header word is at the input;
// bc_strobe follows the last payload word by 1 cycle. The 60% duty cycle
// and lock thresholds are this design's own choices.
module rx_packet_deformer
  import tgc_clk_pkg::*;
#(
  parameter int LOCK_FRAMES   = 4,
  parameter int UNLOCK_FRAMES = 4
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         aligned,
  input  logic [31:0]  data,
  input  logic [3:0]   is_k,
  output logic         locked,
  output logic         clk40,
  output logic         bc_strobe,
  output logic [7:0]   ttc,
  output logic [15:0]  user16,
  output logic [127:0] payload
);

  logic        header;
  logic [2:0]  idx;          // position of the current input word
  logic        idx_valid;
  logic [$clog2(LOCK_FRAMES+1)-1:0]   good;
  logic [$clog2(UNLOCK_FRAMES+1)-1:0] miss;
  logic [7:0]   ttc_s;
  logic [15:0]  user_s;
  logic [95:0]  pay_s;

  assign header = aligned && is_k[3] && (data[31:24] == K28_5);

  always_ff @(posedge clk) begin
    if (rst) begin
      idx       <= '0;
      idx_valid <= 1'b0;
      good      <= '0;
      miss      <= '0;
      locked    <= 1'b0;
      clk40     <= 1'b0;
      bc_strobe <= 1'b0;
      ttc       <= '0;
      user16    <= '0;
      payload   <= '0;
      ttc_s     <= '0;
      user_s    <= '0;
      pay_s     <= '0;
    end else begin
      bc_strobe <= 1'b0;
      if (header) begin
        // word 0 of a frame
        idx       <= 3'd1;
        idx_valid <= 1'b1;
        ttc_s     <= data[23:16];
        user_s    <= data[15:0];
        miss      <= '0;
        if (idx_valid && idx == 3'd0) begin
          if (int'(good) < LOCK_FRAMES) good <= good + 1'b1;
          if (int'(good) >= LOCK_FRAMES - 1) locked <= 1'b1;
        end else begin
          good <= '0;
        end
      end else if (idx_valid) begin
        if (idx == 3'd0) begin
          // header expected but missing
          good <= '0;
          if (int'(miss) == UNLOCK_FRAMES - 1) begin
            locked    <= 1'b0;
            idx_valid <= 1'b0;
            miss      <= '0;
          end else begin
            miss <= miss + 1'b1;
          end
        end
        if (int'(idx) == WORDS_PER_BC - 1) begin
          idx <= '0;
          if (locked) begin
            bc_strobe <= 1'b1;
            ttc       <= ttc_s;
            user16    <= user_s;
            payload   <= {pay_s, data};
          end
        end else begin
          idx <= idx + 1'b1;
          unique case (idx)
            3'd1: pay_s[95:64] <= data;
            3'd2: pay_s[63:32] <= data;
            3'd3: pay_s[31:0]  <= data;
            default: ;
          endcase
        end
      end
      // Reconstructed clock: high for words 0..2 of each frame.
      clk40 <= locked && (header || (idx_valid && idx <= 3'd2));
    end
  end

endmodule
