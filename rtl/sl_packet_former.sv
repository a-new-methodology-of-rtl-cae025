// sl_packet_former: Sector Logic frame builder for the clock/timing link.
//
// The SL sends its LHC clock to every PS board and TAM as data: each 25 ns
// bunch crossing becomes a frame of five 32-bit words at the 200 MHz word
// clock, and the receiver rebuilds the 40 MHz clock from the position of
// the frame header. This module counts the word position (0..4), a bunch
// crossing counter within the orbit and the 200 kHz test clock, and outputs
//   word 0: {K28.5, TTC byte, user16}   (is_k = 4'b1000)
//   words 1..4: payload[127:96], [95:64], [63:32], [31:0]
// TTC bit 0 is the bunch-counter reset (first crossing of each orbit of
// BC_PER_ORBIT crossings), bit 1 the 200 kHz test clock, high for the first
// TEST_DIV/2 crossings of each TEST_DIV-crossing period; other bits are 0.
// payload and user16 are sampled when their word is sent. bc_strobe marks
// the header word. Outputs are registered, one word per clock. The frame
// layout and TTC assignment are this design's own choice.
module sl_packet_former
  import tgc_clk_pkg::*;
#(
  parameter int BC_PER_ORBIT = 3564,
  parameter int TEST_DIV     = 200
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [127:0] payload,
  input  logic [15:0]  user16,
  output logic [31:0]  word,
  output logic [3:0]   is_k,
  output logic [2:0]   word_idx,
  output logic         bc_strobe
);

  logic [2:0]  idx;
  logic [11:0] bcid;
  logic [7:0]  tdiv;
  logic [7:0]  ttc;

  always_comb begin
    ttc           = '0;
    ttc[TTC_BCR]  = (bcid == '0);
    ttc[TTC_T200] = (int'(tdiv) < TEST_DIV / 2);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      idx       <= '0;
      bcid      <= '0;
      tdiv      <= '0;
      word      <= '0;
      is_k      <= '0;
      word_idx  <= '0;
      bc_strobe <= 1'b0;
    end else begin
      word_idx  <= idx;
      bc_strobe <= (idx == 3'd0);
      unique case (idx)
        3'd0: begin word <= {K28_5, ttc, user16}; is_k <= 4'b1000; end
        3'd1: begin word <= payload[127:96]; is_k <= '0; end
        3'd2: begin word <= payload[95:64];  is_k <= '0; end
        3'd3: begin word <= payload[63:32];  is_k <= '0; end
        default: begin word <= payload[31:0]; is_k <= '0; end
      endcase
      if (int'(idx) == WORDS_PER_BC - 1) begin
        idx  <= '0;
        bcid <= (int'(bcid) == BC_PER_ORBIT - 1) ? '0 : bcid + 1'b1;
        tdiv <= (int'(tdiv) == TEST_DIV - 1)     ? '0 : tdiv + 1'b1;
      end else begin
        idx <= idx + 1'b1;
      end
    end
  end

endmodule
