// fl_8b10b_decoder: fixed-latency 8b/10b decoder with comma alignment.
//
// The transceiver's own decoder and comma aligner are bypassed because
// their latency changes from one reset to the next. Instead the raw 40-bit
// word is decoded here, and the word boundary is found by moving the
// transceiver's bit position with RXSLIDE pulses: while searching, if no
// K28.5 comma is seen in lane 0 (the first 10 bits) during one frame of
// WORDS_PER_BC words, one RXSLIDE pulse is issued and the search resumes
// SLIDE_WAIT cycles later, when the slide has taken effect. Once the comma
// sits in lane 0 the decoder is aligned. ERR_LIMIT consecutive words with
// an invalid code send it back to search. Each slide moves the boundary by
// exactly one bit, so the final position, and with it the latency, depends
// only on the incoming bit stream, not on when the search started.
//
// Timing: rx_word is registered, decoded, and registered again; data,
// is_k and code_err follow rx_word by exactly 2 clock cycles. Lane 0
// (rx_word[39:30]) becomes data[31:24]. rx_slide is a one-cycle pulse.
// The slide procedure follows the description of the design; wait time,
// error limit and the 2-cycle pipeline are this design's own choices.
module fl_8b10b_decoder
  import tgc_clk_pkg::*;
#(
  parameter int SLIDE_WAIT = 32,
  parameter int ERR_LIMIT  = 4
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [39:0] rx_word,
  output logic        rx_slide,
  output logic        aligned,
  output logic [31:0] data,
  output logic [3:0]  is_k,
  output logic [3:0]  code_err
);

  logic [39:0] raw_q;
  logic [31:0] dec_data;
  logic [3:0]  dec_k, dec_err;

  for (genvar i = 0; i < 4; i++) begin : g_lane
    dec8b10b u_dec (
      .code(raw_q[39 - 10*i -: 10]),
      .dout(dec_data[31 - 8*i -: 8]),
      .is_k(dec_k[3 - i]),
      .err (dec_err[3 - i])
    );
  end

  dec_state_e state;
  logic [$clog2(SLIDE_WAIT+1)-1:0] timer;
  logic [2:0]                      wcnt;
  logic [$clog2(ERR_LIMIT+1)-1:0]  errs;

  always_ff @(posedge clk) begin
    if (rst) begin
      raw_q    <= '0;
      data     <= '0;
      is_k     <= '0;
      code_err <= '0;
      state    <= DEC_RESET;
      timer    <= '0;
      wcnt     <= '0;
      errs     <= '0;
      rx_slide <= 1'b0;
      aligned  <= 1'b0;
    end else begin
      raw_q    <= rx_word;
      data     <= dec_data;
      is_k     <= dec_k;
      code_err <= dec_err;
      rx_slide <= 1'b0;
      aligned  <= (state == DEC_LOCKED);
      unique case (state)
        DEC_RESET: begin
          wcnt  <= '0;
          state <= DEC_SEARCH;
        end
        DEC_SEARCH: begin
          if (dec_k[3]) begin
            errs  <= '0;
            state <= DEC_LOCKED;
          end else if (int'(wcnt) == WORDS_PER_BC - 1) begin
            rx_slide <= 1'b1;
            timer    <= SLIDE_WAIT[$bits(timer)-1:0];
            state    <= DEC_WAIT;
          end else begin
            wcnt <= wcnt + 1'b1;
          end
        end
        DEC_WAIT: begin
          if (timer == '0) begin
            wcnt  <= '0;
            state <= DEC_SEARCH;
          end else begin
            timer <= timer - 1'b1;
          end
        end
        default: begin   // DEC_LOCKED
          if (|dec_err) begin
            if (int'(errs) == ERR_LIMIT - 1) begin
              wcnt  <= '0;
              state <= DEC_SEARCH;
            end
            errs <= errs + 1'b1;
          end else begin
            errs <= '0;
          end
        end
      endcase
    end
  end

endmodule
