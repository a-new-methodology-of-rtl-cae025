// enc8b10b_word: 32-bit to 40-bit 8b/10b encoder for the SL transmit link.
//
// Four enc8b10b lanes encode the bytes of one word in transmit order
// (byte 0 = data[31:24] first), each lane taking the running disparity left
// by the lane before it. The disparity after lane 3 is stored for the next
// word. The code word is registered: one cycle of latency at the 200 MHz
// word clock, one word per cycle. Lane 0 is placed in code[39:30] so that
// the MSB of the word is the first bit on the fibre.
module enc8b10b_word (
  input  logic        clk,
  input  logic        rst,      // synchronous; running disparity -> negative
  input  logic [31:0] data,
  input  logic [3:0]  is_k,     // is_k[3] belongs to data[31:24]
  output logic [39:0] code
);

  logic [4:0]  rd;              // rd[0] = stored disparity, rd[i+1] after lane i
  logic [39:0] code_c;
  logic        rd_q;

  assign rd[0] = rd_q;

  for (genvar i = 0; i < 4; i++) begin : g_lane
    enc8b10b u_enc (
      .din   (data[31 - 8*i -: 8]),
      .is_k  (is_k[3 - i]),
      .rd_in (rd[i]),
      .code  (code_c[39 - 10*i -: 10]),
      .rd_out(rd[i+1])
    );
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      rd_q <= 1'b0;
      code <= '0;
    end else begin
      rd_q <= rd[4];
      code <= code_c;
    end
  end

endmodule
