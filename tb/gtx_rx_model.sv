// gtx_rx_model: behavioural model of a transceiver receive path in raw
// (decoder-bypassed) mode, for simulation only.
//
// The incoming 40-bit words (tx_word, sampled on rx_clk) form a bit stream,
// most significant bit first. The model delivers 40 consecutive bits of
// that stream per rx_clk cycle, starting at a bit offset that is random
// after reset (as in a real receiver, whose word boundary is arbitrary) or
// forced by force_offset >= 0. Each rx_slide pulse moves the window one bit
// later in the stream. LAT extra cycles of pipeline model the link latency.
module gtx_rx_model #(
  parameter int LAT = 3
) (
  input  logic        rx_clk,
  input  logic [39:0] tx_word,
  input  logic        rx_slide,
  input  int          force_offset,
  output logic [39:0] rx_word
);
  logic [39:0] pipe [LAT+1];
  int          k;
  logic [79:0] stream;

  initial begin
    k = (force_offset >= 0) ? force_offset : int'($urandom_range(39, 0));
    for (int i = 0; i <= LAT; i++) pipe[i] = '0;
    rx_word = '0;
  end

  assign stream = {pipe[LAT], pipe[LAT-1]};

  always @(posedge rx_clk) begin
    pipe[0] <= tx_word;
    for (int i = 1; i <= LAT; i++) pipe[i] <= pipe[i-1];
    rx_word <= stream[79 - k -: 40];
    if (rx_slide) k <= (k == 39) ? 0 : k + 1;
  end
endmodule
