// dec8b10b: combinational 8b/10b decoder for one 10-bit symbol.
//
// The abcdei sub-block is mapped back to EDCBA and the fghj sub-block to
// HGF; both disparity forms of every code are accepted, and the primary
// and alternate forms of x.7 both decode to 7. The K28.5 comma (either
// disparity) is recognised and flagged with is_k. A sub-block that is not
// a valid code sets err. Running disparity is not checked.
//
// Interface: code (bit 9 = 'a', first received bit) gives dout, is_k, err.
// No clock; zero latency.
module dec8b10b (
  input  logic [9:0] code,
  output logic [7:0] dout,
  output logic       is_k,
  output logic       err
);

  logic [4:0] d5;
  logic [2:0] d3;
  logic       err6, err4;

  always_comb begin
    err6 = 1'b0;
    d5   = '0;
    case (code[9:4])
      6'b100111, 6'b011000: d5 = 5'd0;
      6'b011101, 6'b100010: d5 = 5'd1;
      6'b101101, 6'b010010: d5 = 5'd2;
      6'b110001: d5 = 5'd3;
      6'b110101, 6'b001010: d5 = 5'd4;
      6'b101001: d5 = 5'd5;
      6'b011001: d5 = 5'd6;
      6'b111000, 6'b000111: d5 = 5'd7;
      6'b111001, 6'b000110: d5 = 5'd8;
      6'b100101: d5 = 5'd9;
      6'b010101: d5 = 5'd10;
      6'b110100: d5 = 5'd11;
      6'b001101: d5 = 5'd12;
      6'b101100: d5 = 5'd13;
      6'b011100: d5 = 5'd14;
      6'b010111, 6'b101000: d5 = 5'd15;
      6'b011011, 6'b100100: d5 = 5'd16;
      6'b100011: d5 = 5'd17;
      6'b010011: d5 = 5'd18;
      6'b110010: d5 = 5'd19;
      6'b001011: d5 = 5'd20;
      6'b101010: d5 = 5'd21;
      6'b011010: d5 = 5'd22;
      6'b111010, 6'b000101: d5 = 5'd23;
      6'b110011, 6'b001100: d5 = 5'd24;
      6'b100110: d5 = 5'd25;
      6'b010110: d5 = 5'd26;
      6'b110110, 6'b001001: d5 = 5'd27;
      6'b001110: d5 = 5'd28;
      6'b101110, 6'b010001: d5 = 5'd29;
      6'b011110, 6'b100001: d5 = 5'd30;
      6'b101011, 6'b010100: d5 = 5'd31;
      default: err6 = 1'b1;
    endcase
  end

  always_comb begin
    err4 = 1'b0;
    d3   = '0;
    case (code[3:0])
      4'b1011, 4'b0100: d3 = 3'd0;
      4'b1001: d3 = 3'd1;
      4'b0101: d3 = 3'd2;
      4'b1100, 4'b0011: d3 = 3'd3;
      4'b1101, 4'b0010: d3 = 3'd4;
      4'b1010: d3 = 3'd5;
      4'b0110: d3 = 3'd6;
      4'b1110, 4'b0001, 4'b0111, 4'b1000: d3 = 3'd7;
      default: err4 = 1'b1;
    endcase
  end

  always_comb begin
    is_k = (code == 10'b001111_1010) || (code == 10'b110000_0101);
    if (is_k) begin
      dout = 8'hBC;
      err  = 1'b0;
    end else begin
      dout = {d3, d5};
      err  = err6 | err4;
    end
  end

endmodule
