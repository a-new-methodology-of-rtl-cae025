// enc8b10b: combinational 8b/10b encoder for one byte (IEEE 802.3 code).
//
// The byte HGF_EDCBA is split into a 5b/6b part (EDCBA -> abcdei) and a
// 3b/4b part (HGF -> fghj). Each part has a form for negative and for
// positive running disparity; an unbalanced sub-block flips the disparity.
// The alternate x.A7 form replaces x.P7 where the primary form would make
// a run of five equal bits. The only control character supported is K28.5,
// the comma used as the frame header.
//
// Interface: din/is_k and the incoming running disparity rd_in (1 = positive)
// give code (bit 9 = 'a', sent first) and rd_out. No clock; zero latency.
module enc8b10b (
  input  logic [7:0] din,
  input  logic       is_k,
  input  logic       rd_in,
  output logic [9:0] code,
  output logic       rd_out
);

  logic [5:0] c6;   // abcdei for negative disparity
  logic [3:0] c4;   // fghj for negative disparity
  logic       bal6, bal4, rd_mid, alt7;
  logic [4:0] x;
  logic [2:0] y;

  assign x = din[4:0];
  assign y = din[7:5];

  always_comb begin
    bal6 = 1'b0;
    unique case (x)
      5'd0:  c6 = 6'b100111;
      5'd1:  c6 = 6'b011101;
      5'd2:  c6 = 6'b101101;
      5'd3:  begin c6 = 6'b110001; bal6 = 1'b1; end
      5'd4:  c6 = 6'b110101;
      5'd5:  begin c6 = 6'b101001; bal6 = 1'b1; end
      5'd6:  begin c6 = 6'b011001; bal6 = 1'b1; end
      5'd7:  begin c6 = 6'b111000; bal6 = 1'b1; end  // balanced, but alternates
      5'd8:  c6 = 6'b111001;
      5'd9:  begin c6 = 6'b100101; bal6 = 1'b1; end
      5'd10: begin c6 = 6'b010101; bal6 = 1'b1; end
      5'd11: begin c6 = 6'b110100; bal6 = 1'b1; end
      5'd12: begin c6 = 6'b001101; bal6 = 1'b1; end
      5'd13: begin c6 = 6'b101100; bal6 = 1'b1; end
      5'd14: begin c6 = 6'b011100; bal6 = 1'b1; end
      5'd15: c6 = 6'b010111;
      5'd16: c6 = 6'b011011;
      5'd17: begin c6 = 6'b100011; bal6 = 1'b1; end
      5'd18: begin c6 = 6'b010011; bal6 = 1'b1; end
      5'd19: begin c6 = 6'b110010; bal6 = 1'b1; end
      5'd20: begin c6 = 6'b001011; bal6 = 1'b1; end
      5'd21: begin c6 = 6'b101010; bal6 = 1'b1; end
      5'd22: begin c6 = 6'b011010; bal6 = 1'b1; end
      5'd23: c6 = 6'b111010;
      5'd24: c6 = 6'b110011;
      5'd25: begin c6 = 6'b100110; bal6 = 1'b1; end
      5'd26: begin c6 = 6'b010110; bal6 = 1'b1; end
      5'd27: c6 = 6'b110110;
      5'd28: begin c6 = 6'b001110; bal6 = 1'b1; end
      5'd29: c6 = 6'b101110;
      5'd30: c6 = 6'b011110;
      default: c6 = 6'b101011;                    // 31
    endcase
  end

  // x.A7 is used where x.P7 would extend a run of equal bits.
  assign alt7 = rd_mid ? (x == 5'd11 || x == 5'd13 || x == 5'd14)
                       : (x == 5'd17 || x == 5'd18 || x == 5'd20);

  always_comb begin
    bal4 = 1'b0;
    unique case (y)
      3'd0: c4 = 4'b1011;
      3'd1: begin c4 = 4'b1001; bal4 = 1'b1; end
      3'd2: begin c4 = 4'b0101; bal4 = 1'b1; end
      3'd3: begin c4 = 4'b1100; bal4 = 1'b1; end   // balanced, but alternates
      3'd4: c4 = 4'b1101;
      3'd5: begin c4 = 4'b1010; bal4 = 1'b1; end
      3'd6: begin c4 = 4'b0110; bal4 = 1'b1; end
      default: c4 = alt7 ? 4'b0111 : 4'b1110;
    endcase
  end

  logic [5:0] o6;
  logic [3:0] o4;

  always_comb begin
    // Positive disparity selects the complement of an unbalanced sub-block
    // and of the two balanced ones that alternate (D.07 and D.x.3).
    o6     = (rd_in && (!bal6 || x == 5'd7)) ? ~c6 : c6;
    rd_mid = bal6 ? rd_in : ~rd_in;
    o4     = (rd_mid && (!bal4 || y == 3'd3)) ? ~c4 : c4;
    rd_out = bal4 ? rd_mid : ~rd_mid;
    code   = {o6, o4};
    if (is_k) begin
      code   = rd_in ? 10'b110000_0101 : 10'b001111_1010;   // K28.5
      rd_out = ~rd_in;
    end
  end

endmodule
