// tb_sl_packet_former: self-checking test of the SL frame builder.
//
// With a short orbit (20 crossings) and test-clock period (8 crossings) it
// follows 200 frames and checks, word by word: the position sequence
// 0..4, the header {K28.5, TTC, user16} with is_k = 1000 in word 0 only,
// the payload words 1..4, bc_strobe with the header only (one frame per
// 5 cycles), BCR in exactly the first crossing of each orbit, and the test
// clock high in the first half of each 8-crossing period.
module tb_sl_packet_former;
  localparam int ORBIT = 20;
  localparam int TDIV  = 8;
  logic         clk = 1'b0;
  logic         rst = 1'b1;
  logic [127:0] payload;
  logic [15:0]  user16;
  logic [31:0]  word;
  logic [3:0]   is_k;
  logic [2:0]   word_idx;
  logic         bc_strobe;
  int checks = 0, failures = 0;

  sl_packet_former #(.BC_PER_ORBIT(ORBIT), .TEST_DIV(TDIV)) dut (
    .clk(clk), .rst(rst), .payload(payload), .user16(user16),
    .word(word), .is_k(is_k), .word_idx(word_idx), .bc_strobe(bc_strobe)
  );

  always #2.5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    payload = {32'h1111_2222, 32'h3333_4444, 32'h5555_6666, 32'h7777_8888};
    user16  = 16'hA5C3;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk); #1;   // first registered word
    for (int f = 0; f < 200; f++) begin
      for (int w = 0; w < 5; w++) begin
        check(int'(word_idx) == w, $sformatf("frame %0d: index %0d expected %0d", f, word_idx, w));
        check(bc_strobe == (w == 0), $sformatf("frame %0d word %0d: strobe %0b", f, w, bc_strobe));
        if (w == 0) begin
          logic [7:0] ttc;
          ttc = '0;
          ttc[0] = (f % ORBIT == 0);
          ttc[1] = (f % TDIV < TDIV / 2);
          check(is_k == 4'b1000, $sformatf("frame %0d: header is_k %b", f, is_k));
          check(word == {8'hBC, ttc, 16'hA5C3},
                $sformatf("frame %0d: header %08h expected %08h", f, word, {8'hBC, ttc, 16'hA5C3}));
        end else begin
          check(is_k == 4'b0000, $sformatf("frame %0d word %0d: is_k %b", f, w, is_k));
          check(word == payload[127 - 32*(w-1) -: 32],
                $sformatf("frame %0d word %0d: %08h", f, w, word));
        end
        @(posedge clk); #1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
