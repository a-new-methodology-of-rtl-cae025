// tb_fl_8b10b_decoder: self-checking test of the fixed-latency decoder.
//
// The SL frame builder and encoder feed four receiver models whose word
// boundaries start at bit offsets 0, 1, 23 and 39. Each decoder must
// (1) issue exactly (40 - offset) mod 40 RXSLIDE pulses, spaced at least
// SLIDE_WAIT cycles apart, (2) then report aligned and decode every word
// of the frame (header and payload) without code errors, and (3) deliver
// its headers in the same clock cycle as the other three: the latency
// after alignment does not depend on the starting offset. Finally one
// receiver is knocked off alignment by a burst of slides and must report
// code errors, lose alignment, and realign to the same latency.
module tb_fl_8b10b_decoder;
  localparam int NI = 4;
  localparam int SLIDE_WAIT = 32;
  localparam int OFFS [NI] = '{0, 1, 23, 39};
  logic clk = 1'b0;
  logic rst = 1'b1;
  logic rst_rx = 1'b1;   // receivers start once the link carries frames
  int checks = 0, failures = 0;

  logic [127:0] payload = {32'h0123_4567, 32'h89AB_CDEF, 32'hDEAD_BEEF, 32'h0F1E_2D3C};
  logic [31:0]  sl_word;
  logic [3:0]   sl_k;
  logic [2:0]   sl_idx;
  logic         sl_bc;
  logic [39:0]  tx_word;

  sl_packet_former #(.BC_PER_ORBIT(16), .TEST_DIV(8)) u_sl (
    .clk(clk), .rst(rst), .payload(payload), .user16(16'h5A5A),
    .word(sl_word), .is_k(sl_k), .word_idx(sl_idx), .bc_strobe(sl_bc));
  enc8b10b_word u_enc (.clk(clk), .rst(rst), .data(sl_word), .is_k(sl_k), .code(tx_word));

  always #2.5 clk = ~clk;

  logic [39:0] rx_word  [NI];
  logic        rx_slide [NI];
  logic        slide_x  [NI];   // testbench-forced extra slides
  logic        aligned  [NI];
  logic [31:0] data     [NI];
  logic [3:0]  is_k     [NI];
  logic [3:0]  code_err [NI];

  for (genvar i = 0; i < NI; i++) begin : g_rx
    gtx_rx_model #(.LAT(3)) u_gtx (
      .rx_clk(clk), .tx_word(tx_word), .rx_slide(rx_slide[i] | slide_x[i]),
      .force_offset(OFFS[i]), .rx_word(rx_word[i]));
    fl_8b10b_decoder #(.SLIDE_WAIT(SLIDE_WAIT)) dut (
      .clk(clk), .rst(rst_rx), .rx_word(rx_word[i]), .rx_slide(rx_slide[i]),
      .aligned(aligned[i]), .data(data[i]), .is_k(is_k[i]), .code_err(code_err[i]));
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int  slides [NI];
  int  last_slide [NI];
  int  cyc = 0;
  int  err_seen = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    for (int i = 0; i < NI; i++) begin
      if (!rst_rx && rx_slide[i]) begin
        if (slides[i] > 0 && cyc - last_slide[i] <= SLIDE_WAIT) begin
          failures++;
          $display("FAIL: rx %0d slides %0d cycles apart", i, cyc - last_slide[i]);
        end
        slides[i]     <= slides[i] + 1;
        last_slide[i] <= cyc;
      end
      if (!rst_rx && aligned[i] && |code_err[i]) err_seen <= err_seen + 1;
    end
  end

  function automatic logic [31:0] expect_word(input int w);
    return (w == 0) ? 32'hBC00_5A5A : payload[127 - 32*(w-1) -: 32];
  endfunction

  task automatic check_frames(input string tag);
    int hdr_cycle [NI];
    // all aligned: find a header on receiver 0, then check 3 frames everywhere
    do begin @(posedge clk); #1; end while (!(is_k[0][3] && data[0][31:24] == 8'hBC));
    for (int w = 0; w < 15; w++) begin
      for (int i = 0; i < NI; i++) begin
        check(aligned[i], $sformatf("%s: rx %0d not aligned", tag, i));
        check(code_err[i] == '0, $sformatf("%s: rx %0d code error", tag, i));
        check(data[i][31:24] == expect_word(w % 5)[31:24] && data[i][15:0] == expect_word(w % 5)[15:0]
              && is_k[i] == ((w % 5 == 0) ? 4'b1000 : 4'b0000),
              $sformatf("%s: rx %0d word %0d = %08h/%b", tag, i, w, data[i], is_k[i]));
      end
      @(posedge clk); #1;
    end
  endtask

  initial begin
    for (int i = 0; i < NI; i++) begin slides[i] = 0; last_slide[i] = 0; slide_x[i] = 1'b0; end
    repeat (4) @(posedge clk);
    rst <= 1'b0;
    repeat (20) @(posedge clk);
    rst_rx <= 1'b0;
    // wait for all to align
    for (int t = 0; t < 12000; t++) begin
      @(posedge clk);
      if (aligned[0] && aligned[1] && aligned[2] && aligned[3]) break;
    end
    for (int i = 0; i < NI; i++)
      check(slides[i] == (40 - OFFS[i]) % 40,
            $sformatf("rx %0d: %0d slides, expected %0d", i, slides[i], (40 - OFFS[i]) % 40));
    check_frames("initial");
    check(err_seen == 0, "code errors after alignment");
    // knock receiver 2 out of alignment with 3 extra slides
    @(posedge clk);
    repeat (3) begin
      slide_x[2] <= 1'b1; @(posedge clk); slide_x[2] <= 1'b0;
      repeat (SLIDE_WAIT + 2) @(posedge clk);
    end
    for (int t = 0; t < 8000 && aligned[2]; t++) @(posedge clk);
    check(!aligned[2], "rx 2 did not lose alignment");
    check(err_seen > 0, "no code errors seen after misalignment");
    for (int t = 0; t < 12000 && !aligned[2]; t++) @(posedge clk);
    check(slides[2] == (40 - OFFS[2]) % 40 + 37,
          $sformatf("rx 2: %0d slides in total, expected %0d", slides[2], (40 - OFFS[2]) % 40 + 37));
    check_frames("realigned");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
