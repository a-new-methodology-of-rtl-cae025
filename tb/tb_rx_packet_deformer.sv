// tb_rx_packet_deformer: self-checking test of the clock reconstruction.
//
// Frames of five words are driven directly (header = K28.5 in byte 0).
// Checks: locked rises with the 4th header that follows the first one at
// the expected distance; while locked clk40 is
// high for 3 cycles and low for 2, with its rising edge exactly one cycle
// after each header word, so one edge per 5 cycles (40 MHz from 200 MHz);
// bc_strobe and ttc/user16/payload of each frame; the clock keeps running
// through up to 3 missing headers and stops after 4 (unlock); a header
// arriving one word early restarts the lock count and moves the clock edge
// with it.
module tb_rx_packet_deformer;
  logic         clk = 1'b0;
  logic         rst = 1'b1;
  logic         aligned;
  logic [31:0]  data;
  logic [3:0]   is_k;
  logic         locked, clk40, bc_strobe;
  logic [7:0]   ttc;
  logic [15:0]  user16;
  logic [127:0] payload;
  int checks = 0, failures = 0;

  rx_packet_deformer dut (
    .clk(clk), .rst(rst), .aligned(aligned), .data(data), .is_k(is_k),
    .locked(locked), .clk40(clk40), .bc_strobe(bc_strobe), .ttc(ttc),
    .user16(user16), .payload(payload));

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

  // Monitor: rising edges of clk40 relative to the last header input.
  int cyc = 0, last_hdr = -100, last_rise = -100, rises = 0;
  logic clk40_q = 1'b0;
  logic steady = 1'b0;   // set while the clock must run without a break
  logic hdr_in;
  assign hdr_in = aligned && is_k[3] && data[31:24] == 8'hBC;
  always @(posedge clk) begin
    cyc      <= cyc + 1;
    clk40_q  <= clk40;
    if (hdr_in) last_hdr <= cyc;
    if (clk40 && !clk40_q) begin
      rises <= rises + 1;
      if (steady) check(cyc - last_rise == 5, $sformatf("clk40 period %0d cycles", cyc - last_rise));
      last_rise <= cyc;
    end
  end

  int frame_no = 0;
  task automatic send_frame(input logic with_header, input int nwords = 5);
    logic [127:0] pay;
    pay = {$urandom(), $urandom(), $urandom(), $urandom()};
    for (int w = 0; w < nwords; w++) begin
      logic was_locked;
      was_locked = locked;
      if (w == 0) begin
        data <= with_header ? {8'hBC, 8'(frame_no), 16'(frame_no * 3)} : 32'h0;
        is_k <= with_header ? 4'b1000 : 4'b0000;
      end else begin
        data <= pay[127 - 32*(w-1) -: 32];
        is_k <= '0;
      end
      @(posedge clk);
      #1;
      // clk40 registered: high during the cycle after words 0..2
      if (was_locked && w <= 2)
        check(clk40 == 1'b1, $sformatf("frame %0d word %0d: clk40 low", frame_no, w));
      if (was_locked && w >= 3)
        check(clk40 == 1'b0, $sformatf("frame %0d word %0d: clk40 high", frame_no, w));
    end
    // after the last word, the strobe and frame outputs
    if (locked && with_header && nwords == 5) begin
      check(bc_strobe, $sformatf("frame %0d: no strobe", frame_no));
      check(ttc == 8'(frame_no) && user16 == 16'(frame_no * 3) && payload == pay,
            $sformatf("frame %0d: ttc %02h user %04h", frame_no, ttc, user16));
    end
    frame_no++;
  endtask

  initial begin
    aligned = 1'b1; data = '0; is_k = '0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk); #1;
    for (int f = 0; f < 4; f++) begin
      send_frame(1'b1);
      check(!locked, $sformatf("locked after %0d headers", f + 1));
    end
    send_frame(1'b1);
    check(locked, "not locked after 1 + 4 headers");
    send_frame(1'b1);
    steady = 1'b1;
    for (int f = 0; f < 20; f++) send_frame(1'b1);
    steady = 1'b0;
    check(rises >= 20, $sformatf("only %0d clk40 edges", rises));
    check(last_rise == last_hdr + 1,
          $sformatf("clk40 edge at %0d, header at %0d", last_rise, last_hdr));
    // three missing headers: clock keeps running and lock holds
    for (int f = 0; f < 3; f++) send_frame(1'b0);
    check(locked, "lock lost after 3 missing headers");
    send_frame(1'b1);
    for (int f = 0; f < 4; f++) send_frame(1'b0);
    check(!locked, "still locked after 4 missing headers");
    repeat (10) begin @(posedge clk); #1; check(!clk40, "clk40 running while unlocked"); end
    // relock, then shift the frame by one word
    for (int f = 0; f < 6; f++) send_frame(1'b1);
    check(locked, "no relock");
    send_frame(1'b1, 4);           // short frame: next header one word early
    for (int f = 0; f < 3; f++) send_frame(1'b1);
    check(locked, "lock held over the moved header (lock is only lost by missing headers)");
    steady = 1'b1;
    for (int f = 0; f < 3; f++) send_frame(1'b1);
    steady = 1'b0;
    check(last_rise == last_hdr + 1, $sformatf("after move: clk40 edge at %0d, header at %0d", last_rise, last_hdr));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
