// tb_ps_clock_path: self-checking test of one board's clock path.
//
// The SL frame builder and encoder drive two receiver models with word
// boundaries at bit offsets 5 and 30, feeding two ps_clock_path instances
// (A and B) on the same 200 MHz receive clock; each has an MMCM model.
// Checks: both lock; their reconstructed clocks rec_clk40 are identical
// in every cycle (the recovered phase does not depend on where the word
// boundary started) and have a 5-cycle period; after a soft reset of the
// receivers both lock again to the same phase as before relative to the
// SL frame. Then A gets fine delay 700 and coarse delay 3: A's clk40_fine
// must trail B's by 700 x 17.857 ps = 12.5 ns, A's delayed timing byte
// must repeat B's exactly 3 crossings (15 cycles) later, and the 200 kHz
// monitor clocks must differ by 75 ns plus the fine shift, modulo 25 ns.
module tb_ps_clock_path;
  logic clk = 1'b0;
  logic rx_clk;
  logic rst = 1'b1;
  logic rst_rx = 1'b1;
  int checks = 0, failures = 0;

  always #2.5 clk = ~clk;
  assign #1.3 rx_clk = clk;     // fibre and recovery delay

  logic [31:0] sl_word;
  logic [3:0]  sl_k;
  logic [2:0]  sl_idx;
  logic        sl_bc;
  logic [39:0] tx_word;

  sl_packet_former #(.BC_PER_ORBIT(3564), .TEST_DIV(200)) u_sl (
    .clk(clk), .rst(rst), .payload({4{32'hC0FFEE00}}), .user16(16'h1234),
    .word(sl_word), .is_k(sl_k), .word_idx(sl_idx), .bc_strobe(sl_bc));
  enc8b10b_word u_enc (.clk(clk), .rst(rst), .data(sl_word), .is_k(sl_k), .code(tx_word));

  localparam int OFF [2] = '{5, 30};
  logic [4:0]  coarse_dly [2];
  logic [10:0] fine_dly   [2];
  logic [1:0]  rec_clk40, clk40_fine, mon_200k, locked, fine_ok, bc_strobe;
  logic [7:0]  ttc_dly [2];

  for (genvar i = 0; i < 2; i++) begin : g_board
    logic [39:0]  rx_word;
    logic         rx_slide, mmcm_locked, psen, psincdec, psdone, aligned;
    logic [3:0]   code_err;
    logic [10:0]  fine_pos;
    logic [15:0]  user16;
    logic [127:0] payload;
    gtx_rx_model #(.LAT(4)) u_gtx (
      .rx_clk(rx_clk), .tx_word(tx_word), .rx_slide(rx_slide),
      .force_offset(OFF[i]), .rx_word(rx_word));
    mmcm_ps_model #(.BASE_PS(1000)) u_mmcm (
      .clkin(rec_clk40[i]), .psclk(rx_clk), .psen(psen), .psincdec(psincdec),
      .psdone(psdone), .clkout(clk40_fine[i]), .locked(mmcm_locked));
    ps_clock_path dut (
      .rx_clk(rx_clk), .rst(rst_rx), .rx_word(rx_word), .rx_slide(rx_slide),
      .coarse_dly(coarse_dly[i]), .fine_dly(fine_dly[i]), .rec_clk40(rec_clk40[i]),
      .mmcm_locked(mmcm_locked), .psen(psen), .psincdec(psincdec), .psdone(psdone),
      .fine_ok(fine_ok[i]), .fine_pos(fine_pos), .clk40_fine(clk40_fine[i]),
      .mon_200k(mon_200k[i]), .aligned(aligned), .code_err(code_err),
      .locked(locked[i]), .bc_strobe(bc_strobe[i]), .ttc_dly(ttc_dly[i]),
      .user16(user16), .payload(payload));
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #200us;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // SL header to reconstructed-edge distance, in rx cycles
  int cyc = 0, last_sl_hdr = 0, edge_lat = -1;
  logic rec_q = 1'b0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (sl_bc) last_sl_hdr <= cyc;
  end
  always @(posedge rx_clk) begin
    rec_q <= rec_clk40[1];
    if (locked[1] && rec_clk40[1] && !rec_q) edge_lat <= (cyc - last_sl_hdr + 5) % 5;
  end

  task automatic wait_lock(input string tag);
    for (int t = 0; t < 10000 && !(locked[0] && locked[1]); t++) @(posedge rx_clk);
    check(locked[0] && locked[1], {tag, ": not locked"});
    repeat (20) @(posedge rx_clk);
    for (int t = 0; t < 200; t++) begin
      @(posedge rx_clk); #0.5;
      check(rec_clk40[0] == rec_clk40[1], $sformatf("%s: reconstructed clocks differ", tag));
    end
  endtask

  realtime tf [2];
  realtime tm [2];
  int      tt [2];

  initial begin
    int lat1;
    coarse_dly[0] = '0; coarse_dly[1] = '0; fine_dly[0] = '0; fine_dly[1] = '0;
    repeat (4) @(posedge clk);
    rst <= 1'b0;
    repeat (30) @(posedge clk);
    rst_rx <= 1'b0;
    wait_lock("first lock");
    lat1 = edge_lat;
    // soft reset of the receive logic
    @(posedge rx_clk); rst_rx <= 1'b1;
    repeat (10) @(posedge rx_clk); rst_rx <= 1'b0;
    wait_lock("after soft reset");
    check(edge_lat == lat1 && lat1 >= 0,
          $sformatf("edge position %0d after reset, %0d before", edge_lat, lat1));
    // delays on A
    fine_dly[0] = 11'd700;
    coarse_dly[0] = 5'd3;
    for (int t = 0; t < 40000; t++) begin
      @(posedge rx_clk);
      if (fine_ok[0] && g_board[0].fine_pos == 11'd700) break;
    end
    check(g_board[0].fine_pos == 11'd700, "fine delay not reached");
    repeat (20) @(posedge rx_clk);
    @(posedge clk40_fine[1]); tf[1] = $realtime;
    @(posedge clk40_fine[0]); tf[0] = $realtime;
    check(tf[0] - tf[1] > 12.49 && tf[0] - tf[1] < 12.51,
          $sformatf("fine: A trails B by %0.3f ns", tf[0] - tf[1]));
    // timing byte: T200 rising edge on B, then on A
    @(posedge ttc_dly[1][1]); tt[1] = cyc;
    @(posedge ttc_dly[0][1]); tt[0] = cyc;
    check(tt[0] - tt[1] == 15, $sformatf("coarse: A's timing byte %0d cycles after B's", tt[0] - tt[1]));
    @(posedge mon_200k[1]); tm[1] = $realtime;
    @(posedge mon_200k[0]); tm[0] = $realtime;
    begin
      real d, m;
      d = tm[0] - tm[1];
      m = d - 25.0 * $floor(d / 25.0);
      check(d > 50.0 && d < 112.6 && m > 12.49 && m < 12.51,
            $sformatf("200 kHz monitor: A trails B by %0.3f ns", d));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
