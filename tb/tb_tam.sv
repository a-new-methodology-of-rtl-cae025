// tb_tam: self-checking test of TAM-to-TAM phase alignment.
//
// One SL frame stream reaches two TAMs (sectors A and B) whose fibres
// differ by 3 ns. TAM A scans TAM B's clock against a phase-shifted copy of
// its own (fine scan, 1400 steps, 20 samples each). Checks: both TAMs
// lock; the clock edge is found where the skew puts it
// ((3000 - 1000) / 17.857 = 112 steps, the scan MMCM adding 1 ns); after
// B's fine delay is set to 1400 - 168 steps (delaying it by 22 ns, so it
// lands a full 25 ns period after A) a second scan finds the edge at
// step 1344 (reference 1 ns late = 24 ns early); all NJAT reference
// outputs carry A's clock and 200 kHz clock; the scan raises busy and done.
module tb_tam;
  localparam int NS = 20;
  logic clk = 1'b0;
  logic rst = 1'b1;
  logic rst_rx = 1'b1;
  int checks = 0, failures = 0;
  always #2.5 clk = ~clk;

  logic [31:0] sl_word;
  logic [3:0]  sl_k;
  logic [2:0]  sl_idx;
  logic        sl_bc;
  logic [39:0] tx_word;
  sl_packet_former #(.TEST_DIV(200)) u_sl (
    .clk(clk), .rst(rst), .payload('0), .user16('0),
    .word(sl_word), .is_k(sl_k), .word_idx(sl_idx), .bc_strobe(sl_bc));
  enc8b10b_word u_enc (.clk(clk), .rst(rst), .data(sl_word), .is_k(sl_k), .code(tx_word));

  logic [1:0]  rx_clk;
  assign #1.3 rx_clk[0] = clk;
  // 3 ns longer fibre (an explicit clock: a continuous-assignment delay
  // longer than half a period would swallow the clock). The receiver model
  // samples the transmit register directly, so the extra delay must stay
  // below one 5 ns word period minus hold margin.
  initial begin
    rx_clk[1] = 1'b0;
    #4.3;
    forever #2.5 rx_clk[1] = ~rx_clk[1];
  end

  logic [10:0] fine_dly [2];
  logic [1:0]  clk40_fine, tam_locked, mon200;
  logic        scan_start = 1'b0;
  logic [10:0] rd_step = '0;
  logic [4:0]  rd_count;
  logic        scan_busy, scan_done;
  logic [5:0]  ref_clk_out, ref_200k_out;

  for (genvar i = 0; i < 2; i++) begin : g_tam
    logic [39:0] rx_word;
    logic rx_slide, rec_clk40, mmcm_locked, psen, psincdec, psdone, aligned, fine_ok;
    logic scan_clk, scan_locked, scan_psen, scan_psincdec, scan_psdone;
    logic [7:0] ttc_dly;
    logic [5:0] r_clk, r_200k;
    logic [4:0] cnt;
    logic busy, done;
    gtx_rx_model #(.LAT(3)) u_gtx (
      .rx_clk(rx_clk[i]), .tx_word(tx_word), .rx_slide(rx_slide),
      .force_offset(i * 17), .rx_word(rx_word));
    mmcm_ps_model #(.BASE_PS(1000)) u_mmcm (
      .clkin(rec_clk40), .psclk(rx_clk[i]), .psen(psen), .psincdec(psincdec),
      .psdone(psdone), .clkout(clk40_fine[i]), .locked(mmcm_locked));
    mmcm_ps_model #(.BASE_PS(1000)) u_scan_mmcm (
      .clkin(clk40_fine[i]), .psclk(scan_clk), .psen(scan_psen), .psincdec(scan_psincdec),
      .psdone(scan_psdone), .clkout(scan_clk), .locked(scan_locked));
    tam #(.NSAMPLES(NS)) dut (
      .rx_clk(rx_clk[i]), .rst(rst_rx), .rx_word(rx_word), .rx_slide(rx_slide),
      .coarse_dly('0), .fine_dly(fine_dly[i]), .rec_clk40(rec_clk40),
      .mmcm_locked(mmcm_locked), .psen(psen), .psincdec(psincdec), .psdone(psdone),
      .clk40_fine(clk40_fine[i]), .aligned(aligned), .locked(tam_locked[i]),
      .fine_ok(fine_ok), .ttc_dly(ttc_dly),
      .scan_clk(scan_clk), .scan_mmcm_locked(scan_locked), .scan_psen(scan_psen),
      .scan_psincdec(scan_psincdec), .scan_psdone(scan_psdone),
      .nb_clk(clk40_fine[1-i]), .nb_200k(mon200[1-i]),
      .scan_start(i == 0 ? scan_start : 1'b0), .scan_coarse(1'b0),
      .scan_n_steps(11'd1400), .scan_busy(busy), .scan_done(done),
      .rd_step(rd_step), .rd_count(cnt), .ref_clk_out(r_clk), .ref_200k_out(r_200k));
    assign mon200[i] = r_200k[0];
  end
  assign rd_count     = g_tam[0].cnt;
  assign scan_busy    = g_tam[0].busy;
  assign scan_done    = g_tam[0].done;
  assign ref_clk_out  = g_tam[0].r_clk;
  assign ref_200k_out = g_tam[0].r_200k;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #20ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic scan_and_find(input string tag, output int edge_s);
    int v, prev;
    @(posedge g_tam[0].scan_clk);
    scan_start <= 1'b1;
    @(posedge g_tam[0].scan_clk);
    scan_start <= 1'b0;
    @(posedge g_tam[0].scan_clk); #1;
    check(scan_busy, {tag, ": busy not raised"});
    while (!scan_done) @(posedge g_tam[0].scan_clk);
    edge_s = -1;
    prev = -1;
    for (int s = 0; s <= 1400; s++) begin
      @(posedge g_tam[0].scan_clk); rd_step <= 11'(s % 1400);
      @(posedge g_tam[0].scan_clk); @(posedge g_tam[0].scan_clk); #1;
      v = int'(rd_count);
      if (edge_s < 0 && prev >= 0 && prev < NS / 2 && v >= NS / 2) edge_s = s % 1400;
      prev = v;
    end
    $display("%s: neighbour clock edge at step %0d", tag, edge_s);
  endtask

  initial begin
    int e;
    fine_dly[0] = '0; fine_dly[1] = '0;
    repeat (4) @(posedge clk);
    rst <= 1'b0;
    repeat (30) @(posedge clk);
    rst_rx <= 1'b0;
    for (int t = 0; t < 20000 && !(tam_locked[0] && tam_locked[1]); t++) @(posedge clk);
    check(tam_locked[0] && tam_locked[1], "TAMs not locked");
    for (int t = 0; t < 2000 && !g_tam[0].scan_locked; t++) @(posedge clk);
    repeat (100) @(posedge clk);
    for (int t = 0; t < 100; t++) begin
      @(posedge clk); #0.3;
      check(ref_clk_out == {6{clk40_fine[0]}} && ref_200k_out == {6{mon200[0]}},
            "reference fan-out differs from the TAM's own clocks");
    end
    scan_and_find("before alignment", e);
    check(e >= 111 && e <= 113, $sformatf("edge at %0d, expected 112", e));
    fine_dly[1] = 11'(1400 - 168);
    repeat (10) @(posedge clk);
    for (int t = 0; t < 60000 && !g_tam[1].fine_ok; t++)
      @(posedge clk);
    repeat (50) @(posedge clk);
    scan_and_find("after alignment", e);
    check(e >= 1343 && e <= 1345, $sformatf("edge at %0d, expected 1344", e));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
