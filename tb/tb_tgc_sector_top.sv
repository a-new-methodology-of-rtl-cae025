// tb_tgc_sector_top: end-to-end test of one sector's clock distribution
// and phase alignment (11 PS boards, TAM, one JATHub; NSAMPLES reduced to 4
// for run time, the models being jitter-free).
//
// The SL word stream reaches every board over its own modelled link: PS
// board i's receive clock lags the SL clock by 0.5 + 0.3*i ns, its clock
// reaches the JATHub 5 + 0.25*i ns after its MMCM input (MMCM plus cable),
// and boards 7 and 4 have one and two bunch crossings of extra link
// latency. The TAM's link lags by 1 ns; its clock is the JATHub reference.
// The test runs the alignment procedure the way the control software would:
//   1. wait for every link to align (RXSLIDE), frames to lock and MMCMs
//      to lock; check the reference fan-out;
//   2. JATHub fine scan (1400 steps); each board's edge must sit at
//      (2500 + 550*i) ps / 17.857 ps, then set fine delays so that all
//      edges move to the latest one and rescan: all edges must coincide;
//   3. JATHub coarse scan (200 steps of 25 ns); boards 7 and 4 must show
//      their 200 kHz edge 1 and 2 steps late; set coarse delays to
//      compensate and rescan: all edges must coincide;
//   4. TAM scan of a neighbour clock 3 ns late (edge at step 112);
//   5. soft reset of the whole slice (SL, boards, TAM, JATHub; the MMCM
//      models lose lock and restart at phase 0): after relocking, with the
//      same delay parameters, fine and coarse rescans must find every edge
//      where it was before the reset (fixed-latency reconstruction).
// Each mechanism is counted and one that never took place is a failure.
module tb_tgc_sector_top;
  import tgc_clk_pkg::*;
  localparam int NPS = 11;
  localparam int NS  = 4;
  localparam int CW  = $clog2(NS + 1);

  logic clk = 1'b0;
  logic rst = 1'b1;
  int checks = 0, failures = 0;
  always #2.5 clk = ~clk;

  logic [39:0]                tx_word;
  logic [NPS-1:0]             ps_rx_clk, ps_rx_slide, ps_rec_clk40, ps_mmcm_locked;
  logic [NPS-1:0][39:0]       ps_rx_word;
  logic [NPS-1:0][4:0]        ps_coarse_dly;
  logic [NPS-1:0][FINE_W-1:0] ps_fine_dly;
  logic [NPS-1:0]             ps_psen, ps_psincdec, ps_psdone, ps_fine_ok;
  logic [NPS-1:0]             ps_clk40_fine, ps_mon_200k, ps_locked;
  logic [NPS-1:0][7:0]        ps_ttc_dly;

  logic        tam_rx_clk = 1'b0, tam_rx_slide, tam_rec_clk40, tam_mmcm_locked;
  logic [39:0] tam_rx_word;
  logic        tam_psen, tam_psincdec, tam_psdone, tam_clk40_fine, tam_locked, tam_fine_ok;
  logic        tam_scan_clk, tam_scan_mmcm_locked, tam_scan_psen, tam_scan_psincdec, tam_scan_psdone;
  logic        tam_nb_clk, tam_nb_200k;
  logic        tam_scan_start = 1'b0, tam_scan_busy, tam_scan_done;
  logic [10:0] tam_rd_step = '0;
  logic [CW-1:0] tam_rd_count;
  logic [5:0]  tam_ref_clk_out, tam_ref_200k_out;

  logic        jat_clk_ref, jat_mmcm_locked, jat_psen, jat_psincdec, jat_psdone;
  logic        jat_start = 1'b0, jat_coarse = 1'b0, jat_busy, jat_done;
  logic [10:0] jat_n_steps = 11'd1400, jat_rd_step = '0;
  logic [3:0]  jat_rd_ch = '0;
  logic [CW-1:0] jat_rd_count;

  tgc_sector_top #(.NSAMPLES(NS)) dut (
    .rst(rst), .clk_sl(clk), .sl_payload({4{32'hC0FFEE00}}), .sl_user16(16'h5A5A),
    .tx_word(tx_word),
    .ps_rx_clk(ps_rx_clk), .ps_rx_word(ps_rx_word), .ps_rx_slide(ps_rx_slide),
    .ps_coarse_dly(ps_coarse_dly), .ps_fine_dly(ps_fine_dly), .ps_rec_clk40(ps_rec_clk40),
    .ps_mmcm_locked(ps_mmcm_locked), .ps_psen(ps_psen), .ps_psincdec(ps_psincdec),
    .ps_psdone(ps_psdone), .ps_fine_ok(ps_fine_ok), .ps_clk40_fine(ps_clk40_fine),
    .ps_mon_200k(ps_mon_200k), .ps_locked(ps_locked), .ps_ttc_dly(ps_ttc_dly),
    .tam_rx_clk(tam_rx_clk), .tam_rx_word(tam_rx_word), .tam_rx_slide(tam_rx_slide),
    .tam_coarse_dly('0), .tam_fine_dly('0), .tam_rec_clk40(tam_rec_clk40),
    .tam_mmcm_locked(tam_mmcm_locked), .tam_psen(tam_psen), .tam_psincdec(tam_psincdec),
    .tam_psdone(tam_psdone), .tam_clk40_fine(tam_clk40_fine), .tam_locked(tam_locked),
    .tam_fine_ok(tam_fine_ok),
    .tam_scan_clk(tam_scan_clk), .tam_scan_mmcm_locked(tam_scan_mmcm_locked),
    .tam_scan_psen(tam_scan_psen), .tam_scan_psincdec(tam_scan_psincdec),
    .tam_scan_psdone(tam_scan_psdone), .tam_nb_clk(tam_nb_clk), .tam_nb_200k(tam_nb_200k),
    .tam_scan_start(tam_scan_start), .tam_scan_coarse(1'b0), .tam_scan_n_steps(11'd200),
    .tam_scan_busy(tam_scan_busy), .tam_scan_done(tam_scan_done),
    .tam_rd_step(tam_rd_step), .tam_rd_count(tam_rd_count),
    .tam_ref_clk_out(tam_ref_clk_out), .tam_ref_200k_out(tam_ref_200k_out),
    .jat_clk_ref(jat_clk_ref), .jat_mmcm_locked(jat_mmcm_locked), .jat_psen(jat_psen),
    .jat_psincdec(jat_psincdec), .jat_psdone(jat_psdone),
    .jat_mon_clk(ps_clk40_fine), .jat_mon_200k(ps_mon_200k),
    .jat_start(jat_start), .jat_coarse(jat_coarse), .jat_n_steps(jat_n_steps),
    .jat_busy(jat_busy), .jat_done(jat_done), .jat_rd_step(jat_rd_step),
    .jat_rd_ch(jat_rd_ch), .jat_rd_count(jat_rd_count));

  // ---------------- PS board environment ----------------
  int slide_cnt [NPS];
  int step_cnt  [NPS];
  for (genvar i = 0; i < NPS; i++) begin : g_b
    localparam int SKEW_PS  = 500 + 300 * i;
    localparam int CABLE_PS = 5000 + 250 * i;
    localparam int LAT      = 3 + ((i == 4) ? 10 : (i == 7) ? 5 : 0);
    logic rxc = 1'b0;
    int slides = 0, steps = 0;
    initial begin
      #(real'(SKEW_PS) / 1000.0);
      forever #2.5 rxc = ~rxc;
    end
    assign ps_rx_clk[i] = rxc;
    always @(posedge rxc) begin
      if (ps_rx_slide[i]) slides++;
      if (ps_psen[i]) steps++;
    end
    assign slide_cnt[i] = slides;
    assign step_cnt[i]  = steps;
    gtx_rx_model #(.LAT(LAT)) u_gtx (
      .rx_clk(rxc), .tx_word(tx_word), .rx_slide(ps_rx_slide[i]),
      .force_offset((7 * i + 3) % 40), .rx_word(ps_rx_word[i]));
    // MMCM output delay plus the cable to the JATHub
    mmcm_ps_model #(.BASE_PS(CABLE_PS)) u_mmcm (
      .clkin(ps_rec_clk40[i]), .psclk(rxc), .psen(ps_psen[i]), .psincdec(ps_psincdec[i]),
      .psdone(ps_psdone[i]), .clkout(ps_clk40_fine[i]), .locked(ps_mmcm_locked[i]));
  end

  // ---------------- TAM environment ----------------
  int tam_slides = 0;
  initial begin
    #1.0;
    forever #2.5 tam_rx_clk = ~tam_rx_clk;
  end
  always @(posedge tam_rx_clk) if (tam_rx_slide) tam_slides++;
  gtx_rx_model #(.LAT(3)) u_tam_gtx (
    .rx_clk(tam_rx_clk), .tx_word(tx_word), .rx_slide(tam_rx_slide),
    .force_offset(23), .rx_word(tam_rx_word));
  mmcm_ps_model #(.BASE_PS(1000)) u_tam_mmcm (
    .clkin(tam_rec_clk40), .psclk(tam_rx_clk), .psen(tam_psen), .psincdec(tam_psincdec),
    .psdone(tam_psdone), .clkout(tam_clk40_fine), .locked(tam_mmcm_locked));
  mmcm_ps_model #(.BASE_PS(1000)) u_tam_scan_mmcm (
    .clkin(tam_clk40_fine), .psclk(tam_scan_clk), .psen(tam_scan_psen),
    .psincdec(tam_scan_psincdec), .psdone(tam_scan_psdone), .clkout(tam_scan_clk),
    .locked(tam_scan_mmcm_locked));
  // neighbouring sector's clock: same phase plus a 3 ns cable
  logic nb_psdone_nc, nb_locked_nc;
  mmcm_ps_model #(.BASE_PS(3000)) u_nb (
    .clkin(tam_clk40_fine), .psclk(1'b0), .psen(1'b0), .psincdec(1'b0),
    .psdone(nb_psdone_nc), .clkout(tam_nb_clk), .locked(nb_locked_nc));
  assign tam_nb_200k = tam_ref_200k_out[1];

  // ---------------- JATHub reference MMCM ----------------
  mmcm_ps_model #(.BASE_PS(1000)) u_jat_mmcm (
    .clkin(tam_ref_clk_out[0]), .psclk(jat_clk_ref), .psen(jat_psen),
    .psincdec(jat_psincdec), .psdone(jat_psdone), .clkout(jat_clk_ref),
    .locked(jat_mmcm_locked));

  // ---------------- checking ----------------
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #80ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int edge_s [NPS];
  int tam_edge;

  task automatic jat_scan(input logic crs, input int n);
    @(posedge jat_clk_ref);
    jat_coarse  <= crs;
    jat_n_steps <= 11'(n);
    jat_start   <= 1'b1;
    @(posedge jat_clk_ref);
    jat_start <= 1'b0;
    @(posedge jat_clk_ref); #1;
    check(jat_busy && !jat_done, "JATHub scan did not start");
    while (!jat_done) @(posedge jat_clk_ref);
  endtask

  // rising edge of each channel: first step whose count reaches NS/2 after
  // one below it, searching once round the unit interval
  task automatic jat_read(input int n);
    int prev [NPS];
    int v;
    for (int c = 0; c < NPS; c++) begin edge_s[c] = -1; prev[c] = -1; end
    for (int s = 0; s <= n; s++) begin
      @(posedge jat_clk_ref); jat_rd_step <= 11'(s % n);
      @(posedge jat_clk_ref); @(posedge jat_clk_ref); #1;
      for (int c = 0; c < NPS; c++) begin
        jat_rd_ch = 4'(c); #0.1;
        v = int'(jat_rd_count);
        if (edge_s[c] < 0 && prev[c] >= 0 && prev[c] < NS / 2 && v >= NS / 2) edge_s[c] = s % n;
        prev[c] = v;
      end
    end
  endtask

  function automatic int wrapdist(input int a, input int b, input int n);
    int d = (a - b) % n;
    if (d < 0) d += n;
    if (d > n / 2) d -= n;
    return d;
  endfunction

  int n_slide, n_lock, n_fanout, n_fine_step, n_fine_scan, n_coarse_scan, n_coarse_dly, n_tam_scan, n_reset;

  initial begin
    int emax, omax, v, prev, tot;
    n_slide = 0; n_lock = 0; n_fanout = 0; n_fine_step = 0;
    n_fine_scan = 0; n_coarse_scan = 0; n_coarse_dly = 0; n_tam_scan = 0; n_reset = 0;
    for (int i = 0; i < NPS; i++) begin ps_coarse_dly[i] = '0; ps_fine_dly[i] = '0; end
    repeat (40) @(posedge clk);
    rst <= 1'b0;

    // 1. links, frames, MMCMs
    for (int t = 0; t < 40000 && !(&ps_locked && tam_locked && jat_mmcm_locked &&
                                   tam_scan_mmcm_locked && &ps_mmcm_locked); t++)
      @(posedge clk);
    check(&ps_locked, $sformatf("PS boards not all locked: %b", ps_locked));
    check(tam_locked, "TAM not locked");
    check(jat_mmcm_locked && &ps_mmcm_locked && tam_mmcm_locked, "MMCMs not locked");
    if (&ps_locked && tam_locked) n_lock++;
    tot = tam_slides;
    for (int i = 0; i < NPS; i++) tot += slide_cnt[i];
    n_slide = tot;
    for (int t = 0; t < 200; t++) begin
      @(posedge clk); #0.3;
      check(tam_ref_clk_out == {6{tam_clk40_fine}}, "reference clock fan-out");
      if (tam_ref_clk_out == {6{tam_clk40_fine}}) n_fanout++;
    end
    repeat (200) @(posedge jat_clk_ref);

    // 2. fine scan and fine alignment
    jat_scan(1'b0, 1400);
    jat_read(1400);
    emax = 0;
    for (int i = 0; i < NPS; i++) begin
      v = (2500 + 550 * i) * 56 / 1000;   // ps / 17.857
      $display("board %0d: fine edge at step %0d (expected %0d)", i, edge_s[i], v);
      check(edge_s[i] >= v - 3 && edge_s[i] <= v + 3,
            $sformatf("board %0d fine edge %0d, expected %0d", i, edge_s[i], v));
      if (edge_s[i] > emax) emax = edge_s[i];
    end
    if (edge_s[0] >= 0) n_fine_scan++;
    for (int i = 0; i < NPS; i++) ps_fine_dly[i] = FINE_W'(emax - edge_s[i]);
    repeat (20) @(posedge clk);
    for (int t = 0; t < 100000 && !(&ps_fine_ok); t++) @(posedge clk);
    check(&ps_fine_ok, "fine delays not reached");
    tot = 0;
    for (int i = 0; i < NPS; i++) tot += step_cnt[i];
    n_fine_step = tot;
    repeat (100) @(posedge jat_clk_ref);
    jat_scan(1'b0, 1400);
    jat_read(1400);
    for (int i = 0; i < NPS; i++)
      check(edge_s[i] >= emax - 2 && edge_s[i] <= emax + 2,
            $sformatf("after fine alignment board %0d edge %0d, expected %0d", i, edge_s[i], emax));
    $display("after fine alignment: all edges at step %0d +- 2", emax);

    // 3. coarse scan and coarse alignment
    jat_scan(1'b1, 200);
    jat_read(200);
    omax = -1;
    for (int i = 0; i < NPS; i++) begin
      v = (i == 4) ? 2 : (i == 7) ? 1 : 0;
      $display("board %0d: 200 kHz edge at coarse step %0d", i, edge_s[i]);
      check(edge_s[i] >= 0 && wrapdist(edge_s[i], edge_s[0], 200) == v,
            $sformatf("board %0d coarse edge %0d, expected board 0 + %0d", i, edge_s[i], v));
      if (edge_s[i] > omax) omax = edge_s[i];
    end
    if (edge_s[0] >= 0) n_coarse_scan++;
    for (int i = 0; i < NPS; i++) begin
      ps_coarse_dly[i] = 5'(omax - edge_s[i]);
      if (omax != edge_s[i]) n_coarse_dly++;
    end
    repeat (400) @(posedge clk);
    jat_scan(1'b1, 200);
    jat_read(200);
    for (int i = 0; i < NPS; i++)
      check(edge_s[i] == omax,
            $sformatf("after coarse alignment board %0d edge %0d, expected %0d", i, edge_s[i], omax));
    $display("after coarse alignment: all 200 kHz edges at step %0d", omax);

    // 4. TAM-to-TAM scan
    @(posedge tam_scan_clk);
    tam_scan_start <= 1'b1;
    @(posedge tam_scan_clk);
    tam_scan_start <= 1'b0;
    @(posedge tam_scan_clk); #1;
    check(tam_scan_busy, "TAM scan did not start");
    while (!tam_scan_done) @(posedge tam_scan_clk);
    tam_edge = -1;
    prev = -1;
    for (int s = 0; s < 200; s++) begin
      @(posedge tam_scan_clk); tam_rd_step <= 11'(s);
      @(posedge tam_scan_clk); @(posedge tam_scan_clk); #1;
      v = int'(tam_rd_count);
      if (tam_edge < 0 && prev >= 0 && prev < NS / 2 && v >= NS / 2) tam_edge = s;
      prev = v;
    end
    $display("TAM: neighbour clock edge at step %0d (expected 112)", tam_edge);
    check(tam_edge >= 111 && tam_edge <= 113, $sformatf("TAM edge %0d, expected 112", tam_edge));
    if (tam_edge >= 0) n_tam_scan++;

    // 5. soft reset: same phases afterwards
    @(posedge clk);
    rst <= 1'b1;
    repeat (40) @(posedge clk);
    rst <= 1'b0;
    repeat (200) @(posedge clk);
    for (int t = 0; t < 40000 && !(&ps_locked && tam_locked && jat_mmcm_locked &&
                                   &ps_mmcm_locked); t++)
      @(posedge clk);
    check(&ps_locked && tam_locked && jat_mmcm_locked, "not locked again after soft reset");
    repeat (20) @(posedge clk);
    for (int t = 0; t < 100000 && !(&ps_fine_ok); t++) @(posedge clk);
    check(&ps_fine_ok, "fine delays not restored after soft reset");
    repeat (200) @(posedge jat_clk_ref);
    jat_scan(1'b0, 1400);
    jat_read(1400);
    tot = 0;
    for (int i = 0; i < NPS; i++) begin
      check(edge_s[i] >= emax - 2 && edge_s[i] <= emax + 2,
            $sformatf("after soft reset board %0d fine edge %0d, expected %0d", i, edge_s[i], emax));
      if (edge_s[i] >= emax - 2 && edge_s[i] <= emax + 2) tot++;
    end
    jat_scan(1'b1, 200);
    jat_read(200);
    for (int i = 0; i < NPS; i++) begin
      check(edge_s[i] == omax,
            $sformatf("after soft reset board %0d coarse edge %0d, expected %0d", i, edge_s[i], omax));
      if (edge_s[i] == omax) tot++;
    end
    $display("after soft reset: %0d of %0d edges reproduced", tot, 2 * NPS);
    if (tot == 2 * NPS) n_reset++;

    $display("mechanisms: rxslide=%0d lock=%0d fanout=%0d fine_steps=%0d fine_scan=%0d coarse_scan=%0d coarse_delay=%0d tam_scan=%0d reset_reproduced=%0d",
             n_slide, n_lock, n_fanout, n_fine_step, n_fine_scan, n_coarse_scan, n_coarse_dly, n_tam_scan, n_reset);
    check(n_slide > 0, "no RXSLIDE word alignment seen");
    check(n_lock > 0, "no frame lock seen");
    check(n_fanout > 0, "no reference fan-out seen");
    check(n_fine_step > 0, "no fine phase step seen");
    check(n_fine_scan > 0, "no fine scan result");
    check(n_coarse_scan > 0, "no coarse scan result");
    check(n_coarse_dly > 0, "no coarse delay applied");
    check(n_tam_scan > 0, "no TAM scan result");
    check(n_reset > 0, "phases not reproduced after soft reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
