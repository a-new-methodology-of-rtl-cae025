// tb_phase_monitor: self-checking test of the clock phase scan.
//
// A 40 MHz master clock drives an MMCM model that makes the phase-shifted
// reference (1 ns base delay, 17.857 ps per step) and three more MMCM
// models, without phase shift, that stand for PS-board clocks arriving
// 3.0, 9.25 and 17.6 ns after the master edge with up to 30 ps jitter.
// Fine scan, all 1400 steps of one 25 ns UI, NSAMPLES = 20: for every step
// and channel the count read back must be 20 where the reference edge is
// surely inside the high half of the channel's clock, 0 where it is surely
// in the low half, and the first step that reaches 10 after a low run (the
// clock edge) must lie within 3 steps of the delay computed from the
// channel's skew. Coarse scan, 200 steps of 25 ns over a 5 us UI, against
// 200 kHz clocks offset by 0, 37 and 150 crossings: every count must be 0
// or NSAMPLES, each channel must have one rising and one falling
// transition 100 steps apart, and the rising transitions must differ by
// the offsets. Both scans must raise busy and then done.
module tb_phase_monitor;
  localparam int NCH = 3;
  localparam int NS  = 20;
  localparam int JIT = 30;
  localparam int DLY [NCH] = '{3000, 9250, 17600};
  localparam int OFS [NCH] = '{0, 37, 150};

  logic clk40 = 1'b0;
  logic rst = 1'b1;
  always #12.5 clk40 = ~clk40;

  logic clk_ref, ref_locked, psen, psincdec, psdone;
  logic [NCH-1:0] mon_clk, mon_200k;
  logic ref_200k = 1'b0;
  logic start = 1'b0, coarse = 1'b0;
  logic [10:0] n_steps = '0;
  logic busy, done;
  logic [10:0] rd_step = '0;
  logic [1:0]  rd_ch = '0;
  logic [4:0]  rd_count;
  int checks = 0, failures = 0;

  mmcm_ps_model #(.BASE_PS(1000)) u_ref_mmcm (
    .clkin(clk40), .psclk(clk_ref), .psen(psen), .psincdec(psincdec),
    .psdone(psdone), .clkout(clk_ref), .locked(ref_locked));

  for (genvar c = 0; c < NCH; c++) begin : g_mon
    logic unused_done, unused_lock;
    mmcm_ps_model #(.BASE_PS(DLY[c]), .JITTER_PS(JIT)) u_mon (
      .clkin(clk40), .psclk(clk40), .psen(1'b0), .psincdec(1'b0),
      .psdone(unused_done), .clkout(mon_clk[c]), .locked(unused_lock));
    // 200 kHz monitor clock: 100 crossings high, 100 low, offset OFS[c]
    int n = 0;
    always @(posedge mon_clk[c]) begin
      n <= (n + 1) % 200;
      mon_200k[c] <= ((n + 200 - OFS[c]) % 200) < 100;
    end
  end

  int nr = 0;
  always @(posedge clk_ref) begin
    nr <= (nr + 1) % 200;
    ref_200k <= nr < 100;
  end

  phase_monitor #(.NCH(NCH), .NSAMPLES(NS), .MAX_STEPS(1400), .SETTLE(4)) dut (
    .clk_ref(clk_ref), .rst(rst), .mon_clk(mon_clk), .mon_200k(mon_200k),
    .ref_200k(ref_200k), .start(start), .coarse(coarse), .n_steps(n_steps),
    .busy(busy), .done(done), .mmcm_locked(ref_locked), .psen(psen),
    .psincdec(psincdec), .psdone(psdone), .rd_step(rd_step), .rd_ch(rd_ch),
    .rd_count(rd_count));

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #40ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic read_count(input int s, input int c, output int v);
    @(posedge clk_ref);
    rd_step <= 11'(s); rd_ch <= 2'(c);
    @(posedge clk_ref);
    @(posedge clk_ref); #1;
    v = int'(rd_count);
  endtask

  task automatic run_scan(input logic crs, input int steps, input string tag);
    int t0;
    @(posedge clk_ref);
    coarse <= crs; n_steps <= 11'(steps); start <= 1'b1;
    @(posedge clk_ref);
    start <= 1'b0;
    @(posedge clk_ref); #1;
    check(busy, {tag, ": busy not raised"});
    while (!done) @(posedge clk_ref);
    check(!busy, {tag, ": busy still high when done"});
  endtask

  initial begin
    int v, prev, edge_s, exp_s, t, ph;
    repeat (4) @(posedge clk40);
    rst <= 1'b0;
    while (!ref_locked) @(posedge clk40);
    repeat (4) @(posedge clk40);
    // ---------------- fine scan ----------------
    run_scan(1'b0, 1400, "fine");
    for (int c = 0; c < NCH; c++) begin
      prev = NS; edge_s = -1;
      for (int s = 0; s < 1400; s++) begin
        read_count(s, c, v);
        t  = 1000 + (s * 17857 + 500) / 1000;
        ph = ((t - DLY[c]) % 25000 + 25000) % 25000;
        if (ph >= JIT + 2 && ph <= 12500 - 2)
          check(v == NS, $sformatf("fine ch %0d step %0d: count %0d, expected %0d", c, s, v, NS));
        else if (ph >= 12500 + JIT + 2 && ph <= 25000 - 2)
          check(v == 0, $sformatf("fine ch %0d step %0d: count %0d, expected 0", c, s, v));
        if (edge_s < 0 && prev < NS / 2 && v >= NS / 2) edge_s = s;
        prev = v;
      end
      exp_s = (DLY[c] - 1000 + 17857 / 1000) * 1000 / 17857;
      check(edge_s >= exp_s - 3 && edge_s <= exp_s + 3,
            $sformatf("fine ch %0d: edge at step %0d, expected about %0d", c, edge_s, exp_s));
      $display("fine scan: channel %0d clock edge at step %0d (%0d ps after the reference)",
               c, edge_s, (edge_s * 17857) / 1000);
    end
    // ---------------- coarse scan ----------------
    begin
      int rise_s [NCH];
      int fall_s [NCH];
      run_scan(1'b1, 200, "coarse");
      for (int c = 0; c < NCH; c++) begin
        int nr_up, nr_dn;
        nr_up = 0; nr_dn = 0; rise_s[c] = -1; fall_s[c] = -1;
        read_count(199, c, prev);
        for (int s = 0; s < 200; s++) begin
          read_count(s, c, v);
          check(v == 0 || v == NS, $sformatf("coarse ch %0d step %0d: count %0d", c, s, v));
          if (prev == 0 && v == NS) begin nr_up++; rise_s[c] = s; end
          if (prev == NS && v == 0) begin nr_dn++; fall_s[c] = s; end
          prev = v;
        end
        check(nr_up == 1 && nr_dn == 1,
              $sformatf("coarse ch %0d: %0d rising, %0d falling transitions", c, nr_up, nr_dn));
        check((fall_s[c] - rise_s[c] + 200) % 200 == 100,
              $sformatf("coarse ch %0d: high for %0d steps", c, (fall_s[c] - rise_s[c] + 200) % 200));
        $display("coarse scan: channel %0d rises at step %0d", c, rise_s[c]);
      end
      for (int c = 1; c < NCH; c++)
        check((rise_s[c] - rise_s[0] + 200) % 200 == OFS[c] - OFS[0],
              $sformatf("coarse ch %0d: offset %0d crossings, expected %0d", c,
                        (rise_s[c] - rise_s[0] + 200) % 200, OFS[c] - OFS[0]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
