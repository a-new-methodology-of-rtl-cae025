// tb_fine_delay_ctrl: self-checking test of the MMCM phase-shift stepper.
//
// A testbench MMCM port answers each PSEN with PSDONE after a random 3..15
// cycles and keeps its own phase position modulo 1400. For a list of
// targets (small moves, the wrap from 0 down to 1399, a half-circle move,
// random targets) it checks that the controller issues exactly the
// shortest number of steps in one direction, never a second PSEN while a
// step is in flight, and ends with position == target == the MMCM's
// position and at_target high. Dropping mmcm_locked must clear the
// position.
module tb_fine_delay_ctrl;
  localparam int N = 1400;
  logic        clk = 1'b0;
  logic        rst = 1'b1;
  logic        mmcm_locked;
  logic [10:0] target, position;
  logic        psen, psincdec, psdone, at_target;
  int checks = 0, failures = 0;

  fine_delay_ctrl #(.STEPS_PER_UI(N)) dut (
    .clk(clk), .rst(rst), .mmcm_locked(mmcm_locked), .target(target),
    .psen(psen), .psincdec(psincdec), .psdone(psdone),
    .position(position), .at_target(at_target));

  always #2.5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // MMCM phase-shift port model
  int mpos = 0, busy = 0, n_inc = 0, n_dec = 0, overlap = 0;
  always @(posedge clk) begin
    psdone <= 1'b0;
    if (!mmcm_locked) mpos <= 0;
    if (busy > 0) begin
      if (psen) overlap <= overlap + 1;
      busy <= busy - 1;
      if (busy == 1) psdone <= 1'b1;
    end else if (psen) begin
      mpos <= (mpos + (psincdec ? 1 : N - 1)) % N;
      if (psincdec) n_inc <= n_inc + 1; else n_dec <= n_dec + 1;
      busy <= int'($urandom_range(15, 3));
    end
  end

  task automatic move_to(input int t);
    int from, fwd, exp_steps;
    from = int'(position);
    fwd  = (t - from + N) % N;
    exp_steps = (fwd <= N / 2) ? fwd : N - fwd;
    n_inc = 0; n_dec = 0;
    target <= 11'(t);
    repeat (2) @(posedge clk);
    while (!at_target) @(posedge clk);
    #1;
    check(int'(position) == t && mpos == t,
          $sformatf("target %0d: position %0d, mmcm %0d", t, position, mpos));
    check(n_inc + n_dec == exp_steps && (n_inc == 0 || n_dec == 0),
          $sformatf("%0d -> %0d: %0d up, %0d down, expected %0d steps", from, t, n_inc, n_dec, exp_steps));
  endtask

  initial begin
    psdone = 1'b0; target = '0; mmcm_locked = 1'b0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    repeat (3) @(posedge clk);
    mmcm_locked <= 1'b1;
    repeat (3) @(posedge clk);
    move_to(5);
    move_to(0);
    move_to(1399);
    move_to(1);
    move_to(700);
    move_to(1399);
    for (int i = 0; i < 20; i++) move_to(int'($urandom_range(N - 1, 0)));
    check(overlap == 0, $sformatf("%0d PSEN pulses while a step was in flight", overlap));
    mmcm_locked <= 1'b0;
    repeat (20) @(posedge clk); #1;
    check(position == '0, "position not cleared while unlocked");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
