// mmcm_ps_model: behavioural model of an MMCM with dynamic phase shift, for
// simulation only. Parameters are in ps; delays assume a 1 ns time unit.
//
// Every rising edge of clkin produces a rising edge of clkout
// BASE_PS + position * 17.857 ps later (one step = 1/56 of a 1 GHz VCO
// period, rounded to 1 ps), with a HALF_PS high time, so the output is a
// clean 50% clock whatever the input duty cycle. A PSEN pulse, sampled on
// psclk while locked, moves the position one step later (psincdec = 1) or
// earlier (modulo 1400 steps, one 25 ns period), and PSDONE pulses 12
// psclk cycles later. 'locked' rises after LOCK_EDGES input edges with
// the position at 0. If the input clock stops for more than 100 ns (for
// instance while the clock path upstream is in reset), 'locked' falls and
// the position returns to 0, as after the MMCM reset that follows a loss
// of its input clock. JITTER_PS adds a random
// 0..JITTER_PS ps to each output edge pair.
module mmcm_ps_model #(
  parameter int BASE_PS    = 1000,
  parameter int HALF_PS    = 12500,
  parameter int LOCK_EDGES = 8,
  parameter int JITTER_PS  = 0
) (
  input  logic clkin,
  input  logic psclk,
  input  logic psen,
  input  logic psincdec,
  output logic psdone,
  output logic clkout,
  output logic locked
);
  int position;
  int edges;
  int busy_cnt;
  realtime last_in;

  initial begin
    position = 0;
    edges    = 0;
    busy_cnt = 0;
    psdone   = 1'b0;
    clkout   = 1'b0;
    locked   = 1'b0;
    last_in  = 0.0;
  end

  always begin
    #50;
    if (locked && $realtime - last_in > 100.0) begin
      locked   = 1'b0;
      edges    = 0;
      position = 0;
    end
  end

  always @(posedge clkin) begin
    automatic int d = BASE_PS + (position * 17857 + 500) / 1000
                      + ((JITTER_PS > 0) ? int'($urandom_range(JITTER_PS, 0)) : 0);
    last_in = $realtime;
    if (edges < LOCK_EDGES) edges++;
    else locked = 1'b1;
    fork
      begin
        #(real'(d) / 1000.0) clkout = 1'b1;
        #(real'(HALF_PS) / 1000.0) clkout = 1'b0;
      end
    join_none
  end

  always @(posedge psclk) begin
    psdone <= 1'b0;
    if (busy_cnt > 0) begin
      busy_cnt <= busy_cnt - 1;
      if (busy_cnt == 1) psdone <= 1'b1;
    end else if (psen && locked) begin
      position = (position + (psincdec ? 1 : 1399)) % 1400;
      busy_cnt <= 12;
    end
  end
endmodule
