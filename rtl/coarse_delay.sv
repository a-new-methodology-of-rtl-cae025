// coarse_delay: delay of the timing signals in whole bunch crossings.
//
// A DEPTH-stage shift register of W-bit entries advances once per bunch
// crossing (bc_strobe, one pulse per 25 ns on the 200 MHz word clock);
// the output is the entry selected by 'delay', so one step is 25 ns.
// With delay = 0 the output is the value shifted in at the last strobe.
// Together with the MMCM fine delay (18 ps steps) it sets the phase of a
// PS board's or TAM's timing relative to the Sector Logic. The shift
// register follows the description of the design; its depth and width are
// this design's choices.
//
// Timing: dout is registered and changes one clock after a bc_strobe.
// A change of 'delay' takes effect at the next strobe.
module coarse_delay #(
  parameter int W     = 8,
  parameter int DEPTH = 32
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     bc_strobe,
  input  logic [$clog2(DEPTH)-1:0] delay,
  input  logic [W-1:0]             din,
  output logic [W-1:0]             dout
);

  logic [W-1:0] sr [DEPTH];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < DEPTH; i++) sr[i] <= '0;
      dout <= '0;
    end else if (bc_strobe) begin
      sr[0] <= din;
      for (int i = 1; i < DEPTH; i++) sr[i] <= sr[i-1];
      dout <= (delay == '0) ? din : sr[delay - 1'b1];
    end
  end

endmodule
