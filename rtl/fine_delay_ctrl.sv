// fine_delay_ctrl: steps an MMCM's dynamic phase shift to a target value.
//
// A 7-series MMCM moves its output phase by 1/56 of the VCO period (about
// 18 ps with a 1 GHz VCO) for each PSEN pulse, later or earlier according
// to PSINCDEC, and answers each step with a PSDONE pulse. This controller
// keeps the current position (0..STEPS_PER_UI-1, one UI of the 40 MHz clock)
// and, whenever it differs from 'target', issues one step at a time, waiting
// for PSDONE before the next, along the shorter way round the circle. The
// position is cleared while the MMCM is not locked, since a relocked MMCM
// starts at zero shift.
//
// Timing: psen is a one-cycle pulse; at most one step is in flight.
// at_target is high when position == target and no step is in flight.
// Using the MMCM for the fine delay follows the design's description; the
// shortest-way stepping is this design's choice.
module fine_delay_ctrl #(
  parameter int STEPS_PER_UI = 1400,
  localparam int PW          = $clog2(STEPS_PER_UI)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          mmcm_locked,
  input  logic [PW-1:0] target,
  output logic          psen,
  output logic          psincdec,
  input  logic          psdone,
  output logic [PW-1:0] position,
  output logic          at_target
);

  logic          busy;
  logic [PW-1:0] fwd;          // steps needed going later (increment)

  always_comb begin
    if (target >= position) fwd = target - position;
    else                    fwd = PW'(int'(target) + STEPS_PER_UI - int'(position));
  end

  assign at_target = !busy && (position == target);

  always_ff @(posedge clk) begin
    if (rst || !mmcm_locked) begin
      busy     <= 1'b0;
      psen     <= 1'b0;
      psincdec <= 1'b0;
      position <= '0;
    end else begin
      psen <= 1'b0;
      if (busy) begin
        if (psdone) begin
          busy <= 1'b0;
          if (psincdec) position <= (int'(position) == STEPS_PER_UI - 1) ? '0 : position + 1'b1;
          else          position <= (position == '0) ? PW'(STEPS_PER_UI - 1) : position - 1'b1;
        end
      end else if (position != target) begin
        busy     <= 1'b1;
        psen     <= 1'b1;
        psincdec <= (int'(fwd) <= STEPS_PER_UI / 2);
      end
    end
  end

endmodule
