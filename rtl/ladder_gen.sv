// ladder_gen: ladder (staircase) wave accumulator (ADD2).
//
// At every half-cycle boundary, that is once per transit time of the fiber
// coil, the step height is added to the ladder. Because the counter-
// propagating waves see the modulator one transit time apart, the phase
// difference they pick up equals one step height. The accumulator is
// modulo 2^LAD_W and the main D/A full scale is 2*pi, so overflow of the
// adder is the 2*pi reset of the ladder wave: it needs no comparator.
//
// From the source design: the ladder built by accumulating the step height,
// its 2*pi reset, and its update once per transit time. This design's
// choice: 8 ladder bits below the main D/A LSB, so that fractional step
// heights average out over successive steps.
//
// Timing: on the half_end strobe the new ladder value and the state of the
// half cycle that starts next (next_sq) are registered; ladder_valid pulses
// one clk later.
module ladder_gen
  import fog_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  step_t   step,
  input  logic    half_end,     // a half cycle ends: advance the ladder
  input  logic    sq,           // state of the half that is ending
  output ladder_t ladder,       // full-precision ladder phase
  output logic    next_sq,      // state of the half that starts now
  output logic    ladder_valid
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ladder       <= '0;
      next_sq      <= 1'b1;
      ladder_valid <= 1'b0;
    end else begin
      ladder_valid <= half_end;
      if (half_end) begin
        ladder  <= ladder + ladder_t'(step);  // wraps modulo 2*pi
        next_sq <= ~sq;
      end
    end
  end
endmodule
