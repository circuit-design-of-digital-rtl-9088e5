// step_integrator: first feedback loop integrator (ADD1).
//
// Each demodulated error ERD is scaled by the loop gain K and added to the
// running step height of the ladder wave. The step height is the feedback
// phase that cancels the Sagnac phase, so once the loop has settled it is the
// measured angular rate. The error after n updates shrinks by the factor
// (1 - 2*Pd*K) each time, so the loop converges monotonically when
// 0 < Pd*K < 1/2, with Pd the detector amplitude in A/D LSB times the number
// of integrated samples.
//
// From the source design: the error is accumulated into the step height and
// the loop gain K with its convergence condition. This design's choices:
// K = 2^K_SHIFT ladder LSB per ERD count (a ladder LSB is 1/256 of a main
// D/A LSB), and saturation of the step height to just below +/-pi/2, the
// largest phase step the bias modulation can demodulate.
//
// Timing: step updates one clk after erd_valid; sat pulses with it when the
// result was clipped.
module step_integrator
  import fog_pkg::*;
#(
  parameter int unsigned K_SHIFT = 4   // K = 2^K_SHIFT ladder LSB per ERD count
) (
  input  logic  clk,
  input  logic  rst_n,
  input  erd_t  erd,
  input  logic  erd_valid,
  output step_t step,        // ladder step height in ladder LSB (2*pi = 2^LAD_W)
  output logic  sat          // update was clipped to +/-STEP_MAX
);
  localparam int unsigned SW = LAD_W + 2;
  localparam logic signed [SW-1:0] STEP_MAX = SW'((longint'(1) << (LAD_W - 2)) - 1);

  logic signed [SW-1:0] sum;

  always_comb sum = SW'(step) + (SW'(erd) <<< K_SHIFT);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      step <= '0;
      sat  <= 1'b0;
    end else begin
      sat <= 1'b0;
      if (erd_valid) begin
        if (sum > STEP_MAX) begin
          step <= step_t'(STEP_MAX);
          sat  <= 1'b1;
        end else if (sum < -STEP_MAX) begin
          step <= step_t'(-STEP_MAX);
          sat  <= 1'b1;
        end else begin
          step <= step_t'(sum);
        end
      end
    end
  end
endmodule
