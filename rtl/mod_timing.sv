// mod_timing: square-wave modulation timing generator.
//
// The bias modulation is a square wave at the coil's eigenfrequency: each
// half cycle lasts one transit time of light through the fiber coil. This
// block counts A/D samples inside each half cycle and tells the rest of the
// controller which half is running (sq = 1 for the +pi/2 half), which
// samples belong to the integration window, and when a half and a full
// modulation period end.
//
// From the source design: an eigenfrequency of about 158 kHz (316 kHz
// half-cycle rate) and at least 32 integrated samples per half cycle, kept
// away from the spikes at the square-wave edges. This design's choices: 48
// samples per half cycle (15 MHz / 96 = 156 kHz, the nearest whole number of
// samples) and an integration window of the last 32 samples of each half, so
// the first 16 samples after an edge are discarded.
//
// Timing: all outputs except sq are single-clk strobes qualified by
// sample_valid; they describe the sample being delivered in the same cycle.
module mod_timing
  import fog_pkg::*;
#(
  parameter int unsigned HALF_SAMPLES = 48,  // samples per half cycle
  parameter int unsigned INT_SAMPLES  = 32   // integrated samples per half, <= HALF_SAMPLES
) (
  input  logic clk,
  input  logic rst_n,
  input  logic sample_valid,
  output logic sq,          // 1: +pi/2 half cycle running, 0: -pi/2 half
  output logic int_en,      // current sample is inside the integration window
  output logic half_end,    // current sample is the last of its half cycle
  output logic period_end   // current sample is the last of a -pi/2 half
);
  localparam int unsigned IW = $clog2(HALF_SAMPLES);

  logic [IW-1:0] idx;   // index of the current sample within its half

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx <= '0;
      sq  <= 1'b1;
    end else if (sample_valid) begin
      if (idx == IW'(HALF_SAMPLES - 1)) begin
        idx <= '0;
        sq  <= ~sq;
      end else begin
        idx <= idx + 1'b1;
      end
    end
  end

  always_comb begin
    int_en     = sample_valid && (idx >= IW'(HALF_SAMPLES - INT_SAMPLES));
    half_end   = sample_valid && (idx == IW'(HALF_SAMPLES - 1));
    period_end = half_end && !sq;
  end

  initial assert (INT_SAMPLES > 0 && INT_SAMPLES <= HALF_SAMPLES)
    else $error("mod_timing: INT_SAMPLES must be 1..HALF_SAMPLES");
endmodule
