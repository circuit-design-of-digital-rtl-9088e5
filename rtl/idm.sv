// idm: detects whether the ladder wave is increasing or decreasing (IDM).
//
// Successive ladder values (the main D/A bits of the ladder, without the
// bias square wave) are subtracted modulo full scale. Read as a signed
// number, the difference is the step height, whose sign is the direction of
// the staircase; the modulo arithmetic makes the 2*pi reset invisible here.
// A difference of zero keeps the last direction. The direction decides the
// sign of the reset error: a rising ladder resets downward, a falling one
// upward.
//
// From the source design: IDM as the block that detects whether the ladder
// increases or decreases and that steers the subtractor of the second loop.
// This design's choice: detection from the sign of the modular difference.
//
// Only the 16 integer ladder bits are compared; the fraction is not needed
// for the sign.
//
// Timing: up is registered one clk after ladder_valid.
module idm
  import fog_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  ladder_t ladder,
  input  logic    ladder_valid,
  output logic    up            // 1: ladder increasing, 0: decreasing
);
  dac_code_t prev;
  logic signed [DAC_W-1:0] diff;

  always_comb diff = $signed(ladder[LAD_W-1 -: DAC_W] - prev);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prev <= '0;
      up   <= 1'b1;
    end else if (ladder_valid) begin
      prev <= ladder[LAD_W-1 -: DAC_W];
      if (diff > 0)      up <= 1'b1;
      else if (diff < 0) up <= 1'b0;
    end
  end
endmodule
