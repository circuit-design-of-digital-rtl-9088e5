// wave_composer: digital sum of the ladder wave and the square wave.
//
// The main D/A converter drives the phase modulator with one waveform that
// carries both the feedback ladder and the +/-pi/2 bias. The ladder's upper
// DAC_W bits are taken and, in the +pi/2 half cycle, a quarter of full scale
// (pi/2) is added; in the other half nothing is added. Since a wave and its
// counterpart one transit time later see successive codes, the difference
// alternates between +pi/2 and -pi/2 on top of the step height. The sum
// wraps modulo full scale like the ladder, so adding the bias can itself
// cause a 2*pi reset.
//
// From the source design: digital composition of square wave and ladder wave
// into the main D/A converter. This design's choice: a 0 / pi/2 square wave
// (rather than +/-pi/4), which keeps the code unsigned.
//
// The 8 fractional ladder bits are not used here: the converter takes only
// the integer part, and the fraction shows up as the dither of successive
// codes.
//
// Timing: code and code_valid are registered one clk after ladder_valid.
module wave_composer
  import fog_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  ladder_t   ladder,
  input  logic      sq,           // state of the half this code belongs to
  input  logic      ladder_valid,
  output dac_code_t code,         // main D/A code
  output logic      code_sq,      // half-cycle state of `code`
  output logic      code_valid
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      code       <= '0;
      code_sq    <= 1'b0;
      code_valid <= 1'b0;
    end else begin
      code_valid <= ladder_valid;
      if (ladder_valid) begin
        code    <= ladder[LAD_W-1 -: DAC_W] + (sq ? QUARTER : '0);
        code_sq <= sq;
      end
    end
  end
endmodule
