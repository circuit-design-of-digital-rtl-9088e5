// demodulator: integrating filter and square-wave demodulator (Dem).
//
// The detector signal is integrated over the window of each half cycle. At
// the end of every modulation period the sum taken in the -pi/2 half is
// subtracted from the sum of the +pi/2 half that preceded it. The result,
// ERD, is proportional to -sin(residual Sagnac phase): zero when the ladder
// wave cancels the rotation, and of opposite sign for the two directions of
// error. Summing many samples is the digital low-pass filter that suppresses
// white detector noise.
//
// From the source design: integral filtering of the samples and ERD as the
// difference of the interference signal between the positive and the
// negative half cycle. This design's choices: plain sums (no weighting) and
// a 20-bit ERD word, wide enough for 64 samples of 12 bits per half.
//
// Timing: erd_valid pulses one clk after the period_end strobe; erd holds
// until the next period.
module demodulator
  import fog_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  sample_t sample,
  input  logic    sq,          // half-cycle state from mod_timing
  input  logic    int_en,      // sample is inside the integration window
  input  logic    half_end,    // sample is the last of its half
  output erd_t    erd,         // +half sum minus -half sum
  output logic    erd_valid
);
  erd_t acc, pos_sum, acc_next;

  always_comb acc_next = acc + (int_en ? erd_t'(sample) : erd_t'(0));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc       <= '0;
      pos_sum   <= '0;
      erd       <= '0;
      erd_valid <= 1'b0;
    end else begin
      erd_valid <= 1'b0;
      if (half_end) begin
        acc <= '0;
        if (sq) begin
          pos_sum <= acc_next;
        end else begin
          erd       <= pos_sum - acc_next;
          erd_valid <= 1'b1;
        end
      end else begin
        acc <= acc_next;
      end
    end
  end
endmodule
