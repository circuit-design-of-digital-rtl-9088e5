// reset_flag: marks the modulation periods that contain a 2*pi reset (RF).
//
// Every new main D/A code is compared with the previous one as plain
// integers. A normal change is a step height plus or minus pi/2, well inside
// half of full scale; a jump larger than half of full scale is a 2*pi reset,
// upward or downward. The resets of the two halves of a modulation period
// (+pi/2 half first) are summed, because a reset caused only by the bias
// square wave is undone in the next half and its errors cancel in the
// demodulated signal. A period whose net count is not zero is a reset
// period: its ERD carries the error of the 2*pi reset voltage.
//
// From the source design: RF as the flag that tells whether the demodulated
// signal belongs to a reset cycle. This design's choices: detection from
// the code jump and the net count over the period.
//
// Timing: rf, rf_dir and rf_valid are registered one clk after the code of a
// -pi/2 half arrives, so they are settled long before that period's ERD.
module reset_flag
  import fog_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  dac_code_t  code,
  input  logic       code_sq,
  input  logic       code_valid,
  output logic       rf,          // last complete period held a net reset
  output reset_dir_e rf_dir,      // its direction
  output reset_dir_e half_dir,    // reset seen on the latest code (one clk strobe)
  output logic       rf_valid     // one-clk strobe when rf is updated
);
  localparam int signed HALF_FS = 1 <<< (DAC_W - 1);

  dac_code_t         prev_code;
  logic signed [DAC_W+1:0] jump;
  logic signed [1:0] r_now, r_first;
  logic signed [2:0] r_net;

  always_comb begin
    jump  = $signed({2'b00, code}) - $signed({2'b00, prev_code});
    if (jump > (DAC_W+2)'(HALF_FS))        r_now = 2'sb01;
    else if (jump < -(DAC_W+2)'(HALF_FS))  r_now = -2'sb01;
    else                                   r_now = 2'sb00;
    r_net = 3'(r_first) + 3'(r_now);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prev_code <= '0;
      r_first   <= '0;
      rf        <= 1'b0;
      rf_dir    <= RST_NONE;
      half_dir  <= RST_NONE;
      rf_valid  <= 1'b0;
    end else begin
      rf_valid <= 1'b0;
      half_dir <= RST_NONE;
      if (code_valid) begin
        prev_code <= code;
        half_dir  <= (r_now > 0) ? RST_UP : (r_now < 0) ? RST_DOWN : RST_NONE;
        if (code_sq) begin
          r_first <= r_now;
        end else begin
          rf       <= (r_net != 0);
          rf_dir   <= (r_net > 0) ? RST_UP : (r_net < 0) ? RST_DOWN : RST_NONE;
          rf_valid <= 1'b1;
        end
      end
    end
  end
endmodule
