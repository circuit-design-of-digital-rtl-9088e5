// gain_loop: subtractor and accumulator of the second closed loop (SUB and
// the accumulator in front of the assistant D/A converter).
//
// When the modulation gain drifts, a 2*pi reset of the ladder no longer
// shifts the optical phase by exactly 2*pi, and the period holding the reset
// shows an extra error. SUB forms RD - CD to isolate that error and gives it
// the sign of the ladder direction from IDM, since a rising ladder resets
// downward and a falling one upward. The signed error, scaled by
// 2^-A_SHIFT, is subtracted from an accumulator whose value is the
// assistant D/A code. The assistant converter sets the reference voltage,
// and so the gain, of the main D/A converter; the accumulator settles where
// the reset error is zero, which is where the reset voltage is exactly 2*pi.
//
// From the source design: the reset error detected around the ladder reset,
// accumulated, and sent to the 14-bit assistant D/A as the feedback of the
// second loop. This design's choices: the loop gain 2^-A_SHIFT, a start
// value of mid-scale, saturation at the code limits, and the sign
// convention that a larger assistant code raises the main converter's gain.
//
// Timing: aux and aux_valid are registered one clk after rd_valid.
module gain_loop
  import fog_pkg::*;
#(
  parameter int unsigned A_SHIFT  = 3,                      // loop gain 2^-A_SHIFT
  parameter aux_code_t   AUX_INIT = aux_code_t'(1) << (AUX_W - 1)  // start-up code
) (
  input  logic      clk,
  input  logic      rst_n,
  input  erd_t      rd,
  input  erd_t      cd,
  input  logic      rd_valid,
  input  logic      up,          // ladder increasing (from IDM)
  output aux_code_t aux,         // assistant D/A code
  output logic      aux_valid,   // one-clk strobe on each update
  output logic      sat          // the last update was clipped
);
  localparam int unsigned W = ERD_W + 2;
  localparam logic signed [W-1:0] AUX_MAX = W'((1 << AUX_W) - 1);

  logic signed [W-1:0] diff, err, next;

  always_comb begin
    diff = W'(rd) - W'(cd);
    err  = up ? diff : -diff;
    next = $signed({{(W-AUX_W){1'b0}}, aux}) - (err >>> A_SHIFT);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      aux       <= AUX_INIT;
      aux_valid <= 1'b0;
      sat       <= 1'b0;
    end else begin
      aux_valid <= rd_valid;
      if (rd_valid) begin
        sat <= 1'b0;
        if (next < 0) begin
          aux <= '0;
          sat <= 1'b1;
        end else if (next > AUX_MAX) begin
          aux <= '1;
          sat <= 1'b1;
        end else begin
          aux <= AUX_W'(next);
        end
      end
    end
  end
endmodule
