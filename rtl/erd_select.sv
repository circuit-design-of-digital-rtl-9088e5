// erd_select: sorts the demodulated error into reset and normal periods
// (RD and CD).
//
// Each ERD is stored in RD when the reset flag marks its period as a reset
// period, and in CD otherwise. In a normal period the ERD holds only the
// residual rotation error; in a reset period it also holds the error of the
// 2*pi reset, so RD - CD isolates the error of the reset voltage. The
// direction of the reset is stored with RD.
//
// From the source design: RD as the difference signal of the ladder in its
// reset cycle and CD in its normal cycle, selected by RF. This design's
// choice: rd_valid is raised only once a normal period has been stored, so
// the first reset after start-up is not compared with an empty CD.
//
// Timing: rd, cd and rd_valid are registered one clk after erd_valid.
module erd_select
  import fog_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  erd_t       erd,
  input  logic       erd_valid,
  input  logic       rf,          // the period of this ERD held a 2*pi reset
  input  reset_dir_e rf_dir,
  output erd_t       rd,
  output erd_t       cd,
  output reset_dir_e rd_dir,
  output logic       rd_valid     // one-clk strobe: new RD with a valid CD
);
  logic cd_seen;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd       <= '0;
      cd       <= '0;
      rd_dir   <= RST_NONE;
      rd_valid <= 1'b0;
      cd_seen  <= 1'b0;
    end else begin
      rd_valid <= 1'b0;
      if (erd_valid) begin
        if (rf) begin
          rd       <= erd;
          rd_dir   <= rf_dir;
          rd_valid <= cd_seen;
        end else begin
          cd      <= erd;
          cd_seen <= 1'b1;
        end
      end
    end
  end
endmodule
