// main_dac_if: parallel interface to the 16-bit main D/A converter.
//
// Each new code is placed on the 16-bit bus BD and, one clk later, latched
// into the converter by a one-clk pulse on DACLK, so the bus is stable for a
// full clk before the latching edge. The converter's analog output, scaled
// by the post amplifier, drives the phase modulator.
//
// From the source design: a 16-bit main converter on a parallel bus BD[0..15]
// with a clock DACLK. This design's choice: the one-clk setup and the
// positive latch pulse.
//
// Timing: bd changes one clk after code_valid; daclk is high in the clk
// after that.
module main_dac_if
  import fog_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  dac_code_t code,
  input  logic      code_valid,
  output dac_code_t bd,      // converter data bus
  output logic      daclk    // converter latch clock, rising edge latches bd
);
  logic pending;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bd      <= '0;
      daclk   <= 1'b0;
      pending <= 1'b0;
    end else begin
      daclk   <= pending;
      pending <= code_valid;
      if (code_valid) bd <= code;
    end
  end
endmodule
