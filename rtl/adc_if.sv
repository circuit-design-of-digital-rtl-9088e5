// adc_if: parallel interface to the 12-bit A/D converter.
//
// The converter is clocked from the FPGA (adclk) at the system clock divided
// by CLK_DIV. One system-clock cycle before each rising edge of adclk the
// 12-bit output bus is registered, converted from offset binary to two's
// complement by inverting its MSB, and presented on `sample` together with a
// one-cycle `sample_valid` strobe. Every other block of the controller runs
// on these strobes, so the sampling rate sets the modulation timing.
//
// From the source design: a 12-bit converter with a parallel bus AD[0..11],
// a converter clock ADCLK and an active-low output-disable pin driven by the
// FPGA, sampled at 15 MHz or more. This design's choices: the clock divider
// (a 30 MHz system clock gives the 15 MHz sample rate), offset-binary data,
// and the output-disable pin held inactive after reset.
//
// Timing: sample_valid is high for one clk every CLK_DIV clks; sample is
// valid with it and holds until the next strobe.
module adc_if
  import fog_pkg::*;
#(
  parameter int unsigned CLK_DIV = 2   // system clocks per conversion, >= 2
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [ADC_W-1:0]  ad,            // converter output bus
  output logic              adclk,         // converter clock
  output logic              opdis_n,       // converter output disable, active low
  output sample_t           sample,        // two's complement sample
  output logic              sample_valid   // one-clk strobe per sample
);
  localparam int unsigned CW = (CLK_DIV > 2) ? $clog2(CLK_DIV) : 1;
  logic [CW-1:0] div_cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div_cnt      <= '0;
      adclk        <= 1'b0;
      opdis_n      <= 1'b0;
      sample       <= '0;
      sample_valid <= 1'b0;
    end else begin
      opdis_n      <= 1'b1;
      sample_valid <= 1'b0;
      if (div_cnt == CW'(CLK_DIV - 1)) begin
        div_cnt      <= '0;
        sample       <= sample_t'({~ad[ADC_W-1], ad[ADC_W-2:0]});
        sample_valid <= 1'b1;
      end else begin
        div_cnt <= div_cnt + 1'b1;
      end
      // adclk is high in the first half of each conversion period.
      adclk <= (div_cnt == CW'(CLK_DIV - 1)) || (int'(div_cnt) + 1 < int'(CLK_DIV / 2));
    end
  end
endmodule
