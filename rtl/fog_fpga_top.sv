// fog_fpga_top: FPGA logic of a digital dual closed-loop fiber optic gyroscope.
//
// The detector signal arrives from the 12-bit A/D converter. The
// demodulator integrates it over each half of the +/-pi/2 square-wave bias
// and subtracts the halves (ERD). The first loop adds ERD into the step
// height (ADD1), the step height is accumulated into a ladder wave that
// rises one step per fiber transit time and wraps at 2*pi (ADD2), and ladder
// plus square wave go to the 16-bit main D/A converter that drives the phase
// modulator. The step height cancels the Sagnac phase and is the rate
// output. The second loop watches the periods that hold a 2*pi reset (RF),
// compares their ERD (RD) with that of normal periods (CD), signs the
// difference with the ladder direction (IDM) and accumulates it into the
// code of the 14-bit assistant D/A converter, which sets the main
// converter's reference so that a reset stays exactly 2*pi.
//
// The pins follow the FPGA's connection to the A/D sheet, the D/A sheet and
// the interface connector of the source design: AD[0..11], ADCLK and the
// output-disable pin of the A/D converter; BD[0..15] and DACLK of the main
// D/A converter; SDACS2, FS2, SDACLK2 and SDAIN2 of the assistant D/A
// converter; the serial pair S+/S- and the active-low reset RST. The serial
// port that the A/D sheet also carries (SDACS1, SDACLK, SDAIN, FS) is not
// driven: its purpose is not described. Parallel copies of the rate word,
// the step height and the assistant code, and a status word with the loop
// events (resets, ladder direction, saturation), are brought out for test.
//
// Timing: all logic runs on clk; one A/D sample every CLK_DIV clks, a half
// cycle of HALF_SAMPLES samples. A new main D/A code is latched 4 clks after
// the last sample of a half cycle.
module fog_fpga_top
  import fog_pkg::*;
#(
  parameter int unsigned CLK_DIV      = 2,     // clks per A/D sample
  parameter int unsigned HALF_SAMPLES = 48,    // samples per half cycle
  parameter int unsigned INT_SAMPLES  = 32,    // integrated samples per half
  parameter int unsigned K_SHIFT      = 4,     // first loop gain
  parameter int unsigned A_SHIFT      = 3,     // second loop gain
  parameter int unsigned SCLK_HALF    = 2,     // assistant D/A serial clock
  parameter int unsigned OUT_HALVES   = 3160,  // rate output window
  parameter int unsigned BAUD_DIV     = 260    // serial rate output bit time
) (
  input  logic             clk,
  input  logic             rst_n,     // RST, active low
  // A/D converter
  input  logic [ADC_W-1:0] ad,
  output logic             adclk,
  output logic             opdis_n,
  // main D/A converter
  output dac_code_t        bd,
  output logic             daclk,
  // assistant D/A converter
  output logic             sdacs2_n,
  output logic             fs2_n,
  output logic             sdaclk2,
  output logic             sdain2,
  // serial rate output
  output logic             s_p,
  output logic             s_n,
  // parallel observation
  output rate_t            rate,
  output logic             rate_valid,
  output step_t            step,
  output aux_code_t        aux,
  output fog_status_t      status
);
  sample_t    sample;
  logic       sample_valid;
  logic       sq, int_en, half_end, period_end;
  erd_t       erd, rd, cd;
  logic       erd_valid, step_sat;
  ladder_t    ladder;
  logic       next_sq, ladder_valid;
  dac_code_t  code;
  logic       code_sq, code_valid;
  logic       rf, rf_valid;
  reset_dir_e rf_dir, half_dir, rd_dir;
  logic       up, rd_valid, aux_valid, aux_sat, spi_busy, rate_dropped;

  adc_if #(.CLK_DIV(CLK_DIV)) u_adc (
    .clk, .rst_n, .ad, .adclk, .opdis_n, .sample, .sample_valid
  );

  mod_timing #(.HALF_SAMPLES(HALF_SAMPLES), .INT_SAMPLES(INT_SAMPLES)) u_timing (
    .clk, .rst_n, .sample_valid, .sq, .int_en, .half_end, .period_end
  );

  demodulator u_dem (
    .clk, .rst_n, .sample, .sq, .int_en, .half_end, .erd, .erd_valid
  );

  step_integrator #(.K_SHIFT(K_SHIFT)) u_add1 (
    .clk, .rst_n, .erd, .erd_valid, .step, .sat(step_sat)
  );

  ladder_gen u_add2 (
    .clk, .rst_n, .step, .half_end, .sq, .ladder, .next_sq, .ladder_valid
  );

  wave_composer u_comp (
    .clk, .rst_n, .ladder, .sq(next_sq), .ladder_valid, .code, .code_sq, .code_valid
  );

  reset_flag u_rf (
    .clk, .rst_n, .code, .code_sq, .code_valid, .rf, .rf_dir, .half_dir, .rf_valid
  );

  idm u_idm (
    .clk, .rst_n, .ladder, .ladder_valid, .up
  );

  erd_select u_rdcd (
    .clk, .rst_n, .erd, .erd_valid, .rf, .rf_dir, .rd, .cd, .rd_dir, .rd_valid
  );

  gain_loop #(.A_SHIFT(A_SHIFT)) u_gain (
    .clk, .rst_n, .rd, .cd, .rd_valid, .up, .aux, .aux_valid, .sat(aux_sat)
  );

  main_dac_if u_dac (
    .clk, .rst_n, .code, .code_valid, .bd, .daclk
  );

  spi_dac_if #(.DATA_W(AUX_W), .FRAME_W(16), .SCLK_HALF(SCLK_HALF)) u_spi (
    .clk, .rst_n, .data(aux), .start(aux_valid),
    .cs_n(sdacs2_n), .fs_n(fs2_n), .sclk(sdaclk2), .sdin(sdain2), .busy(spi_busy)
  );

  always_comb begin
    status.rf_valid     = rf_valid;
    status.rf           = rf;
    status.rf_dir       = rf_dir;
    status.half_dir     = half_dir;
    status.rd_dir       = rd_dir;
    status.rd_valid     = rd_valid;
    status.up           = up;
    status.step_sat     = step_sat;
    status.aux_sat      = aux_sat;
    status.spi_busy     = spi_busy;
    status.rate_dropped = rate_dropped;
    status.period_end   = period_end;
  end

  rate_output #(.OUT_HALVES(OUT_HALVES), .BAUD_DIV(BAUD_DIV)) u_rate (
    .clk, .rst_n, .step, .step_valid(ladder_valid),
    .rate, .rate_valid, .dropped(rate_dropped), .s_p, .s_n
  );
endmodule
