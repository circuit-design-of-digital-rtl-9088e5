// fog_pkg: widths and constants shared by the FOG closed-loop controller.
//
// The converter widths follow the hardware the design is built around: a
// 12-bit A/D converter on the detector signal, a 16-bit main D/A converter
// driving the phase modulator and a 14-bit assistant D/A converter setting
// the main converter's reference. The main D/A code spans one full 2*pi of
// modulator phase, so pi/2 is a quarter of its range. The fractional ladder
// bits, the demodulator word width and the phase encoding are this design's
// own choices.
package fog_pkg;
  localparam int unsigned ADC_W  = 12;  // A/D converter resolution
  localparam int unsigned DAC_W  = 16;  // main D/A converter resolution
  localparam int unsigned AUX_W  = 14;  // assistant D/A converter resolution
  localparam int unsigned FRAC_W = 8;   // ladder bits below the main D/A LSB
  localparam int unsigned LAD_W  = DAC_W + FRAC_W;  // ladder accumulator width
  localparam int unsigned ERD_W  = 20;  // demodulated error word
  localparam int unsigned RATE_W = 40;  // angular rate output word

  // Square-wave bias: pi/2 of modulator phase in main D/A LSB (2*pi = 2^DAC_W).
  localparam logic [DAC_W-1:0] QUARTER = DAC_W'(1) << (DAC_W - 2);

  typedef logic signed [ADC_W-1:0] sample_t;
  typedef logic signed [ERD_W-1:0] erd_t;
  typedef logic signed [LAD_W-1:0] step_t;
  typedef logic        [LAD_W-1:0] ladder_t;
  typedef logic        [DAC_W-1:0] dac_code_t;
  typedef logic        [AUX_W-1:0] aux_code_t;
  typedef logic signed [RATE_W-1:0] rate_t;

  // Direction of a 2*pi reset seen on the main D/A code.
  typedef enum logic [1:0] {
    RST_NONE = 2'b00,
    RST_UP   = 2'b01,   // code jumped up by about full scale
    RST_DOWN = 2'b10    // code jumped down by about full scale
  } reset_dir_e;

  // Loop events brought out of the top for observation.
  typedef struct packed {
    logic       rf_valid;      // reset flag updated (once per period)
    logic       rf;            // last period held a net 2*pi reset
    reset_dir_e rf_dir;        // its direction
    reset_dir_e half_dir;      // reset on the latest main D/A code (strobe)
    reset_dir_e rd_dir;        // direction stored with RD
    logic       rd_valid;      // second loop update (strobe)
    logic       up;            // ladder increasing (IDM)
    logic       step_sat;      // step height clipped (strobe)
    logic       aux_sat;       // assistant code at a limit
    logic       spi_busy;      // assistant D/A frame in progress
    logic       rate_dropped;  // rate window not sent serially (strobe)
    logic       period_end;    // last sample of a modulation period (strobe)
  } fog_status_t;
endpackage
