// fog_plant_model: behavioural model of everything around the FPGA in a
// closed-loop fiber optic gyroscope, for simulation only.
//
// It stands for the main D/A converter, post amplifier and phase modulator,
// the assistant D/A converter that sets the main converter's reference, the
// fiber coil, the detector with its preamplifier, and the 12-bit A/D
// converter. On each rising edge of adclk it forms the phase difference of
// the two counter-propagating waves as the modulator phase now minus the
// phase HALF_SAMPLES samples ago (one transit time), where the modulator
// phase is the latched main D/A code times (2*pi / 2^16) * (1 + eps). The
// gain error eps = eps0 + (aux - 8192) * AUX_GAIN models the drift of the
// modulation gain and its correction through the assistant converter. The
// detector power is PD * (1 + cos(dphi + phi_s)) in A/D LSB plus uniform
// noise of +/-NOISE LSB, and the A/D output is offset binary centred on PD.
module fog_plant_model #(
  parameter int unsigned HALF_SAMPLES = 48,
  parameter real         PD           = 1000.0,
  parameter real         AUX_GAIN     = 1.2e-5,   // gain change per assistant LSB
  parameter int unsigned NOISE        = 2
) (
  input  logic        adclk,
  input  logic [15:0] bd,
  input  logic        daclk,
  input  logic        sdacs_n,
  input  logic        sdaclk,
  input  logic        sdain,
  input  real         phi_s,     // Sagnac phase, rad
  input  real         eps0,      // modulation gain error with aux at mid-scale
  output logic [11:0] ad,
  output logic [13:0] aux,       // code held by the assistant converter
  output real         eps        // present gain error
);
  localparam real PI = 3.14159265358979;

  logic [15:0] dac_q = 16'd0;
  logic [15:0] hist [HALF_SAMPLES];
  logic [15:0] shin = 16'd0;
  real dphi, p;
  int  v;

  initial begin
    aux = 14'd8192;
    ad  = 12'd2048;
    foreach (hist[i]) hist[i] = 16'd0;
  end

  always @(posedge daclk) dac_q <= bd;

  // Assistant converter: shift on rising sclk while selected, update on deselect.
  // Only a complete 16-bit frame updates the code.
  int nb = 0;
  always @(negedge sdacs_n) nb = 0;
  always @(posedge sdaclk) if (!sdacs_n) begin shin <= {shin[14:0], sdain}; nb++; end
  always @(posedge sdacs_n) if (nb == 16) aux <= shin[13:0];

  always_comb eps = eps0 + (real'(int'(aux)) - 8192.0) * AUX_GAIN;

  always @(posedge adclk) begin
    for (int i = HALF_SAMPLES - 1; i > 0; i--) hist[i] <= hist[i-1];
    hist[0] <= dac_q;
    dphi = (real'(int'(dac_q)) - real'(int'(hist[HALF_SAMPLES-1])))
           * (2.0 * PI / 65536.0) * (1.0 + eps);
    p = PD * (1.0 + $cos(dphi + phi_s));
    v = int'(p - PD) + int'($urandom_range(2 * NOISE)) - int'(NOISE) + 2048;
    if (v < 0) v = 0;
    if (v > 4095) v = 4095;
    ad <= 12'(v);
  end
endmodule
