// tb_fog_workloads: the two figures of merit of a gyroscope, measured on the
// controller at its default parameters against the behavioural model.
//
// Scale factor: the Sagnac phase is stepped through +/-0.05, 0.1, 0.2 and
// 0.4 rad. For each point the loop is given 1500 periods to settle, then one
// complete rate word is taken. A least-squares line through the points must
// have the ideal slope, -2^24 / (2*pi) * 3160 rate LSB per rad, within 0.2 %,
// with the same slope for both rotation directions within 0.1 %, and no
// point off the line by more than 0.1 % of the largest input. The sweep is
// run twice, with +3 % and with -3 % modulation gain error: the second loop
// must keep the slope the same within 0.1 %.
//
// Zero offset: after the sweeps, with no rotation, 32 successive rate words
// are taken. Their mean must stay below 100 ladder LSB per update (3.7e-5
// rad) and their spread below 200. A rate word is the net movement of the
// ladder over its window, so detector noise that makes the step height
// wander by a few D/A LSB shows up as a random walk of the ladder (angle
// random walk); in this model that gives a spread of several tens of ladder
// LSB per update. The measured mean and spread are printed.
module tb_fog_workloads;
  import fog_pkg::*;

  localparam real PI = 3.14159265358979;
  localparam int  NPTS = 8;
  localparam real IDEAL = -real'(longint'(1) << LAD_W) / (2.0 * PI) * 3160.0;
  localparam real PH [NPTS] = '{0.4, 0.2, 0.1, 0.05, -0.05, -0.1, -0.2, -0.4};

  logic clk = 1'b0, rst_n = 1'b0;
  always #1 clk = ~clk;

  logic [11:0] ad;
  logic adclk, opdis_n, daclk, sdacs2_n, fs2_n, sdaclk2, sdain2, s_p, s_n, rate_valid;
  dac_code_t bd;
  rate_t rate;
  step_t step;
  aux_code_t aux;
  fog_status_t st;
  logic [13:0] model_aux;
  real phi_s = 0.0, eps0 = 0.0, eps;

  fog_fpga_top dut (
    .clk, .rst_n, .ad, .adclk, .opdis_n, .bd, .daclk,
    .sdacs2_n, .fs2_n, .sdaclk2, .sdain2, .s_p, .s_n,
    .rate, .rate_valid, .step, .aux, .status(st)
  );

  fog_plant_model plant (
    .adclk, .bd, .daclk, .sdacs_n(sdacs2_n), .sdaclk(sdaclk2), .sdain(sdain2),
    .phi_s, .eps0, .ad, .aux(model_aux), .eps
  );

  int checks = 0, failures = 0, n_periods = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic real fabs(input real x);
    return x < 0.0 ? -x : x;
  endfunction

  always @(posedge clk) if (rst_n && st.period_end) n_periods++;

  task automatic run_periods(input int n);
    int start = n_periods;
    while (n_periods < start + n) @(posedge clk);
  endtask

  // The rate word of the next window that starts after this call.
  task automatic next_full_word(output real w);
    @(posedge clk iff rate_valid);
    @(posedge clk iff rate_valid);
    w = real'(rate);
  endtask

  task automatic sweep(input real e0, output real slope);
    real y [NPTS];
    real sx = 0, sy = 0, sxx = 0, sxy = 0, a, b, sp, sn, worst = 0;
    eps0 = e0;
    for (int i = 0; i < NPTS; i++) begin
      phi_s = PH[i];
      run_periods(1500);
      next_full_word(y[i]);
      sx += PH[i]; sy += y[i]; sxx += PH[i] * PH[i]; sxy += PH[i] * y[i];
    end
    b = (NPTS * sxy - sx * sy) / (NPTS * sxx - sx * sx);
    a = (sy - b * sx) / NPTS;
    for (int i = 0; i < NPTS; i++)
      if (fabs(y[i] - (a + b * PH[i])) > worst) worst = fabs(y[i] - (a + b * PH[i]));
    sp = (y[0] - y[3]) / (PH[0] - PH[3]);
    sn = (y[4] - y[7]) / (PH[4] - PH[7]);
    $display("gain error %0.3f: slope %0.1f (ideal %0.1f), +dir %0.1f, -dir %0.1f, worst residual %0.1f, eps now %f",
             e0, b, IDEAL, sp, sn, worst, eps);
    check(fabs(b / IDEAL - 1.0) < 0.002, "scale factor within 0.2 % of ideal");
    check(fabs(sp / sn - 1.0) < 0.001, "same scale factor for both directions");
    check(worst < 0.001 * fabs(IDEAL) * 0.4, "linearity over the input range");
    slope = b;
  endtask

  initial begin
    repeat (40_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real s1, s2, w, sum = 0, sum2 = 0, mean, sd;
    repeat (10) @(posedge clk);
    rst_n = 1'b1;
    sweep(0.03, s1);
    sweep(-0.03, s2);
    check(fabs(s1 / s2 - 1.0) < 0.001, "scale factor independent of modulation gain error");

    phi_s = 0.0;
    run_periods(1500);
    for (int i = 0; i < 32; i++) begin
      next_full_word(w);
      sum += w; sum2 += w * w;
    end
    mean = sum / 32.0 / 3160.0;
    sd   = $sqrt(sum2 / 32.0 - (sum / 32.0) * (sum / 32.0)) / 3160.0;
    $display("zero offset: mean %f, spread %f ladder LSB per update (%e rad)", mean, sd,
             mean * 2.0 * PI / real'(longint'(1) << LAD_W));
    check(fabs(mean) < 100.0, "zero offset below 100 ladder LSB per update");
    check(sd < 200.0, "zero offset spread below 200 ladder LSB per update");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
