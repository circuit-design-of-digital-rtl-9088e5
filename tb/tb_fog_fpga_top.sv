// tb_fog_fpga_top: end-to-end test of the closed-loop controller at its
// default parameters, against the behavioural gyroscope model.
//
// Three scenarios run back to back on the same controller:
//   A  positive Sagnac phase (falling ladder, downward 2*pi resets) with a
//      +3 % modulation gain error;
//   B  negative Sagnac phase (rising ladder, upward resets) with a -2 % error;
//   C  a Sagnac phase beyond pi/2, which must drive the step height into
//      its limit.
// After A and B the step height must equal the Sagnac phase in ladder LSB
// (within 0.5 %), the second loop must have brought the gain error under
// 0.3 %, and the rate word must equal the window sum of the step height.
// The serial rate frames are decoded and compared with the parallel rate
// word, the assistant D/A frames are received by the model, and the main
// D/A latch interval is checked against one half cycle (96 clks) and the
// rate word interval against 3160 half cycles. Each loop
// mechanism (resets in both directions, reset periods, second-loop updates,
// both ladder directions, rate words, serial frames, assistant D/A frames,
// step saturation) is counted and must occur.
module tb_fog_fpga_top;
  import fog_pkg::*;

  localparam int unsigned HALF_CLKS = 96;    // 48 samples x 2 clks
  localparam int unsigned BAUD      = 260;
  localparam int unsigned WINDOW    = 3160;
  localparam real         PI        = 3.14159265358979;

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

  int checks = 0, failures = 0;
  int n_down = 0, n_up = 0, n_rf = 0, n_rd = 0, n_idm_up = 0, n_idm_dn = 0;
  int n_rate = 0, n_frames = 0, n_spi = 0, n_sat = 0, n_periods = 0;
  longint cyc = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      if (st.half_dir == RST_DOWN) n_down++;
      if (st.half_dir == RST_UP)   n_up++;
      if (st.rf_valid && st.rf)    n_rf++;
      if (st.rd_valid)             n_rd++;
      if (st.step_sat)             n_sat++;
      if (st.period_end) begin
        n_periods++;
        if (st.up) n_idm_up++; else n_idm_dn++;
      end
    end
  end

  // Main D/A latch interval: one code per half cycle.
  longint last_daclk = -1;
  int daclk_seen = 0;
  always @(posedge daclk) if (rst_n) begin
    if (last_daclk >= 0 && daclk_seen < 2000) begin
      daclk_seen++;
      check(cyc - last_daclk == HALF_CLKS, "main D/A latch interval");
    end
    last_daclk = cyc;
  end

  // Assistant D/A frames: the model's code must follow the controller's.
  always @(posedge sdacs2_n) if (rst_n) begin
    n_spi++;
    #1 check(model_aux == aux, "assistant D/A code received over SPI");
  end

  // Serial rate frames: header then the rate word, MSB first.
  rate_t last_rate;
  longint last_rate_cyc;
  always @(posedge clk) if (rst_n && rate_valid) begin
    last_rate <= rate;
    n_rate++;
    if (n_rate > 1)
      check(cyc - last_rate_cyc == longint'(WINDOW) * HALF_CLKS, $sformatf("one rate word per window (%0d clks at %0d)", cyc - last_rate_cyc, cyc));
    last_rate_cyc = cyc;
  end

  task automatic rx_byte(output logic [7:0] b);
    @(negedge s_p);
    repeat (BAUD / 2) @(posedge clk);
    check(s_p == 1'b0, "serial start bit");
    for (int i = 0; i < 8; i++) begin
      repeat (BAUD) @(posedge clk);
      b[i] = s_p;
    end
    repeat (BAUD) @(posedge clk);
    check(s_p == 1'b1, "serial stop bit");
  endtask

  initial begin : serial_rx
    logic [7:0] b;
    rate_t word;
    forever begin
      rx_byte(b);
      if (b == 8'hA5) begin
        word = '0;
        for (int k = 0; k < RATE_W / 8; k++) begin
          rx_byte(b);
          word = {word[RATE_W-9:0], b};
        end
        n_frames++;
        check(word == last_rate, "serial rate word equals parallel rate word");
      end
    end
  end

  always @(posedge clk) if (rst_n) begin
    if (s_n !== ~s_p) begin
      failures++;
      $display("FAIL: S- is not the complement of S+");
    end
  end

  task automatic run_periods(input int n);
    int start = n_periods;
    while (n_periods < start + n) @(posedge clk);
  endtask

  task automatic check_locked(input string tag);
    real want, got, r_want;
    want = -phi_s / (2.0 * PI) * real'(longint'(1) << LAD_W);
    got  = real'(step);
    $display("%s: step=%0d expected %0.1f, aux=%0d eps=%f, rate=%0d",
             tag, step, want, aux, eps, last_rate);
    check((got - want) < 0.005 * (want < 0 ? -want : want) &&
          (want - got) < 0.005 * (want < 0 ? -want : want), {tag, ": step height cancels the Sagnac phase"});
    check(eps < 0.003 && eps > -0.003, {tag, ": second loop removed the gain error"});
    r_want = want * WINDOW;
    check(real'(last_rate) - r_want < 0.01 * (r_want < 0 ? -r_want : r_want) &&
          r_want - real'(last_rate) < 0.01 * (r_want < 0 ? -r_want : r_want),
          {tag, ": rate word is the window sum of the step height"});
  endtask

  initial begin : watchdog
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);
    check(opdis_n == 1'b1, "A/D output enabled after reset");

    phi_s = 0.10; eps0 = 0.03;
    run_periods(4000);
    check_locked("A");

    phi_s = -0.15; eps0 = -0.02;
    run_periods(4000);
    check_locked("B");

    phi_s = 1.8;
    run_periods(200);

    $display("events: resets down=%0d up=%0d reset periods=%0d second-loop updates=%0d",
             n_down, n_up, n_rf, n_rd);
    $display("events: periods up=%0d down=%0d rate words=%0d serial frames=%0d spi frames=%0d step sat=%0d",
             n_idm_up, n_idm_dn, n_rate, n_frames, n_spi, n_sat);
    check(n_down > 0, "downward 2*pi reset occurred");
    check(n_up > 0, "upward 2*pi reset occurred");
    check(n_rf > 0, "reset period flagged");
    check(n_rd > 0, "second loop updated");
    check(n_idm_up > 0, "IDM saw a rising ladder");
    check(n_idm_dn > 0, "IDM saw a falling ladder");
    check(n_rate > 0, "rate word produced");
    check(n_frames > 0, "serial rate frame received");
    check(n_spi > 0, "assistant D/A frame sent");
    check(n_sat > 0, "step height saturated");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
