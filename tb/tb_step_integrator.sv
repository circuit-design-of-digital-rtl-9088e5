// tb_step_integrator: checks the first-loop integrator (ADD1). Random ERD
// words, with occasional runs of large ones of one sign, are applied; a
// reference integrator in the testbench adds ERD * 2^K_SHIFT to its own step
// height and clips it to +/-(2^22 - 1), just under pi/2. The step height
// and the saturation strobe must match one clk after each ERD, and must not
// change without one. Saturation must have happened in both directions.
module tb_step_integrator;
  import fog_pkg::*;
  localparam int K = 4;
  localparam longint SMAX = (longint'(1) << (LAD_W - 2)) - 1;

  logic clk = 1'b0, rst_n = 1'b0, erd_valid = 1'b0, sat;
  always #1 clk = ~clk;
  erd_t erd = '0;
  step_t step;
  int checks = 0, failures = 0;

  step_integrator #(.K_SHIFT(K)) dut (.clk, .rst_n, .erd, .erd_valid, .step, .sat);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint ref_step = 0, sum;
    bit ref_sat;
    int sat_hi = 0, sat_lo = 0, bias;
    repeat (4) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 5000; n++) begin
      // Bias phases drive the integrator into both limits.
      bias = ((n / 500) % 4 == 1) ? 200000 : ((n / 500) % 4 == 3) ? -200000 : 0;
      erd       = erd_t'(bias + int'($urandom_range(20000)) - 10000);
      erd_valid = ($urandom_range(3) != 0);
      ref_sat   = 1'b0;
      if (erd_valid) begin
        sum = ref_step + longint'(erd) * (longint'(1) << K);
        if (sum > SMAX)       begin ref_step = SMAX;  ref_sat = 1'b1; sat_hi++; end
        else if (sum < -SMAX) begin ref_step = -SMAX; ref_sat = 1'b1; sat_lo++; end
        else                         ref_step = sum;
      end
      @(negedge clk);
      check(longint'(step) == ref_step, "step height");
      check(sat == ref_sat, "saturation strobe");
    end
    check(sat_hi > 0 && sat_lo > 0, "both limits reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
