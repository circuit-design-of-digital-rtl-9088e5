// tb_mod_timing: checks the modulation timing generator. Samples arrive
// every second clk. A reference count in the testbench predicts, for every
// sample, the half-cycle state, whether it is in the integration window and
// whether it ends a half or a period. Over ten periods each half must hold
// exactly HALF_SAMPLES samples, INT_SAMPLES of them integrated, and
// period_end must come once every 2*HALF_SAMPLES samples.
module tb_mod_timing;
  localparam int unsigned HALF = 48, INTN = 32;

  logic clk = 1'b0, rst_n = 1'b0, sample_valid = 1'b0;
  always #1 clk = ~clk;
  logic sq, int_en, half_end, period_end;
  int checks = 0, failures = 0;

  mod_timing #(.HALF_SAMPLES(HALF), .INT_SAMPLES(INTN)) dut (
    .clk, .rst_n, .sample_valid, .sq, .int_en, .half_end, .period_end
  );

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

  int pos;
  bit pos_half;
  int n = 0, ints = 0, periods = 0, last_period = -1;
  initial begin
    repeat (4) @(negedge clk);
    rst_n = 1'b1;
    while (n < 10 * 2 * HALF) begin
      @(negedge clk);
      sample_valid = ~sample_valid;
      if (sample_valid) begin
        pos = n % HALF;
        pos_half = ((n / HALF) % 2) == 0;
        #0.5;   // outputs are combinational from the strobe
        check(sq == pos_half, "half-cycle state");
        check(int_en == (pos >= HALF - INTN), "integration window");
        check(half_end == (pos == HALF - 1), "half end");
        check(period_end == (pos == HALF - 1 && !pos_half), "period end");
        if (int_en) ints++;
        if (period_end) begin
          if (last_period >= 0) check(n - last_period == 2 * HALF, "period length in samples");
          last_period = n;
          periods++;
        end
        n++;
      end else begin
        #0.5;
        check(!int_en && !half_end && !period_end, "no strobe without a sample");
      end
    end
    check(ints == 10 * 2 * INTN, "integrated samples per half");
    check(periods == 10, "period count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
