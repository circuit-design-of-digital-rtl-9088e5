// tb_demodulator: checks the integrating demodulator. The testbench plays
// the timing generator itself (half cycles of 8 samples, the last 5
// integrated) and feeds random samples. For every period it sums the window
// samples of the + half and of the - half on its own and expects
// ERD = sum(+) - sum(-) one clk after the last sample of the - half.
module tb_demodulator;
  import fog_pkg::*;
  localparam int HALF = 8, INTN = 5, PERIODS = 200;

  logic clk = 1'b0, rst_n = 1'b0;
  always #1 clk = ~clk;
  sample_t sample = '0;
  logic sq = 1'b1, int_en = 1'b0, half_end = 1'b0, erd_valid;
  erd_t erd;
  int checks = 0, failures = 0;

  demodulator dut (.clk, .rst_n, .sample, .sq, .int_en, .half_end, .erd, .erd_valid);

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

  int valids = 0;
  initial begin
    int spos, sneg, expected;
    repeat (4) @(negedge clk);
    rst_n = 1'b1;
    for (int p = 0; p < PERIODS; p++) begin
      spos = 0; sneg = 0;
      for (int h = 0; h < 2; h++) begin
        for (int i = 0; i < HALF; i++) begin
          @(negedge clk);
          check(!erd_valid, "no ERD inside a period");
          sq       = (h == 0);
          int_en   = (i >= HALF - INTN);
          half_end = (i == HALF - 1);
          sample   = sample_t'($urandom);
          if (int_en) begin
            if (h == 0) spos += int'(sample); else sneg += int'(sample);
          end
        end
      end
      expected = spos - sneg;
      @(negedge clk);
      int_en = 1'b0; half_end = 1'b0;
      check(erd_valid, "ERD one clk after the period ends");
      check(erd == erd_t'(expected), "ERD = sum(+half) - sum(-half)");
      if (erd_valid) valids++;
    end
    check(valids == PERIODS, "one ERD per period");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
