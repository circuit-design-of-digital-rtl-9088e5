// tb_adc_if: checks the A/D interface. Random converter words are applied
// once per conversion; each sample must appear exactly every CLK_DIV clks as
// the two's complement of the offset-binary word, adclk must run at clk /
// CLK_DIV with its rising edge right after the capture, and the output
// disable pin must be released after reset.
module tb_adc_if;
  import fog_pkg::*;
  localparam int unsigned CLK_DIV = 2;

  logic clk = 1'b0, rst_n = 1'b0;
  always #1 clk = ~clk;

  logic [ADC_W-1:0] ad = '0;
  logic adclk, opdis_n, sample_valid;
  logic adclk_q = 1'b0;
  sample_t sample;
  int checks = 0, failures = 0;

  adc_if #(.CLK_DIV(CLK_DIV)) dut (.clk, .rst_n, .ad, .adclk, .opdis_n, .sample, .sample_valid);

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

  int last = -1, cyc = 0, rises = 0, valids = 0;
  initial begin
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      cyc++;
      if (adclk && !adclk_q) rises++;
      adclk_q = adclk;
      if (sample_valid) begin
        valids++;
        check(sample == sample_t'(int'(ad) - 2048), "sample is offset-binary word minus mid-scale");
        if (last >= 0) check(cyc - last == CLK_DIV, "one sample per CLK_DIV clks");
        last = cyc;
      end
      check(opdis_n == 1'b1, "output disable released");
      ad = ADC_W'($urandom);
    end
    check(valids >= 2000 / CLK_DIV - 1, "sample count");
    check(rises >= 2000 / CLK_DIV - 2 && rises <= 2000 / CLK_DIV + 1, "adclk rate");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
