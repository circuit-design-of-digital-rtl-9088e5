// tb_main_dac_if: checks the main D/A parallel interface. A model latch in
// the testbench captures BD on each rising DACLK edge. For every code
// written, at random spacing, the latch must receive exactly that code: the
// bus must change one clk after code_valid and DACLK must rise one clk
// after that, with the bus stable across the edge.
module tb_main_dac_if;
  import fog_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, code_valid = 1'b0, daclk;
  always #1 clk = ~clk;
  dac_code_t code = '0, bd, latched;
  int checks = 0, failures = 0, latches = 0;

  main_dac_if dut (.clk, .rst_n, .code, .code_valid, .bd, .daclk);

  always @(posedge daclk) begin
    latched = bd;
    latches++;
  end

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
    int n_before;
    repeat (4) @(negedge clk);
    rst_n = 1'b1;
    check(daclk == 1'b0, "latch idle after reset");
    for (int n = 0; n < 1000; n++) begin
      code = dac_code_t'($urandom);
      code_valid = 1'b1;
      n_before = latches;
      @(negedge clk);
      code_valid = 1'b0;
      check(bd == code && !daclk, "bus set one clk after the write");
      @(negedge clk);
      check(daclk, "latch pulse two clks after the write");
      check(latches == n_before + 1 && latched == code, "converter latched the code");
      repeat (1 + $urandom_range(3)) @(negedge clk);
      check(!daclk, "single latch pulse");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
