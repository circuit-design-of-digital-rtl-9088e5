// tb_wave_composer: checks the composition of ladder and square wave. For
// random ladders and half states the main D/A code must be the ladder's top
// 16 bits plus 16384 (pi/2) in the + half, modulo 65536, one clk after
// ladder_valid, with its half state; the code must hold otherwise.
module tb_wave_composer;
  import fog_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, sq = 1'b0, ladder_valid = 1'b0;
  always #1 clk = ~clk;
  ladder_t ladder = '0;
  dac_code_t code;
  logic code_sq, code_valid;
  int checks = 0, failures = 0;

  wave_composer dut (.clk, .rst_n, .ladder, .sq, .ladder_valid, .code, .code_sq, .code_valid);

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
    int ref_code = 0;
    bit ref_sq = 1'b0;
    int wraps = 0;
    repeat (4) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 4000; n++) begin
      ladder       = ladder_t'($urandom);
      sq           = $urandom_range(1);
      ladder_valid = $urandom_range(1);
      if (ladder_valid) begin
        ref_code = (int'(ladder) / 256 + (sq ? 16384 : 0));
        if (ref_code > 65535) wraps++;
        ref_code = ref_code % 65536;
        ref_sq   = sq;
      end
      @(negedge clk);
      check(int'(code) == ref_code, "code = ladder + square wave");
      check(code_sq == ref_sq, "code half state");
      check(code_valid == ladder_valid, "valid strobe");
    end
    check(wraps > 0, "square wave wrapped the code");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
