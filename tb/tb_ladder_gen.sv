// tb_ladder_gen: checks the ladder accumulator (ADD2). Random step heights
// of both signs and random half-cycle ends are applied; a reference ladder in
// the testbench adds the step modulo 2^24 at each half end. The ladder, the
// next half's state and the valid strobe must match one clk later, and the
// ladder must have wrapped (a 2*pi reset) in both directions.
module tb_ladder_gen;
  import fog_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, half_end = 1'b0, sq = 1'b1;
  always #1 clk = ~clk;
  step_t step = '0;
  ladder_t ladder;
  logic next_sq, ladder_valid;
  int checks = 0, failures = 0;

  ladder_gen dut (.clk, .rst_n, .step, .half_end, .sq, .ladder, .next_sq, .ladder_valid);

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
    longint ref_l = 0, nxt;
    bit ref_sq = 1'b1;
    int wrap_up = 0, wrap_dn = 0;
    repeat (4) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 6000; n++) begin
      step     = step_t'(((n / 1500) % 2 == 0 ? 1 : -1) * int'($urandom_range(1 << 21)));
      half_end = $urandom_range(1);
      sq       = $urandom_range(1);
      if (half_end) begin
        nxt = ref_l + longint'(step);
        if (nxt >= (longint'(1) << LAD_W)) wrap_up++;
        if (nxt < 0) wrap_dn++;
        ref_l  = nxt & ((longint'(1) << LAD_W) - 1);
        ref_sq = ~sq;
      end
      @(negedge clk);
      check(longint'(ladder) == ref_l, "ladder value");
      check(next_sq == ref_sq, "next half state");
      check(ladder_valid == half_end, "valid strobe");
    end
    check(wrap_up > 0 && wrap_dn > 0, "ladder wrapped both ways");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
