// tb_gain_loop: checks the subtractor and accumulator of the second loop.
// (1) Random RD, CD and ladder directions are applied; a reference
// accumulator subtracts (+/-(RD - CD)) >> 3, with the sign of the ladder
// direction, from its own code and clips it to 0..16383. The code, the
// strobe and the clip flag must match. Both limits must be reached.
// (2) Closed loop: a linear gain-error model (the reset error is
// proportional to the distance of the code from a target) must be driven to
// its target code within a few updates, for both ladder directions.
module tb_gain_loop;
  import fog_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, rd_valid = 1'b0, up = 1'b1, aux_valid, sat;
  always #1 clk = ~clk;
  erd_t rd = '0, cd = '0;
  aux_code_t aux;
  int checks = 0, failures = 0;

  gain_loop #(.A_SHIFT(3)) dut (.clk, .rst_n, .rd, .cd, .rd_valid, .up, .aux, .aux_valid, .sat);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int asr3(input int v);
    return (v >= 0) ? (v / 8) : -((-v + 7) / 8);   // floor division by 8
  endfunction

  initial begin
    int ref_aux = 8192, e, nxt, target, n_lo = 0, n_hi = 0;
    bit ref_sat = 1'b0;
    repeat (4) @(negedge clk);
    rst_n = 1'b1;
    check(aux == 14'd8192, "mid-scale after reset");
    for (int n = 0; n < 4000; n++) begin
      rd = erd_t'(int'($urandom_range(40000)) - 20000 + ((n / 500) % 2 ? 30000 : -30000));
      cd = erd_t'(int'($urandom_range(40000)) - 20000);
      up = $urandom_range(1);
      rd_valid = ($urandom_range(2) == 0);
      if (rd_valid) begin
        e = up ? (int'(rd) - int'(cd)) : (int'(cd) - int'(rd));
        nxt = ref_aux - asr3(e);
        ref_sat = 1'b0;
        if (nxt < 0)          begin ref_aux = 0;     ref_sat = 1'b1; n_lo++; end
        else if (nxt > 16383) begin ref_aux = 16383; ref_sat = 1'b1; n_hi++; end
        else ref_aux = nxt;
      end
      @(negedge clk);
      check(int'(aux) == ref_aux, "assistant code");
      check(aux_valid == rd_valid, "update strobe");
      check(sat == ref_sat, "clip flag");
    end
    check(n_lo > 0 && n_hi > 0, "both limits reached");
    // Closed loop against a linear model of the reset error.
    for (int dir = 0; dir < 2; dir++) begin
      target = dir ? 4000 : 12000;
      up = dir[0];
      for (int k = 0; k < 60; k++) begin
        // Reset error grows with (aux - target); its sign flips with direction.
        e = 2 * (int'(aux) - target);
        rd = erd_t'(up ? e : -e);
        cd = '0;
        rd_valid = 1'b1;
        @(negedge clk);
        rd_valid = 1'b0;
        @(negedge clk);
      end
      check(int'(aux) - target <= 4 && target - int'(aux) <= 4, "second loop settles on the target code");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
