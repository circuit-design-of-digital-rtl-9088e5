// tb_reset_flag: checks the reset-period flag (RF). A staircase of random
// step heights, first rising then falling, plus the 0 / pi/2 square wave is
// fed as main D/A codes, + half first in each period. The testbench finds
// each 2*pi reset on its own as a code jump of more than half of full scale
// and sums the resets of the two halves of every period. After each - half
// code, rf must say whether the net count is non-zero and rf_dir give its
// sign; half_dir must flag each single reset. Resets of both directions,
// reset periods, and periods whose square-wave wraps cancel must all occur.
module tb_reset_flag;
  import fog_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, code_sq = 1'b0, code_valid = 1'b0;
  always #1 clk = ~clk;
  dac_code_t code = '0;
  logic rf, rf_valid;
  reset_dir_e rf_dir, half_dir;
  int checks = 0, failures = 0;

  reset_flag dut (.clk, .rst_n, .code, .code_sq, .code_valid, .rf, .rf_dir, .half_dir, .rf_valid);

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

  initial begin
    int lad = 0, prev = 0, c, r, r_first = 0, net, step;
    int n_up = 0, n_dn = 0, n_rf = 0, n_cancel = 0;
    repeat (4) @(negedge clk);
    rst_n = 1'b1;
    for (int p = 0; p < 3000; p++) begin
      step = ((p / 1000) == 1 ? -1 : 1) * int'($urandom_range(3000));
      for (int h = 0; h < 2; h++) begin
        lad = (lad + step + 65536) % 65536;
        c = (lad + (h == 0 ? 16384 : 0)) % 65536;
        r = (c - prev > 32768) ? 1 : (c - prev < -32768) ? -1 : 0;
        prev = c;
        code = dac_code_t'(c); code_sq = (h == 0); code_valid = 1'b1;
        @(negedge clk);
        code_valid = 1'b0;
        check(half_dir == (r > 0 ? RST_UP : r < 0 ? RST_DOWN : RST_NONE), "single reset direction");
        if (r > 0) n_up++;
        if (r < 0) n_dn++;
        if (h == 0) begin
          r_first = r;
          check(!rf_valid, "no flag update after a + half");
        end else begin
          net = r_first + r;
          check(rf_valid, "flag update after a - half");
          check(rf == (net != 0), "reset period flag");
          check(rf_dir == (net > 0 ? RST_UP : net < 0 ? RST_DOWN : RST_NONE), "reset period direction");
          if (net != 0) n_rf++;
          if (net == 0 && r != 0) n_cancel++;
        end
        repeat ($urandom_range(3)) @(negedge clk);
      end
    end
    $display("resets up=%0d down=%0d reset periods=%0d cancelled=%0d", n_up, n_dn, n_rf, n_cancel);
    check(n_up > 0 && n_dn > 0 && n_rf > 0 && n_cancel > 0, "all reset cases occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
