// tb_idm: checks the ladder direction detector (IDM). A ladder is advanced
// by random steps whose sign changes every few hundred updates and which
// cross the 2*pi wrap many times; after each update `up` must give the sign
// of the step (a zero step keeps the previous direction), never confused by
// a wrap.
module tb_idm;
  import fog_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, ladder_valid = 1'b0, up;
  always #1 clk = ~clk;
  ladder_t ladder = '0;
  int checks = 0, failures = 0;

  idm dut (.clk, .rst_n, .ladder, .ladder_valid, .up);

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
    longint lad = 0;
    int step, d, n_up = 0, n_dn = 0;
    bit ref_up = 1'b1;
    repeat (4) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 4000; n++) begin
      step = int'($urandom_range(1 << 21));
      if ((n / 300) % 2 == 1) step = -step;
      if ($urandom_range(50) == 0) step = 0;
      lad = (lad + step + (longint'(1) << LAD_W)) % (longint'(1) << LAD_W);
      // The detector sees the top 16 bits: the coarse difference decides.
      begin
        d = int'(lad >> FRAC_W) - int'((lad - step + (longint'(1) << LAD_W)) % (longint'(1) << LAD_W) >> FRAC_W);
        if (d > 32767) d -= 65536;
        if (d < -32768) d += 65536;
        if (d > 0) ref_up = 1'b1; else if (d < 0) ref_up = 1'b0;
      end
      ladder = ladder_t'(lad); ladder_valid = 1'b1;
      @(negedge clk);
      ladder_valid = 1'b0;
      check(up == ref_up, "ladder direction");
      if (up) n_up++; else n_dn++;
      @(negedge clk);
    end
    check(n_up > 0 && n_dn > 0, "both directions seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
