// tb_erd_select: checks the RD / CD latches. Random ERD words arrive with a
// random reset flag and direction. Normal-period words must land in CD,
// reset-period words in RD together with their direction, and rd_valid must
// pulse for every reset-period word except those that arrive before the
// first normal one.
module tb_erd_select;
  import fog_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, erd_valid = 1'b0, rf = 1'b0, rd_valid;
  always #1 clk = ~clk;
  erd_t erd = '0, rd, cd;
  reset_dir_e rf_dir = RST_NONE, rd_dir;
  int checks = 0, failures = 0;

  erd_select dut (.clk, .rst_n, .erd, .erd_valid, .rf, .rf_dir, .rd, .cd, .rd_dir, .rd_valid);

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
    erd_t ref_rd = '0, ref_cd = '0;
    reset_dir_e ref_dir = RST_NONE;
    bit seen_cd = 1'b0, ref_v;
    int n_rdv = 0, n_early = 0;
    repeat (4) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 4000; n++) begin
      erd       = erd_t'($urandom);
      erd_valid = $urandom_range(1);
      // The first words are all reset words, so the start-up rule is tested.
      rf        = (n < 20) ? 1'b1 : ($urandom_range(3) == 0);
      rf_dir    = $urandom_range(1) ? RST_UP : RST_DOWN;
      ref_v     = 1'b0;
      if (erd_valid) begin
        if (rf) begin
          ref_rd = erd; ref_dir = rf_dir; ref_v = seen_cd;
          if (!seen_cd) n_early++;
        end else begin
          ref_cd = erd; seen_cd = 1'b1;
        end
      end
      @(negedge clk);
      check(rd == ref_rd, "RD holds the last reset-period ERD");
      check(cd == ref_cd, "CD holds the last normal-period ERD");
      check(rd_dir == ref_dir, "RD direction");
      check(rd_valid == ref_v, "RD strobe");
      if (rd_valid) n_rdv++;
    end
    check(n_rdv > 0 && n_early > 0, "start-up and normal RD updates occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
