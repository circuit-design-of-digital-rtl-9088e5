// tb_spi_dac_if: checks the SPI write to the 14-bit assistant D/A. A model
// converter shifts SDIN on each rising SCLK while chip select is low and
// takes the frame when chip select rises. Every frame must be 16 bits, two
// zero bits then the code, frame sync must equal chip select, and sclk must
// stay low outside a frame. Codes are written both with the interface idle
// and while a frame is running, where the newest pending code must follow
// as the next frame. The frame length is checked against 16 * 2 * SCLK_HALF
// clks plus the start and end clks.
module tb_spi_dac_if;
  localparam int SCLK_HALF = 2;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  always #1 clk = ~clk;
  logic [13:0] data = '0;
  logic cs_n, fs_n, sclk, sdin, busy;
  logic [31:0] shin = '0;
  int nbits = 0, frames = 0, cyc = 0, cs_fall = 0;
  logic [15:0] last_frame;
  int last_len;
  int checks = 0, failures = 0;

  spi_dac_if #(.DATA_W(14), .FRAME_W(16), .SCLK_HALF(SCLK_HALF)) dut (
    .clk, .rst_n, .data, .start, .cs_n, .fs_n, .sclk, .sdin, .busy
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) cyc++;
  always @(posedge sclk) if (!cs_n) begin shin = {shin[30:0], sdin}; nbits++; end
  always @(negedge cs_n) begin cs_fall = cyc; nbits = 0; end
  always @(posedge cs_n) if (rst_n) begin
    frames++;
    last_frame = shin[15:0];
    last_len = cyc - cs_fall;
    check(nbits == 16, "16 clocks per frame");
  end
  always @(negedge clk) if (rst_n) begin
    if (fs_n !== cs_n) begin failures++; $display("FAIL: frame sync differs from chip select"); end
    if (cs_n && sclk)  begin failures++; $display("FAIL: sclk active outside a frame"); end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write(input logic [13:0] d);
    data = d; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
  endtask

  initial begin
    logic [13:0] a, b, c;
    int f0;
    repeat (4) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 200; n++) begin
      a = 14'($urandom);
      f0 = frames;
      write(a);
      while (frames == f0) @(negedge clk);
      check(last_frame == {2'b00, a}, "frame carries the code");
      check(last_len == 16 * 2 * SCLK_HALF + 1, "frame length in clks");
      @(negedge clk);
      check(!busy, "idle after the frame");
      // Two codes while busy: only the newest follows.
      a = 14'($urandom); b = 14'($urandom); c = 14'($urandom);
      f0 = frames;
      write(a);
      repeat (5) @(negedge clk);
      write(b);
      repeat (3) @(negedge clk);
      write(c);
      while (frames < f0 + 2) @(negedge clk);
      check(last_frame == {2'b00, c}, "newest pending code sent next");
      repeat (200) @(negedge clk);
      check(frames == f0 + 2 && !busy, "no extra frame");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
