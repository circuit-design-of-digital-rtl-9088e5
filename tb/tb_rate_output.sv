// tb_rate_output: checks the angular rate output with a short window (10
// ladder updates) and a fast serial line (8 clks per bit). Random step
// heights are summed in the testbench over each window; `rate` must equal
// the sum when rate_valid pulses. A serial receiver in the testbench
// decodes S+ and must get the header 0xA5 and the 5 bytes of the same sum,
// MSB first, with S- the complement of S+. Windows that close while a frame
// is still being sent must be flagged as dropped; this is provoked by
// stretches of back-to-back updates.
module tb_rate_output;
  import fog_pkg::*;
  localparam int WIN = 10, BAUD = 8;

  logic clk = 1'b0, rst_n = 1'b0, step_valid = 1'b0, rate_valid, dropped, s_p, s_n;
  always #1 clk = ~clk;
  step_t step = '0;
  rate_t rate;
  int checks = 0, failures = 0;

  rate_output #(.OUT_HALVES(WIN), .BAUD_DIV(BAUD)) dut (
    .clk, .rst_n, .step, .step_valid, .rate, .rate_valid, .dropped, .s_p, .s_n
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected words in order of their windows, and whether each was sent.
  rate_t sent_q[$];
  int n_windows = 0, n_frames = 0, n_dropped = 0;

  always @(negedge clk) if (rst_n) begin
    if (s_n !== ~s_p) begin failures++; $display("FAIL: S- not the complement of S+"); end
    if (dropped) n_dropped++;
  end

  task automatic rx_byte(output logic [7:0] b);
    @(negedge s_p);
    repeat (BAUD / 2) @(posedge clk);
    for (int i = 0; i < 8; i++) begin
      repeat (BAUD) @(posedge clk);
      b[i] = s_p;
    end
    repeat (BAUD) @(posedge clk);
    check(s_p == 1'b1, "stop bit");
  endtask

  initial begin : rx
    logic [7:0] b;
    rate_t w;
    forever begin
      rx_byte(b);
      check(b == 8'hA5, "frame header");
      w = '0;
      for (int k = 0; k < RATE_W / 8; k++) begin
        rx_byte(b);
        w = {w[RATE_W-9:0], b};
      end
      n_frames++;
      check(sent_q.size() > 0 && w == sent_q.pop_front(), "serial word equals window sum");
    end
  end

  initial begin
    longint sum = 0;
    int k = 0;
    bit busy_line = 1'b0;
    int line_free_at = 0, cyc = 0;
    repeat (4) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 2000; n++) begin
      step = step_t'(int'($urandom_range(1 << 23)) - (1 << 22));
      step_valid = 1'b1;
      sum += longint'(step);
      k++;
      @(negedge clk);
      step_valid = 1'b0;
      cyc++;
      if (k == WIN) begin
        check(rate_valid && rate == rate_t'(sum), "window sum");
        n_windows++;
        // A frame takes 6 bytes of 10 bits; the line is free after that.
        if (cyc >= line_free_at) begin
          sent_q.push_back(rate_t'(sum));
          line_free_at = cyc + 6 * 10 * BAUD + 8;
        end
        sum = 0; k = 0;
      end else begin
        check(!rate_valid, "no rate word inside a window");
      end
      // Sparse updates most of the time, back-to-back ones now and then.
      if ((n / 200) % 2 == 0) repeat (60) begin @(negedge clk); cyc++; end
    end
    repeat (1000) @(negedge clk);
    $display("windows=%0d frames=%0d dropped=%0d", n_windows, n_frames, n_dropped);
    check(n_frames > 0 && n_dropped > 0, "frames sent and windows dropped");
    check(n_frames + n_dropped == n_windows, "every window sent or flagged");
    check(sent_q.size() == 0, "every expected frame received");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
