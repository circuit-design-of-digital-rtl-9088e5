// rate_output: angular rate output.
//
// Once the first loop has settled, the step height of the ladder is the
// Sagnac phase and so the angular rate. This block adds the step height at
// every ladder update over a window of OUT_HALVES half cycles, which is the
// integrated feedback phase (an angle increment) over the window: the sum
// averages away the fractional ladder bits and the loop noise. At the end of
// each window the sum is presented in parallel on `rate` with a one-clk
// `rate_valid`, and is also sent on the serial line as a frame of one header
// byte 0xA5 followed by the RATE_W/8 bytes of the sum, most significant
// first. The serial line drives a differential pair: s_p carries the line
// and s_n its complement.
//
// From the source design: an angular rate output of the FPGA and the serial
// pins S+ and S- of its interface connector. This design's choices: the
// window (3160 half cycles, about 50 outputs per second at 156 kHz
// modulation), the frame, and the bit rate. A window that ends while a frame
// is still being sent is not sent on the line but is still given on `rate`.
//
// Timing: rate_valid pulses one clk after the step_valid strobe that closes
// a window; the serial frame starts in the clk after that.
module rate_output
  import fog_pkg::*;
#(
  parameter int unsigned OUT_HALVES = 3160,  // ladder updates per output
  parameter int unsigned BAUD_DIV   = 260    // clks per serial bit
) (
  input  logic  clk,
  input  logic  rst_n,
  input  step_t step,
  input  logic  step_valid,     // one clk per ladder update
  output rate_t rate,           // sum of step heights over the last window
  output logic  rate_valid,
  output logic  dropped,        // one-clk strobe: a window was not sent serially
  output logic  s_p,
  output logic  s_n
);
  localparam int unsigned NBYTES = RATE_W / 8;
  localparam int unsigned WW = $clog2(OUT_HALVES + 1);
  localparam int unsigned BCW = $clog2(NBYTES + 2);

  rate_t         acc, shbuf;
  logic [WW-1:0] wcnt;
  logic [BCW-1:0] bytes_left;
  logic [7:0]    tx_data;
  logic          tx_start, tx_ready, tx_line, sending;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc        <= '0;
      wcnt       <= '0;
      rate       <= '0;
      rate_valid <= 1'b0;
      dropped    <= 1'b0;
    end else begin
      rate_valid <= 1'b0;
      dropped    <= 1'b0;
      if (step_valid) begin
        if (wcnt == WW'(OUT_HALVES - 1)) begin
          wcnt       <= '0;
          acc        <= '0;
          rate       <= acc + rate_t'(step);
          rate_valid <= 1'b1;
          dropped    <= sending;
        end else begin
          wcnt <= wcnt + 1'b1;
          acc  <= acc + rate_t'(step);
        end
      end
    end
  end

  // Frame sequencer: header byte then the rate word, MSB first.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sending    <= 1'b0;
      bytes_left <= '0;
      shbuf      <= '0;
      tx_data    <= '0;
      tx_start   <= 1'b0;
    end else begin
      tx_start <= 1'b0;
      if (!sending) begin
        if (rate_valid) begin
          sending    <= 1'b1;
          shbuf      <= rate;
          tx_data    <= 8'hA5;
          tx_start   <= 1'b1;
          bytes_left <= BCW'(NBYTES);
        end
      end else if (tx_ready && !tx_start) begin
        if (bytes_left == 0) begin
          sending <= 1'b0;
        end else begin
          tx_data    <= shbuf[RATE_W-1 -: 8];
          shbuf      <= shbuf << 8;
          tx_start   <= 1'b1;
          bytes_left <= bytes_left - 1'b1;
        end
      end
    end
  end

  uart_tx #(.BAUD_DIV(BAUD_DIV)) u_tx (
    .clk, .rst_n,
    .data  (tx_data),
    .start (tx_start),
    .tx    (tx_line),
    .ready (tx_ready)
  );

  assign s_p = tx_line;
  assign s_n = ~tx_line;
endmodule
