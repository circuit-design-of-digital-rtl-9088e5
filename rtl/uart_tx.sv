// uart_tx: asynchronous serial transmitter, 8 data bits, no parity, one stop
// bit, LSB first, idle high. One bit lasts BAUD_DIV clks.
//
// Helper of rate_output. The rate word leaves the board on one differential
// serial pair; the frame format and bit rate are this design's own choice.
//
// Timing: load a byte with a one-clk `start` while ready is high; ready is
// low for 10*BAUD_DIV clks.
module uart_tx #(
  parameter int unsigned BAUD_DIV = 260   // clks per bit (30 MHz / 115200)
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] data,
  input  logic       start,
  output logic       tx,
  output logic       ready
);
  localparam int unsigned CW = (BAUD_DIV > 1) ? $clog2(BAUD_DIV) : 1;

  logic [9:0]    frame;   // stop, data[7:0], start; shifted out LSB first
  logic [3:0]    nbits;
  logic [CW-1:0] cnt;

  assign ready = (nbits == 0);
  assign tx    = ready ? 1'b1 : frame[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      frame <= '1;
      nbits <= '0;
      cnt   <= '0;
    end else if (ready) begin
      if (start) begin
        frame <= {1'b1, data, 1'b0};
        nbits <= 4'd10;
        cnt   <= '0;
      end
    end else if (cnt == CW'(BAUD_DIV - 1)) begin
      cnt   <= '0;
      frame <= {1'b1, frame[9:1]};
      nbits <= nbits - 1'b1;
    end else begin
      cnt <= cnt + 1'b1;
    end
  end
endmodule
