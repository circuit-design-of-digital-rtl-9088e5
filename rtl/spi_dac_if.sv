// spi_dac_if: serial (SPI) interface to the 14-bit assistant D/A converter.
//
// Few FPGA pins are left for the assistant converter, so it is written
// serially. A write sends one FRAME_W-bit frame, MSB first: FRAME_W-DATA_W
// zero control bits followed by the DATA_W-bit code. Chip select and frame
// sync go low together for the whole frame; data changes while sclk is low
// and the converter samples it on the rising edge of sclk, which idles low.
// A code that arrives while a frame is being sent is kept, and the newest
// one kept is sent when the frame ends.
//
// From the source design: a 14-bit assistant converter written over SPI,
// with the pins SDACS2, FS2, SDACLK2 and SDAIN2. This design's choices: the
// 16-bit frame with two zero control bits, the clock polarity, and sclk at
// clk / (2*SCLK_HALF).
//
// Timing: a frame lasts FRAME_W*2*SCLK_HALF clks plus two; busy is high
// from the clk after start until cs_n has risen again.
module spi_dac_if
  import fog_pkg::*;
#(
  parameter int unsigned DATA_W    = AUX_W,  // converter resolution
  parameter int unsigned FRAME_W   = 16,     // bits per frame, >= DATA_W
  parameter int unsigned SCLK_HALF = 2       // clks per half sclk period
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [DATA_W-1:0] data,
  input  logic              start,     // one-clk request to send `data`
  output logic              cs_n,      // chip select, active low
  output logic              fs_n,      // frame sync, active low
  output logic              sclk,
  output logic              sdin,
  output logic              busy
);
  localparam int unsigned BW = $clog2(FRAME_W + 1);
  localparam int unsigned HW = (SCLK_HALF > 1) ? $clog2(SCLK_HALF) : 1;

  typedef enum logic [1:0] {IDLE, SHIFT_LO, SHIFT_HI, DONE} state_e;
  state_e state;

  logic [FRAME_W-1:0] shreg;
  logic [BW-1:0]      bits_left;
  logic [HW-1:0]      hcnt;
  logic [DATA_W-1:0]  pend_data;
  logic               pend;

  assign busy = (state != IDLE);
  assign fs_n = cs_n;
  assign sdin = shreg[FRAME_W-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= IDLE;
      shreg     <= '0;
      bits_left <= '0;
      hcnt      <= '0;
      cs_n      <= 1'b1;
      sclk      <= 1'b0;
      pend      <= 1'b0;
      pend_data <= '0;
    end else begin
      if (start) begin
        pend      <= 1'b1;
        pend_data <= data;
      end
      unique case (state)
        IDLE: if (pend || start) begin
          shreg     <= FRAME_W'(start ? data : pend_data);
          pend      <= 1'b0;
          bits_left <= BW'(FRAME_W);
          hcnt      <= '0;
          cs_n      <= 1'b0;
          sclk      <= 1'b0;
          state     <= SHIFT_LO;
        end
        SHIFT_LO: begin
          if (hcnt == HW'(SCLK_HALF - 1)) begin
            hcnt  <= '0;
            sclk  <= 1'b1;
            state <= SHIFT_HI;
          end else hcnt <= hcnt + 1'b1;
        end
        SHIFT_HI: begin
          if (hcnt == HW'(SCLK_HALF - 1)) begin
            hcnt      <= '0;
            sclk      <= 1'b0;
            shreg     <= shreg << 1;
            bits_left <= bits_left - 1'b1;
            state     <= (bits_left == BW'(1)) ? DONE : SHIFT_LO;
          end else hcnt <= hcnt + 1'b1;
        end
        DONE: begin
          cs_n  <= 1'b1;
          state <= IDLE;
        end
      endcase
    end
  end

  // sclk only toggles inside a frame.
  assert property (@(posedge clk) disable iff (!rst_n) cs_n |-> !sclk);
endmodule
