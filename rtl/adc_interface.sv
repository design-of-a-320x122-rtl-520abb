// adc_interface -- digital side of the A/D board.
//
// The converter delivers each pixel as a 12-bit two's-complement style word
// (mid-scale = 000000000000, +full scale = 011111111111, -full scale =
// 100000000000). Inverting the MSB turns it into plain offset binary
// (0 = -full scale, 2048 = zero, 4095 = +full scale), which is what the rest
// of the processor uses; this mapping is the document's conversion table.
// The converted word is registered together with the head timing signals so
// that the video bus leaves the board with data and timing lined up.
//
// Interface: one pixel per clk; latency one clock for data and timing alike.
module adc_interface
  import radiometer_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic [PIX_W-1:0]  adc_word,   // converter output, sampled at mid-pixel
  input  logic              va,
  input  logic              ha,
  input  logic              hsync_n,
  input  logic              lock_n,
  output video_bus_t        bus
);
  always_ff @(posedge clk) begin
    if (rst) begin
      bus <= '{va: 1'b0, ha: 1'b0, hsync_n: 1'b1, lock_n: 1'b1, data: '0};
    end else begin
      bus.va      <= va;
      bus.ha      <= ha;
      bus.hsync_n <= hsync_n;
      bus.lock_n  <= lock_n;
      bus.data    <= {~adc_word[PIX_W-1], adc_word[PIX_W-2:0]};
    end
  end
endmodule
