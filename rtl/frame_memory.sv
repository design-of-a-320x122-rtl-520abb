// frame_memory -- one frame store of the display board (memory A or B).
//
// Holds one 320 x 122 frame of 8-bit display pixels, addressed line by line
// (address = line * 320 + column). It has a write port and an independent
// read port on the same clock, like the board's frame memory chips whose
// input and output are controlled separately; the read data are registered
// (one clock latency). Written as an array; the depth is the frame size.
//
// Interface: clk; we/waddr/wdata write; raddr in, rdata one clock later.
module frame_memory #(
  parameter int DW    = 8,
  parameter int DEPTH = radiometer_pkg::PIXELS_PER_FRAME,
  parameter int AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [DW-1:0] wdata,
  input  logic [AW-1:0] raddr,
  output logic [DW-1:0] rdata
);
  logic [DW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we && waddr < AW'(DEPTH)) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule
