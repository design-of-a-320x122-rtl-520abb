// async_fifo -- clocked FIFO between the Datacube dot clock and the camera
// pixel clock on the display board (the board's 512 x 9 clocked FIFO).
//
// Writes and reads are independent and may use unrelated clocks. Each side
// keeps a binary pointer one bit wider than the address and passes its Gray
// code to the other side through a two-flop synchroniser; full and empty are
// computed from the synchronised Gray pointers, so they are conservative
// (a flag may stay set a few clocks longer than needed, never too short).
// The read port is first-word-fall-through: rdata shows the oldest word
// whenever empty is low, and re removes it. The 512 x 9 size follows the
// document; the pointer scheme is the usual one for a dual-clock FIFO.
// Writes into a full FIFO and reads from an empty one are ignored.
//
// Interface: wclk side (we, wdata, full); rclk side (re, rdata, empty).
module async_fifo #(
  parameter int DW = 9,
  parameter int AW = 9            // 2**AW words
) (
  input  logic          wclk,
  input  logic          wrst,
  input  logic          we,
  input  logic [DW-1:0] wdata,
  output logic          full,
  input  logic          rclk,
  input  logic          rrst,
  input  logic          re,
  output logic [DW-1:0] rdata,
  output logic          empty
);
  logic [DW-1:0] mem [2**AW];
  logic [AW:0] wbin, rbin, wgray, rgray;
  logic [AW:0] rgray_w1, rgray_w2, wgray_r1, wgray_r2;
  logic [AW:0] wbin_nx, rbin_nx;

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  assign wbin_nx = wbin + (AW+1)'(we && !full);
  assign rbin_nx = rbin + (AW+1)'(re && !empty);

  // write side
  always_ff @(posedge wclk) begin
    if (wrst) begin
      wbin     <= '0;
      wgray    <= '0;
      rgray_w1 <= '0;
      rgray_w2 <= '0;
    end else begin
      wbin     <= wbin_nx;
      wgray    <= bin2gray(wbin_nx);
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
    end
  end

  always_ff @(posedge wclk) begin
    if (we && !full) mem[wbin[AW-1:0]] <= wdata;
  end

  assign full = (wgray == {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]});

  // read side
  always_ff @(posedge rclk) begin
    if (rrst) begin
      rbin     <= '0;
      rgray    <= '0;
      wgray_r1 <= '0;
      wgray_r2 <= '0;
    end else begin
      rbin     <= rbin_nx;
      rgray    <= bin2gray(rbin_nx);
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
    end
  end

  assign empty = (rgray == wgray_r2);
  assign rdata = mem[rbin[AW-1:0]];
endmodule
