// roi_sync_select -- chooses the region-of-interest sync pair on the
// display board.
//
// The Datacube P4 connector carries four pairs of active-low sync signals
// (Hsync one pixel wide, Vsync from one pixel to two lines long), one pair
// per region-of-interest channel. All eight are first latched on the dot
// clock DC, then a dual 4:1 multiplexer picks one pair with the 2-bit
// address set by two on-board jumpers. Latch-then-select follows the
// document; registering the selected pair a second time, so that the board
// logic sees clean one-clock signals, is this design's choice.
//
// Interface: dc_clk domain; hsync_n/vsync_n are two clocks after P4.
module roi_sync_select (
  input  logic       dc_clk,
  input  logic       rst,
  input  logic [3:0] p4_hsync_n,
  input  logic [3:0] p4_vsync_n,
  input  logic [1:0] sel,          // jumper address
  output logic       hsync_n,
  output logic       vsync_n
);
  logic [3:0] h_q, v_q;

  always_ff @(posedge dc_clk) begin
    if (rst) begin
      h_q     <= '1;
      v_q     <= '1;
      hsync_n <= 1'b1;
      vsync_n <= 1'b1;
    end else begin
      h_q     <= p4_hsync_n;
      v_q     <= p4_vsync_n;
      hsync_n <= h_q[sel];
      vsync_n <= v_q[sel];
    end
  end
endmodule
