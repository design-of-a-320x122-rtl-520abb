// display_board -- the Datacube display board: turns processed video coming
// back from the Datacube at its 10 MHz dot clock into a steady 30 frame/s
// RS-170 picture at full screen size.
//
// Dot-clock side: the region-of-interest sync pair chosen by the jumpers
// (roi_sync_select) frames the incoming 8-bit data. After the Vsync pulse
// the next V_ACT Hsync pulses each open a window of H_ACT pixels, starting
// IN_HOFS dot clocks after the Hsync pulse; those pixels are written into
// the FIFO, the first pixel of the frame marked with a start-of-frame flag.
// Camera-clock side: the FIFO is drained into the ping-pong frame memories
// of the scan converter, and the RS-170 sync generator, locked to the
// camera's 30 Hz LOCK pulse, reads them out four times enlarged vertically.
// The outputs go to the video DAC (data, blank and composite sync).
//
// The clock domains, the FIFO between them, the ROI sync selection, the
// ping-pong memories, the LOCK-driven sync generator and the 4X conversion
// follow the document. The data window position after Hsync (IN_HOFS) and
// the start-of-frame flag are this design's choices. A write into a full
// FIFO is dropped and sets the sticky overflow flag.
//
// Interface: dc_clk (dot clock) and clk (camera pixel clock) are unrelated;
// rst must be held for a few cycles of both.
module display_board #(
  parameter int H_ACT   = radiometer_pkg::H_ACTIVE,
  parameter int V_ACT   = radiometer_pkg::V_ACTIVE,
  parameter int IN_HOFS = 4
) (
  input  logic       dc_clk,
  input  logic       clk,
  input  logic       rst,
  input  logic [7:0] p5_data,        // processed data, top 8 bits
  input  logic [3:0] p4_hsync_n,
  input  logic [3:0] p4_vsync_n,
  input  logic [1:0] roi_sel,
  input  logic       lock_n,         // 30 Hz LOCK from the camera (P6)
  output logic [7:0] dac_data,
  output logic       dac_blank_n,
  output logic       dac_sync_n,
  output logic       overflow,
  output logic       swap,
  output logic       repeat_frame
);
  // ---------------- dot-clock side ----------------
  logic       hs_n, vs_n, hs_d;
  logic [7:0] data_q;
  logic [9:0] hcnt;
  logic [7:0] vline;
  logic       in_line, sof_pend;
  logic       fifo_we, fifo_full;
  logic [8:0] fifo_wdata;

  roi_sync_select u_roi (
    .dc_clk, .rst, .p4_hsync_n, .p4_vsync_n, .sel(roi_sel),
    .hsync_n(hs_n), .vsync_n(vs_n)
  );

  always_ff @(posedge dc_clk) begin
    if (rst) begin
      hs_d     <= 1'b1;
      data_q   <= '0;
      hcnt     <= '0;
      vline    <= 8'(V_ACT);
      in_line  <= 1'b0;
      sof_pend <= 1'b0;
      overflow <= 1'b0;
    end else begin
      hs_d   <= hs_n;
      // the sync pair is two dot clocks behind P4; delay data to match
      data_q <= p5_data;
      if (!vs_n) begin
        vline    <= '0;
        in_line  <= 1'b0;
        sof_pend <= 1'b1;
      end else if (!hs_n && hs_d && vline < 8'(V_ACT)) begin
        in_line <= 1'b1;
        hcnt    <= '0;
      end else if (in_line) begin
        hcnt <= hcnt + 10'd1;
        if (hcnt == 10'(IN_HOFS + H_ACT - 1)) begin
          in_line <= 1'b0;
          vline   <= vline + 8'd1;
        end
      end
      if (fifo_we) sof_pend <= 1'b0;
      if (fifo_we && fifo_full) overflow <= 1'b1;
    end
  end

  assign fifo_we    = in_line && (hcnt >= 10'(IN_HOFS)) && (vs_n);
  assign fifo_wdata = {sof_pend, data_q};

  // ---------------- FIFO ----------------
  logic [8:0] fifo_rdata;
  logic       fifo_empty, fifo_re;

  async_fifo #(.DW(9), .AW(9)) u_fifo (
    .wclk(dc_clk), .wrst(rst), .we(fifo_we), .wdata(fifo_wdata), .full(fifo_full),
    .rclk(clk), .rrst(rst), .re(fifo_re), .rdata(fifo_rdata), .empty(fifo_empty)
  );

  // ---------------- camera-clock side ----------------
  logic [9:0] hcount, vcount;
  logic       field, de, hsync_n, vsync_n, frame_start;
  logic [7:0] act_line;
  logic       de_o, hsync_o_n, vsync_o_n, front_sel;

  display_sync_gen u_sync (
    .clk, .rst, .lock_n, .hcount, .vcount, .field, .de, .act_line,
    .hsync_n, .vsync_n, .frame_start
  );

  scan_converter #(.H_ACT(H_ACT), .V_ACT(V_ACT)) u_scan (
    .clk, .rst, .fifo_rdata, .fifo_empty, .fifo_re,
    .hcount, .de, .act_line, .hsync_n, .vsync_n, .frame_start,
    .pix(dac_data), .de_o, .hsync_o_n, .vsync_o_n,
    .front_sel, .swap, .repeat_frame
  );

  assign dac_blank_n = de_o;
  assign dac_sync_n  = hsync_o_n & vsync_o_n;
endmodule
