// dc_input_board -- digital part of the Datacube input board.
//
// The board sits between the camera processor and the Datacube acquisition
// board. It latches the camera video bus, and it also contains an autonomous
// test-pattern generator that needs no input: its own line and frame
// counters reproduce the camera timing in the non-interlaced 320 x 122,
// 30 frame/s format (320 active pixels and 69 blanking pixels per line, 525
// lines per frame), and its picture is a white grid on black: columns 1, 160
// and 320 and lines 1, 61, 62 and 122 are white, everything else is black.
// White is written by setting the two MSBs (C00h), black is all zeros. A
// switch selects which of the two latched sources drives the output. The
// format, the grid and the white/black codes follow the document; running
// the generator from the camera pixel clock (the real board has its own
// crystal) is this design's simplification.
//
// Interface: one pixel per clk; the camera path has one clock of latency,
// the test path is free running.
module dc_input_board
  import radiometer_pkg::*;
#(
  parameter int H_ACT = radiometer_pkg::H_ACTIVE,
  parameter int H_BLK = radiometer_pkg::H_BLANK,
  parameter int V_ACT = radiometer_pkg::V_ACTIVE,
  parameter int V_TOT = radiometer_pkg::V_TOTAL
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        test_mode,   // 1 = send the test pattern
  input  video_bus_t  cam_bus,
  output video_bus_t  bus_out
);
  localparam int COL_MID  = 160;
  localparam int LINE_MID = 61;

  logic [9:0] hcount, vcount;
  logic       ha, hsync_n, lock_n, line_start, blank_start;
  logic       va_tp;
  video_bus_t cam_q, tp_q;
  logic       white;

  video_timing #(.H_ACT(H_ACT), .H_BLK(H_BLK), .V_TOT(V_TOT)) u_timing (
    .clk, .rst, .hcount, .vcount, .ha, .hsync_n, .lock_n, .line_start, .blank_start
  );

  // grid: columns and lines are numbered from 1; active lines are 1..V_ACT
  assign white = (hcount == 10'd0) || (hcount == 10'(COL_MID - 1)) ||
                 (hcount == 10'(H_ACT - 1)) ||
                 (vcount == 10'd1) || (vcount == 10'(LINE_MID)) ||
                 (vcount == 10'(LINE_MID + 1)) || (vcount == 10'(V_ACT));

  always_ff @(posedge clk) begin
    if (rst) begin
      va_tp <= 1'b0;
      cam_q <= '{va: 1'b0, ha: 1'b0, hsync_n: 1'b1, lock_n: 1'b1, data: '0};
      tp_q  <= '{va: 1'b0, ha: 1'b0, hsync_n: 1'b1, lock_n: 1'b1, data: '0};
    end else begin
      if (blank_start && vcount == 10'd0)        va_tp <= 1'b1;
      if (blank_start && vcount == 10'(V_ACT))   va_tp <= 1'b0;
      cam_q        <= cam_bus;
      tp_q.va      <= va_tp;
      tp_q.ha      <= ha;
      tp_q.hsync_n <= hsync_n;
      tp_q.lock_n  <= lock_n;
      tp_q.data    <= (va_tp && ha && white) ? 12'hC00 : 12'h000;
    end
  end

  assign bus_out = test_mode ? tp_q : cam_q;
endmodule
