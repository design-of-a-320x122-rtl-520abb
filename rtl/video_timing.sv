// video_timing -- line and frame counters of the camera head.
//
// Counts pixel clocks within a line (hcount, 0..H_ACT+H_BLK-1) and lines
// within a 30 Hz frame (vcount, 0..V_TOT-1). A line begins with the rising
// edge of HA, which stays high over the H_ACT active pixels and low over the
// H_BLK blanking pixels, as in the document's timing relationship. HSYNC is
// an active-low pulse inside the blanking interval (its offset and width are
// this design's choice). LOCK is the document's one-pixel, active-low 30 Hz
// pulse; it is placed one pixel after the point where VA rises in a frame
// that starts on line 0, i.e. at hcount = H_ACT+2 of line 0 (VA rises at
// H_ACT+1).
//
// Interface: clk is the pixel clock; all outputs are registered and change
// together. line_start is high for the first pixel of each line, blank_start
// for the first blanking pixel.
module video_timing #(
  parameter int H_ACT      = radiometer_pkg::H_ACTIVE,
  parameter int H_BLK      = radiometer_pkg::H_BLANK,
  parameter int V_TOT      = radiometer_pkg::V_TOTAL,
  parameter int HSYNC_OFS  = 10,   // first HSYNC pixel after the start of blanking
  parameter int HSYNC_LEN  = 29    // HSYNC width in pixels (about 4.7 us)
) (
  input  logic        clk,
  input  logic        rst,
  output logic [9:0]  hcount,
  output logic [9:0]  vcount,
  output logic        ha,
  output logic        hsync_n,
  output logic        lock_n,
  output logic        line_start,
  output logic        blank_start
);
  localparam int H_TOT = H_ACT + H_BLK;

  logic [9:0] h_nx, v_nx;

  always_comb begin
    h_nx = (hcount == 10'(H_TOT - 1)) ? '0 : hcount + 10'd1;
    v_nx = vcount;
    if (hcount == 10'(H_TOT - 1))
      v_nx = (vcount == 10'(V_TOT - 1)) ? '0 : vcount + 10'd1;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      hcount      <= '0;
      vcount      <= '0;
      ha          <= 1'b1;
      hsync_n     <= 1'b1;
      lock_n      <= 1'b1;
      line_start  <= 1'b1;
      blank_start <= 1'b0;
    end else begin
      hcount      <= h_nx;
      vcount      <= v_nx;
      ha          <= (h_nx < 10'(H_ACT));
      hsync_n     <= !((h_nx >= 10'(H_ACT + HSYNC_OFS)) &&
                       (h_nx <  10'(H_ACT + HSYNC_OFS + HSYNC_LEN)));
      lock_n      <= !((v_nx == '0) && (h_nx == 10'(H_ACT + 2)));
      line_start  <= (h_nx == '0);
      blank_start <= (h_nx == 10'(H_ACT));
    end
  end

  initial begin
    assert (H_ACT + HSYNC_OFS + HSYNC_LEN <= H_TOT)
      else $error("HSYNC does not fit in the blanking interval");
  end
endmodule
