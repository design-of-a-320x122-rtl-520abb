// display_sync_gen -- RS-170 sync generator of the display board.
//
// The camera's frame rate varies with the integration time, but the monitor
// must run at 30 frames/s, so the display board has its own sync generator.
// It counts pixels (H_ACT active + H_BLK blanking per line) and 525 lines
// per frame, split into two interlaced fields of 263 and 262 lines. In each
// field ACT_LINES lines starting at field line V_START are active; the
// 4X scan converter fills them with 122 source lines, each shown twice per
// field and again in the other field. The generator is locked to the
// camera's 30 Hz LOCK pulse: each LOCK puts the counters to the position
// the camera timing is at right after its LOCK, so the two never drift. The
// 30 frame/s output, the two fields and the LOCK input follow the document;
// the sync positions and widths and the active-line window are this
// design's choices.
//
// Interface: clk is the camera pixel clock. All outputs are registered.
// act_line is the active line number inside the field (0..ACT_LINES-1),
// valid while de is high.
module display_sync_gen #(
  parameter int H_ACT     = radiometer_pkg::H_ACTIVE,
  parameter int H_BLK     = radiometer_pkg::H_BLANK,
  parameter int V_TOT     = radiometer_pkg::V_TOTAL,
  parameter int ACT_LINES = 244,
  parameter int V_START   = 10,
  parameter int HSYNC_OFS = 10,
  parameter int HSYNC_LEN = 29,
  parameter int VSYNC_LEN = 3
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       lock_n,
  output logic [9:0] hcount,
  output logic [9:0] vcount,
  output logic       field,        // 0 = first field, 1 = second field
  output logic       de,           // active picture
  output logic [7:0] act_line,
  output logic       hsync_n,
  output logic       vsync_n,
  output logic       frame_start   // first pixel of the first field
);
  localparam int H_TOT  = H_ACT + H_BLK;
  localparam int F0_LEN = (V_TOT + 1) / 2;      // 263 lines

  logic [9:0] h_nx, v_nx, fl_nx;
  logic       f_nx;
  logic       lock_d;

  always_comb begin
    if (!lock_n && lock_d) begin
      // camera timing is at pixel H_ACT+3 of line 0 on the next clock
      h_nx = 10'(H_ACT + 3);
      v_nx = '0;
    end else begin
      h_nx = (hcount == 10'(H_TOT - 1)) ? '0 : hcount + 10'd1;
      v_nx = vcount;
      if (hcount == 10'(H_TOT - 1))
        v_nx = (vcount == 10'(V_TOT - 1)) ? '0 : vcount + 10'd1;
    end
    f_nx  = (v_nx >= 10'(F0_LEN));
    fl_nx = f_nx ? v_nx - 10'(F0_LEN) : v_nx;   // line inside the field
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      hcount      <= '0;
      vcount      <= '0;
      field       <= 1'b0;
      de          <= 1'b0;
      act_line    <= '0;
      hsync_n     <= 1'b1;
      vsync_n     <= 1'b1;
      frame_start <= 1'b0;
      lock_d      <= 1'b1;
    end else begin
      lock_d      <= lock_n;
      hcount      <= h_nx;
      vcount      <= v_nx;
      field       <= f_nx;
      de          <= (h_nx < 10'(H_ACT)) && (fl_nx >= 10'(V_START)) &&
                     (fl_nx < 10'(V_START + ACT_LINES));
      act_line    <= 8'(fl_nx - 10'(V_START));
      hsync_n     <= !((h_nx >= 10'(H_ACT + HSYNC_OFS)) &&
                       (h_nx <  10'(H_ACT + HSYNC_OFS + HSYNC_LEN)));
      vsync_n     <= !(fl_nx < 10'(VSYNC_LEN));
      frame_start <= (v_nx == '0) && (h_nx == '0);
    end
  end

  initial begin
    assert (V_START + ACT_LINES <= V_TOT / 2)
      else $error("active window does not fit in a field");
  end
endmodule
