// tb_display_sync_gen -- runs the display sync generator next to a camera
// timing generator that was started at a different time. Before the first
// LOCK the two run freely; after it the display counters must equal the
// camera counters on every clock. Over two frames it checks: 389 pixels
// per line with 320 active, 263 + 262 line fields, 244 active lines per
// field numbered 0..243, VSYNC low for 3 lines at the start of each field,
// one frame_start per 525 lines, and HSYNC low for 29 pixels per line.
module tb_display_sync_gen;
  logic clk = 0, rst = 1, rst_cam = 1;
  logic [9:0] hcount, vcount, c_h, c_v;
  logic field, de, hsync_n, vsync_n, frame_start;
  logic [7:0] act_line;
  logic c_ha, c_hs, lock_n, c_ls, c_bs;
  int checks = 0, failures = 0;

  display_sync_gen dut (.clk, .rst, .lock_n, .hcount, .vcount, .field, .de,
                        .act_line, .hsync_n, .vsync_n, .frame_start);
  video_timing cam (.clk, .rst(rst_cam), .hcount(c_h), .vcount(c_v), .ha(c_ha),
                    .hsync_n(c_hs), .lock_n, .line_start(c_ls), .blank_start(c_bs));
  always #5 clk = !clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  bit locked = 0;
  int n_lock = 0;
  always @(posedge clk) if (!rst_cam && !lock_n) n_lock++;

  initial begin
    int de_pix, de_lines, hs_pix, vs_lines, fs_gap, fs_seen, last_fs, cyc;
    int max_act [2];
    bit de_d, vs_d;
    int fld_lines, fld_de_lines;
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (12345) @(posedge clk);   // camera starts at an arbitrary offset
    rst_cam <= 0;
    @(posedge clk iff n_lock == 1);
    @(posedge clk); #1;
    de_pix = 0; de_lines = 0; hs_pix = 0; vs_lines = 0; fs_seen = 0;
    last_fs = -1; cyc = 0; de_d = 0; vs_d = 1; max_act = '{0, 0};
    fld_de_lines = 0;
    // two full frames
    repeat (2 * 525 * 389) begin
      chk(hcount == c_h && vcount == c_v, "locked to the camera");
      if (de) begin
        de_pix++;
        chk(hcount < 320, "de only in the first 320 pixels");
        chk(act_line < 244, "act_line range");
        if (act_line > max_act[field]) max_act[field] = act_line;
        chk(act_line == ((field ? vcount - 263 : vcount) - 10), "act_line numbering");
      end
      if (de && !de_d) de_lines++;
      if (!hsync_n) hs_pix++;
      if (!vsync_n && hcount == 0) vs_lines++;
      if (frame_start) begin
        chk(vcount == 0 && hcount == 0, "frame_start position");
        if (last_fs >= 0) chk(cyc - last_fs == 525 * 389, "frame period");
        last_fs = cyc; fs_seen++;
      end
      chk(field == (vcount >= 263), "field split 263/262");
      de_d = de;
      cyc++;
      @(posedge clk); #1;
    end
    chk(de_pix == 2 * 2 * 244 * 320, $sformatf("active pixels %0d", de_pix));
    chk(de_lines == 2 * 2 * 244, $sformatf("active lines %0d", de_lines));
    chk(hs_pix == 2 * 525 * 29, $sformatf("hsync pixels %0d", hs_pix));
    chk(vs_lines == 2 * 2 * 3, $sformatf("vsync lines %0d", vs_lines));
    chk(fs_seen == 2, "two frame starts");
    chk(max_act[0] == 243 && max_act[1] == 243, "244 lines per field");
    chk(n_lock >= 2, "LOCK kept coming");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
