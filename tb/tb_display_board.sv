// tb_display_board -- the whole display board between a model of the
// Datacube output (10 MHz dot clock) and the camera pixel clock (6 MHz,
// with a camera timing generator supplying LOCK). The Datacube model sends
// frames of 122 lines of 320 8-bit pixels on ROI sync pair 2 (the other
// pairs carry unrelated syncs); every pixel carries a frame number, line
// and column pattern. Checks on the DAC side: each displayed field has 244
// lines of 320 pixels; every pixel of a field equals source pixel
// (line/2, column) of one single frame; the frame number shown never goes
// back; at least three different frames are shown; a pause of the source
// produces repeats; the FIFO does not overflow at the normal line rate but
// does, stickily, when lines arrive back to back.
module tb_display_board;
  localparam int HA = 320, VA = 122;
  localparam int LINE = 635;       // dot clocks per line (63.5 us)
  localparam int DOFS = 6;         // pixel 0 comes 6 dot clocks after Hsync falls
  logic dc_clk = 0, clk = 0, rst = 1;
  logic [7:0] p5_data = 0;
  logic [3:0] p4_hsync_n = '1, p4_vsync_n = '1;
  logic [1:0] roi_sel = 2;
  logic lock_n, c_ha, c_hs, c_ls, c_bs;
  logic [9:0] c_h, c_v;
  logic [7:0] dac_data;
  logic dac_blank_n, dac_sync_n, overflow, swap, repeat_frame;
  int checks = 0, failures = 0;

  display_board dut (.*);
  video_timing cam (.clk, .rst, .hcount(c_h), .vcount(c_v), .ha(c_ha),
                    .hsync_n(c_hs), .lock_n, .line_start(c_ls), .blank_start(c_bs));
  always #50 dc_clk = !dc_clk;
  always #83 clk = !clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  function automatic logic [7:0] pat(input int f, input int l, input int c);
    return 8'(f * 29 + l * 5 + c);
  endfunction

  // Datacube output model: one frame of 525 lines, VSYNC on lines 0..2,
  // data on lines 3..124
  task automatic send_frame(input int f, input int line_len, input bit blank);
    for (int l = 0; l < 525; l++) begin
      for (int k = 0; k < line_len; k++) begin
        @(negedge dc_clk);
        p4_hsync_n[2] = !(k < 47);
        p4_vsync_n[2] = !(l < 3);
        p4_hsync_n[0] = !(k >= 100 && k < 140);
        p4_vsync_n[0] = !(l >= 200 && l < 203);
        p4_hsync_n[1] = 1'($urandom); p4_vsync_n[1] = 1'($urandom);
        p4_hsync_n[3] = 1'($urandom); p4_vsync_n[3] = 1'($urandom);
        if (blank) begin p4_hsync_n[2] = 1; p4_vsync_n[2] = 1; end
        if (l >= 3 && l < 3 + VA && k >= DOFS && k < DOFS + HA)
          p5_data = pat(f, l - 3, k - DOFS);
        else
          p5_data = 8'($urandom);
      end
    end
  endtask

  // DAC-side checker
  int low_run = 0, line_in_field = -1, col = 0, fld_f = -1, prev_f = -1;
  int fields = 0, frames_seen = 0, n_swap = 0, n_repeat = 0;
  bit bl_d = 0;
  always @(posedge clk) begin
    if (!rst) begin
      if (swap) n_swap++;
      if (repeat_frame) n_repeat++;
      low_run = dac_sync_n ? 0 : low_run + 1;
      if (low_run == 200) begin        // a VSYNC: a new field begins
        if (line_in_field > 0) begin
          chk(line_in_field == 244, $sformatf("244 lines per field, got %0d", line_in_field));
          fields++;
        end
        line_in_field = 0; fld_f = -1;
      end
      if (dac_blank_n && !bl_d) col = 0;
      if (dac_blank_n && line_in_field >= 0 && n_swap > 0) begin
        if (fld_f < 0) begin
          // recover the frame number from the first pixel: 29 * 53 = 1 mod 256
          fld_f = int'(8'(dac_data * 53));
          if (prev_f >= 0) chk(fld_f >= prev_f, "frame number never goes back");
          if (fld_f != prev_f) frames_seen++;
          prev_f = fld_f;
        end
        chk(dac_data == pat(fld_f, line_in_field / 2, col),
            $sformatf("field line %0d col %0d: %h", line_in_field, col, dac_data));
      end
      if (dac_blank_n) col++;
      if (!dac_blank_n && bl_d) begin
        if (line_in_field >= 0 && n_swap > 0) chk(col == HA, "320 pixels per line");
        if (line_in_field >= 0) line_in_field++;
      end
      bl_d = dac_blank_n;
    end
  end

  initial begin
    int rep0;
    repeat (5) @(posedge clk);
    rst = 0;
    for (int f = 1; f <= 4; f++) send_frame(f, LINE, 0);
    chk(!overflow, "no overflow at the normal line rate");
    rep0 = n_repeat;
    send_frame(0, LINE, 1);           // source pauses for two frames
    send_frame(0, LINE, 1);
    chk(n_repeat > rep0, "repeats while the source pauses");
    for (int f = 5; f <= 6; f++) send_frame(f, LINE, 0);
    chk(prev_f == 5 || prev_f == 6, $sformatf("latest frames shown, %0d", prev_f));
    chk(frames_seen >= 3, $sformatf("frames seen %0d", frames_seen));
    chk(fields >= 10, $sformatf("fields %0d", fields));
    chk(n_swap >= 3, $sformatf("swaps %0d", n_swap));
    chk(!overflow, "still no overflow");
    // lines back to back: 320 pixels every 330 dot clocks is faster than
    // the 6 MHz drain
    send_frame(7, 330, 0);
    chk(overflow, "overflow flagged");
    repeat (100) @(posedge dc_clk);
    chk(overflow, "overflow is sticky");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5_000_000) @(posedge dc_clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
