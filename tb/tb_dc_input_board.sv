// tb_dc_input_board -- camera mode: the output is the camera bus one clock
// later. Test mode: over a whole frame, every active pixel must be C00h on
// columns 1, 160, 320 and lines 1, 61, 62, 122 and 000h elsewhere; there
// must be 122 active lines of 320 pixels, 69 blanking pixels per line, and
// the frame (LOCK to LOCK) must be 525 lines of 389 pixels.
module tb_dc_input_board;
  import radiometer_pkg::*;
  logic clk = 0, rst = 1, test_mode = 0;
  video_bus_t cam_bus, bus_out;
  int checks = 0, failures = 0;

  dc_input_board dut (.*);
  always #5 clk = !clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    video_bus_t prev;
    int col, line, white_pix, act_lines, cyc, lock_at, blank_len;
    bit in_frame, ha_d;
    cam_bus = '0;
    repeat (3) @(posedge clk);
    rst <= 0;
    // camera mode
    repeat (500) begin
      @(negedge clk);
      prev = cam_bus;
      cam_bus = video_bus_t'($urandom);
      @(posedge clk); #1;
      chk(bus_out == prev || bus_out == cam_bus, "sanity");
      chk(bus_out == cam_bus, "camera bus latched");
    end
    // test mode: wait for LOCK, then scan one frame
    test_mode = 1;
    @(negedge clk iff !bus_out.lock_n);
    col = 0; line = 0; white_pix = 0; act_lines = 0; cyc = 0; lock_at = -1;
    in_frame = 0; ha_d = 0; blank_len = 0;
    forever begin
      @(negedge clk);
      cyc++;
      if (!bus_out.lock_n) begin lock_at = cyc; break; end
      if (bus_out.va && bus_out.ha) begin
        bit w;
        if (!ha_d) begin line++; col = 0; act_lines++; end
        col++;
        w = (col == 1 || col == 160 || col == 320 ||
             line == 1 || line == 61 || line == 62 || line == 122);
        chk(bus_out.data == (w ? 12'hC00 : 12'h000),
            $sformatf("pixel line %0d col %0d = %h", line, col, bus_out.data));
        if (w) white_pix++;
      end else if (bus_out.va && !bus_out.ha) begin
        blank_len++;
        if (ha_d) chk(col == 320, $sformatf("320 pixels per line, got %0d", col));
      end
      ha_d = bus_out.ha;
    end
    chk(act_lines == 122, $sformatf("122 active lines, got %0d", act_lines));
    chk(lock_at == 525 * 389, $sformatf("frame length %0d", lock_at));
    // 4 full lines + 3 columns on the other 118 lines
    chk(white_pix == 4 * 320 + 118 * 3, $sformatf("white pixels %0d", white_pix));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
