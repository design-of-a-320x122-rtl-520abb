// tb_video_timing -- checks the camera line/frame timing against a cycle
// model: HA high for the 320 active pixels of each 389-pixel line, HSYNC low
// for 29 pixels inside blanking, LOCK one pixel long once per 525-line frame
// (checked for period), line_start/blank_start on the right pixels.
module tb_video_timing;
  localparam int HA_N = 320, HB_N = 69, HT = HA_N + HB_N, VT = 525;
  logic clk = 0, rst = 1;
  logic [9:0] hcount, vcount;
  logic ha, hsync_n, lock_n, line_start, blank_start;
  int checks = 0, failures = 0;
  int h, v, lock_seen, last_lock, cyc;

  video_timing dut (.*);

  always #5 clk = !clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s h=%0d v=%0d", what, h, v);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    h = 0; v = 0; lock_seen = 0; last_lock = -1; cyc = 0;
    @(negedge clk);
    repeat (VT * HT * 2 + 100) begin
      chk(hcount == 10'(h) && vcount == 10'(v), "counters");
      chk(ha == (h < HA_N), "HA");
      chk(hsync_n == !(h >= HA_N + 10 && h < HA_N + 39), "HSYNC");
      chk(lock_n == !(v == 0 && h == HA_N + 2), "LOCK");
      chk(line_start == (h == 0), "line_start");
      chk(blank_start == (h == HA_N), "blank_start");
      if (!lock_n) begin
        if (last_lock >= 0) chk(cyc - last_lock == VT * HT, "LOCK period");
        last_lock = cyc;
        lock_seen++;
      end
      @(negedge clk);
      cyc++;
      h++;
      if (h == HT) begin h = 0; v = (v == VT - 1) ? 0 : v + 1; end
    end
    chk(lock_seen == 2, "two LOCK pulses in two frames");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (VT * HT * 3) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
