// tb_pattern_sim -- drives the simulator board with camera-like timing
// (320 active + 69 blanking pixels, VA over lines 1..NL) and checks both
// patterns on every active pixel: the ramp shows column mod 256 in the top
// eight bits with 0000 below, the bars show the active line number in the
// top eight bits with 1111 below.
module tb_pattern_sim;
  import radiometer_pkg::*;
  localparam int HA_N = 320, HT = 389, NL = 12, VT = 16;
  logic clk = 0, rst = 1, sel = 0;
  logic va = 0, ha, hsync_n = 1, lock_n = 1;
  video_bus_t bus;
  int checks = 0, failures = 0;
  int ramp_ok_pix = 0;

  pattern_sim dut (.*);
  always #5 clk = !clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  // timing source: line v (0..VT-1), pixel h; VA rises at pixel HA_N+1 of
  // line 0 and falls at pixel HA_N+1 of line NL, as the camera does
  int h = 0, v = 0;
  always @(posedge clk) begin
    if (rst) begin h <= 0; v <= 0; end
    else begin
      h <= (h == HT - 1) ? 0 : h + 1;
      if (h == HT - 1) v <= (v == VT - 1) ? 0 : v + 1;
    end
  end
  assign ha = !rst && (h < HA_N);
  always @(posedge clk) begin
    if (h == HA_N && v == 0) va <= 1;
    if (h == HA_N && v == NL) va <= 0;
  end

  // check the registered output against the position one clock earlier
  int hp, vp;
  always @(posedge clk) begin
    hp <= h; vp <= v;
  end
  always @(negedge clk) begin
    if (!rst && bus.va && bus.ha) begin
      if (!sel) chk(bus.data == {8'(hp % 256), 4'h0}, $sformatf("ramp col %0d got %h", hp, bus.data));
      else      chk(bus.data == {8'(vp - 1), 4'hF}, $sformatf("bars line %0d got %h", vp, bus.data));
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (2 * VT * HT) @(posedge clk);
    sel <= 1;
    repeat (2 * VT * HT) @(posedge clk);
    chk(checks > 4 * NL * HA_N - 10, "enough active pixels checked");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5 * VT * HT) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
