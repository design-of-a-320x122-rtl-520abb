// tb_smart_frame -- runs several frames of random video through the Smart
// Frame inserter with a changing frame count and integration code. On the
// third active line every pixel must carry the four-word group (count high
// byte + code, count low byte + code, FFF, 000), with the count of this
// frame and the code that was commanded when the previous frame began; the
// group must appear 80 times per line; every other pixel and every timing
// signal must pass through unchanged, one clock later.
module tb_smart_frame;
  import radiometer_pkg::*;
  localparam int HA_N = 320, HT = 389, NL = 8, VT = 12;
  logic clk = 0, rst = 1;
  video_bus_t bus_in, bus_out;
  logic [15:0] frame_count;
  logic [3:0] int_code;
  logic muxsel;
  int checks = 0, failures = 0;

  smart_frame dut (.*);
  always #5 clk = !clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  int h = 0, v = 0;
  logic va_r = 0;
  always @(posedge clk) begin
    if (rst) begin h <= 0; v <= 0; end
    else begin
      h <= (h == HT - 1) ? 0 : h + 1;
      if (h == HT - 1) v <= (v == VT - 1) ? 0 : v + 1;
      if (h == HA_N && v == 0)  va_r <= 1;
      if (h == HA_N && v == NL) va_r <= 0;
    end
  end
  always_comb begin
    bus_in.ha      = !rst && h < HA_N;
    bus_in.va      = va_r;
    bus_in.hsync_n = !(h >= HA_N + 10 && h < HA_N + 39);
    bus_in.lock_n  = !(v == 0 && h == HA_N + 2);
  end
  always @(posedge clk) bus_in.data <= 12'($urandom);

  // frame count steps two clocks after VA rises; code changes at VA fall
  logic va_d1, va_d2;
  logic [3:0] code_at_rise, code_prev_rise;
  logic [15:0] fc_frame;
  always @(posedge clk) begin
    va_d1 <= va_r; va_d2 <= va_d1;
    if (va_d1 && !va_d2) frame_count <= frame_count + 16'd1;
    if (!va_r && va_d1)  int_code <= 4'($urandom_range(0, 11));
    if (va_r && !va_d1) begin code_prev_rise <= code_at_rise; code_at_rise <= int_code; end
  end

  // reference: delay the input one clock and predict the output
  video_bus_t in_d;
  int hd, vd, groups;
  always @(posedge clk) begin
    in_d <= bus_in; hd <= h; vd <= v;
    if (v == 1 && h == 1) fc_frame <= frame_count;
  end
  always @(negedge clk) begin
    if (!rst && in_d.va && vd >= 1 && vd <= NL) begin
      chk({bus_out.va, bus_out.ha, bus_out.hsync_n, bus_out.lock_n} ==
          {in_d.va, in_d.ha, in_d.hsync_n, in_d.lock_n}, "timing passes");
      if (vd == 3 && in_d.ha) begin
        logic [11:0] e;
        case (hd % 4)
          0: e = {fc_frame[15:8], code_prev_rise};
          1: e = {fc_frame[7:0],  code_prev_rise};
          2: e = 12'hFFF;
          default: e = 12'h000;
        endcase
        chk(bus_out.data == e, $sformatf("info word pix %0d got %h exp %h", hd, bus_out.data, e));
        if (hd % 4 == 3) groups++;
      end else begin
        chk(bus_out.data == in_d.data, $sformatf("video passes line %0d pix %0d", vd, hd));
      end
    end
  end

  initial begin
    frame_count = 16'h12F0; int_code = 4'd5; code_at_rise = 0; code_prev_rise = 0;
    groups = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    // skip the first frame (no previous code yet), check the next four
    @(posedge clk iff (v == VT - 1));
    groups = 0;
    repeat (4) begin
      @(posedge clk iff (v == 1));
      @(posedge clk iff (v == VT - 1));
    end
    chk(groups == 4 * 80, $sformatf("80 groups per frame, got %0d", groups));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10 * VT * HT) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
