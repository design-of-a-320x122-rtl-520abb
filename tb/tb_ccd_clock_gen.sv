// tb_ccd_clock_gen -- drives the CCD sequencer with each mode for several
// lines and counts, per line, the B transfers, the C cycles and the length
// of the transfer pulse: READOUT 1 B transfer and 320+8 C pixels, TRANSFER
// 31 clearing B transfers and a 245-tick pulse, DUMP a 245-tick pulse and
// high-speed B clocking (one transfer per 32 ticks) for the rest of the
// line, SWEEP high-speed B clocking all line. It also checks that exactly
// two adjacent phases of each clock are high at all times. The pixel clock
// is 1/4 of the sequencer clock.
module tb_ccd_clock_gen;
  import radiometer_pkg::*;
  logic clk_sam = 0, clk = 0, rst = 1;
  logic [9:0] hcount, vcount;
  logic ha, hsync_n, lock_n, line_start, blank_start;
  logic trans = 0, dump = 0, sweep = 0;
  logic [3:0] b_clk, c_clk;
  logic tg;
  int checks = 0, failures = 0;

  video_timing u_t (.clk, .rst, .hcount, .vcount, .ha, .hsync_n, .lock_n,
                    .line_start, .blank_start);
  ccd_clock_gen dut (.clk_sam, .rst, .ha, .trans, .dump, .sweep, .b_clk, .c_clk, .tg);

  always #5 clk_sam = !clk_sam;
  always @(posedge clk_sam) begin : divide
    int n;
    n = (n + 1) % 2;
    if (n == 0) clk <= !clk;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  function automatic bit two_adjacent(input logic [3:0] p);
    return p == 4'b0011 || p == 4'b0110 || p == 4'b1100 || p == 4'b1001;
  endfunction

  // per-line counters in the sequencer clock domain
  int nb, nc, ntg;
  logic [3:0] b_d, c_d;
  always @(posedge clk_sam) begin
    b_d <= b_clk; c_d <= c_clk;
    if (!rst) begin
      if (b_clk[0] && !b_d[0]) nb++;
      if (c_clk[0] && !c_d[0]) nc++;
      if (tg) ntg++;
      if (!two_adjacent(b_clk) || !two_adjacent(c_clk)) chk(0, "four-phase pattern");
    end
  end

  // present the mode for the next line at the start of blanking, like the
  // sequencer does, then measure over the following line (HA rise to HA rise;
  // the sequencer starts its line a few ticks later, after the synchroniser)
  task automatic one_line(input seq_mode_t m, output int b, output int c, output int t);
    @(posedge clk iff blank_start);
    trans <= (m == MODE_TRANSFER); dump <= (m == MODE_DUMP); sweep <= (m == MODE_SWEEP);
    @(posedge clk iff hcount == 10'd0);
    nb = 0; nc = 0; ntg = 0;
    @(posedge clk iff blank_start);
    trans <= 0; dump <= 0; sweep <= 0;
    @(posedge clk iff hcount == 10'd0);
    b = nb; c = nc; t = ntg;
  endtask

  initial begin
    int b, c, t;
    repeat (20) @(posedge clk_sam);
    rst <= 0;
    repeat (2) @(posedge clk iff line_start);
    repeat (2) begin
      one_line(MODE_READOUT, b, c, t);
      chk(b == 1, $sformatf("READOUT B transfers %0d", b));
      chk(c == 328, $sformatf("READOUT C cycles %0d", c));
      chk(t == 0, "READOUT no transfer pulse");
      one_line(MODE_TRANSFER, b, c, t);
      chk(b == 31, $sformatf("TRANSFER B transfers %0d", b));
      chk(t == 245, $sformatf("TRANSFER pulse %0d", t));
      chk(c >= 388 && c <= 390, $sformatf("TRANSFER C cycles %0d", c));
      one_line(MODE_DUMP, b, c, t);
      chk(t == 245, $sformatf("DUMP pulse %0d", t));
      chk(b >= 40 && b <= 41, $sformatf("DUMP B transfers %0d", b));
      chk(c >= 388 && c <= 390, $sformatf("DUMP C cycles %0d", c));
      one_line(MODE_SWEEP, b, c, t);
      chk(b >= 48 && b <= 49, $sformatf("SWEEP B transfers %0d", b));
      chk(t == 0, "SWEEP no transfer pulse");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200_000) @(posedge clk_sam);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
