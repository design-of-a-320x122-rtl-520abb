// tb_pixel_counter -- feeds frames of random white/black flags (flags one
// clock behind VA, as pixel_compare delivers them), counts them here, and
// checks the latched totals, TOOLITE/TOODARK against random count
// thresholds, and one decide pulse per frame, two clocks after VA falls.
// One frame is a full 39040-pixel frame so that the top-byte comparison is
// exercised with realistic totals.
module tb_pixel_counter;
  logic clk = 0, rst = 1;
  logic va = 0, white = 0, black = 0;
  logic [7:0] white_thr, black_thr;
  logic [15:0] white_total, black_total;
  logic toolite, toodark, decide;
  int checks = 0, failures = 0;
  int decides = 0;

  pixel_counter dut (.*);
  always #5 clk = !clk;
  always @(posedge clk) if (decide) decides++;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  task automatic frame(input int npix, input int pw, input int pb);
    int nw = 0, nb = 0, d0;
    @(negedge clk);
    va = 1;
    for (int i = 0; i < npix; i++) begin
      @(negedge clk);
      white = ($urandom_range(0, 99) < pw);
      black = !white && ($urandom_range(0, 99) < pb);
      nw += int'(white); nb += int'(black);
      if (i % 320 == 319) begin   // a little blanking now and then
        @(negedge clk); white = 0; black = 0;
      end
    end
    @(negedge clk);
    white = 0; black = 0; va = 0;
    d0 = decides;
    repeat (4) @(negedge clk);
    chk(decides == d0 + 1, "one decide per frame");
    chk(white_total == 16'(nw), $sformatf("white total %0d vs %0d", white_total, nw));
    chk(black_total == 16'(nb), $sformatf("black total %0d vs %0d", black_total, nb));
    chk(toolite == ((nw >> 8) > int'(white_thr)), "TOOLITE");
    chk(toodark == ((nb >> 8) > int'(black_thr)), "TOODARK");
    repeat (50) @(negedge clk);
  endtask

  initial begin
    white_thr = 8'h40; black_thr = 8'h40;
    repeat (2) @(posedge clk);
    rst <= 0;
    frame(39040, 60, 30);
    frame(39040, 5, 80);
    white_thr = 8'h98; black_thr = 8'h00;
    frame(39040, 99, 0);
    frame(2000, 50, 50);
    repeat (6) begin
      white_thr = 8'($urandom_range(0, 8)); black_thr = 8'($urandom_range(0, 8));
      frame(3000, $urandom_range(0, 100), $urandom_range(0, 100));
    end
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
