// tb_frame_counter -- VA pulses before START must not count; START clears
// and enables the counter; then every VA pulse counts one, including the
// wrap from FFFFh to 0 after 65536 frames; a second START clears again.
module tb_frame_counter;
  logic clk = 0, rst = 1, start = 0, va = 0;
  logic [15:0] count;
  logic running;
  int checks = 0, failures = 0;

  frame_counter dut (.*);
  always #5 clk = !clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  task automatic frames(input int n);
    repeat (n) begin
      @(negedge clk); va = 1;
      repeat (3) @(negedge clk);
      va = 0;
      repeat (2) @(negedge clk);
    end
  endtask

  task automatic pulse_start();
    @(negedge clk); start = 1;
    repeat (2) @(negedge clk);
    start = 0;
    repeat (4) @(negedge clk);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst <= 0;
    frames(5);
    chk(count == 0 && !running, "held before START");
    pulse_start();
    chk(count == 0 && running, "cleared and running after START");
    frames(7);
    chk(count == 16'd7, $sformatf("seven frames -> %0d", count));
    frames(65536 - 7);
    chk(count == 16'd0, "wraps after 65536 frames");
    frames(3);
    chk(count == 16'd3, "counts on after the wrap");
    pulse_start();
    chk(count == 0, "second START clears");
    frames(1);
    chk(count == 16'd1, "one frame");
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
