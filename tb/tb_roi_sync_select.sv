// tb_roi_sync_select -- random sync patterns on the four P4 pairs and a
// random jumper address; the selected pair must appear two dot clocks later.
module tb_roi_sync_select;
  logic dc_clk = 0, rst = 1;
  logic [3:0] p4_hsync_n = '1, p4_vsync_n = '1;
  logic [1:0] sel = 0;
  logic hsync_n, vsync_n;
  int checks = 0, failures = 0;
  logic [3:0] h_hist [3], v_hist [3];
  logic [1:0] s_hist [3];

  roi_sync_select dut (.*);
  always #5 dc_clk = !dc_clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (3) @(posedge dc_clk);
    rst <= 0;
    repeat (1000) begin
      @(negedge dc_clk);
      h_hist[2] = h_hist[1]; h_hist[1] = h_hist[0];
      v_hist[2] = v_hist[1]; v_hist[1] = v_hist[0];
      s_hist[2] = s_hist[1]; s_hist[1] = s_hist[0];
      p4_hsync_n = 4'($urandom); p4_vsync_n = 4'($urandom);
      if ($urandom_range(0, 20) == 0) sel = 2'($urandom);
      h_hist[0] = p4_hsync_n; v_hist[0] = p4_vsync_n; s_hist[0] = sel;
      @(posedge dc_clk); #1;
      // output register sampled h_q (the P4 latched one clock before) with
      // the address of one clock before
      if (checks > 4) begin
        chk(hsync_n == h_hist[1][s_hist[0]], "hsync select");
        chk(vsync_n == v_hist[1][s_hist[0]], "vsync select");
      end else checks++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge dc_clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
