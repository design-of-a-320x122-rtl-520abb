// tb_async_fifo -- writes at about 10 MHz and reads at about 6 MHz with
// random gaps on both sides; every word read must be the next word written
// (scoreboard), nothing may be lost, full must appear when the writer runs
// ahead and the FIFO must hold exactly 512 words when full.
module tb_async_fifo;
  logic wclk = 0, rclk = 0, rst = 1;
  logic we = 0, re = 0;
  logic [8:0] wdata = 0, rdata;
  logic full, empty;
  int checks = 0, failures = 0;
  logic [8:0] sb [$];
  int nfull = 0, nread = 0;

  async_fifo #(.DW(9), .AW(9)) dut (
    .wclk, .wrst(rst), .we, .wdata, .full, .rclk, .rrst(rst), .re, .rdata, .empty
  );
  always #50 wclk = !wclk;   // 10 MHz
  always #81 rclk = !rclk;   // about 6.2 MHz

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  bit wr_on = 1, rd_on = 1;
  int wr_count = 0;
  always @(posedge wclk) begin
    if (!rst) begin
      if (we && !full) begin sb.push_back(wdata); wr_count++; end
      if (full) nfull++;
      we    <= wr_on && ($urandom_range(0, 3) != 0);
      wdata <= 9'($urandom);
    end
  end
  always @(posedge rclk) begin
    if (!rst) begin
      if (re && !empty) begin
        chk(sb.size() > 0 && rdata == sb[0], "read order");
        if (sb.size() > 0) void'(sb.pop_front());
        nread++;
      end
      re <= rd_on && ($urandom_range(0, 4) != 0);
    end
  end

  initial begin
    repeat (5) @(posedge wclk);
    rst <= 0;
    repeat (20000) @(posedge wclk);
    // stop reading: the FIFO must fill to exactly 512 words
    rd_on = 0;
    repeat (2000) @(posedge wclk);
    chk(full, "full when the reader stops");
    chk(sb.size() == 512, $sformatf("holds 512 words, has %0d", sb.size()));
    wr_on = 0; rd_on = 1;
    repeat (3000) @(posedge rclk);
    chk(empty && sb.size() == 0, "drains completely");
    chk(nfull > 0 && nread > 10000, "traffic happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge wclk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
