// tb_frame_memory -- fills a whole 320 x 122 frame with a generated pattern,
// reads it back in another order with one clock of read latency, and checks
// that a write to one address does not disturb others.
module tb_frame_memory;
  localparam int DEPTH = 320 * 122;
  logic clk = 0, we = 0;
  logic [15:0] waddr = 0, raddr = 0;
  logic [7:0] wdata = 0, rdata;
  int checks = 0, failures = 0;

  frame_memory dut (.*);
  always #5 clk = !clk;

  function automatic logic [7:0] pat(input int a, input int k);
    return 8'((a * 7 + (a >> 8) * 13 + k) ^ (a >> 3));
  endfunction

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk); we = 1; waddr = 16'(a); wdata = pat(a, 0);
    end
    @(negedge clk); we = 0;
    for (int a = DEPTH - 1; a >= 0; a -= 3) begin
      @(negedge clk); raddr = 16'(a);
      @(posedge clk); #1;
      chk(rdata == pat(a, 0), $sformatf("addr %0d", a));
    end
    // write while reading another address
    for (int a = 0; a < 2000; a++) begin
      int r;
      r = $urandom_range(0, DEPTH - 1);
      @(negedge clk); we = 1; waddr = 16'(a * 19 % DEPTH); wdata = pat(a * 19 % DEPTH, 1);
      raddr = 16'(r);
      @(posedge clk); #1;
      if (r != a * 19 % DEPTH) begin
        // r was already rewritten if it is an earlier a*19
        bit rew;
        rew = 0;
        for (int b = 0; b < a; b++) if (b * 19 % DEPTH == r) rew = 1;
        chk(rdata == pat(r, rew ? 1 : 0), $sformatf("independent read port a=%0d r=%0d got %h exp %h rew %0d", a, r, rdata, pat(r, rew ? 1 : 0), rew));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
