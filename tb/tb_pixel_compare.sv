// tb_pixel_compare -- random pixels and switch settings; white must be
// D11..D4 > white switch, black must be (D11 = 0 and black switch >
// D10..D3), both only while VA and HA are high; plus the threshold ends of
// the table (white 15/4080, black 7/2040).
module tb_pixel_compare;
  import radiometer_pkg::*;
  logic clk = 0, rst = 1;
  video_bus_t bus;
  logic [7:0] white_sw, black_sw;
  logic white, black;
  int checks = 0, failures = 0;

  pixel_compare dut (.*);
  always #5 clk = !clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  task automatic apply(input logic [11:0] d, input logic v, input logic h,
                       input logic [7:0] ws, input logic [7:0] bs);
    int val;
    bit ew, eb;
    @(negedge clk);
    bus = '{va: v, ha: h, hsync_n: 1'b1, lock_n: 1'b1, data: d};
    white_sw = ws; black_sw = bs;
    val = int'(d);
    // white level in full counts: switch * 16 + 15; black: switch * 8
    ew = v && h && (val > int'(ws) * 16 + 15);
    eb = v && h && (val < int'(bs) * 8);
    @(posedge clk); #1;
    chk(white == ew, $sformatf("white d=%0d sw=%0d", val, ws));
    chk(black == eb, $sformatf("black d=%0d sw=%0d", val, bs));
  endtask

  initial begin
    bus = '0; white_sw = 0; black_sw = 0;
    repeat (2) @(posedge clk);
    rst <= 0;
    // lowest / highest settings of the threshold table
    apply(12'd15, 1, 1, 8'h00, 8'h01);   // 15 is not above white level 15
    apply(12'd16, 1, 1, 8'h00, 8'h01);   // 16 is
    apply(12'd7, 1, 1, 8'hFF, 8'h01);    // 7 is below black level 8
    apply(12'd8, 1, 1, 8'hFF, 8'h01);
    apply(12'd4095, 1, 1, 8'hFF, 8'hFF); // nothing above 4095
    apply(12'd2047, 1, 1, 8'hFF, 8'hFF); // black up to 2040
    apply(12'd2048, 1, 1, 8'hFF, 8'hFF); // D11 set: not black
    apply(12'd4095, 0, 1, 8'h00, 8'hFF); // gated by VA
    apply(12'd0, 1, 0, 8'h00, 8'hFF);    // gated by HA
    repeat (2000) apply(12'($urandom), 1'($urandom_range(0, 3) != 0), 1'($urandom_range(0, 3) != 0),
                        8'($urandom), 8'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
