// tb_rotary_encoder -- every single switch position must give its code
// 1..11, no grounded position must give 0000, and with two positions
// grounded the higher one wins.
module tb_rotary_encoder;
  logic [10:0] pos_n;
  logic [3:0] code;
  int checks = 0, failures = 0;

  rotary_encoder dut (.*);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    pos_n = '1; #1;
    chk(code == 4'd0, "no position -> 0000");
    for (int i = 0; i < 11; i++) begin
      pos_n = ~(11'd1 << i); #1;
      chk(int'(code) == i + 1, $sformatf("position %0d -> %0d", i + 1, code));
    end
    for (int i = 0; i < 11; i++)
      for (int j = 0; j < i; j++) begin
        pos_n = ~((11'd1 << i) | (11'd1 << j)); #1;
        chk(int'(code) == i + 1, "two positions");
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
