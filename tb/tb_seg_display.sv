// tb_seg_display -- checks the two seven-segment digits for every code:
// 0..9 on the ones digit with a blank tens digit, 10 and 11 with a 1 on the
// tens digit, dashes for the unused codes 12..15. Segment patterns {g..a}
// are listed here by hand.
module tb_seg_display;
  logic [3:0] code;
  logic [6:0] seg_tens, seg_ones;
  int checks = 0, failures = 0;
  // digits 0..9, {g,f,e,d,c,b,a}
  logic [6:0] pat [10] = '{7'h3F, 7'h06, 7'h5B, 7'h4F, 7'h66, 7'h6D, 7'h7D, 7'h07, 7'h7F, 7'h6F};

  seg_display dut (.*);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    for (int c = 0; c < 16; c++) begin
      code = 4'(c); #1;
      if (c < 10) begin
        chk(seg_tens == 7'h00 && seg_ones == pat[c], $sformatf("code %0d", c));
      end else if (c < 12) begin
        chk(seg_tens == pat[1] && seg_ones == pat[c - 10], $sformatf("code %0d", c));
      end else begin
        chk(seg_tens == 7'h40 && seg_ones == 7'h40, $sformatf("code %0d", c));
      end
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
