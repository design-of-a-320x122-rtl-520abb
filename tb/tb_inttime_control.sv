// tb_inttime_control -- steps the automatic integration-time counter with
// TOODARK (up) and TOOLITE (down) decisions and checks it against a model:
// it must stop at 11 and at 0, hold when both or neither are flagged, move
// only on a decide pulse, and the output must follow the rotary code in
// manual mode and the counter in automatic mode.
module tb_inttime_control;
  logic clk = 0, rst = 1;
  logic decide = 0, toolite = 0, toodark = 0, auto_mode = 1;
  logic [3:0] manual_code = 0, auto_code, int_code;
  int checks = 0, failures = 0;
  int model;

  inttime_control dut (.*);
  always #5 clk = !clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  task automatic step(input bit lite, input bit dark, input bit pulse);
    @(negedge clk);
    toolite = lite; toodark = dark; decide = pulse;
    @(negedge clk);
    decide = 0;
    if (pulse && dark && !lite && model < 11) model++;
    if (pulse && lite && !dark && model > 0) model--;
    @(negedge clk);
    chk(int'(auto_code) == model, $sformatf("auto code %0d vs %0d", auto_code, model));
    chk(int_code == (auto_mode ? auto_code : manual_code), "selector");
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst <= 0;
    model = 9;
    @(negedge clk);
    chk(auto_code == 4'd9, "reset code");
    repeat (5)  step(0, 1, 1);          // up to 11 and stop there
    chk(auto_code == 4'd11, "stops at 11");
    step(1, 1, 1);                       // both: hold
    step(0, 1, 0);                       // no decide: hold
    repeat (14) step(1, 0, 1);          // down to 0 and stop there
    chk(auto_code == 4'd0, "stops at 0");
    step(0, 0, 1);
    auto_mode = 0;
    for (int m = 0; m < 12; m++) begin
      manual_code = 4'(m);
      step(0, 1, 1);                     // counter still runs in manual mode
    end
    auto_mode = 1;
    repeat (300) step(1'($urandom), 1'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
