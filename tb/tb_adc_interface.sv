// tb_adc_interface -- checks the converter-word to offset-binary mapping on
// the rows of the conversion table (full scale, quarter scales, +/-1 bit,
// zero) and on random words, and that the timing signals come out one
// clock later together with the data.
module tb_adc_interface;
  import radiometer_pkg::*;
  logic clk = 0, rst = 1;
  logic [11:0] adc_word = '0;
  logic va = 0, ha = 0, hsync_n = 1, lock_n = 1;
  video_bus_t bus;
  int checks = 0, failures = 0;

  adc_interface dut (.*);
  always #5 clk = !clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  // converter output -> expected decimal value
  logic [11:0] tab_in  [11] = '{12'h7FF, 12'h600, 12'h400, 12'h200, 12'h001, 12'h000,
                                12'hFFF, 12'hE00, 12'hC00, 12'hA00, 12'h800};
  int          tab_out [11] = '{4095, 3584, 3072, 2560, 2049, 2048,
                                2047, 1536, 1024, 512, 0};

  task automatic apply(input logic [11:0] w, input logic [3:0] ctl, input int exp_val);
    @(negedge clk);
    adc_word = w; {va, ha, hsync_n, lock_n} = ctl;
    @(posedge clk); #1;
    chk(int'(bus.data) == exp_val, $sformatf("word %h -> %0d, got %0d", w, exp_val, bus.data));
    chk({bus.va, bus.ha, bus.hsync_n, bus.lock_n} == ctl, "timing signals");
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int i = 0; i < 11; i++) apply(tab_in[i], 4'(i), tab_out[i]);
    repeat (200) begin
      logic [11:0] w;
      w = 12'($urandom);
      // offset binary = two's complement value + 2048
      apply(w, 4'($urandom), int'($signed(w)) + 2048);
    end
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
