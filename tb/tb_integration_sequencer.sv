// tb_integration_sequencer -- runs every integration-time code and measures,
// from the mode of each line, the readout period (in lines), the exposure
// (start of the DUMP line to the next TRANSFER, or TRANSFER to TRANSFER when
// there is no dump), the number of SWEEP lines and the 122 VA lines per
// period. Expected values are the integration-time table written out here.
// It also checks that the SAM pins never change while HSYNC is low.
module tb_integration_sequencer;
  import radiometer_pkg::*;
  logic clk = 0, rst = 1;
  logic [9:0] hcount, vcount;
  logic ha, hsync_n, lock_n, line_start, blank_start;
  logic [3:0] int_code;
  logic sam_trans, sam_dump, sam_sweep, va, period_start;
  seq_mode_t line_mode;
  logic [3:0] exp_code;
  logic [11:0] pline;
  int checks = 0, failures = 0;

  // exposure in lines and readout period in lines (60/s alternates 262/263)
  int exp_tab [12] = '{2, 4, 8, 16, 32, 64, 128, 256, 394, 525, 1050, 2100};
  int per_tab [12] = '{262, 262, 262, 262, 262, 262, 262, 525, 525, 525, 1050, 2100};

  video_timing u_t (.*);
  integration_sequencer dut (.*);

  always #5 clk = !clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s code=%0d", what, int_code); end
  endtask

  // pins must be stable while HSYNC is low
  logic [2:0] pins_d;
  always @(posedge clk) begin
    pins_d <= {sam_trans, sam_dump, sam_sweep};
    if (!rst && !hsync_n && pins_d != {sam_trans, sam_dump, sam_sweep})
      chk(0, "pins changed during HSYNC");
  end

  int line_no, last_dump, last_xfer, sweeps, va_lines, per_start;
  int n_dumps, n_periods;
  bit measuring;

  always @(posedge clk) begin
    if (!rst && line_start) line_no <= line_no + 1;
  end

  // observe each line at its second pixel (line_mode updated on line_start)
  task automatic run_code(input int code);
    int measured_periods;
    int_code = 4'(code);
    // let the code take effect: two period starts
    repeat (2) @(posedge clk iff period_start);
    measured_periods = 0;
    last_dump = -1; last_xfer = -1; sweeps = 0; va_lines = 0; per_start = -1;
    n_dumps = 0;
    while (measured_periods < 3) begin
      @(posedge clk iff (hcount == 10'd1));
      if (ha && va) va_lines++;
      case (line_mode)
        MODE_TRANSFER: begin
          if (last_xfer >= 0) begin
            int per = line_no - last_xfer;
            bit per_ok = (code <= 6) ? (per == 262 || per == 263) : (per == per_tab[code]);
            chk(per_ok, $sformatf("period %0d", per));
            if (code <= 8) begin
              chk(last_dump >= 0 && line_no - last_dump == exp_tab[code],
                  $sformatf("exposure %0d", line_no - last_dump));
              chk(sweeps == ((exp_tab[code] - 1 < 4) ? exp_tab[code] - 1 : 4),
                  $sformatf("sweep lines %0d", sweeps));
            end else begin
              chk(per == exp_tab[code], "multi-frame exposure");
              chk(n_dumps == 0, "no dump without sub-frame exposure");
            end
            chk(va_lines == 122, $sformatf("VA lines %0d", va_lines));
            chk(exp_code == 4'(code), "exp_code");
            measured_periods++;
          end
          last_xfer = line_no; sweeps = 0; va_lines = 0; n_dumps = 0; last_dump = -1;
        end
        MODE_DUMP:  begin last_dump = line_no; n_dumps++; end
        MODE_SWEEP: sweeps++;
        default: ;
      endcase
    end
  endtask

  initial begin
    int_code = 4'd9;
    line_no = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int c = 0; c < 12; c++) run_code(c);
    // unused codes are clamped to 11
    int_code = 4'd14;
    repeat (2) @(posedge clk iff period_start);
    chk(exp_code == 4'd11, "code 14 clamped to 11");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40_000_000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
