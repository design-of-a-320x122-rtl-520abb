// tb_radiometer_top -- end-to-end test of the whole radiometer at its full
// size: 320 x 122 pixels, 525-line frames, all twelve integration times.
//
// Models around the design:
//  * a scene and A/D converter: every pixel of a frame gets a value
//    proportional to a scene flux, to the exposure in lines of the period
//    that exposed it, and to a per-pixel factor 1..128, limited to 4095 and
//    sent in the converter's offset code (MSB inverted);
//  * a Datacube output on the dot clock: 122-line frames of 320 pixels with
//    a frame-numbered pattern, framed by the ROI sync pair 1.
//
// The test walks through: manual selection with the rotary switch (and the
// seven-segment digits), the simulator board's ramp and bars, the input
// board's test grid, the automatic loop settling on a moderate scene (at 64 or 128 lines), then
// climbing to the longest time on a dark scene and falling to the shortest
// on a bright one, the experiment frame counter, the Smart Frame line, and
// the display board with a paused source and, at the end, an overrun FIFO.
//
// Checked continuously, independently of the design:
//  * every exposure period: its length in lines (262/263 alternating, 525,
//    1050, 2100), the transfer line that opens it, a dump line exactly N
//    lines before its end with the sweep lines after it for codes 0-8 and
//    none for 9-11, and one detector transfer pulse per transfer or dump;
//  * every frame: the white and black pixel totals, recounted here from the
//    video bus, and the TOOLITE/TOODARK flags against the thresholds;
//  * every automatic change of the code is one step in the direction the
//    flags ask for, and never past 0 or 11;
//  * the Smart Frame line carries the frame count and the code that exposed
//    the frame, and the frame counter counts frames from the start pulse;
//  * every displayed pixel of a field is pixel (line/2, column) of one
//    Datacube frame, and displayed frames never go back.
// Each mechanism is counted, and one that never happened is a failure.
module tb_radiometer_top;
  import radiometer_pkg::*;

  // clocks: clk_sam is four times the pixel clock; the dot clock is unrelated
  logic clk = 0, clk_sam = 0, dc_clk = 0, rst = 1;
  always #5  clk_sam = !clk_sam;
  always #20 clk = !clk;
  always #12 dc_clk = !dc_clk;

  logic [11:0] adc_word = 0;
  logic [3:0]  b_clk, c_clk;
  logic        tg;
  seq_mode_t   line_mode;
  logic [3:0]  exp_code, int_code;
  logic        sim_enable = 0, sim_sel = 0;
  logic [7:0]  white_sw = 8'd200, black_sw = 8'd16;
  logic [7:0]  white_thr = 8'd20, black_thr = 8'd20;
  logic        auto_mode = 0;
  logic [10:0] rotary_pos_n = '1;
  logic        start = 0;
  logic [6:0]  seg_tens, seg_ones;
  logic [15:0] frame_count, white_total, black_total;
  logic        fc_running, toolite, toodark, info_line;
  logic        test_mode = 0;
  video_bus_t  dc_bus;
  logic [7:0]  p5_data = 0;
  logic [3:0]  p4_hsync_n = '1, p4_vsync_n = '1;
  logic [1:0]  roi_sel = 2'd1;
  logic [7:0]  dac_data;
  logic        dac_blank_n, dac_sync_n, fifo_overflow, disp_swap, disp_repeat;

  radiometer_top dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 30) $display("FAIL %s", what); end
  endtask

  // mechanism counters
  int n_periods [12];
  int n_transfer = 0, n_dump = 0, n_sweep = 0, n_tg = 0;
  int n_up = 0, n_down = 0, n_hold = 0, n_at_max = 0, n_at_min = 0;
  int n_manual = 0, n_info = 0, n_test = 0, n_ramp = 0, n_bars = 0;
  int n_start = 0, n_fc = 0, n_swap = 0, n_repeat = 0, n_overflow = 0;
  int n_frames = 0;

  // ---------------------------------------------------------------------
  // exposure periods, sampled once per line in the middle of HSYNC
  // ---------------------------------------------------------------------
  int pl_len = -1, dump_at = -1, sweeps = 0, tg_in_period = 0, last_len = 0;
  logic [3:0] per_code = 0, code_exposed = 9;
  logic hs_d = 1, tg_d = 0;
  always @(posedge clk_sam) begin
    if (!rst) begin
      if (tg && !tg_d) begin tg_in_period++; n_tg++; end
      tg_d = tg;
    end
  end
  always @(posedge clk) begin
    if (!rst) begin
      if (!dc_bus.hsync_n && hs_d) begin
        // line_mode now shows the line that is in progress
        if (line_mode == MODE_TRANSFER) begin
          if (pl_len > 0) begin
            int n;
            int exp_len;
            n = int_lines(per_code);
            exp_len = (code_rate(per_code) == RATE_60) ? ((last_len == 262) ? 263 : 262)
                    : (code_rate(per_code) == RATE_30) ? 525
                    : (code_rate(per_code) == RATE_15) ? 1050 : 2100;
            if (code_rate(per_code) == RATE_60)
              chk(pl_len == 262 || pl_len == 263, $sformatf("60/s period %0d lines", pl_len));
            else
              chk(pl_len == exp_len, $sformatf("code %0d period %0d lines", per_code, pl_len));
            if (code_dumps(per_code)) begin
              chk(dump_at == pl_len - n, $sformatf("code %0d dump at %0d of %0d", per_code, dump_at, pl_len));
              chk(sweeps == ((n - 1 < 4) ? n - 1 : 4), $sformatf("code %0d sweeps %0d", per_code, sweeps));
              chk(tg_in_period == 2, $sformatf("code %0d tg pulses %0d", per_code, tg_in_period));
            end else begin
              chk(dump_at < 0 && sweeps == 0, $sformatf("code %0d must not dump", per_code));
              chk(tg_in_period == 1, $sformatf("code %0d tg pulses %0d", per_code, tg_in_period));
            end
            n_periods[per_code]++;
            last_len = pl_len;
            code_exposed = per_code;
          end
          n_transfer++;
          pl_len = 0; dump_at = -1; sweeps = 0; tg_in_period = 0;
          per_code = exp_code;
        end else if (line_mode == MODE_DUMP) begin
          dump_at = pl_len; n_dump++;
        end else if (line_mode == MODE_SWEEP) begin
          sweeps++; n_sweep++;
        end
        if (pl_len >= 0) pl_len++;
      end
      hs_d = dc_bus.hsync_n;
    end
  end

  // ---------------------------------------------------------------------
  // scene and A/D converter
  // ---------------------------------------------------------------------
  int flux = 10;
  int pix_i = 0;
  always @(negedge clk) begin
    int v;
    pix_i = (pix_i + 1) % 128;
    v = flux * int_lines(code_exposed) * (pix_i + 1) / 64;
    if (v > 4095) v = 4095;
    adc_word = 12'(v) ^ 12'h800;
  end

  // ---------------------------------------------------------------------
  // pixel totals and flags, recounted from the processor video bus
  // ---------------------------------------------------------------------
  int my_w = 0, my_b = 0, fr_w = 0, fr_b = 0, dec_wait = -1;
  logic va_d = 0;
  logic [3:0] code_before = 9;
  always @(posedge clk) begin
    if (!rst) begin
      video_bus_t b;
      b = dut.bus_pp;
      if (b.va && b.ha) begin
        if (b.data[11:4] > white_sw) my_w++;
        if (!b.data[11] && black_sw > b.data[10:3]) my_b++;
      end
      if (b.va && !va_d) begin my_w = 0; my_b = 0; end
      if (!b.va && va_d) begin fr_w = my_w; fr_b = my_b; dec_wait = 4; n_frames++; end
      va_d = b.va;
      if (dec_wait > 0) dec_wait--;
      else if (dec_wait == 0) begin
        dec_wait = -1;
        chk(white_total == 16'(fr_w), $sformatf("white total %0d, counted %0d", white_total, fr_w));
        chk(black_total == 16'(fr_b), $sformatf("black total %0d, counted %0d", black_total, fr_b));
        chk(toolite == (fr_w[15:8] > white_thr), "TOOLITE flag");
        chk(toodark == (fr_b[15:8] > black_thr), "TOODARK flag");
        if (auto_mode) begin
          if (toodark && !toolite && code_before == 11) n_at_max++;
          if (toolite && !toodark && code_before == 0) n_at_min++;
          if (toodark == toolite) n_hold++;
        end
      end
    end
  end

  // every code change in automatic mode follows the flags
  logic [3:0] ic_d = 9;
  logic am_d = 0, am_dd = 0;
  always @(posedge clk) begin
    if (!rst) begin
      if (auto_mode && am_dd && int_code != ic_d) begin
        if (int_code == ic_d + 1) begin
          n_up++; chk(toodark && !toolite, "step up only when too dark");
        end else if (int_code == ic_d - 1) begin
          n_down++; chk(toolite && !toodark, "step down only when too light");
        end else chk(0, $sformatf("code jumped %0d -> %0d", ic_d, int_code));
      end
      chk(int_code <= 11, "code within 0..11");
      ic_d = int_code; am_dd = am_d; am_d = auto_mode;
      code_before = int_code;
    end
  end

  // ---------------------------------------------------------------------
  // the bus towards the Datacube: Smart Frame line, simulator, test grid,
  // frame counter
  // ---------------------------------------------------------------------
  int act_line = -1, col = 0, grid_w = 0, line_val = 0, prev_bar = -1;
  logic dva_d = 0, dha_d = 0;
  logic [11:0] w0 = 0;
  bit ramp_ok, bars_ok;
  int fc_prev = -1;
  always @(posedge clk) begin
    if (!rst) begin
      if (dc_bus.va && !dva_d) begin
        act_line = -1; grid_w = 0;
        if (fc_running && !test_mode) begin
          if (fc_prev >= 0) begin
            chk(frame_count == 16'(fc_prev + 1), "frame counter steps once per frame");
            n_fc++;
          end
          fc_prev = frame_count;
        end else fc_prev = -1;
      end
      if (dc_bus.ha && !dha_d && dc_bus.va) begin act_line++; col = 0; ramp_ok = 1; bars_ok = 1; end
      if (dc_bus.va && dc_bus.ha) begin
        logic [11:0] d;
        d = dc_bus.data;
        if (test_mode) begin
          bit w;
          w = (col == 0 || col == 159 || col == 319 || act_line == 0 ||
               act_line == 60 || act_line == 61 || act_line == 121);
          chk(d == (w ? 12'hC00 : 12'h000), "test grid pixel");
          if (w) grid_w++;
        end else if (act_line == 2) begin
          // Smart Frame: {FC high, INT}, {FC low, INT}, FFF, 000 repeated
          case (col % 4)
            0: begin
              w0 = d;
              if (n_transfer > 2) chk(d[3:0] == code_exposed, $sformatf("info INT %0d, exposed with %0d", d[3:0], code_exposed));
            end
            1: begin
              chk(d[3:0] == w0[3:0], "info INT repeated");
              if (fc_running)
                chk({w0[11:4], d[11:4]} == frame_count, "info frame count");
            end
            2: chk(d == 12'hFFF, "info word FFF");
            3: chk(d == 12'h000, "info word 000");
          endcase
          if (col == 319) n_info++;
        end else if (sim_enable && !sim_sel) begin
          ramp_ok &= (d == {8'(col), 4'h0});
          if (col == 319) begin chk(ramp_ok, "simulator ramp"); n_ramp++; end
        end else if (sim_enable && sim_sel) begin
          if (col == 0) line_val = d;
          bars_ok &= (d == 12'(line_val)) && (d[3:0] == 4'hF);
          if (col == 319) begin
            chk(bars_ok, "simulator bar is flat");
            if (prev_bar >= 0 && act_line > 3)
              chk(line_val[11:4] == 8'(prev_bar + 1), "bars step by one per line");
            prev_bar = line_val[11:4]; n_bars++;
          end
        end
        col++;
      end
      if (!dc_bus.va && dva_d && test_mode) begin
        chk(grid_w == 4 * 320 + 118 * 3, $sformatf("test grid %0d white", grid_w));
        n_test++;
      end
      dva_d = dc_bus.va; dha_d = dc_bus.ha;
    end
  end

  // ---------------------------------------------------------------------
  // Datacube output model and display checker
  // ---------------------------------------------------------------------
  localparam int DC_LINE = 648;     // dot clocks per line, close to the camera line
  bit dc_pause = 0, dc_fast = 0;
  function automatic logic [7:0] dpat(input int f, input int l, input int c);
    return 8'(f * 29 + l * 5 + c);
  endfunction
  initial begin
    int f;
    f = 1;
    @(negedge rst);
    forever begin
      int len;
      bit blank;
      len = dc_fast ? 330 : DC_LINE;
      blank = dc_pause;
      for (int l = 0; l < 525; l++)
        for (int k = 0; k < len; k++) begin
          @(negedge dc_clk);
          p4_hsync_n = 4'b1111; p4_vsync_n = 4'b1111;
          if (!blank) begin
            p4_hsync_n[1] = !(k < 47);
            p4_vsync_n[1] = !(l < 3);
          end
          p4_hsync_n[3] = !(k >= 200 && k < 240);
          p5_data = (l >= 3 && l < 125 && k >= 6 && k < 326) ? dpat(f, l - 3, k - 6)
                                                             : 8'($urandom);
        end
      if (!blank) f++;
    end
  end

  int low_run = 0, fl_line = -1, dcol = 0, fld_f = -1, prev_f = -1, frames_shown = 0;
  logic bl_d = 0;
  always @(posedge clk) begin
    if (!rst) begin
      if (disp_swap) n_swap++;
      if (disp_repeat) n_repeat++;
      low_run = dac_sync_n ? 0 : low_run + 1;
      if (low_run == 200) begin fl_line = 0; fld_f = -1; end
      if (dac_blank_n && !bl_d) dcol = 0;
      if (dac_blank_n && fl_line >= 0 && n_swap > 0 && !fifo_overflow) begin
        if (fld_f < 0) begin
          fld_f = int'(8'(dac_data * 53));   // 29 * 53 = 1 mod 256
          if (prev_f >= 0) chk(fld_f >= prev_f, "displayed frames never go back");
          if (fld_f != prev_f) frames_shown++;
          prev_f = fld_f;
        end
        chk(dac_data == dpat(fld_f, fl_line / 2, dcol),
            $sformatf("display line %0d col %0d", fl_line, dcol));
      end
      if (dac_blank_n) dcol++;
      if (!dac_blank_n && bl_d && fl_line >= 0) fl_line++;
      bl_d = dac_blank_n;
    end
  end

  // ---------------------------------------------------------------------
  // seven-segment reference, {g..a}
  // ---------------------------------------------------------------------
  function automatic logic [6:0] seg_ref(input int d);
    case (d)
      0: return 7'h3F; 1: return 7'h06; 2: return 7'h5B; 3: return 7'h4F;
      4: return 7'h66; 5: return 7'h6D; 6: return 7'h7D; 7: return 7'h07;
      8: return 7'h7F; 9: return 7'h6F; default: return 7'h00;
    endcase
  endfunction

  task automatic wait_periods(input int n);
    int t;
    t = n_transfer + n;
    while (n_transfer < t) @(posedge clk);
  endtask

  task automatic wait_frames(input int n);
    int t;
    t = n_frames + n;
    while (n_frames < t) @(posedge clk);
  endtask

  // ---------------------------------------------------------------------
  // the test sequence
  // ---------------------------------------------------------------------
  initial begin
    repeat (10) @(posedge clk);
    rst = 0;
    chk(int_code == 9 && dut.u_int.auto_code == 9, "reset code 9");
    wait_periods(2);

    // manual: every rotary position, then run at code 3
    for (int p = 0; p <= 11; p++) begin
      rotary_pos_n = '1;
      if (p > 0) rotary_pos_n[p - 1] = 1'b0;
      repeat (3) @(posedge clk);
      chk(int_code == 4'(p), $sformatf("manual code %0d", p));
      chk(seg_ones == seg_ref(p % 10) && seg_tens == ((p >= 10) ? seg_ref(1) : 7'h00),
          $sformatf("digits for %0d", p));
      n_manual++;
    end
    rotary_pos_n = '1; rotary_pos_n[2] = 1'b0;      // code 3
    wait_periods(3);
    chk(exp_code == 3, "code 3 exposing");

    // simulator board: ramp then bars, for one frame each
    sim_enable = 1; sim_sel = 0;
    wait_frames(2);
    sim_sel = 1; prev_bar = -1;
    wait_frames(2);
    sim_enable = 0;

    // experiment start between frames, then the test grid for one frame
    @(posedge clk iff !dc_bus.va);
    repeat (1000) @(posedge clk);
    @(negedge clk); start = 1; @(negedge clk); start = 0; n_start++;
    test_mode = 1;
    @(posedge clk iff dc_bus.va);
    @(posedge clk iff !dc_bus.va);
    repeat (2) @(posedge clk);
    test_mode = 0;

    // automatic: a moderate scene settles at code 6 from wherever it is
    flux = 10;
    auto_mode = 1;
    wait_frames(12);
    // exposures of 64 and 128 lines both balance this scene
    chk(int_code == 5 || int_code == 6, $sformatf("moderate scene settles at 5 or 6, at %0d", int_code));
    chk(n_hold > 0, "moderate scene holds");
    // the Datacube source pauses meanwhile
    dc_pause = 1;
    wait_frames(3);
    dc_pause = 0;
    // dark scene: up to the longest time, and it stays there
    flux = 0;
    while (!(int_code == 11 && n_at_max >= 1)) @(posedge clk);
    chk(int_code == 11, "dark scene reaches code 11");
    // bright scene: down to the shortest time
    flux = 1000;
    while (!(int_code == 0 && n_at_min >= 1)) @(posedge clk);
    chk(int_code == 0, "bright scene reaches code 0");
    wait_periods(2);

    // display FIFO overrun with lines sent back to back
    chk(!fifo_overflow, "no FIFO overflow at the normal line rate");
    dc_fast = 1;
    while (!fifo_overflow) @(posedge clk);
    n_overflow++;
    repeat (100) @(posedge clk);
    chk(fifo_overflow, "overflow is sticky");

    // every mechanism must have happened
    for (int c = 0; c < 12; c++)
      chk(n_periods[c] > 0, $sformatf("no period ran with code %0d", c));
    chk(n_transfer > 0, "transfer lines");
    chk(n_dump > 0, "dump lines");
    chk(n_sweep > 0, "sweep lines");
    chk(n_tg > 0, "transfer gate pulses");
    chk(n_up > 0, "automatic step up");
    chk(n_down > 0, "automatic step down");
    chk(n_hold > 0, "automatic hold");
    chk(n_at_max > 0, "held at the longest time");
    chk(n_at_min > 0, "held at the shortest time");
    chk(n_manual > 0, "manual selection");
    chk(n_info > 0, "Smart Frame line");
    chk(n_ramp > 0, "simulator ramp");
    chk(n_bars > 0, "simulator bars");
    chk(n_test > 0, "test grid");
    chk(n_start > 0 && n_fc > 0, "frame counter");
    chk(n_swap > 0, "display swap");
    chk(n_repeat > 0, "display repeat");
    chk(frames_shown >= 2, $sformatf("frames shown %0d", frames_shown));
    chk(n_overflow > 0, "FIFO overflow");
    $display("periods per code: %p", n_periods);
    $display("up %0d down %0d hold %0d max %0d min %0d swaps %0d repeats %0d info %0d",
             n_up, n_down, n_hold, n_at_max, n_at_min, n_swap, n_repeat, n_info);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (15_000_000) @(posedge clk);
    failures++;
    $display("watchdog: periods %p", n_periods);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
