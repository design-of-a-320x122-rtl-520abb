// radiometer_top -- digital logic of the 320 x 122 PtSi IR-CCD imaging
// radiometer with automatic optical integration-time control.
//
// Three units are wired as a stream:
//   Camera head: video_timing makes the line/frame timing (HA, HSYNC,
//     LOCK); integration_sequencer turns the 4-bit integration-time code
//     into per-line TRANSFER/READOUT/DUMP/SWEEP modes and the frame signal
//     VA; ccd_clock_gen (on its own faster clock) makes the four-phase B and
//     C CCD clocks and the transfer pulse from those modes.
//   Video processor: the digitised video (adc_interface, or the simulator
//     board pattern_sim when sim_enable is set, which sits in the same slot)
//     is classified pixel by pixel (pixel_compare), white and black pixels
//     are counted per frame (pixel_counter) and the integration-time counter
//     steps up or down once per frame (inttime_control); a front-panel
//     switch chooses it or the rotary switch code (rotary_encoder), which
//     goes back to the head and to the LED display (seg_display). The frame
//     counter numbers frames after START, and smart_frame writes frame number
//     and integration time into the third active line.
//   Datacube interface: dc_input_board passes the video on, or its own test
//     pattern, towards the Datacube (brought out as dc_bus); display_board
//     takes processed 8-bit video back at the Datacube dot clock and shows
//     it at 30 frames/s, 4X enlarged, on an RS-170 monitor.
// Analog parts (detector array, bias/analog/pre-process boards, A/D
// converter, line drivers, optoisolators, video DAC) and the commercial
// Datacube processor are outside this RTL; their digital signals are ports.
//
// Clocks: clk is the camera pixel clock (half the 12 MHz camera CLOCK);
// clk_sam is the CCD sequencer clock, 4x clk in this design; dc_clk is the
// Datacube dot clock (about 10 MHz), unrelated to clk. rst is synchronous
// and must be held for a few cycles of all three clocks.
module radiometer_top
  import radiometer_pkg::*;
(
  input  logic              clk,
  input  logic              clk_sam,
  input  logic              dc_clk,
  input  logic              rst,
  // camera head
  input  logic [PIX_W-1:0]  adc_word,      // A/D converter output
  output logic [3:0]        b_clk,         // vertical CCD phases
  output logic [3:0]        c_clk,         // horizontal CCD phases
  output logic              tg,            // detector transfer pulse
  output seq_mode_t         line_mode,     // sequencer mode of the current line
  output logic [3:0]        exp_code,      // code of the exposure now running
  // video processor front panel and switches
  input  logic              sim_enable,    // simulator board instead of A/D board
  input  logic              sim_sel,       // simulator: 0 ramp, 1 bars
  input  logic [7:0]        white_sw,      // white pixel level
  input  logic [7:0]        black_sw,      // black pixel level
  input  logic [7:0]        white_thr,     // white pixel-count threshold
  input  logic [7:0]        black_thr,     // black pixel-count threshold
  input  logic              auto_mode,     // 1 automatic, 0 manual
  input  logic [10:0]       rotary_pos_n,  // rotary switch, active low
  input  logic              start,         // experiment start pulse
  output logic [3:0]        int_code,      // integration time to the head
  output logic [6:0]        seg_tens,
  output logic [6:0]        seg_ones,
  output logic [15:0]       frame_count,   // to the thermocouple computer
  output logic              fc_running,    // counting since the last start
  output logic              toolite,
  output logic              toodark,
  output logic [15:0]       white_total,   // white pixels in the last frame
  output logic [15:0]       black_total,   // black pixels in the last frame
  output logic              info_line,     // Smart Frame line being inserted
  // Datacube input board
  input  logic              test_mode,     // 1 = board test pattern
  output video_bus_t        dc_bus,        // towards the Datacube
  // Datacube display board
  input  logic [7:0]        p5_data,
  input  logic [3:0]        p4_hsync_n,
  input  logic [3:0]        p4_vsync_n,
  input  logic [1:0]        roi_sel,
  output logic [7:0]        dac_data,
  output logic              dac_blank_n,
  output logic              dac_sync_n,
  output logic              fifo_overflow,
  output logic              disp_swap,
  output logic              disp_repeat
);
  // ---------------- camera head ----------------
  logic        ha, hsync_n, lock_n, line_start, blank_start;
  logic        sam_trans, sam_dump, sam_sweep, va;

  video_timing u_timing (
    .clk, .rst, .hcount(), .vcount(), .ha, .hsync_n, .lock_n, .line_start, .blank_start
  );

  integration_sequencer u_seq (
    .clk, .rst, .int_code, .line_start, .blank_start,
    .sam_trans, .sam_dump, .sam_sweep, .line_mode, .va, .exp_code, .pline(), .period_start()
  );

  ccd_clock_gen u_sam (
    .clk_sam, .rst, .ha, .trans(sam_trans), .dump(sam_dump), .sweep(sam_sweep),
    .b_clk, .c_clk, .tg
  );

  // ---------------- video processor ----------------
  video_bus_t bus_adc, bus_sim, bus_pp, bus_sf;
  logic       white, black, decide;
  logic [3:0]  manual_code;

  adc_interface u_adc (
    .clk, .rst, .adc_word, .va, .ha, .hsync_n, .lock_n, .bus(bus_adc)
  );

  pattern_sim u_sim (
    .clk, .rst, .sel(sim_sel), .va, .ha, .hsync_n, .lock_n, .bus(bus_sim)
  );

  assign bus_pp = sim_enable ? bus_sim : bus_adc;

  pixel_compare u_cmp (
    .clk, .rst, .bus(bus_pp), .white_sw, .black_sw, .white, .black
  );

  pixel_counter u_cnt (
    .clk, .rst, .va(bus_pp.va), .white, .black, .white_thr, .black_thr,
    .white_total, .black_total, .toolite, .toodark, .decide
  );

  rotary_encoder u_rot (.pos_n(rotary_pos_n), .code(manual_code));

  inttime_control u_int (
    .clk, .rst, .decide, .toolite, .toodark, .auto_mode, .manual_code,
    .auto_code(), .int_code
  );

  seg_display u_seg (.code(int_code), .seg_tens, .seg_ones);

  frame_counter u_fc (
    .clk, .rst, .start, .va(bus_pp.va), .count(frame_count), .running(fc_running)
  );

  smart_frame u_sf (
    .clk, .rst, .bus_in(bus_pp), .frame_count, .int_code, .bus_out(bus_sf),
    .muxsel(info_line)
  );

  // ---------------- Datacube interface ----------------
  dc_input_board u_dcin (
    .clk, .rst, .test_mode, .cam_bus(bus_sf), .bus_out(dc_bus)
  );

  display_board u_disp (
    .dc_clk, .clk, .rst, .p5_data, .p4_hsync_n, .p4_vsync_n, .roi_sel,
    .lock_n(dc_bus.lock_n), .dac_data, .dac_blank_n, .dac_sync_n,
    .overflow(fifo_overflow), .swap(disp_swap), .repeat_frame(disp_repeat)
  );
endmodule
