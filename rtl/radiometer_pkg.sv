// radiometer_pkg -- constants and types shared by the camera head, the video
// processor and the Datacube interface logic of the 320x122 PtSi IR-CCD
// imaging radiometer.
//
// Frame geometry: the imager is read non-interlaced at half vertical
// resolution, 320 active pixels by 122 active lines. A line is 320 active
// pixels plus a 69-pixel blanking interval (389 pixel clocks, about 63.5 us
// at the 6.1 MHz pixel rate, half of the 12 MHz camera CLOCK); a 30 Hz frame
// is 525 lines. These numbers follow the document; the position and width of
// HSYNC inside the blanking interval are this design's choice.
//
// Integration time: a 4-bit code 0..11 selects one of twelve exposures
// (120 us .. 122 ms). The tables below give, for each code, the exposure in
// line times and the readout rate. Codes 0..8 expose for part of a frame by
// dumping the charge N lines before the next transfer ("dump and read");
// codes 9..11 integrate over one, two or four whole 30 Hz frames with no
// dump. The exposures in lines are this design's rounding of the printed
// times to whole lines (2,4,...,128 lines for 120 us..8 ms, 256 lines for
// 16 ms, 394 lines for 25 ms, whole frames above that).
package radiometer_pkg;

  localparam int H_ACTIVE  = 320;   // active pixels per line
  localparam int H_BLANK   = 69;    // blanking pixels per line
  localparam int H_TOTAL   = H_ACTIVE + H_BLANK;
  localparam int V_ACTIVE  = 122;   // active lines per frame
  localparam int V_TOTAL   = 525;   // lines per 30 Hz frame
  localparam int PIX_W     = 12;    // video word width
  localparam int INT_MAX   = 11;    // largest valid integration-time code
  localparam int PIXELS_PER_FRAME = H_ACTIVE * V_ACTIVE;  // 39040

  // Sequencer line modes; on the SAM pins READOUT is "all three low".
  typedef enum logic [1:0] {
    MODE_READOUT  = 2'd0,
    MODE_TRANSFER = 2'd1,
    MODE_DUMP     = 2'd2,
    MODE_SWEEP    = 2'd3
  } seq_mode_t;

  // Readout rate classes of Table "available integration times".
  typedef enum logic [1:0] {
    RATE_60  = 2'd0,   // one readout per half frame (262 or 263 lines)
    RATE_30  = 2'd1,   // one readout per frame (525 lines)
    RATE_15  = 2'd2,   // one readout per two frames
    RATE_7_5 = 2'd3    // one readout per four frames
  } rate_t;

  // The processor video bus: 12-bit pixel word plus the head timing signals.
  typedef struct packed {
    logic              va;       // vertical active, high over the 122 active lines
    logic              ha;       // horizontal active, high over the 320 active pixels
    logic              hsync_n;  // horizontal sync, active low
    logic              lock_n;   // 30 Hz lock pulse, active low, one pixel wide
    logic [PIX_W-1:0]  data;     // offset-binary pixel value
  } video_bus_t;

  // Exposure of each integration-time code, in line times.
  function automatic int unsigned int_lines(input logic [3:0] code);
    case (code)
      4'd0:    return 2;      // 120 us
      4'd1:    return 4;      // 240 us
      4'd2:    return 8;      // 480 us
      4'd3:    return 16;     // 960 us
      4'd4:    return 32;     // 2 ms
      4'd5:    return 64;     // 4 ms
      4'd6:    return 128;    // 8 ms
      4'd7:    return 256;    // 16 ms
      4'd8:    return 394;    // 25 ms
      4'd9:    return 525;    // 33 ms, one frame
      4'd10:   return 1050;   // 66 ms, two frames
      default: return 2100;   // 122 ms row: four frames
    endcase
  endfunction

  function automatic rate_t code_rate(input logic [3:0] code);
    if (code <= 4'd6)       return RATE_60;
    else if (code <= 4'd9)  return RATE_30;
    else if (code == 4'd10) return RATE_15;
    else                    return RATE_7_5;
  endfunction

  // Codes up to 8 clear the detectors with a dump before the exposure.
  function automatic logic code_dumps(input logic [3:0] code);
    return code <= 4'd8;
  endfunction

endpackage
