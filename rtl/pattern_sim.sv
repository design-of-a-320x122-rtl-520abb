// pattern_sim -- the simulator board: a noise-free digital pixel stream that
// replaces the A/D board for testing the processor.
//
// Two pattern generators run from the head timing (VA, HA and the pixel
// clock) and a 12-bit 2:1 selector picks one:
//   ramp (sel = 0): an 8-bit counter clocked at the pixel rate drives the 8
//     MSBs, the 4 LSBs are 0. It is cleared at the start of every line and
//     counts only while VA and HA are both high, so each line ramps up to
//     column 256 and starts again up to column 320.
//   bars (sel = 1): an 8-bit counter clocked at the line rate drives the 8
//     MSBs, the 4 LSBs are 1. It is cleared at the start of the frame and
//     counts only while VA is high, one step per active line.
// These counters, their clearing and their gating follow the document. The
// bar counter steps at the end of each active line (falling HA), so the
// first active line shows level 0; that choice is this design's.
//
// Interface: one pixel per clk; the output bus is registered, one clock after
// the timing inputs, which it carries along.
module pattern_sim
  import radiometer_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        sel,       // 0 = ramp, 1 = bars
  input  logic        va,
  input  logic        ha,
  input  logic        hsync_n,
  input  logic        lock_n,
  output video_bus_t  bus
);
  logic [7:0] ramp_cnt, bar_cnt;
  logic       ha_d, va_d;
  logic [7:0] ramp_now;

  // value shown on the current pixel: 0 at the first pixel of a line
  assign ramp_now = (ha && !ha_d) ? 8'd0 : ramp_cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      ramp_cnt <= '0;
      bar_cnt  <= '0;
      ha_d     <= 1'b0;
      va_d     <= 1'b0;
      bus      <= '{va: 1'b0, ha: 1'b0, hsync_n: 1'b1, lock_n: 1'b1, data: '0};
    end else begin
      ha_d <= ha;
      va_d <= va;
      // ramp: cleared at the line start, counts while VA and HA
      if (va && ha) ramp_cnt <= ramp_now + 8'd1;
      else if (ha && !ha_d) ramp_cnt <= '0;
      // bars: cleared at the frame start, one step per active line
      if (va && !va_d)         bar_cnt <= '0;
      else if (va && ha_d && !ha) bar_cnt <= bar_cnt + 8'd1;

      bus.va      <= va;
      bus.ha      <= ha;
      bus.hsync_n <= hsync_n;
      bus.lock_n  <= lock_n;
      bus.data    <= sel ? {bar_cnt, 4'hF} : {ramp_now, 4'h0};
    end
  end
endmodule
