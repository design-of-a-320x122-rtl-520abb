// inttime_control -- the automatic integration-time decision and the
// manual/automatic selector.
//
// A 4-bit up/down counter holds the automatic integration-time code. Once
// per frame (decide) it counts up when the frame was too dark and down when
// it was too light; when both or neither are flagged it holds (the
// exclusive-OR gating of the decision circuit). Counting up is blocked at
// 1011 (11) and counting down at 0000, so the code stays in the valid range
// 0..11. A 2:1 selector then passes either this code or the manual code
// from the rotary switch. The gating, limits and selector follow the
// document; the reset value (RESET_CODE, 9 = one full 33 ms frame) and the
// direction of the response (too dark -> longer exposure) are this design's
// reading, since the decision truth table is not reproduced in the text.
//
// Interface: one clock domain; int_code is registered and changes on the
// clock after decide.
module inttime_control #(
  parameter logic [3:0] RESET_CODE = 4'd9
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       decide,       // one pulse per frame
  input  logic       toolite,      // too many white pixels: shorten
  input  logic       toodark,      // too many black pixels: lengthen
  input  logic       auto_mode,    // 1 = automatic, 0 = manual
  input  logic [3:0] manual_code,  // from the rotary switch encoder
  output logic [3:0] auto_code,
  output logic [3:0] int_code
);
  localparam logic [3:0] CODE_MAX = 4'd11;

  logic up, down;
  // increase when dark and not light, and not already at the top code;
  // decrease when light and not dark, and not already at zero
  assign up   = decide && (toodark ^ toolite) && toodark && (auto_code != CODE_MAX);
  assign down = decide && (toodark ^ toolite) && toolite && (auto_code != 4'd0);

  always_ff @(posedge clk) begin
    if (rst) begin
      auto_code <= RESET_CODE;
      int_code  <= RESET_CODE;
    end else begin
      if (up)        auto_code <= auto_code + 4'd1;
      else if (down) auto_code <= auto_code - 4'd1;
      int_code <= auto_mode ? auto_code : manual_code;
    end
  end

  a_range: assert property (@(posedge clk) disable iff (rst) auto_code <= CODE_MAX);
endmodule
