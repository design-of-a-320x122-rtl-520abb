// pixel_compare -- classifies every valid pixel as white, black or neutral
// for the automatic integration-time control.
//
// White: the top eight video bits D11..D4 exceed the white DIP-switch level
// (the flash comparator's "P > Q" with P = video, Q = switch), so the white
// threshold spans 15..4080 of 4095 counts. Black: the switch level exceeds
// video bits D10..D3 (the comparator inputs swapped), so the black threshold
// spans 7..2040. Both flags are gated with VA AND HA so that only active
// pixels are judged. This follows the document. A pixel with D11 set is
// never taken as black here: the black level covers only the lower half of
// the range, and bits D10..D3 alone would call a bright pixel such as 2048
// black; that qualification is this design's choice.
//
// Interface: one pixel per clk; white/black are registered, one clock after
// the bus.
module pixel_compare
  import radiometer_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  video_bus_t  bus,
  input  logic [7:0]  white_sw,   // white level DIP switch
  input  logic [7:0]  black_sw,   // black level DIP switch
  output logic        white,
  output logic        black
);
  logic valid;
  assign valid = bus.va && bus.ha;

  always_ff @(posedge clk) begin
    if (rst) begin
      white <= 1'b0;
      black <= 1'b0;
    end else begin
      white <= valid && (bus.data[11:4] > white_sw);
      black <= valid && !bus.data[11] && (black_sw > bus.data[10:3]);
    end
  end
endmodule
