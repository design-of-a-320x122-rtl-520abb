// pixel_counter -- counts the white and the black pixels of each frame and
// decides whether the frame is too light or too dark.
//
// Two 16-bit counters add up the white and black flags while VA is high;
// they are cleared when VA rises. When VA falls at the end of the frame the
// totals are latched, and the top eight bits of each total are compared with
// an 8-bit pixel-count threshold (P > Q): too many white pixels gives
// TOOLITE, too many black pixels gives TOODARK. A threshold above 98H (the
// top byte of 39040 = 9880H) can never be exceeded and so disables that
// half of the control. decide pulses for one clock when TOOLITE/TOODARK are
// new. The counters, the latch at the end of the frame and the top-eight-bit
// comparison follow the document; clearing on the rising edge of VA and the
// one-clock decide strobe are this design's choices.
//
// Interface: one pixel per clk. decide comes two clocks after VA falls.
module pixel_counter (
  input  logic        clk,
  input  logic        rst,
  input  logic        va,
  input  logic        white,
  input  logic        black,
  input  logic [7:0]  white_thr,   // pixel-count threshold for white pixels
  input  logic [7:0]  black_thr,   // pixel-count threshold for black pixels
  output logic [15:0] white_total,
  output logic [15:0] black_total,
  output logic        toolite,
  output logic        toodark,
  output logic        decide
);
  logic [15:0] wcnt, bcnt;
  logic        va_d, latched;

  always_ff @(posedge clk) begin
    if (rst) begin
      wcnt        <= '0;
      bcnt        <= '0;
      va_d        <= 1'b0;
      latched     <= 1'b0;
      white_total <= '0;
      black_total <= '0;
      toolite     <= 1'b0;
      toodark     <= 1'b0;
      decide      <= 1'b0;
    end else begin
      va_d    <= va;
      latched <= 1'b0;
      decide  <= latched;
      if (va && !va_d) begin
        wcnt <= '0;
        bcnt <= '0;
      end else begin
        // the flags arrive one clock after the bus, so count one clock longer
        if (white && (va || va_d)) wcnt <= wcnt + 16'd1;
        if (black && (va || va_d)) bcnt <= bcnt + 16'd1;
      end
      if (!va && va_d) latched <= 1'b1;
      if (latched) begin
        white_total <= wcnt;
        black_total <= bcnt;
        toolite     <= wcnt[15:8] > white_thr;
        toodark     <= bcnt[15:8] > black_thr;
      end
    end
  end
endmodule
