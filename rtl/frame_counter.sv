// frame_counter -- numbers the video frames of an experiment.
//
// A START pulse from the process equipment clears a 16-bit counter and
// enables it; from then on every rising edge of VA (one per frame read out)
// adds one. With the frame rate known from the integration time, count and
// rate give the elapsed process time. Before the first START the counter is
// held at zero. START comes from outside the camera clock domain, so it is
// passed through a two-flop synchroniser and its rising edge is used. The
// 16-bit width, START clear and VA counting follow the document; the
// synchroniser and the hold-before-START behaviour are this design's
// choices.
//
// Interface: count is registered; it changes two clocks after a VA rising
// edge, and is zero three clocks after START rises.
module frame_counter (
  input  logic        clk,
  input  logic        rst,
  input  logic        start,
  input  logic        va,
  output logic [15:0] count,
  output logic        running
);
  logic [2:0] start_s;
  logic       va_d;

  always_ff @(posedge clk) begin
    if (rst) begin
      start_s <= '0;
      va_d    <= 1'b0;
      count   <= '0;
      running <= 1'b0;
    end else begin
      start_s <= {start_s[1:0], start};
      va_d    <= va;
      if (start_s[1] && !start_s[2]) begin
        count   <= '0;
        running <= 1'b1;
      end else if (running && va && !va_d) begin
        count <= count + 16'd1;
      end
    end
  end
endmodule
