// smart_frame -- writes the frame number and the integration time into the
// picture itself, so that every frame stored downstream carries what is
// needed to turn it back into radiance.
//
// One active line (LINE_SEL, counted from 0 at the first active line; 2 =
// the third line, inside the first lines that are discarded anyway after a
// short exposure) is replaced by a repeating four-word group:
//   word 1: frame count bits 15..8 on D11..D4, integration code on D3..D0
//   word 2: frame count bits  7..0 on D11..D4, integration code on D3..D0
//   word 3: 1111 1111 1111  (sync)
//   word 4: 0000 0000 0000  (sync)
// A 2-bit pixel counter, cleared at the start of the line, selects the word,
// so the 20 bits of information appear 80 times across the 320 pixels and a
// reader can find them by the all-ones/all-zeros pair even if some pixels are
// corrupted. All other lines pass unchanged. The four words, their bit
// layout and the 80-fold repetition follow the document; the choice of the
// third line (the text names both "line two" and "line three") and of which
// nibble carries the code are this design's reading.
//
// The frame count is taken at the first active line, after the frame counter
// has counted this frame's VA. The integration code inserted is the one the
// processor was commanding when the previous frame started: that is the code
// whose exposure produced the frame now being read, since the sequencer takes
// a new code at each readout period and the exposure ends at the next one.
//
// Interface: one pixel per clk; bus_out is bus_in delayed by one clock.
module smart_frame
  import radiometer_pkg::*;
#(
  parameter int LINE_SEL = 2
) (
  input  logic        clk,
  input  logic        rst,
  input  video_bus_t  bus_in,
  input  logic [15:0] frame_count,
  input  logic [3:0]  int_code,
  output video_bus_t  bus_out,
  output logic        muxsel        // high while the information line is sent
);
  logic       va_d, ha_d;
  logic [7:0] line_cnt;
  logic [1:0] pix_cnt;
  logic [15:0] fc_q;
  logic [3:0]  int_cur, int_prev;
  logic        line_first;          // first pixel of a line
  logic [1:0]  word_sel;
  logic [PIX_W-1:0] info;

  assign line_first = bus_in.ha && !ha_d;
  assign word_sel   = line_first ? 2'd0 : pix_cnt;
  assign muxsel     = bus_in.va && (line_cnt == 8'(LINE_SEL));

  always_comb begin
    unique case (word_sel)
      2'd0: info = {fc_q[15:8], int_prev};
      2'd1: info = {fc_q[7:0],  int_prev};
      2'd2: info = '1;
      2'd3: info = '0;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      va_d     <= 1'b0;
      ha_d     <= 1'b0;
      line_cnt <= '0;
      pix_cnt  <= '0;
      fc_q     <= '0;
      int_cur  <= '0;
      int_prev <= '0;
      bus_out  <= '{va: 1'b0, ha: 1'b0, hsync_n: 1'b1, lock_n: 1'b1, data: '0};
    end else begin
      va_d <= bus_in.va;
      ha_d <= bus_in.ha;
      if (bus_in.va && !va_d) begin
        line_cnt <= '0;
        int_prev <= int_cur;
        int_cur  <= int_code;
      end else if (bus_in.va && ha_d && !bus_in.ha && line_cnt != 8'hff) begin
        line_cnt <= line_cnt + 8'd1;
      end
      if (bus_in.va && line_first && line_cnt == 8'd0) fc_q <= frame_count;
      pix_cnt <= word_sel + 2'd1;

      bus_out <= bus_in;
      if (muxsel && bus_in.ha) bus_out.data <= info;
    end
  end
endmodule
