// scan_converter -- ping-pong frame stores and 4X line repetition of the
// display board.
//
// Processed 122-line frames arrive through the FIFO at whatever rate the
// camera runs (60 down to 7.5 frames/s); the monitor needs 30 frames/s with
// 488 active lines in two fields. Two frame memories, A and B, alternate:
// incoming pixels are written into the back memory while the front memory
// is shown. Each FIFO word carries a start-of-frame flag (bit 8) with the
// 8-bit pixel; the flag resets the write address. When a whole frame has
// been written, the memories swap at the start of the next display frame.
// A complete frame waiting in the back memory is kept until that swap:
// frames arriving meanwhile are dropped (start-of-frame words are ignored
// while the back memory is full), so a frame that is being written is never
// what the swap finds when source and display run at nearly the same rate.
// If no new frame has been completed, the front memory is simply shown
// again, so slow frame rates do not flicker. A frame whose first word
// arrives in the very clock of a swap is dropped as well. On the display side every
// source line is read twice in each field and again in the other field,
// filling 2 x 244 lines from 122 (the 4X scan conversion).
//
// Two memories toggled per frame, the repetition of old frames and the 4X
// line repetition follow the document. The document's board shows each new
// line straight from the FIFO and repeats it from memory on the next line;
// here every displayed line is read from the front memory, which gives the
// same picture with one read path. That arrangement, the start-of-frame
// flag in the FIFO's ninth bit and the swap rule are this design's.
//
// Interface: clk is the camera pixel clock. The FIFO is read first-word-
// fall-through. Display timing comes from display_sync_gen; the outputs
// (pix, de_o, hsync_o_n, vsync_o_n) are one clock behind it. swap pulses
// when the memories change roles, repeat when a display frame starts with
// no new frame to show.
module scan_converter #(
  parameter int H_ACT = radiometer_pkg::H_ACTIVE,
  parameter int V_ACT = radiometer_pkg::V_ACTIVE
) (
  input  logic       clk,
  input  logic       rst,
  // FIFO read side
  input  logic [8:0] fifo_rdata,     // {start_of_frame, pixel}
  input  logic       fifo_empty,
  output logic       fifo_re,
  // display timing
  input  logic [9:0] hcount,
  input  logic       de,
  input  logic [7:0] act_line,
  input  logic       hsync_n,
  input  logic       vsync_n,
  input  logic       frame_start,
  // to the video DAC
  output logic [7:0] pix,
  output logic       de_o,
  output logic       hsync_o_n,
  output logic       vsync_o_n,
  // status
  output logic       front_sel,      // 0 = memory A shown, 1 = memory B shown
  output logic       swap,
  output logic       repeat_frame
);
  localparam int DEPTH = H_ACT * V_ACT;
  localparam int AW    = $clog2(DEPTH);

  logic [AW-1:0] waddr, waddr_q, raddr;
  logic          back_full;
  logic          wr;
  logic [7:0]    wdata_q;
  logic          we_a, we_b;
  logic [7:0]    rdata_a, rdata_b;
  logic [7:0]    src_line;

  assign fifo_re = !fifo_empty;
  assign wr      = fifo_re;
  // start-of-frame word goes to address 0, the rest follow; while a complete
  // frame waits, waddr_q sits at DEPTH and nothing is written
  assign waddr   = (fifo_rdata[8] && !back_full) ? '0 : waddr_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      waddr_q      <= '0;
      back_full    <= 1'b0;
      front_sel    <= 1'b0;
      swap         <= 1'b0;
      repeat_frame <= 1'b0;
    end else begin
      swap         <= 1'b0;
      repeat_frame <= 1'b0;
      if (wr) begin
        if (waddr < AW'(DEPTH)) waddr_q <= waddr + AW'(1);
        if (waddr == AW'(DEPTH - 1)) back_full <= 1'b1;
      end
      if (frame_start) begin
        if (back_full) begin
          front_sel <= !front_sel;
          back_full <= 1'b0;
          waddr_q   <= AW'(DEPTH);        // nothing more until the next frame
          swap      <= 1'b1;
        end else begin
          repeat_frame <= 1'b1;
        end
      end
    end
  end

  // write into the back memory
  assign we_a    = wr && front_sel  && (waddr < AW'(DEPTH));
  assign we_b    = wr && !front_sel && (waddr < AW'(DEPTH));
  assign wdata_q = fifo_rdata[7:0];

  // read: each source line serves two display lines of the field
  assign src_line = act_line >> 1;
  assign raddr    = AW'(src_line) * AW'(H_ACT) + AW'(hcount);

  frame_memory #(.DW(8), .DEPTH(DEPTH)) u_mem_a (
    .clk, .we(we_a), .waddr, .wdata(wdata_q), .raddr, .rdata(rdata_a)
  );
  frame_memory #(.DW(8), .DEPTH(DEPTH)) u_mem_b (
    .clk, .we(we_b), .waddr, .wdata(wdata_q), .raddr, .rdata(rdata_b)
  );

  logic de_q;
  always_ff @(posedge clk) begin
    if (rst) begin
      de_q      <= 1'b0;
      hsync_o_n <= 1'b1;
      vsync_o_n <= 1'b1;
    end else begin
      de_q      <= de;
      hsync_o_n <= hsync_n;
      vsync_o_n <= vsync_n;
    end
  end

  // the memory that was front when the read was issued; a swap happens only
  // at frame_start, outside the active picture
  assign de_o = de_q;
  assign pix  = !de_q ? 8'h00 : (front_sel ? rdata_b : rdata_a);
endmodule
