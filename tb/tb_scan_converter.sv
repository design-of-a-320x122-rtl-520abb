// tb_scan_converter -- drives the scan converter from a first-word-fall-
// through FIFO model in the testbench and real display timing from
// display_sync_gen. Frames of 320 x 122 pixels with a frame-numbered
// pattern are fed in bursts; some frames are delayed past a display frame
// start, and one frame is cut short and followed by a new start of frame.
// Checks: every displayed pixel of a field line n equals source pixel
// (n/2, column) of the frame that was complete at the last swap; the frame
// shown only changes at a swap; a swap happens only when a complete frame
// is waiting, otherwise a repeat is flagged; the truncated frame is never
// shown; a frame arriving while a complete one waits is dropped. Swaps
// and repeats must both have happened.
module tb_scan_converter;
  localparam int HA = 320, VA = 122, DEPTH = HA * VA;
  logic clk = 0, rst = 1, rst_cam = 1;
  logic [8:0] fifo_rdata;
  logic fifo_empty, fifo_re;
  logic [9:0] hcount, vcount, c_h, c_v;
  logic de, hsync_n, vsync_n, frame_start, field;
  logic [7:0] act_line, pix;
  logic de_o, hsync_o_n, vsync_o_n, front_sel, swap, repeat_frame;
  logic c_ha, c_hs, lock_n, c_ls, c_bs;
  int checks = 0, failures = 0;

  display_sync_gen u_sync (.clk, .rst, .lock_n, .hcount, .vcount, .field, .de,
                           .act_line, .hsync_n, .vsync_n, .frame_start);
  video_timing cam (.clk, .rst(rst_cam), .hcount(c_h), .vcount(c_v), .ha(c_ha),
                    .hsync_n(c_hs), .lock_n, .line_start(c_ls), .blank_start(c_bs));
  scan_converter dut (.*);
  always #5 clk = !clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  function automatic logic [7:0] pat(input int f, input int l, input int c);
    return 8'(f * 41 + l * 3 + c);
  endfunction

  // FIFO model: first word falls through
  logic [8:0] q [$];
  task automatic fifo_outputs();
    // nonblocking, so the converter samples the values from before the edge
    fifo_empty <= (q.size() == 0);
    fifo_rdata <= (q.size() == 0) ? 9'h0 : q[0];
  endtask
  initial fifo_outputs();

  // bookkeeping of what the converter has received: pending is the frame
  // that is complete in the back memory and not yet shown
  int cur_id = -1, cur_cnt = 0, pending = -1;
  int shown = -1, n_swap = 0, n_repeat = 0;
  int qid [$];
  bit exp_swap = 0, exp_rep = 0;
  always @(posedge clk) begin
    if (!rst) begin
      // outputs of the previous decision
      chk(swap == exp_swap && repeat_frame == exp_rep, "swap/repeat decision");
      if (swap) n_swap++;
      if (repeat_frame) n_repeat++;
      exp_swap = 0; exp_rep = 0;
      if (frame_start) begin
        if (pending >= 0) begin
          exp_swap = 1; shown = pending; pending = -1;
        end else exp_rep = 1;
      end
      if (fifo_re) begin
        // a new frame is accepted only while nothing complete is waiting
        if (fifo_rdata[8]) begin
          if (pending < 0 && !exp_swap) begin cur_id = qid[0]; cur_cnt = 0; end
          else cur_id = -1;
        end
        if (cur_id >= 0) begin
          cur_cnt++;
          if (cur_cnt == DEPTH) begin pending = cur_id; cur_id = -1; end
        end
        void'(q.pop_front()); void'(qid.pop_front());
        fifo_outputs();
      end
    end
  end

  task automatic feed(input int id, input int npix, input int gap_every);
    for (int i = 0; i < npix; i++) begin
      @(negedge clk);
      q.push_back({i == 0, pat(id, i / HA, i % HA)});
      qid.push_back(id);
      fifo_outputs();
      if (gap_every > 0 && i % gap_every == 0) repeat (3) @(negedge clk);
    end
  endtask

  // display checker: columns count from the start of each active run,
  // lines from the VSYNC of each field
  int line_in_field = 0, col = 0;
  bit deo_d = 0, synced = 0;
  logic vs_d = 1;
  always @(posedge clk) begin
    if (!rst) begin
      if (!vsync_o_n && vs_d) begin line_in_field = 0; synced = 1; end
      vs_d = vsync_o_n;
      if (de_o && !deo_d) col = 0;
      if (de_o) begin
        if (shown >= 0 && synced)
          chk(pix == pat(shown, line_in_field / 2, col),
              $sformatf("frame %0d line %0d col %0d got %h", shown, line_in_field, col, pix));
        col++;
      end
      if (!de_o && deo_d) begin
        if (synced) chk(col == HA, "320 pixels per displayed line");
        line_in_field++;
      end
      deo_d = de_o;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0; rst_cam <= 0;
    feed(0, DEPTH, 0);            // ready before the first frame start
    @(posedge clk iff swap);
    chk(shown == 0, "first frame shown");
    @(posedge clk iff frame_start);   // nothing new: repeat
    repeat (100000) @(posedge clk);
    feed(1, DEPTH, 1);            // slow feed that spans a frame start
    @(posedge clk iff swap);
    chk(shown == 1, $sformatf("slow frame shown, shown=%0d", shown));
    feed(2, DEPTH / 2, 0);        // cut short ...
    feed(3, DEPTH, 0);            // ... and replaced
    @(posedge clk iff swap);
    chk(shown == 3, $sformatf("replacement frame shown, shown=%0d", shown));
    feed(4, DEPTH, 0);
    @(posedge clk iff swap);
    chk(shown == 4, $sformatf("frame 4 shown, shown=%0d", shown));
    feed(5, DEPTH, 0);            // complete and waiting ...
    feed(6, DEPTH, 0);            // ... so this one is dropped
    @(posedge clk iff swap);
    chk(shown == 5, $sformatf("waiting frame kept, shown=%0d", shown));
    repeat (2) @(posedge clk iff frame_start);
    chk(n_swap >= 5, $sformatf("swaps %0d", n_swap));
    chk(n_repeat >= 3, $sformatf("repeats %0d", n_repeat));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
