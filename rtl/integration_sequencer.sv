// integration_sequencer -- chooses, line by line, what the CCD does so that
// the detectors integrate for the commanded time ("dump and read").
//
// The 4-bit integration-time code is taken at the start of every readout
// period. A period begins with a TRANSFER line (signal charge moved from the
// detectors into the vertical registers), followed by the V_ACT readout lines
// during which VA is high. For codes 0..8 the detectors are then emptied by a
// DUMP line placed N lines before the end of the period (N = exposure in
// lines) and up to SWEEP_LINES SWEEP lines that clear the dumped charge out
// of the registers; the exposure runs from the start of the DUMP line to the
// next TRANSFER. Codes 9..11 have no dump: the detectors integrate over one,
// two or four whole 30 Hz frames and the period is that long. Period length
// follows the code's readout rate: 262/263 lines alternately at 60 frames/s,
// 525 at 30, 1050 at 15 and 2100 at 7.5 frames/s.
//
// The four modes and the three SAM control pins (TRANS, DUMP, SWEEP; all low
// means READOUT) follow the document. The pins for a line are presented from
// the start of the blanking interval of the line before it, so they are
// stable while HSYNC is low, as the document requires. Which line inside the
// period carries the dump, the five-line dump+sweep length and the period
// lengths are this design's reading of the document's timing description.
//
// Interface: clk is the pixel clock, line_start / blank_start come from
// video_timing. exp_code is the code whose exposure ends at the next
// TRANSFER, so it is the code of the frame read out in the following period.
module integration_sequencer
  import radiometer_pkg::*;
#(
  parameter int V_ACT       = radiometer_pkg::V_ACTIVE,
  parameter int SWEEP_LINES = 4
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [3:0]  int_code,     // integration time from the processor
  input  logic        line_start,
  input  logic        blank_start,
  output logic        sam_trans,    // pins for the next line
  output logic        sam_dump,
  output logic        sam_sweep,
  output seq_mode_t   line_mode,    // mode of the current line
  output logic        va,
  output logic [3:0]  exp_code,     // code in force for the current period
  output logic [11:0] pline,        // line number inside the period
  output logic        period_start  // one clock at the first line of a period
);
  logic [11:0] plen;
  logic        half;                // selects 262 or 263 lines at 60 frames/s
  logic [11:0] pl_next;
  logic [11:0] dump_line;
  seq_mode_t   next_mode;

  function automatic logic [11:0] period_len(input logic [3:0] code, input logic h);
    case (code_rate(code))
      RATE_60:  return h ? 12'd263 : 12'd262;
      RATE_30:  return 12'd525;
      RATE_15:  return 12'd1050;
      default:  return 12'd2100;
    endcase
  endfunction

  always_comb begin
    pl_next   = (pline == plen - 12'd1) ? 12'd0 : pline + 12'd1;
    dump_line = plen - 12'(int_lines(exp_code));
    if (pl_next == 12'd0)
      next_mode = MODE_TRANSFER;
    else if (code_dumps(exp_code) && pl_next == dump_line)
      next_mode = MODE_DUMP;
    else if (code_dumps(exp_code) && pl_next > dump_line &&
             pl_next <= dump_line + 12'(SWEEP_LINES))
      next_mode = MODE_SWEEP;
    else
      next_mode = MODE_READOUT;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      plen         <= 12'd525;
      pline        <= 12'd524;
      half         <= 1'b0;
      exp_code     <= 4'd9;
      line_mode    <= MODE_SWEEP;
      va           <= 1'b0;
      sam_trans    <= 1'b1;
      sam_dump     <= 1'b0;
      sam_sweep    <= 1'b0;
      period_start <= 1'b0;
    end else begin
      period_start <= 1'b0;
      if (blank_start) begin
        sam_trans <= (next_mode == MODE_TRANSFER);
        sam_dump  <= (next_mode == MODE_DUMP);
        sam_sweep <= (next_mode == MODE_SWEEP);
        if (pline == 12'd0 && line_mode == MODE_TRANSFER) va <= 1'b1;
        if (pline == 12'(V_ACT))                           va <= 1'b0;
      end
      if (line_start) begin
        pline     <= pl_next;
        line_mode <= sam_trans ? MODE_TRANSFER :
                     sam_dump  ? MODE_DUMP     :
                     sam_sweep ? MODE_SWEEP    : MODE_READOUT;
        if (pl_next == 12'd0) begin
          // new readout period: take the commanded code
          exp_code     <= (int_code > 4'(INT_MAX)) ? 4'(INT_MAX) : int_code;
          period_start <= 1'b1;
          if (code_rate(int_code) == RATE_60) begin
            plen <= period_len(int_code, half);
            half <= !half;
          end else begin
            plen <= period_len(int_code, 1'b0);
            half <= 1'b0;
          end
        end
      end
    end
  end

  // Only one SAM pin may be high, and a dump must not cut into the readout.
  a_onehot_pins: assert property (@(posedge clk) disable iff (rst)
    $onehot0({sam_trans, sam_dump, sam_sweep}));
  a_dump_after_readout: assert property (@(posedge clk) disable iff (rst)
    (line_mode == MODE_DUMP) |-> (pline > 12'(V_ACT)));
endmodule
