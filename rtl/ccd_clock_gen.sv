// ccd_clock_gen -- the CCD clock microsequencer (the board's stand-alone
// microsequencer, SAM): turns the sequencer's per-line mode into four-phase
// vertical (B) clocks, four-phase horizontal (C) clocks and the detector
// transfer pulse.
//
// It runs on its own clock, clk_sam, TICKS pixel periods faster than the
// pixel clock (4 by default: one C step per tick, so one four-phase C cycle
// per pixel). HA and the three mode pins (TRANS, DUMP, SWEEP) arrive from the
// pixel-clock domain and pass through two-flop synchronisers; the mode is
// taken at each rising edge of HA, when the pins have been stable since the
// start of the previous blanking interval. Per line:
//   READOUT  (all pins low): C clocks for the 320 active pixels plus OVERSCAN
//            extra pixels; one B transfer in the blanking interval.
//   TRANSFER: CLEAR_B high-speed B transfers clear the vertical registers,
//            then the transfer pulse (about 10 us) moves the detector charge
//            into them; C clocks run all line.
//   DUMP:    the line starts with the transfer pulse, then B clocks run at
//            high speed for the rest of the line; C clocks run all line.
//   SWEEP:   B and C clocks both run continuously at high speed.
// High-speed B clocking is one transfer per 16 CLOCK periods (750 k
// transfers/s), i.e. one B phase step every HS_DIV = 8 ticks.
//
// The modes, the 31 clearing transfers, the ~10 us transfer pulse, the
// 750 k transfers/s rate and the overscan follow the document. The two-high
// four-phase pattern, the overscan length, the point in the line where each
// event happens and the readout B transfer position are this design's
// choices: the measured waveforms are not reproduced here.
module ccd_clock_gen #(
  parameter int H_ACT    = radiometer_pkg::H_ACTIVE,
  parameter int TICKS    = 4,     // clk_sam periods per pixel
  parameter int OVERSCAN = 8,     // extra C pixels after the active line
  parameter int HS_DIV   = 8,     // ticks per B phase step at high speed
  parameter int CLEAR_B  = 31,    // clearing B transfers in a TRANSFER line
  parameter int TG_TICKS = 245    // transfer pulse length (10 us at 24.5 MHz)
) (
  input  logic       clk_sam,
  input  logic       rst,
  input  logic       ha,          // from the pixel-clock domain
  input  logic       trans,
  input  logic       dump,
  input  logic       sweep,
  output logic [3:0] b_clk,       // vertical register phases 1..4
  output logic [3:0] c_clk,       // horizontal register phases 1..4
  output logic       tg           // detector transfer pulse
);
  import radiometer_pkg::*;

  localparam int T_TG      = CLEAR_B * 4 * HS_DIV;      // transfer pulse start
  localparam int C_RO_END  = (H_ACT + OVERSCAN) * TICKS;
  localparam int RO_B_BEG  = H_ACT * TICKS;
  localparam int RO_B_END  = RO_B_BEG + 4 * HS_DIV;

  logic [2:0]  ha_s;
  logic [1:0]  tr_s, du_s, sw_s;
  logic        lstart;
  seq_mode_t   mode;
  logic [11:0] t;
  logic [1:0]  b_ph, c_ph;
  logic [$clog2(HS_DIV)-1:0] b_div;
  logic        b_win, c_en;

  assign lstart = ha_s[1] && !ha_s[2];

  always_comb begin
    unique case (mode)
      MODE_TRANSFER: b_win = (t < 12'(T_TG));
      MODE_DUMP:     b_win = (t >= 12'(TG_TICKS));
      MODE_SWEEP:    b_win = 1'b1;
      default:       b_win = (t >= 12'(RO_B_BEG)) && (t < 12'(RO_B_END));
    endcase
    c_en = (mode != MODE_READOUT) || (t < 12'(C_RO_END));
  end

  always_ff @(posedge clk_sam) begin
    if (rst) begin
      ha_s  <= '0;
      tr_s  <= '0;
      du_s  <= '0;
      sw_s  <= '0;
      mode  <= MODE_READOUT;
      t     <= 12'hfff;
      b_ph  <= '0;
      c_ph  <= '0;
      b_div <= '0;
      tg    <= 1'b0;
    end else begin
      ha_s <= {ha_s[1:0], ha};
      tr_s <= {tr_s[0], trans};
      du_s <= {du_s[0], dump};
      sw_s <= {sw_s[0], sweep};
      if (lstart) begin
        t     <= '0;
        b_div <= '0;
        mode  <= tr_s[1] ? MODE_TRANSFER :
                 du_s[1] ? MODE_DUMP     :
                 sw_s[1] ? MODE_SWEEP    : MODE_READOUT;
      end else begin
        if (t != 12'hfff) t <= t + 12'd1;
        if (b_win) begin
          if (b_div == $bits(b_div)'(HS_DIV - 1)) begin
            b_div <= '0;
            b_ph  <= b_ph + 2'd1;
          end else begin
            b_div <= b_div + 1'b1;
          end
        end else begin
          b_div <= '0;
        end
        if (c_en) c_ph <= c_ph + 2'd1;
      end
      tg <= !lstart &&
            (((mode == MODE_TRANSFER) && (t >= 12'(T_TG)) && (t < 12'(T_TG + TG_TICKS))) ||
             ((mode == MODE_DUMP) && (t < 12'(TG_TICKS))));
    end
  end

  // Four-phase pattern: phase k is high in steps k and k-1, so two adjacent
  // phases are always high and the charge packet moves one phase per step.
  always_comb begin
    for (int k = 0; k < 4; k++) begin
      b_clk[k] = (b_ph == 2'(k)) || (b_ph == 2'((k + 3) % 4));
      c_clk[k] = (c_ph == 2'(k)) || (c_ph == 2'((k + 3) % 4));
    end
  end

  initial begin
    assert (T_TG + TG_TICKS < (H_ACT + 69) * TICKS)
      else $error("TRANSFER line does not fit in one line time");
  end
endmodule
