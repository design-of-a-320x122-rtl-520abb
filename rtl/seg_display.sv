// seg_display -- front-panel LED display of the integration time.
//
// Shows the 4-bit integration-time code in decimal on two seven-segment
// digits (00..11; codes 12..15 are not used and show a dash on both
// digits). Segment order is {g,f,e,d,c,b,a}, active high; the leading tens
// digit is blanked when it is zero. The two-digit display and the decoding
// of the binary code follow the document; showing the code number (rather
// than the time in units) and the segment polarity are this design's
// choices.
//
// Interface: purely combinational.
module seg_display (
  input  logic [3:0] code,
  output logic [6:0] seg_tens,
  output logic [6:0] seg_ones
);
  function automatic logic [6:0] digit(input logic [3:0] d);
    case (d)
      4'd0: return 7'b0111111;
      4'd1: return 7'b0000110;
      4'd2: return 7'b1011011;
      4'd3: return 7'b1001111;
      4'd4: return 7'b1100110;
      4'd5: return 7'b1101101;
      4'd6: return 7'b1111101;
      4'd7: return 7'b0000111;
      4'd8: return 7'b1111111;
      4'd9: return 7'b1101111;
      default: return 7'b1000000;   // dash
    endcase
  endfunction

  always_comb begin
    if (code > 4'd11) begin
      seg_tens = 7'b1000000;
      seg_ones = 7'b1000000;
    end else if (code >= 4'd10) begin
      seg_tens = digit(4'd1);
      seg_ones = digit(code - 4'd10);
    end else begin
      seg_tens = 7'b0000000;
      seg_ones = digit(code);
    end
  end
endmodule
