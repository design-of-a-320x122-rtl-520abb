// rotary_encoder -- turns the front-panel integration-time rotary switch
// into a 4-bit code.
//
// The switch grounds one of eleven lines, pos_n[0] for code 0001 up to
// pos_n[10] for code 1011. When no line is grounded (the twelfth position)
// the code is 0000, the document's "no input impressed" case. The eleven
// positions and the 0000 default follow the document; if more than one line
// is low, the highest position wins (a priority encoder), which is this
// design's choice for a switch caught between positions.
//
// Interface: purely combinational.
module rotary_encoder (
  input  logic [10:0] pos_n,     // active-low switch positions 1..11
  output logic [3:0]  code
);
  always_comb begin
    code = 4'd0;
    for (int i = 0; i < 11; i++)
      if (!pos_n[i]) code = 4'(i + 1);
  end
endmodule
