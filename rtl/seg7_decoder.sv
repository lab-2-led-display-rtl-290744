// seg7_decoder: two-bit value to seven-segment digit 0..3.
//
// A small lookup: each of the four values lights the segments of the
// matching decimal digit. The output is combinational. seg[0] is segment a
// and seg[6] is segment g (a at the top, then clockwise b..f, g in the
// middle). ACTIVE_LOW inverts all segments for displays whose segments light
// when their pin is driven low.
//
// Decoding the two low register bits to a digit follows the lab
// description. Segment order, the polarity parameter and its default
// (a 1 lights a segment) are this design's choices.
module seg7_decoder
  import led_pkg::*;
#(
  parameter bit ACTIVE_LOW = 1'b0
) (
  input  logic [1:0] value,   // digit to show, 0..3
  output seg7_t      seg      // segment drives {g,f,e,d,c,b,a}
);

  seg7_t lit;   // 1 = segment on

  always_comb begin
    lit = '0;
    unique case (value)
      2'd0: begin
        lit[SEG_A] = 1'b1; lit[SEG_B] = 1'b1; lit[SEG_C] = 1'b1;
        lit[SEG_D] = 1'b1; lit[SEG_E] = 1'b1; lit[SEG_F] = 1'b1;
      end
      2'd1: begin
        lit[SEG_B] = 1'b1; lit[SEG_C] = 1'b1;
      end
      2'd2: begin
        lit[SEG_A] = 1'b1; lit[SEG_B] = 1'b1; lit[SEG_D] = 1'b1;
        lit[SEG_E] = 1'b1; lit[SEG_G] = 1'b1;
      end
      2'd3: begin
        lit[SEG_A] = 1'b1; lit[SEG_B] = 1'b1; lit[SEG_C] = 1'b1;
        lit[SEG_D] = 1'b1; lit[SEG_G] = 1'b1;
      end
      default: lit = '0;
    endcase
    seg = ACTIVE_LOW ? ~lit : lit;
  end

endmodule
