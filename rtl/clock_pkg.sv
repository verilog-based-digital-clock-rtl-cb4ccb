// clock_pkg: types and constants shared by the digital clock.
//
// Holds the width of one BCD digit, the width of the binary hour value and
// the seven-segment code table. The display is driven active low (a segment
// lights when its bit is 0), with seg[7] = decimal point, seg[6] = g ...
// seg[0] = a. With that convention the digit 0 reads 8'hC0, the code the
// clock's display shows for a zero. The decimal point is never lit, and a
// value outside 0..9 blanks the digit (8'hFF). Both the polarity/bit order
// and the blanking are this design's choices.
package clock_pkg;

  localparam int unsigned DIGIT_W = 4;   // one BCD digit
  localparam int unsigned HOUR_W  = 5;   // binary hour, 0..23
  localparam int unsigned SEG_W   = 8;   // dp,g,f,e,d,c,b,a
  localparam int unsigned NUM_DIGITS = 6; // HH MM SS
  localparam int unsigned SEL_W   = 3;

  typedef logic [DIGIT_W-1:0] digit_t;
  typedef logic [HOUR_W-1:0]  hour_t;
  typedef logic [SEG_W-1:0]   seg_t;
  typedef logic [SEL_W-1:0]   sel_t;

  localparam seg_t SEG_BLANK = 8'hFF;
  localparam seg_t SEG_ZERO  = 8'hC0;

  // Active-low seven-segment code of one decimal digit.
  function automatic seg_t seg_encode(digit_t d);
    unique case (d)
      4'd0:    seg_encode = 8'hC0;
      4'd1:    seg_encode = 8'hF9;
      4'd2:    seg_encode = 8'hA4;
      4'd3:    seg_encode = 8'hB0;
      4'd4:    seg_encode = 8'h99;
      4'd5:    seg_encode = 8'h92;
      4'd6:    seg_encode = 8'h82;
      4'd7:    seg_encode = 8'hF8;
      4'd8:    seg_encode = 8'h80;
      4'd9:    seg_encode = 8'h90;
      default: seg_encode = SEG_BLANK;
    endcase
  endfunction

endpackage
