// seg_decoder: seven-segment decoder with dynamic (time-multiplexed) scan.
//
// The six digits of HH:MM:SS share one segment bus. On every rising edge of
// clk_10hz the decoder steps the digit select sel to the next digit and, on
// the same edge, registers the segment code of that digit on seg, so the
// pair (sel, seg) always changes together and stays stable for one scan
// period. Digit order of sel:
//   0 led0 (seconds units)   1 led1 (seconds tens)
//   2 led2 (minutes units)   3 led3 (minutes tens)
//   4 hour units             5 hour tens
// The hour comes in as a binary 0..23 value (counter24) and is split into
// two decimal digits here. seg is active low with seg[7] the decimal point,
// never lit; digits above 9 are shown blank (see clock_pkg). rst is active
// low and asynchronous: it sets sel to 0 and seg to the code of "0".
// The port names and widths, the 10 Hz scan clock and the led0..led3
// assignment follow the original design; the order of the two hour digits,
// the registered output, the reset values and the segment polarity are this
// design's choices (the polarity matches the code 8'hC0 the original shows
// for a zero).
module seg_decoder
  import clock_pkg::*;
(
  input  logic  clk_10hz,
  input  logic  rst,
  input  hour_t counter24,
  input  digit_t led0,
  input  digit_t led1,
  input  digit_t led2,
  input  digit_t led3,
  output seg_t  seg,
  output sel_t  sel
);

  localparam sel_t LAST_SEL = sel_t'(NUM_DIGITS - 1);

  sel_t   sel_next;
  digit_t hour_tens, hour_units, digit_next;

  always_comb begin
    hour_tens  = digit_t'(counter24 / HOUR_W'(10));
    hour_units = digit_t'(counter24 % HOUR_W'(10));
  end

  assign sel_next = (sel >= LAST_SEL) ? '0 : sel + 1'b1;

  always_comb begin
    unique case (sel_next)
      3'd0:    digit_next = led0;
      3'd1:    digit_next = led1;
      3'd2:    digit_next = led2;
      3'd3:    digit_next = led3;
      3'd4:    digit_next = hour_units;
      3'd5:    digit_next = hour_tens;
      default: digit_next = 4'hF;
    endcase
  end

  always_ff @(posedge clk_10hz or negedge rst) begin
    if (!rst) begin
      sel <= '0;
      seg <= SEG_ZERO;
    end else begin
      sel <= sel_next;
      seg <= seg_encode(digit_next);
    end
  end

endmodule
