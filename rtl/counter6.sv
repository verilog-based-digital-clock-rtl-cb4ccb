// counter6: modulo-6 counter, used for the tens of seconds and minutes.
//
// A synchronous counter on the rising edge of clock, modelled on a library
// (LPM-style) counter: sclr clears q to 0, sload loads q from data, and
// cnt_en lets q advance by one, wrapping from 5 to 0. sclr has
// priority over sload, and sload over counting; all three take effect at the
// next rising edge of clock. A loaded value above 5 wraps to 0 on the
// next count.
// cout is combinational: high while cnt_en is high and q is at (or above)
// 5, i.e. in the cycle where this counter wraps; it is the cnt_en of the next
// digit. q is four bits wide although it never counts past 5.
// The modulus, the port names clock/data/sclr/sload/q and their widths follow
// the original design. The cnt_en input is this design's addition: the
// counters of the clock share one clock and are chained through cnt_en/cout,
// so the whole time value changes on a single edge.
module counter6 (
  input  logic                        clock,
  input  logic                        cnt_en,
  input  logic [clock_pkg::DIGIT_W-1:0]  data,
  input  logic                        sclr,
  input  logic                        sload,
  output logic                        cout,
  output logic [clock_pkg::DIGIT_W-1:0] q
);

  localparam int unsigned MODULUS = 6;
  localparam clock_pkg::digit_t LAST = clock_pkg::digit_t'(MODULUS - 1);

  logic at_last;
  assign at_last = (q >= LAST);
  assign cout    = cnt_en & at_last;

  always_ff @(posedge clock) begin
    if (sclr)        q <= '0;
    else if (sload)  q <= data;
    else if (cnt_en) q <= at_last ? '0 : q + 1'b1;
  end

endmodule
