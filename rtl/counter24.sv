// counter24: modulo-24 hour counter, binary 0..23.
//
// A synchronous counter on the rising edge of clock, modelled on a library
// (LPM-style) counter: sclr clears q to 0, sload loads q from data, and
// cnt_en lets q advance by one, wrapping from 23 to 0. sclr has
// priority over sload, and sload over counting; all three take effect at the
// next rising edge of clock. A loaded value above 23 wraps to 0 on the
// next count.
// It has no carry output: nothing follows the hours. q is a plain binary
// value; the display decoder splits it into tens and units.
// The modulus, the port names clock/data/sclr/sload/q and their widths follow
// the original design. The cnt_en input is this design's addition: the
// counters of the clock share one clock and are chained through cnt_en/cout,
// so the whole time value changes on a single edge.
module counter24 (
  input  logic                        clock,
  input  logic                        cnt_en,
  input  logic [clock_pkg::HOUR_W-1:0] data,
  input  logic                        sclr,
  input  logic                        sload,
  output logic [clock_pkg::HOUR_W-1:0] q
);

  localparam int unsigned MODULUS = 24;
  localparam clock_pkg::hour_t LAST = clock_pkg::hour_t'(MODULUS - 1);

  always_ff @(posedge clock) begin
    if (sclr)        q <= '0;
    else if (sload)  q <= data;
    else if (cnt_en) q <= (q >= LAST) ? '0 : q + 1'b1;
  end

endmodule
