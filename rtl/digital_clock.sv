// digital_clock: 24-hour HH:MM:SS clock with manual time setting and a
// six-digit multiplexed seven-segment display.
//
// Structure:
//   fpin          divides clk (CLK_HZ) into clk_1s (1 Hz) and clk_10hz.
//   five counters clocked by clk_1s, chained seconds-units (mod 10) ->
//                 seconds-tens (mod 6) -> minutes-units (mod 10) ->
//                 minutes-tens (mod 6) -> hours (mod 24, binary). Each
//                 counter's cout enables the next, so 13:59:59 -> 14:00:00
//                 happens on one clk_1s edge.
//   seg_decoder   scans the six digits at clk_10hz, driving seg and sel.
// Interface: RST is active low. While LOAD is high, each clk_1s edge
// copies H (binary hour), MH, ML, SH, SL (BCD digits) into the counters; the
// clock runs on from the loaded time once LOAD is low again.
// Reset: RST resets the divider and the display scan at once. The counters
// have a synchronous clear (sclr), but the divider holds clk_1s low during
// reset, so the clear cannot be clocked in while RST is low. A flag clr_pend
// is therefore set asynchronously by RST and dropped by the first clk_1s
// edge after RST is released; it drives every counter's sclr, so that first
// edge (one half second after release) sets the time to 00:00:00, and the
// count starts from there. A clear wins over LOAD on that edge.
// Timing: load, clear and every count take effect at the rising edge of
// clk_1s; a new digit is shown at every rising edge of clk_10hz.
// Block set, port names and wiring follow the original schematic. Chaining
// through count enables on one shared clock and the clr_pend flag are this
// design's choices. clk_1s and
// clk_10hz are clocks generated in logic, as in the original; an FPGA build
// should put them on global clock buffers or turn them into enables.
module digital_clock
  import clock_pkg::*;
#(
  parameter int unsigned CLK_HZ  = 50_000_000,
  parameter int unsigned SCAN_HZ = 10
) (
  input  logic   clk,
  input  logic   RST,
  input  logic   LOAD,
  input  hour_t  H,
  input  digit_t MH,
  input  digit_t ML,
  input  digit_t SH,
  input  digit_t SL,
  output seg_t   seg,
  output sel_t   sel
);

  logic   clk_1s, clk_10hz;
  logic   clr_pend, sclr;
  logic   cout_sl, cout_sh, cout_ml, cout_mh;
  digit_t q_sl, q_sh, q_ml, q_mh;
  hour_t  q_h;

  always_ff @(posedge clk_1s or negedge RST) begin
    if (!RST) clr_pend <= 1'b1;
    else      clr_pend <= 1'b0;
  end

  assign sclr = clr_pend;

  fpin #(.CLK_HZ(CLK_HZ), .SCAN_HZ(SCAN_HZ)) u_fpin (
    .clk, .RST, .clk_1s, .clk_10hz
  );

  counter10 u_sec_lo (
    .clock(clk_1s), .cnt_en(1'b1), .data(SL), .sclr, .sload(LOAD),
    .cout(cout_sl), .q(q_sl)
  );

  counter6 u_sec_hi (
    .clock(clk_1s), .cnt_en(cout_sl), .data(SH), .sclr, .sload(LOAD),
    .cout(cout_sh), .q(q_sh)
  );

  counter10 u_min_lo (
    .clock(clk_1s), .cnt_en(cout_sh), .data(ML), .sclr, .sload(LOAD),
    .cout(cout_ml), .q(q_ml)
  );

  counter6 u_min_hi (
    .clock(clk_1s), .cnt_en(cout_ml), .data(MH), .sclr, .sload(LOAD),
    .cout(cout_mh), .q(q_mh)
  );

  counter24 u_hour (
    .clock(clk_1s), .cnt_en(cout_mh), .data(H), .sclr, .sload(LOAD),
    .q(q_h)
  );

  seg_decoder u_seg (
    .clk_10hz, .rst(RST), .counter24(q_h),
    .led0(q_sl), .led1(q_sh), .led2(q_ml), .led3(q_mh),
    .seg, .sel
  );

endmodule
