// fpin: frequency divider of the digital clock.
//
// Divides the board clock clk (CLK_HZ, 50 MHz by default as on the target
// board) into two 50%-duty clocks:
//   clk_1s   - 1 Hz, clocks the time counters;
//   clk_10hz - SCAN_HZ (10 Hz), clocks the display scan.
// Each output is a flip-flop that toggles when its own half-period counter
// reaches CLK_HZ/2 - 1 (resp. CLK_HZ/(2*SCAN_HZ) - 1), so both change right
// after a rising edge of clk. clk_1s has a period of exactly CLK_HZ clk
// cycles, clk_10hz of CLK_HZ/SCAN_HZ cycles. RST is active low and
// asynchronous; in reset both outputs and counters are 0.
// The two output names, the 1 Hz and 10 Hz rates, the 50 MHz input and the
// active-low reset follow the original design; the counter-and-toggle method
// and the asynchronous reset are this design's choice. CLK_HZ must be a
// multiple of 2*SCAN_HZ.
module fpin #(
  parameter int unsigned CLK_HZ  = 50_000_000,
  parameter int unsigned SCAN_HZ = 10
) (
  input  logic clk,
  input  logic RST,
  output logic clk_1s,
  output logic clk_10hz
);

  localparam int unsigned HALF_1S   = CLK_HZ / 2;
  localparam int unsigned HALF_SCAN = CLK_HZ / (2 * SCAN_HZ);
  localparam int unsigned W_1S      = (HALF_1S   > 1) ? $clog2(HALF_1S)   : 1;
  localparam int unsigned W_SCAN    = (HALF_SCAN > 1) ? $clog2(HALF_SCAN) : 1;

  if (CLK_HZ % (2 * SCAN_HZ) != 0 || HALF_SCAN < 1) begin : g_bad_cfg
    $error("fpin: CLK_HZ must be a non-zero multiple of 2*SCAN_HZ");
  end

  logic [W_1S-1:0]   cnt_1s;
  logic [W_SCAN-1:0] cnt_scan;

  always_ff @(posedge clk or negedge RST) begin
    if (!RST) begin
      cnt_1s <= '0;
      clk_1s <= 1'b0;
    end else if (cnt_1s == W_1S'(HALF_1S - 1)) begin
      cnt_1s <= '0;
      clk_1s <= ~clk_1s;
    end else begin
      cnt_1s <= cnt_1s + 1'b1;
    end
  end

  always_ff @(posedge clk or negedge RST) begin
    if (!RST) begin
      cnt_scan <= '0;
      clk_10hz <= 1'b0;
    end else if (cnt_scan == W_SCAN'(HALF_SCAN - 1)) begin
      cnt_scan <= '0;
      clk_10hz <= ~clk_10hz;
    end else begin
      cnt_scan <= cnt_scan + 1'b1;
    end
  end

endmodule
