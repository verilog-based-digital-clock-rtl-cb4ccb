// tb_fpin: self-checking testbench of the frequency divider.
//
// Runs fpin with a small CLK_HZ (40, so clk_1s has a period of 40 clk
// cycles and clk_10hz of 4) and checks, cycle by cycle against a reference
// count kept in the testbench: both outputs are low in reset, every edge of
// clk_1s lands exactly CLK_HZ/2 cycles after the previous one, every edge of
// clk_10hz exactly CLK_HZ/(2*SCAN_HZ) cycles after the previous one, and a
// reset in mid-run returns both outputs to 0 at once. A watchdog ends the run.
module tb_fpin;
  localparam int unsigned CLK_HZ  = 40;
  localparam int unsigned SCAN_HZ = 10;
  localparam int unsigned HALF_1S   = CLK_HZ / 2;
  localparam int unsigned HALF_SCAN = CLK_HZ / (2 * SCAN_HZ);

  logic clk = 1'b0, RST = 1'b1;
  logic clk_1s, clk_10hz;
  int checks = 0, failures = 0;

  fpin #(.CLK_HZ(CLK_HZ), .SCAN_HZ(SCAN_HZ)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Reference model: expected level after the n-th rising clk edge since
  // reset release.
  int unsigned n;
  logic exp_1s, exp_10;
  int edges_1s, edges_10;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 RST = 1'b0;   // asynchronous reset from power-up
    repeat (3) @(posedge clk);
    #1;
    check(clk_1s == 1'b0 && clk_10hz == 1'b0, "outputs low in reset");
    RST = 1'b1;
    n = 0; edges_1s = 0; edges_10 = 0;
    repeat (10 * CLK_HZ) begin
      @(posedge clk);
      n++;
      exp_1s = ((n / HALF_1S) % 2) == 1;
      exp_10 = ((n / HALF_SCAN) % 2) == 1;
      #1;
      check(clk_1s == exp_1s, "clk_1s level");
      check(clk_10hz == exp_10, "clk_10hz level");
    end
    // 10 s: 20 edges of clk_1s and 200 of clk_10hz happened (checked above)
    // Mid-period asynchronous reset.
    repeat (7) @(posedge clk);
    #2 RST = 1'b0;
    #1 check(clk_1s == 1'b0 && clk_10hz == 1'b0, "async reset clears outputs");
    #10 RST = 1'b1;
    n = 0;
    repeat (2 * CLK_HZ) begin
      @(posedge clk);
      n++;
      exp_1s = ((n / HALF_1S) % 2) == 1;
      exp_10 = ((n / HALF_SCAN) % 2) == 1;
      #1;
      check(clk_1s == exp_1s, "clk_1s level after reset");
      check(clk_10hz == exp_10, "clk_10hz level after reset");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
