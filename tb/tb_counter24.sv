// tb_counter24: self-checking testbench of the modulo-24 counter.
//
// Drives random combinations of sclr, sload, cnt_en and data (all sampled
// at the rising edge of clock) and compares q every
// cycle with a reference model kept in the testbench. It also runs a long
// stretch of plain counting to check the wrap from 23 to 0 and
// counts how often clear, load, wrap and out-of-range loads happened;
// each must happen at least once. A watchdog ends the run.
module tb_counter24;
  localparam int unsigned MOD = 24;
  localparam int unsigned W   = 5;

  logic         clock = 1'b0;
  logic         cnt_en, sclr, sload;
  logic [W-1:0] data, q;
  int checks = 0, failures = 0;
  int n_clr = 0, n_load = 0, n_wrap = 0, n_big = 0;
  int unsigned ref_q;

  counter24 dut (.*);

  always #5 clock = ~clock;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t: q=%0d ref=%0d", what, $time, q, ref_q);
    end
  endtask

  // One clock cycle with the given controls; updates the reference model.
  task automatic step(input logic c, input logic l, input logic e,
                      input logic [W-1:0] d);
    sclr = c; sload = l; cnt_en = e; data = d;
    #1;
    @(posedge clock);
    if (c) begin
      ref_q = 0; n_clr++;
    end else if (l) begin
      ref_q = d; n_load++;
      if (d >= MOD) n_big++;
    end else if (e) begin
      if (ref_q >= MOD - 1) begin
        ref_q = 0; n_wrap++;
      end else begin
        ref_q = ref_q + 1;
      end
    end
    #1;
    check(q == W'(ref_q), "q");
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clock);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clock);
    step(1'b1, 1'b0, 1'b0, '0);           // clear to a known state
    check(q == '0, "q after clear");
    repeat (3 * MOD + 2) step(1'b0, 1'b0, 1'b1, '0);   // plain counting
    step(1'b0, 1'b0, 1'b0, '0);           // hold
    step(1'b1, 1'b1, 1'b1, W'(MOD - 1));  // clear beats load
    step(1'b0, 1'b1, 1'b1, W'(MOD - 1));  // load beats count
    step(1'b0, 1'b0, 1'b1, '0);           // wrap from the loaded value
    repeat (2000) begin
      step(($urandom % 16) == 0, ($urandom % 8) == 0, ($urandom % 4) != 0,
           W'($urandom));
    end
    check(n_clr > 0,  "clear happened");
    check(n_load > 0, "load happened");
    check(n_wrap > 0, "wrap happened");
    check(n_big > 0,  "out-of-range load happened");
    $display("clears=%0d loads=%0d wraps=%0d big_loads=%0d",
             n_clr, n_load, n_wrap, n_big);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
