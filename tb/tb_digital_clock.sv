// tb_digital_clock: end-to-end testbench of the whole clock.
//
// Runs digital_clock with CLK_HZ = 40 (one "second" is 40 clk cycles, one
// scan step 4 cycles) and watches only the top's ports plus the internal
// 1 Hz clock as a time reference. The testbench keeps its own HH:MM:SS
// model, advanced at every clk_1s edge (or loaded/cleared as the top's
// controls say), and after every second it rebuilds the six displayed
// digits from the scanned seg/sel outputs and compares them with the model.
// It also checks the 1 Hz period in clk cycles and the counter contents.
// Scenarios: power-up reset, free running over a minute boundary, the
// 13:59 -> 14:00 roll-over, the 23:59:59 -> 00:00:00 wrap, a manual load of
// 11:07:02, a long LOAD, and a reset in mid-run. Each mechanism (seconds
// carry, minute carry, hour carry, hour wrap, load, clear, full display
// scan) is counted and must have happened at least once.
module tb_digital_clock;
  import clock_pkg::*;

  localparam int unsigned CLK_HZ  = 40;
  localparam int unsigned SCAN_HZ = 10;

  logic   clk = 1'b0, RST = 1'b1, LOAD = 1'b0;
  hour_t  H = '0;
  digit_t MH = '0, ML = '0, SH = '0, SL = '0;
  seg_t   seg;
  sel_t   sel;

  int checks = 0, failures = 0;
  int n_sec_carry = 0, n_min_carry = 0, n_hour_carry = 0, n_hour_wrap = 0;
  int n_load = 0, n_clear = 0, n_scan = 0;

  digital_clock #(.CLK_HZ(CLK_HZ), .SCAN_HZ(SCAN_HZ)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // ---------------- reference model ----------------
  int unsigned r_h, r_m, r_s;
  bit          pend_clear;   // model of "clear at the first tick after reset"

  function automatic int unsigned seg_to_digit(logic [7:0] code);
    case (code)
      8'hC0: return 0;  8'hF9: return 1;  8'hA4: return 2;  8'hB0: return 3;
      8'h99: return 4;  8'h92: return 5;  8'h82: return 6;  8'hF8: return 7;
      8'h80: return 8;  8'h90: return 9;
      default: return 15;
    endcase
  endfunction

  // Displayed digits, rebuilt from the scan.
  int unsigned disp [6];
  int unsigned scans_since_tick;

  logic [2:0] last_sel;
  always @(negedge clk) begin
    if (RST && sel !== last_sel) begin
      disp[sel] = seg_to_digit(seg);
      scans_since_tick++;
    end
    last_sel = sel;
  end

  // Model update on every 1 Hz edge (the top's counting clock).
  int unsigned tick_cycle, cyc;
  bit          seen_tick;
  always @(posedge clk) cyc++;

  always @(posedge dut.clk_1s) begin
    if (seen_tick) check(cyc - tick_cycle == CLK_HZ, "1 Hz period");
    seen_tick  = 1'b1;
    tick_cycle = cyc;
    if (pend_clear) begin
      r_h = 0; r_m = 0; r_s = 0; pend_clear = 1'b0; n_clear++;
    end else if (LOAD) begin
      r_h = H; r_m = MH * 10 + ML; r_s = SH * 10 + SL; n_load++;
    end else begin
      r_s++;
      if (r_s % 10 == 0) n_sec_carry++;
      if (r_s == 60) begin
        r_s = 0; r_m++; n_min_carry++;
        if (r_m == 60) begin
          r_m = 0; r_h++; n_hour_carry++;
          if (r_h == 24) begin
            r_h = 0; n_hour_wrap++;
          end
        end
      end
    end
    scans_since_tick = 0;
  end

  // Compare counters right after a tick, and the display once the scan has
  // gone once round the six digits after that tick.
  task automatic check_time(input string what);
    @(posedge dut.clk_1s);
    #1;
    check(dut.q_h == hour_t'(r_h) && dut.q_mh == digit_t'(r_m / 10) &&
          dut.q_ml == digit_t'(r_m % 10) && dut.q_sh == digit_t'(r_s / 10) &&
          dut.q_sl == digit_t'(r_s % 10), {what, ": counters"});
    wait (scans_since_tick >= 6);
    check(disp[5] == r_h / 10 && disp[4] == r_h % 10 &&
          disp[3] == r_m / 10 && disp[2] == r_m % 10 &&
          disp[1] == r_s / 10 && disp[0] == r_s % 10, {what, ": display"});
    if (failures > 0 && failures < 5)
      $display("  model %02d:%02d:%02d display %0d%0d:%0d%0d:%0d%0d", r_h, r_m, r_s,
               disp[5], disp[4], disp[3], disp[2], disp[1], disp[0]);
    n_scan++;
  endtask

  task automatic set_inputs(int unsigned h, int unsigned m, int unsigned s);
    H = hour_t'(h); MH = digit_t'(m / 10); ML = digit_t'(m % 10);
    SH = digit_t'(s / 10); SL = digit_t'(s % 10);
  endtask

  task automatic load_time(int unsigned h, int unsigned m, int unsigned s);
    @(negedge dut.clk_1s);
    set_inputs(h, m, s);
    LOAD = 1'b1;
    check_time("load");
    @(negedge dut.clk_1s);
    LOAD = 1'b0;
  endtask

  task automatic do_reset();
    @(negedge clk);
    RST = 1'b0;
    pend_clear = 1'b1;
    seen_tick = 1'b0;
    repeat (7) @(negedge clk);
    #1 check(sel == 3'd0 && seg == 8'hC0, "scan reset");
    RST = 1'b1;
  endtask

  initial begin : watchdog
    repeat (200 * CLK_HZ * 10) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1;
    do_reset();
    check_time("first tick clears");
    repeat (70) check_time("free run");
    // Figure-style roll-over: minutes 59 -> 00 while the hour goes 13 -> 14.
    load_time(13, 59, 55);
    repeat (8) check_time("13:59 roll-over");
    check(r_h == 14 && r_m == 0, "reached 14:00");
    // Day wrap.
    load_time(23, 59, 58);
    repeat (4) check_time("day wrap");
    check(r_h == 0 && r_m == 0, "reached 00:00");
    // Manual setting to 11:07:02 with LOAD held for three seconds.
    @(negedge dut.clk_1s);
    set_inputs(11, 7, 2);
    LOAD = 1'b1;
    repeat (3) check_time("long load");
    @(negedge dut.clk_1s);
    LOAD = 1'b0;
    repeat (3) check_time("after load");
    check(r_h == 11 && r_m == 7 && r_s == 5, "11:07:05 reached");
    // Reset in mid-run: back to 00:00:00, LOAD high is overridden.
    LOAD = 1'b1;
    do_reset();
    check_time("clear beats load");
    LOAD = 1'b0;
    @(negedge dut.clk_1s);
    repeat (3) check_time("after reset");

    check(n_sec_carry  > 0, "seconds carry happened");
    check(n_min_carry  > 0, "minute carry happened");
    check(n_hour_carry > 0, "hour carry happened");
    check(n_hour_wrap  > 0, "hour wrap happened");
    check(n_load       > 0, "load happened");
    check(n_clear      > 1, "clear happened");
    check(n_scan       > 0, "display scan compared");
    $display("sec_carry=%0d min_carry=%0d hour_carry=%0d hour_wrap=%0d load=%0d clear=%0d scans=%0d",
             n_sec_carry, n_min_carry, n_hour_carry, n_hour_wrap, n_load, n_clear, n_scan);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
