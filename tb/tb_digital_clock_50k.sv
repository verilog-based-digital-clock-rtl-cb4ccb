// tb_digital_clock_50k: the clock run from a 50 kHz clock, the rate used to
// simulate the original design, through its two demonstration cases.
//
// CLK_HZ = 50,000, so one second is 50,000 clk cycles and one scan step
// 5,000. Case 1 (manual setting): with LOAD high, hour 5'h0b, minutes-units
// 4'h7 and seconds-units 4'h2 (tens 0) are loaded; the counters must read
// 11:07:02 and the scanned display must show it, digit by digit. Case 2
// (clock function): the time is set to 13:59:58; two seconds later the
// minutes have rolled from 59 to 00 and the hour from 13 to 14 on the same
// 1 Hz edge. The testbench checks counters and display against values
// worked out here, and that the 1 Hz edges fall on a grid of CLK_HZ cycles.
module tb_digital_clock_50k;
  import clock_pkg::*;

  localparam int unsigned CLK_HZ = 50_000;

  logic   clk = 1'b0, RST = 1'b1, LOAD = 1'b0;
  hour_t  H = '0;
  digit_t MH = '0, ML = '0, SH = '0, SL = '0;
  seg_t   seg;
  sel_t   sel;

  int checks = 0, failures = 0;
  int unsigned cyc = 0, t_tick = 0;
  int unsigned disp [6];

  digital_clock #(.CLK_HZ(CLK_HZ)) dut (.*);

  always #10 clk = ~clk;
  always @(posedge clk) cyc++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at cycle %0d", what, cyc);
    end
  endtask

  function automatic int unsigned seg_to_digit(logic [7:0] code);
    case (code)
      8'hC0: return 0;  8'hF9: return 1;  8'hA4: return 2;  8'hB0: return 3;
      8'h99: return 4;  8'h92: return 5;  8'h82: return 6;  8'hF8: return 7;
      8'h80: return 8;  8'h90: return 9;
      default: return 15;
    endcase
  endfunction

  // Wait for a 1 Hz edge and check that it lies a whole number of periods
  // after the previous one seen (display reads may skip an edge).
  task automatic tick();
    @(posedge dut.clk_1s);
    if (t_tick != 0) check((cyc - t_tick) % CLK_HZ == 0, "1 Hz edges on a CLK_HZ-cycle grid");
    t_tick = cyc;
    #1;
  endtask

  task automatic expect_time(int unsigned h, int unsigned m, int unsigned s,
                             input string what);
    check(dut.q_h == hour_t'(h) && dut.q_mh == digit_t'(m / 10) &&
          dut.q_ml == digit_t'(m % 10) && dut.q_sh == digit_t'(s / 10) &&
          dut.q_sl == digit_t'(s % 10), {what, ": counters"});
    for (int i = 0; i < 6; i++) begin
      @(posedge dut.clk_10hz);
      #1 disp[sel] = seg_to_digit(seg);
    end
    check(disp[5] == h / 10 && disp[4] == h % 10 && disp[3] == m / 10 &&
          disp[2] == m % 10 && disp[1] == s / 10 && disp[0] == s % 10,
          {what, ": display"});
    $display("%s: display %0d%0d:%0d%0d:%0d%0d", what, disp[5], disp[4],
             disp[3], disp[2], disp[1], disp[0]);
  endtask

  initial begin : watchdog
    #1s;   // 50,000,000 clk cycles
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 RST = 1'b0;
    repeat (5) @(negedge clk);
    RST = 1'b1;
    tick();
    expect_time(0, 0, 0, "after reset");
    // Case 1: manual setting.
    @(negedge dut.clk_1s);
    H = 5'h0b; MH = 4'h0; ML = 4'h7; SH = 4'h0; SL = 4'h2;
    LOAD = 1'b1;
    tick();
    expect_time(11, 7, 2, "manual setting");
    @(negedge dut.clk_1s);
    LOAD = 1'b0;
    tick();
    expect_time(11, 7, 3, "runs on after setting");
    // Case 2: 13:59 -> 14:00.
    @(negedge dut.clk_1s);
    H = 5'd13; MH = 4'd5; ML = 4'd9; SH = 4'd5; SL = 4'd8;
    LOAD = 1'b1;
    tick();
    expect_time(13, 59, 58, "set 13:59:58");
    @(negedge dut.clk_1s);
    LOAD = 1'b0;
    tick();
    expect_time(13, 59, 59, "13:59:59");
    tick();
    expect_time(14, 0, 0, "hour and minute roll-over");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
