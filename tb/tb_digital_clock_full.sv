// tb_digital_clock_full: the clock at its default parameters (50 MHz board
// clock, 1 Hz count, 10 Hz scan) through one complete operation.
//
// After a power-up reset it checks that the first 1 Hz edge, 25,000,000
// clk cycles after release, clears the time to 00:00:00; then it sets the
// time to 13:59:59 with LOAD, lets one second pass and checks the roll-over
// to 14:00:00 in the counters and, digit by digit, on the scanned display
// (six scan steps of 5,000,000 cycles each). It also checks the 1 Hz period
// (50,000,000 cycles) and the scan period (5,000,000 cycles) by counting clk
// edges. About 160 million clk cycles are simulated.
module tb_digital_clock_full;
  import clock_pkg::*;

  localparam int unsigned CLK_HZ = 50_000_000;

  logic   clk = 1'b0, RST = 1'b1, LOAD = 1'b0;
  hour_t  H = '0;
  digit_t MH = '0, ML = '0, SH = '0, SL = '0;
  seg_t   seg;
  sel_t   sel;

  int checks = 0, failures = 0;
  int unsigned cyc = 0;

  digital_clock dut (.*);

  always #10 clk = ~clk;   // 50 MHz
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

  int unsigned t_tick, t_scan, release_cyc;
  int unsigned disp [6];

  initial begin : watchdog
    #4s;   // 200,000,000 clk cycles
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 RST = 1'b0;
    repeat (5) @(negedge clk);
    RST = 1'b1;
    release_cyc = cyc;
    // First 1 Hz edge: half a second after release, clears the counters.
    @(posedge dut.clk_1s);
    t_tick = cyc;
    check(t_tick - release_cyc == CLK_HZ / 2, "first 1 Hz edge after CLK_HZ/2 cycles");
    #1 check(dut.q_h == 0 && dut.q_mh == 0 && dut.q_ml == 0 &&
             dut.q_sh == 0 && dut.q_sl == 0, "cleared to 00:00:00");
    // Set 13:59:59.
    @(negedge dut.clk_1s);
    H = 5'd13; MH = 4'd5; ML = 4'd9; SH = 4'd5; SL = 4'd9;
    LOAD = 1'b1;
    @(posedge dut.clk_1s);
    check(cyc - t_tick == CLK_HZ, "1 Hz period");
    t_tick = cyc;
    #1 check(dut.q_h == 13 && dut.q_mh == 5 && dut.q_ml == 9 &&
             dut.q_sh == 5 && dut.q_sl == 9, "loaded 13:59:59");
    @(negedge dut.clk_1s);
    LOAD = 1'b0;
    // One second later: 14:00:00.
    @(posedge dut.clk_1s);
    check(cyc - t_tick == CLK_HZ, "1 Hz period");
    #1 check(dut.q_h == 14 && dut.q_mh == 0 && dut.q_ml == 0 &&
             dut.q_sh == 0 && dut.q_sl == 0, "rolled over to 14:00:00");
    // Read the six digits off the scanned display.
    @(posedge dut.clk_10hz);
    t_scan = cyc;
    #1 disp[sel] = seg_to_digit(seg);
    for (int i = 0; i < 5; i++) begin
      @(posedge dut.clk_10hz);
      check(cyc - t_scan == CLK_HZ / 10, "scan period");
      t_scan = cyc;
      #1 disp[sel] = seg_to_digit(seg);
    end
    check(disp[5] == 1 && disp[4] == 4 && disp[3] == 0 && disp[2] == 0 &&
          disp[1] == 0 && disp[0] == 0, "display shows 14:00:00");
    $display("display %0d%0d:%0d%0d:%0d%0d", disp[5], disp[4], disp[3], disp[2],
             disp[1], disp[0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
