// tb_seg_decoder: self-checking testbench of the scanning display decoder.
//
// Drives clk_10hz directly and changes the five inputs at random between
// scan edges. After every edge it checks that sel stepped 0,1,2,3,4,5,0,...
// and that seg holds the active-low code, taken from the testbench's own
// table, of the digit sel now points at, as it was at the edge (hour digits
// are split from the binary hour by the testbench). It also checks the
// asynchronous reset values, that seg does not follow an input change
// between edges, and that each of the six positions and a blanked
// out-of-range digit were seen. A watchdog ends the run.
module tb_seg_decoder;
  import clock_pkg::*;

  logic   clk_10hz = 1'b0, rst = 1'b1;
  hour_t  counter24;
  digit_t led0, led1, led2, led3;
  seg_t   seg;
  sel_t   sel;
  int checks = 0, failures = 0;
  int seen_sel [6];
  int n_blank = 0;

  seg_decoder dut (.*);

  // Reference segment table: index = digit, active low, dp off.
  localparam logic [7:0] REF_SEG [10] = '{
    8'hC0, 8'hF9, 8'hA4, 8'hB0, 8'h99, 8'h92, 8'h82, 8'hF8, 8'h80, 8'h90
  };

  function automatic logic [7:0] ref_code(int unsigned d);
    return (d < 10) ? REF_SEG[d] : 8'hFF;
  endfunction

  function automatic int unsigned ref_digit(int unsigned pos);
    case (pos)
      0: return led0;
      1: return led1;
      2: return led2;
      3: return led3;
      4: return counter24 % 10;
      default: return counter24 / 10;
    endcase
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t: sel=%0d seg=%h", what, $time, sel, seg);
    end
  endtask

  task automatic randomize_inputs(input bit in_range);
    counter24 = hour_t'(in_range ? $urandom % 24 : $urandom);
    led0 = digit_t'(in_range ? $urandom % 10 : $urandom);
    led1 = digit_t'(in_range ? $urandom % 6  : $urandom);
    led2 = digit_t'(in_range ? $urandom % 10 : $urandom);
    led3 = digit_t'(in_range ? $urandom % 6  : $urandom);
  endtask

  int unsigned exp_sel;
  logic [7:0]  exp_seg, held_seg;

  initial begin : watchdog
    #200000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    randomize_inputs(1'b1);
    #1 rst = 1'b0;   // asynchronous reset from power-up
    #2;
    check(sel == 3'd0 && seg == 8'hC0, "reset values");
    clk_10hz = 1'b1; #5 clk_10hz = 1'b0; #5;
    check(sel == 3'd0 && seg == 8'hC0, "held in reset while clocked");
    rst = 1'b1;
    exp_sel = 0;
    for (int i = 0; i < 600; i++) begin
      randomize_inputs(i % 5 != 4);
      #2;
      exp_sel = (exp_sel + 1) % 6;
      exp_seg = ref_code(ref_digit(exp_sel));
      clk_10hz = 1'b1;
      #1;
      check(sel == sel_t'(exp_sel), "sel steps");
      check(seg == exp_seg, "seg code");
      seen_sel[exp_sel]++;
      if (exp_seg == 8'hFF) n_blank++;
      // inputs change between edges: output must hold
      held_seg = seg;
      randomize_inputs(1'b1);
      #2 check(seg == held_seg, "seg holds between edges");
      #2 clk_10hz = 1'b0;
      #3;
    end
    // asynchronous reset in mid-scan
    rst = 1'b0;
    #1 check(sel == 3'd0 && seg == 8'hC0, "async reset");
    foreach (seen_sel[p]) check(seen_sel[p] > 0, "every digit position scanned");
    check(n_blank > 0, "out-of-range digit blanked");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
