# Digital clock: HH:MM:SS on a multiplexed seven-segment display

A 24-hour clock for an FPGA board. It divides a 50 MHz board clock down to
1 Hz, counts seconds, minutes and hours in five cascaded counters, and shows
the time on six seven-segment digits that share one segment bus and are lit
one after another. Five switch inputs and a LOAD button set the time by hand.

```
            +------+ clk_1s   SL   SH   ML   MH     H        (load values)
  clk ----->| fpin |------+----|----|----|----|-----|------
  RST --+-->|      |      |  +----+ +----+ +----+ +----+ +-----+
        |   +------+      +->|mod | |mod | |mod | |mod | |mod  |
        |      | clk_10hz    | 10 |>| 6  |>| 10 |>| 6  |>| 24  |
        |      |             +----+ +----+ +----+ +----+ +-----+
        |      |       cout -> cnt_en chain   |   |   |    | q (binary)
        |      v                              v   v   v    v
        +-> seg_decoder  <-- led0..led3 (BCD digits) + counter24
                 |
                 +--> seg[7:0], sel[2:0]
```

## Files

| file | what it is |
|---|---|
| `rtl/clock_pkg.sv` | shared widths, types and the seven-segment code table |
| `rtl/fpin.sv` | frequency divider: `clk` -> `clk_1s` (1 Hz) and `clk_10hz` (scan) |
| `rtl/counter10.sv` | modulo-10 counter (units of seconds, units of minutes) |
| `rtl/counter6.sv` | modulo-6 counter (tens of seconds, tens of minutes) |
| `rtl/counter24.sv` | modulo-24 binary hour counter |
| `rtl/seg_decoder.sv` | six-digit scanning seven-segment decoder |
| `rtl/digital_clock.sv` | top level |
| `tb/tb_*.sv` | one self-checking testbench per module, plus two more for the top |

## Top-level interface (`digital_clock`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | board clock, `CLK_HZ` (default 50 MHz) |
| `RST` | in | 1 | reset, **active low** |
| `LOAD` | in | 1 | while high, each 1 Hz edge loads the time inputs |
| `H` | in | 5 | hour to load, **binary** 0..23 |
| `MH`, `ML` | in | 4 each | tens and units of the minutes to load (BCD) |
| `SH`, `SL` | in | 4 each | tens and units of the seconds to load (BCD) |
| `seg` | out | 8 | segment code of the digit being shown |
| `sel` | out | 3 | index 0..5 of the digit being shown |

Parameters: `CLK_HZ` (default 50,000,000) and `SCAN_HZ` (default 10).
`CLK_HZ` must be a multiple of `2*SCAN_HZ`; elaboration stops otherwise.

## Timing: everything happens on the 1 Hz edge

All five counters are clocked by `clk_1s`, so **loading, clearing and
counting take effect only at a rising edge of `clk_1s`**. To set the time,
hold `LOAD` high across at least one 1 Hz edge (up to one second). The clock
runs on from the loaded value at the first edge after `LOAD` goes low.

`fpin` makes both slow clocks from counters that toggle a flip-flop every half
period. They are 50 % duty square waves that change just after a rising
`clk` edge:

* `clk_1s`: period `CLK_HZ` cycles. The first rising edge comes
  `CLK_HZ/2` cycles after `RST` is released.
* `clk_10hz`: period `CLK_HZ/SCAN_HZ` cycles.

With the defaults, a rising edge of `clk_1s` never falls on the same `clk`
edge as a rising edge of `clk_10hz`. So the display never samples the
counters while they are changing.

## The counter chain

The counters follow the usual digit order: seconds units (mod 10) -> seconds
tens (mod 6) -> minutes units (mod 10) -> minutes tens (mod 6) -> hours
(mod 24). Each counter has a count enable `cnt_en` and a combinational carry
`cout = cnt_en && q == last`. The `cout` of one counter is the `cnt_en` of the
next, and the seconds-units counter is always enabled. The carry ripples
combinationally through the enables, but all counters share one clock. So a
roll-over such as 13:59:59 -> 14:00:00 changes every digit on the same edge.

Each counter has the ports of a library counter: `clock`, `data`, `sclr`
(synchronous clear), `sload` (synchronous load) and `q`. Clear beats load,
and load beats counting. A loaded value beyond the modulus (for example 7 in a
tens digit, or 12 in a units digit) is held until the next count, where it
wraps to 0 and carries. While held, a value above 9 shows as a blank digit.
The hour counter has no carry output. Its `q` is a plain 5-bit binary
number, which the display decoder splits into two decimal digits.

### Reset

`RST` resets the divider and the display scan at once (asynchronous). The
counters only have a synchronous clear, and the divider holds `clk_1s` low
during reset, so a clear tied straight to `RST` would never be clocked in.
The top therefore has a one-bit flag, `clr_pend`. `RST` sets it
asynchronously, and the first `clk_1s` edge after release clears it. The flag
drives every counter's `sclr`, so that first edge, half a second after
release, sets the time to 00:00:00. Until then the display shows whatever the
counters held. At that edge the clear wins over `LOAD`.

## Display scan and segment code

`seg_decoder` drives one digit at a time. At every rising edge of `clk_10hz`
it steps `sel` to the next digit. On the same edge it registers that digit's
segment code on `seg`, so `sel` and `seg` always change together:

| `sel` | digit |
|---|---|
| 0 | seconds units (`led0`) |
| 1 | seconds tens (`led1`) |
| 2 | minutes units (`led2`) |
| 3 | minutes tens (`led3`) |
| 4 | hour units |
| 5 | hour tens |

`sel` is a binary index. A board with one enable line per digit needs a
3-to-8 decoder (and any digit-driver inversion) outside this design.

`seg` is active low (a 0 lights the segment), with `seg[7]` the decimal
point, `seg[6]` = g ... `seg[0]` = a. The decimal point is never lit. Zero is
`8'hC0`, and a value above 9 blanks the digit (`8'hFF`). The full table is in
`clock_pkg::seg_encode`. In reset, `sel` = 0 and `seg` = `8'hC0`.

**Scan rate.** At the default `SCAN_HZ` = 10, each digit is refreshed only
1.7 times a second, so a real display visibly blinks digit by digit. A scan
of several hundred hertz looks steady. To get one, set `SCAN_HZ` to, say,
1000 (any value with `CLK_HZ % (2*SCAN_HZ) == 0`). Nothing else changes.

## Where this design makes its own choices

The block set, the port names and widths, the 1 Hz and 10 Hz rates, the
50 MHz input, the active-low reset, the moduli and the order of the chain
come from the original design. These are this implementation's own:

* **Carry chaining by count enable** on one shared 1 Hz clock. The original
  library counter has no enable port, and the original description does not say
  how the carries reach the next counter.
* **The `clr_pend` flag** that lets the synchronous clear work after reset.
* **`sel` as a binary index**, the **order of the two hour digits**, the
  **registered** `seg`/`sel` pair, the **active-low segment polarity and bit
  order**, and **blanking** of values above 9. The polarity fits the code
  `8'hC0` that the original shows for a zero digit.
* **Reset style**: asynchronous in the divider and the decoder, synchronous
  in the counters (as their `sclr` name says).
* **Divider method**: a toggle flip-flop per output with a 50 % duty cycle.
* The original tens-of-seconds and tens-of-minutes counters are
  sometimes described as "hexadecimal". They are built as modulo-6 counters,
  which is what their name `counter_6` and their job need.

The original also names a second set of demonstration signals (8-bit BCD
hour/minute values, an enable and a pulse output) that its block diagram
does not contain. Those are not built. Only the behaviour they show, the
13:59 -> 14:00 roll-over, is used as a test case.

The generated clocks `clk_1s` and `clk_10hz` come from flip-flops, as in the
original. That is fine in simulation and on a small FPGA design. In a
production build you would put them on global clock buffers, or turn them
into one-cycle enables on `clk`.

## Verification

Every testbench is self-checking. It ends by printing
`TB_RESULT checks=N failures=M`, and a watchdog stops it if it hangs.

| testbench | what it checks |
|---|---|
| `tb_fpin` | both output levels on every cycle against a cycle count (`CLK_HZ`=40), async reset mid-period |
| `tb_counter10`, `tb_counter6`, `tb_counter24` | 2,000+ random cycles of clear/load/enable/data against a reference model; `q` and `cout` each cycle; wrap, clear > load > count priority, out-of-range loads |
| `tb_seg_decoder` | `sel` sequence and `seg` code against its own table for 600 scan steps; outputs hold between edges; blanking; async reset |
| `tb_digital_clock` | end to end at `CLK_HZ`=40: a free-running minute, 13:59:55 -> 14:00, 23:59:58 -> 00:00, a held LOAD of 11:07:02, reset during LOAD. The display is rebuilt from `seg`/`sel` after every second and compared with a reference clock. Each carry, the hour wrap, load and clear must each occur |
| `tb_digital_clock_50k` | the top run from a 50 kHz clock: manual setting to 11:07:02 (hour loaded as `5'h0b`), then 13:59:58 -> 14:00:00, on counters and display |
| `tb_digital_clock_full` | default parameters (50 MHz): reset, clear at the first 1 Hz edge, load 13:59:59, roll-over to 14:00:00, read off the display; 1 Hz and scan periods counted in cycles (about 160 M cycles, about 1 minute of simulation) |

Run one with Verilator 5, from the directory holding `rtl/` and `tb/`:

```
verilator --binary --timing --assert --timescale 1ns/1ps -y rtl \
    rtl/clock_pkg.sv tb/tb_digital_clock.sv --top-module tb_digital_clock
./obj_dir/Vtb_digital_clock
```

Verilator has only two logic states. The testbenches therefore assert reset
before relying on any state, and the design works from any power-up value of
its flip-flops.

## Size

After generic synthesis the whole clock is 82 flip-flops. Most are the two
divider counters: 25 bits for the 1 Hz half period and 22 bits for the
10 Hz one. The counters add 21 bits and the decoder 11. The segment table
maps to a small ROM.
