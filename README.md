# Hall-sensor digital speedometer with over-speed warning

A toothed disc on the wheel passes a Hall-effect sensor, which turns wheel
rotation into a square wave whose frequency is proportional to speed. This
design counts the sensor's pulses over a fixed gate time of 0.5 s, converts
the count to km/h, shows the result (0 to 255 km/h) on three seven-segment
digits and lights a red LED whenever the speed is above 110 km/h. The reading
is refreshed every 0.5 s. It targets a 50 MHz FPGA board clock and a board with
active-low seven-segment displays (Cyclone IV E / DE2-115 class), but the RTL is
plain, vendor-neutral SystemVerilog.

## Measuring principle: a gated pulse count

Speed is measured the way a frequency counter measures frequency: by counting
events over a known time. Two counters do the work.

* The **clock counter** (`clock_divider`) counts board clock cycles from 0 to
  `WINDOW_CYCLES-1` = 24,999,999 and so cuts time into 0.5 s windows. On the
  last cycle of each window it raises `window_end` for one cycle. It also
  toggles `clock_out`, a divided clock that is high for one window and low for
  the next (1 s period); this pin is only an indicator, nothing is clocked
  from it.
* The **pulse counter** (`pulse_counter`) synchronises the asynchronous sensor
  signal with two flip-flops, detects rising edges with a third, and counts
  them. When `window_end` is high it hands the window's total N to the next
  stage and restarts from zero in the same cycle, so a pulse is never lost or
  counted twice at a window boundary. The counter is 16 bits wide and
  saturates.

Only rising edges are counted: one sensor period is one pulse.

## From pulses to km/h

For a wheel of circumference C metres that gives one pulse per
circumference-worth of travel, N pulses in T seconds is a speed of

    V = C * N / T * 3.6   km/h

`speed_calc` evaluates this with integers. With C in micrometres
(`CIRC_UM`) and T = `WINDOW_CYCLES` / `CLK_HZ`,

    V = N * (CIRC_UM * 36 * CLK_HZ) / (10^7 * WINDOW_CYCLES)

Both constants are computed at elaboration and divided by their greatest
common divisor; for the defaults the ratio is 718,749 / 1,250,000. The
hardware is therefore one multiply and one divide by constants, with half the
divisor added first so the result is rounded to the nearest km/h, then a clamp
so anything above 255 reads 255.

**Calibration.** The wheel circumference is not a fixed property of the
design; the default, `CIRC_UM = 79861` (0.079861 m), sets the scale to
0.575 km/h per pulse in a 0.5 s window. That value was chosen so that the two
reference operating points of the design come out exactly:

| pulses in 0.5 s | exact V    | reading | red LED |
|-----------------|------------|---------|---------|
| 150             | 86.25 km/h | 086     | off     |
| 200             | 115.0 km/h | 115     | on      |

For a real vehicle, set `CIRC_UM` to the wheel circumference divided by the
number of pulses per revolution. Changing `CLK_HZ` and `WINDOW_CYCLES`
together keeps the conversion right, since only their ratio (the window length
in seconds) enters the formula; the testbenches rely on this to simulate a
0.5 s window at a 4 kHz clock.

Resolution follows from the gate time: one pulse is 0.575 km/h, and a full
255 km/h needs about 444 pulses per window, far below the counter's 65,535.

## Display and warning

The 8-bit speed is split into hundreds, tens and ones by `bin2bcd`, a
combinational shift-and-add-3 ("double dabble") array of seven `add3` cells,
m1 to m7. Each cell adds 3 to a 4-bit value of 5 or more, which makes the
following one-bit left shift carry correctly between decimal digits. Cells
m1 to m5 form a chain that builds the ones and tens digits as the binary bits
enter from the top; m6 and m7 correct the bits that leave that chain and form
the hundreds and the upper tens bits. The exact wiring is listed in the
header of `rtl/bin2bcd.sv`.

Each digit goes through `seg7_decoder`, which outputs `{G,F,E,D,C,B,A}` with
a 0 lighting a segment:

| digit | 0  | 1  | 2  | 3  | 4  | 5  | 6  | 7  | 8  | 9  |
|-------|----|----|----|----|----|----|----|----|----|----|
| hex   | 40 | 79 | 24 | 30 | 19 | 12 | 02 | 78 | 00 | 10 |

HEX2 shows hundreds, HEX1 tens, HEX0 ones; leading zeros are shown (86 reads
"086"). Codes 10 to 15 cannot occur and would blank the digit.

`speed_limit_compare` drives `red_led` high while the speed is strictly
greater than `SPEED_LIMIT_KMH` (110): 110 km/h leaves the LED off, 111 turns
it on. The limit is a parameter, so other regional limits need only a
different value.

## Timing

Everything runs in the single `CLOCK_50` domain. Number the clock edges after
reset release 1, 2, 3, ...; window k (k = 1, 2, ...) ends at edge k x
`WINDOW_CYCLES`.

| edge        | event                                                   |
|-------------|---------------------------------------------------------|
| kW          | `window_end` sampled: N latched, pulse counter cleared, `clock_out` toggles |
| kW + 1      | speed register loaded; digits and LED change            |

The display therefore changes one clock cycle (20 ns) after the edge that
closes its window and holds steady for the whole next window. A sensor edge is counted 2 to 3
cycles after it arrives (synchroniser). Before the first window ends the
display reads 000 with the LED off. `rst_n` is an asynchronous active-low
reset that clears every register.

## Top-level interface (`speedometer`)

| port                 | dir | width | meaning                                   |
|----------------------|-----|-------|-------------------------------------------|
| `CLOCK_50`           | in  | 1     | 50 MHz board clock                        |
| `rst_n`              | in  | 1     | asynchronous reset, active low            |
| `hall_effect_sensor` | in  | 1     | sensor square wave, asynchronous          |
| `HEX0`,`HEX1`,`HEX2` | out | 7 each| ones, tens, hundreds; active low {G..A}   |
| `red_led`            | out | 1     | speed above the limit                     |
| `clock_out`          | out | 1     | divided clock, toggles every window       |
| `speed_kmh`          | out | 8     | binary reading (for LEDs or a host)       |

| parameter         | default    | meaning                                  |
|-------------------|------------|------------------------------------------|
| `CLK_HZ`          | 50,000,000 | clock frequency                          |
| `WINDOW_CYCLES`   | 25,000,000 | gate time in cycles (0.5 s)              |
| `CIRC_UM`         | 79,861     | travel per pulse in micrometres          |
| `SPEED_LIMIT_KMH` | 110        | warning threshold                        |

## Files

| file                          | content                                        |
|-------------------------------|------------------------------------------------|
| `rtl/speedo_pkg.sv`           | shared constants and types (`speed_t`, `bcd3_t`, `seg7_t`) |
| `rtl/speedometer.sv`          | top level                                      |
| `rtl/clock_divider.sv`        | window timer and `clock_out`                   |
| `rtl/pulse_counter.sv`        | synchroniser, edge detector, gated counter     |
| `rtl/speed_calc.sv`           | count to km/h, rounding, clamp                 |
| `rtl/speed_limit_compare.sv`  | over-speed comparator                          |
| `rtl/bin2bcd.sv`, `rtl/add3.sv` | binary to BCD                                |
| `rtl/seg7_decoder.sv`         | digit to segment code                          |
| `tb/tb_<module>.sv`           | self-checking testbench for each module        |
| `tb/tb_speedometer_full.sv`   | whole design at 50 MHz / 0.5 s, no overrides   |
| `tb/speedo_tb_pkg.sv`         | reference model shared by the testbenches      |

## Verification

Every testbench compares against values computed independently of the RTL
(floating-point speed formula, integer division for BCD, the segment table
written out segment by segment), has a watchdog, and ends with a line
`TB_RESULT checks=N failures=M`.

* `tb_add3`, `tb_bin2bcd`, `tb_seg7_decoder`, `tb_speed_limit_compare`:
  exhaustive over their inputs.
* `tb_speed_calc`: counts 0 to 1,200 and 65,535 at the default clock and at a
  1 kHz clock with the same 0.5 s window, plus the one-cycle latency and
  hold behaviour.
* `tb_clock_divider`: strobe position, width and `clock_out` phase for 7- and
  10-cycle windows.
* `tb_pulse_counter`: 200 windows of random square waves with pulses down to
  one cycle wide, including edges right at the window boundary; a 4-bit
  instance checks saturation.
* `tb_speedometer`: end to end at a 4 kHz clock with 2,000-cycle (0.5 s)
  windows through twelve windows. It checks the exact update cycle and counts
  each behaviour, failing if one never occurs: refresh, LED on, LED off,
  reading exactly at the limit, zero reading, three-digit reading and clamping
  above 255.
* `tb_speedometer_full`: default parameters, 75 million cycles (about a
  minute in Verilator): 150, 200 and 150 pulses read 086 / 115 / 086 with the
  exact segment codes and the LED off / on / off.

To run one with Verilator (from the directory holding `rtl/` and `tb/`):

    verilator --binary --timing --assert -y rtl -y tb \
        rtl/speedo_pkg.sv tb/speedo_tb_pkg.sv tb/tb_speedometer.sv \
        --top-module tb_speedometer -o sim
    ./obj_dir/sim

Replace `tb_speedometer` by any other testbench name; `-y` lets Verilator
find the modules by file name. The packages are listed first because they
are not found that way.

Synthesised with Yosys, the whole design is about 70 flip-flops; the
three segment decoders map to small ROMs (336 bits in total) or equivalent
LUT logic. The original FPGA implementation reported 204 logic elements and
61 registers on a Cyclone IV E, the same order of size; this version adds an
input synchroniser and a separate speed register.

## What follows the original design and what does not

Taken from the original description: the two-counter gated measurement, the
50 MHz clock and 0.5 s refresh, the speed equation, the 0 to 255 km/h range,
the 110 km/h warning, the seven add3 cells of the binary-to-BCD converter,
the segment code and the port names `CLOCK_50`, `hall_effect_sensor`,
`HEX0` to `HEX2`, `red_led` and `clock_out`.

Choices of this implementation, where the description gives no detail:

* the wheel circumference (calibrated from the two reference points above);
* rounding to nearest, and clamping above 255 km/h;
* counting rising edges, with a two-flip-flop synchroniser and no debouncing;
* a single clock domain, with `window_end` as a clock enable rather than a
  second, divided clock;
* the asynchronous active-low reset and the extra `speed_kmh` output;
* a combinational BCD converter; the original cells are said to contain
  registers, which a value that changes every 0.5 s does not need;
* strict "greater than" for the warning, and leading zeros shown.

The sensor, the displays and the LED themselves are board hardware and are
not modelled; the testbenches drive the sensor input directly with square
waves.
