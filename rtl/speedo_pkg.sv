// speedo_pkg: types and constants shared by the speedometer modules.
//
// The speedometer measures wheel speed by counting Hall-sensor pulses over a
// fixed 0.5 s window clocked from a 50 MHz board clock, converts the count to
// km/h, shows it on three active-low seven-segment digits and lights a red LED
// above 110 km/h. The 50 MHz clock, the 0.5 s refresh, the 0..255 km/h range,
// the 110 km/h limit and the segment code are the design's published values;
// the wheel circumference is this design's own calibration (see speed_calc).
package speedo_pkg;

  // Board clock and measurement window (0.5 s at 50 MHz).
  localparam int unsigned CLK_HZ_DEFAULT        = 50_000_000;
  localparam int unsigned WINDOW_CYCLES_DEFAULT = 25_000_000;

  // Wheel circumference in micrometres. Chosen so that 150 pulses per 0.5 s
  // read 86 km/h and 200 pulses read 115 km/h (V = 0.575 km/h per pulse).
  localparam int unsigned CIRC_UM_DEFAULT = 79_861;

  // Over-speed threshold in km/h; the LED lights when the speed exceeds it.
  localparam int unsigned SPEED_LIMIT_KMH_DEFAULT = 110;

  // Width of the displayed speed: 0..255 km/h.
  localparam int unsigned SPEED_W = 8;

  // Width of the per-window pulse counter.
  localparam int unsigned PULSE_CNT_W = 16;

  typedef logic [SPEED_W-1:0] speed_t;

  // Three BCD digits of a speed value.
  typedef struct packed {
    logic [3:0] hundreds;
    logic [3:0] tens;
    logic [3:0] ones;
  } bcd3_t;

  // Active-low segment pattern, bit order {G,F,E,D,C,B,A}.
  typedef logic [6:0] seg7_t;
  localparam seg7_t SEG_BLANK = 7'b111_1111;

endpackage
