// speedometer: Hall-sensor digital speedometer with over-speed warning.
//
// A wheel-mounted Hall sensor delivers a square wave whose frequency rises
// with wheel speed. The design counts its pulses over a fixed window of
// WINDOW_CYCLES board clocks (0.5 s at 50 MHz), converts the count to km/h
// with V = C * N / T * 3.6, and shows the result, 0..255 km/h, on three
// active-low seven-segment digits: HEX2 hundreds, HEX1 tens, HEX0 ones
// (leading zeros are shown). red_led lights while the speed is above
// SPEED_LIMIT_KMH (110). The reading is refreshed once per window.
//
// Data path: clock_divider (window strobe, clock_out) -> pulse_counter (N)
// -> speed_calc (km/h register) -> bin2bcd (seven add3 cells) ->
// three seg7_decoder; speed_limit_compare drives red_led from the same
// speed register.
//
// Timing: window_end is high during the last cycle of a window. The clock
// edge that ends that cycle closes the window and latches the pulse count;
// the speed, digits and LED change at the next edge, one cycle later.
// Before the first window ends the display reads 000 with the LED off.
//
// Published: the 50 MHz clock, 0.5 s window, the speed equation, 0..255 range, 110 km/h
// limit, the add3-based conversion and the segment code. This design's own
// choices: the wheel circumference calibration, the async active-low reset
// rst_n, the input synchroniser, rising-edge counting, rounding and clamping,
// and the extra speed_kmh output (the binary reading).
module speedometer #(
  parameter int unsigned CLK_HZ          = speedo_pkg::CLK_HZ_DEFAULT,
  parameter int unsigned WINDOW_CYCLES   = speedo_pkg::WINDOW_CYCLES_DEFAULT,
  parameter int unsigned CIRC_UM         = speedo_pkg::CIRC_UM_DEFAULT,
  parameter int unsigned SPEED_LIMIT_KMH = speedo_pkg::SPEED_LIMIT_KMH_DEFAULT
) (
  input  logic               CLOCK_50,
  input  logic               rst_n,
  input  logic               hall_effect_sensor,
  output speedo_pkg::seg7_t  HEX0,
  output speedo_pkg::seg7_t  HEX1,
  output speedo_pkg::seg7_t  HEX2,
  output logic               red_led,
  output logic               clock_out,
  output speedo_pkg::speed_t speed_kmh
);
  import speedo_pkg::*;

  logic                   window_end;
  logic [PULSE_CNT_W-1:0] pulse_count;
  logic                   count_valid;
  logic                   speed_valid;
  bcd3_t                  digits;

  clock_divider #(
    .WINDOW_CYCLES(WINDOW_CYCLES)
  ) u_clock_divider (
    .clk       (CLOCK_50),
    .rst_n     (rst_n),
    .window_end(window_end),
    .clock_out (clock_out)
  );

  pulse_counter #(
    .CNT_W(PULSE_CNT_W)
  ) u_pulse_counter (
    .clk        (CLOCK_50),
    .rst_n      (rst_n),
    .hall_in    (hall_effect_sensor),
    .window_end (window_end),
    .count_out  (pulse_count),
    .count_valid(count_valid)
  );

  speed_calc #(
    .CLK_HZ       (CLK_HZ),
    .WINDOW_CYCLES(WINDOW_CYCLES),
    .CIRC_UM      (CIRC_UM),
    .CNT_W        (PULSE_CNT_W)
  ) u_speed_calc (
    .clk        (CLOCK_50),
    .rst_n      (rst_n),
    .count      (pulse_count),
    .count_valid(count_valid),
    .speed      (speed_kmh),
    .speed_valid(speed_valid)
  );

  speed_limit_compare #(
    .LIMIT_KMH(SPEED_LIMIT_KMH)
  ) u_speed_limit_compare (
    .speed  (speed_kmh),
    .red_led(red_led)
  );

  bin2bcd u_bin2bcd (
    .bin(speed_kmh),
    .bcd(digits)
  );

  seg7_decoder u_hex0 (.digit(digits.ones),     .seg(HEX0));
  seg7_decoder u_hex1 (.digit(digits.tens),     .seg(HEX1));
  seg7_decoder u_hex2 (.digit(digits.hundreds), .seg(HEX2));

  // A new speed is produced exactly once per window.
  property p_one_result_per_window;
    @(posedge CLOCK_50) disable iff (!rst_n) count_valid |=> speed_valid;
  endproperty
  assert property (p_one_result_per_window);

endmodule
