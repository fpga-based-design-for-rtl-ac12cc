// tb_speedometer: end-to-end test of the speedometer at a reduced clock.
//
// The design runs at CLK_HZ = 4000 with a 2000-cycle window, which is still a
// 0.5 s window, so the km/h conversion is the same as on the 50 MHz board.
// For each window the testbench emits a chosen number of sensor pulses, then
// checks, just after the clock edge that closes the window, that the old
// reading is still shown and, after the next edge, that speed_kmh, all three
// digit codes and red_led show the new reading computed by the reference
// model. It also checks that clock_out toggles once per window.
// Mechanisms counted (each must occur): display refresh, LED turning on,
// LED turning off, reading at exactly the limit with the LED off, zero
// reading, a three-digit reading, and clamping of an out-of-range count.
module tb_speedometer;
  import speedo_tb_pkg::*;
  localparam int CLK = 4000;
  localparam int W   = 2000;

  logic       clk = 0, rst_n = 0, hall = 0;
  logic [6:0] hex0, hex1, hex2;
  logic       red_led, clock_out;
  logic [7:0] speed_kmh;
  int checks = 0, failures = 0;
  int n_refresh = 0, n_led_on = 0, n_led_off = 0, n_at_limit = 0;
  int n_zero = 0, n_three_digit = 0, n_clamp = 0;

  always #5 clk = ~clk;

  speedometer #(.CLK_HZ(CLK), .WINDOW_CYCLES(W)) dut (
    .CLOCK_50(clk), .rst_n(rst_n), .hall_effect_sensor(hall),
    .HEX0(hex0), .HEX1(hex1), .HEX2(hex2),
    .red_led(red_led), .clock_out(clock_out), .speed_kmh(speed_kmh));

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endtask

  task automatic check_display(int v, string tag);
    check(speed_kmh == 8'(v), $sformatf("%s: speed %0d expected %0d", tag, speed_kmh, v));
    check(hex2 == ref_seg(v / 100) && hex1 == ref_seg((v / 10) % 10) &&
          hex0 == ref_seg(v % 10),
          $sformatf("%s: digits %b %b %b for %0d", tag, hex2, hex1, hex0, v));
    check(red_led == (v > 110), $sformatf("%s: red_led %b for %0d", tag, red_led, v));
  endtask

  initial begin
    repeat (60 * W) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Pulse pattern of a window with n pulses: period p spread over the middle
  // of the window, high for the first half of each period.
  function automatic logic pattern(int n, int pos);
    int p;
    if (n == 0) return 1'b0;
    p = (W - 40) / n;
    if (p < 2) p = 2;
    if (pos < 10 || pos >= 10 + n * p) return 1'b0;
    return ((pos - 10) % p) < p / 2;
  endfunction

  int counts [] = '{150, 200, 0, 191, 193, 300, 500, 437, 150, 17, 900, 120};
  int edges = 0;   // clock edges since reset release

  always @(posedge clk) if (rst_n) edges <= edges + 1;

  // Edge e+1 (the next one) lies in window e / W, at position e % W.
  always @(negedge clk) begin
    if (rst_n && edges / W < counts.size())
      hall <= pattern(counts[edges / W], edges % W);
    else
      hall <= 1'b0;
  end

  initial begin
    automatic int prev = 0, exp;
    automatic logic prev_co = 0;
    repeat (3) @(negedge clk);
    check_display(0, "reset");
    rst_n = 1'b1;
    for (int k = 0; k < counts.size(); k++) begin
      // Window k ends at edge (k+1)*W.
      wait (edges == (k + 1) * W);
      @(negedge clk);
      check_display(prev, "at the edge closing the window");
      check(clock_out != prev_co, "clock_out toggles at window end");
      prev_co = clock_out;
      @(negedge clk);
      exp = ref_speed(counts[k]);
      check_display(exp, $sformatf("window with %0d pulses", counts[k]));
      n_refresh++;
      if (exp > 110 && prev <= 110) n_led_on++;
      if (exp <= 110 && prev > 110) n_led_off++;
      if (exp == 110) n_at_limit++;
      if (exp == 0) n_zero++;
      if (exp >= 100) n_three_digit++;
      if (real'(counts[k]) * 0.575 > 255.5) n_clamp++;
      prev = exp;
    end
    check(n_refresh == counts.size(), "one refresh per window");
    check(n_led_on > 0,      "LED turned on");
    check(n_led_off > 0,     "LED turned off");
    check(n_at_limit > 0,    "reading at the limit");
    check(n_zero > 0,        "zero reading");
    check(n_three_digit > 0, "three-digit reading");
    check(n_clamp > 0,       "out-of-range count clamped");
    $display("refresh=%0d led_on=%0d led_off=%0d at_limit=%0d zero=%0d three_digit=%0d clamp=%0d",
             n_refresh, n_led_on, n_led_off, n_at_limit, n_zero, n_three_digit, n_clamp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
