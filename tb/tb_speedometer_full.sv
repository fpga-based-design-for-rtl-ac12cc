// tb_speedometer_full: the speedometer at its board configuration (50 MHz
// clock, 25,000,000-cycle = 0.5 s window, no parameter overrides).
//
// Three windows are driven with 150, 200 and 150 sensor pulses, the two
// published simulation scenarios. After each window the testbench checks the
// reading against the reference model and against the exact digit codes of
// those scenarios: 150 pulses show 0-8-6 (HEX2..HEX0 = 1000000, 0000000,
// 0000010) with the LED off; 200 pulses show 1-1-5 (1111001, 1111001,
// 0010010) with the LED on. It also checks that the reading changes exactly
// one clock edge after the edge that closes each window and that clock_out
// has toggled.
module tb_speedometer_full;
  import speedo_tb_pkg::*;
  localparam int W = 25_000_000;

  logic       clk = 0, rst_n = 0, hall = 0;
  logic [6:0] hex0, hex1, hex2;
  logic       red_led, clock_out;
  logic [7:0] speed_kmh;
  int checks = 0, failures = 0;

  always #10 clk = ~clk;   // 50 MHz

  speedometer dut (
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

  initial begin
    repeat (4 * W) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int counts [3] = '{150, 200, 150};
  int edges = 0;

  always @(posedge clk) if (rst_n) edges <= edges + 1;

  // Pulses with a period of (W - 40) / n cycles, half high, starting at
  // position 10 of each window.
  always @(negedge clk) begin
    int k, pos, p;
    k = edges / W;
    pos = edges % W;
    if (!rst_n || k >= 3) hall <= 1'b0;
    else begin
      p = (W - 40) / counts[k];
      hall <= (pos >= 10 && pos < 10 + counts[k] * p) && (((pos - 10) % p) < p / 2);
    end
  end

  initial begin
    automatic int prev = 0, exp;
    automatic logic prev_co = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 3; k++) begin
      wait (edges == (k + 1) * W);
      @(negedge clk);
      check(speed_kmh == 8'(prev), "reading unchanged at the edge closing the window");
      check(clock_out != prev_co, "clock_out toggled");
      prev_co = clock_out;
      @(negedge clk);
      exp = ref_speed(counts[k]);
      check(speed_kmh == 8'(exp), $sformatf("speed %0d expected %0d", speed_kmh, exp));
      if (counts[k] == 150) begin
        check(speed_kmh == 8'd86, "150 pulses read 86 km/h");
        check(hex2 == 7'b1000000 && hex1 == 7'b0000000 && hex0 == 7'b0000010,
              $sformatf("digits for 86: %b %b %b", hex2, hex1, hex0));
        check(!red_led, "LED off at 86 km/h");
      end else begin
        check(speed_kmh == 8'd115, "200 pulses read 115 km/h");
        check(hex2 == 7'b1111001 && hex1 == 7'b1111001 && hex0 == 7'b0010010,
              $sformatf("digits for 115: %b %b %b", hex2, hex1, hex0));
        check(red_led, "LED on at 115 km/h");
      end
      $display("window %0d: %0d pulses -> %0d km/h, red_led=%b", k, counts[k], speed_kmh, red_led);
      prev = exp;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
