// tb_speed_calc: compares the speed for pulse counts 0..1200 with
// V = C * N / T * 3.6 evaluated in floating point (C = 0.079861 m,
// T = 0.5 s), rounded to nearest and limited to 255. Runs the default
// 50 MHz / 0.5 s instance and a 1 kHz / 0.5 s instance, which must agree.
// Also checks the one-cycle latency, that the output holds between updates,
// and the two published points: 150 pulses -> 86 km/h, 200 pulses -> 115.
module tb_speed_calc;
  import speedo_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [PULSE_CNT_W-1:0] count;
  logic   count_valid;
  speed_t speed_a, speed_b;
  logic   valid_a, valid_b;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  speed_calc dut_a (.clk(clk), .rst_n(rst_n), .count(count), .count_valid(count_valid),
                    .speed(speed_a), .speed_valid(valid_a));
  speed_calc #(.CLK_HZ(1000), .WINDOW_CYCLES(500)) dut_b (
    .clk(clk), .rst_n(rst_n), .count(count), .count_valid(count_valid),
    .speed(speed_b), .speed_valid(valid_b));

  function automatic int ref_speed(int n);
    real v = real'(n) * 0.079861 * 3.6 / 0.5;
    int  r = $rtoi(v + 0.5);
    return (r > 255) ? 255 : r;
  endfunction

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endtask

  task automatic apply(int n);
    @(negedge clk);
    count = PULSE_CNT_W'(n);
    count_valid = 1'b1;
    @(negedge clk);
    count_valid = 1'b0;
    check(valid_a && valid_b, $sformatf("valid one cycle after count_valid (n=%0d)", n));
    check(speed_a == speed_t'(ref_speed(n)),
          $sformatf("n=%0d speed=%0d expected %0d", n, speed_a, ref_speed(n)));
    check(speed_b == speed_a, $sformatf("n=%0d 1 kHz instance %0d vs %0d", n, speed_b, speed_a));
    // Output holds while count changes without count_valid.
    count = PULSE_CNT_W'(n + 17);
    @(negedge clk);
    check(!valid_a && speed_a == speed_t'(ref_speed(n)), $sformatf("hold after n=%0d", n));
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    count = '0;
    count_valid = 1'b0;
    repeat (3) @(negedge clk);
    check(speed_a == 0 && !valid_a, "reset value");
    rst_n = 1'b1;
    apply(150);
    check(speed_a == 8'd86, "150 pulses read 86 km/h");
    apply(200);
    check(speed_a == 8'd115, "200 pulses read 115 km/h");
    for (int n = 0; n <= 1200; n += 3) apply(n);
    apply(65535);
    check(speed_a == 8'd255, "full-scale count clamps to 255");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
