// tb_speed_limit_compare: all 256 speeds against the default 110 km/h limit
// (LED off at 110, on at 111), and against a 60 km/h limit to show the
// threshold is a parameter.
module tb_speed_limit_compare;
  import speedo_pkg::*;
  speed_t speed;
  logic   led_110, led_60;
  int checks = 0, failures = 0;

  speed_limit_compare dut (.speed(speed), .red_led(led_110));
  speed_limit_compare #(.LIMIT_KMH(60)) dut60 (.speed(speed), .red_led(led_60));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      speed = speed_t'(v);
      #1;
      checks++;
      if (led_110 !== (v > 110)) begin
        failures++;
        $display("FAIL limit 110, speed %0d: led=%b", v, led_110);
      end
      checks++;
      if (led_60 !== (v > 60)) begin
        failures++;
        $display("FAIL limit 60, speed %0d: led=%b", v, led_60);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
