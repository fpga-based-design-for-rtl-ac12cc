// tb_pulse_counter: drives random square waves (random high and low lengths,
// including one-cycle ones) and a window strobe every 50 cycles, counts rising
// edges of the sensor signal independently in each window (shifted by the
// 3-cycle detection latency) and compares with count_out one cycle after each
// strobe. A 4-bit instance checks that the count saturates at 15.
module tb_pulse_counter;
  logic clk = 0, rst_n = 0;
  logic hall = 0, window_end = 0;
  logic [15:0] count16;
  logic [3:0]  count4;
  logic        valid16, valid4;
  int checks = 0, failures = 0;
  localparam int W = 50;

  always #5 clk = ~clk;

  pulse_counter dut16 (.clk(clk), .rst_n(rst_n), .hall_in(hall), .window_end(window_end),
                       .count_out(count16), .count_valid(valid16));
  pulse_counter #(.CNT_W(4)) dut4 (.clk(clk), .rst_n(rst_n), .hall_in(hall),
                       .window_end(window_end), .count_out(count4), .count_valid(valid4));

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Stimulus: at each negedge set hall and window_end for the coming edge.
  // A rising edge of hall applied before edge e is counted at edge e+2, so it
  // belongs to the first window whose strobe is sampled at edge e+2 or later.
  initial begin
    automatic int edge_no = 0;
    automatic int hold = 0;
    int maxlen;
    int pending[$];      // detection edges of outstanding rising edges
    int exp_count, exp_sat;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int win = 0; win < 200; win++) begin
      maxlen = (win % 4 == 0) ? 1 : (win % 4 == 1) ? 3 : (win % 4 == 2) ? 8 : 25;
      for (int c = 0; c < W; c++) begin
        if (hold == 0) begin
          if (!hall) pending.push_back(edge_no + 3);
          hall = !hall;
          hold = 1 + ($urandom % maxlen);
        end
        hold--;
        window_end = (c == W - 1);
        @(posedge clk);
        edge_no++;
        if (window_end) begin
          // Pulses detected at edges up to and including this one, i.e.
          // detection edge <= edge_no.
          exp_count = 0;
          while (pending.size() > 0 && pending[0] <= edge_no) begin
            void'(pending.pop_front());
            exp_count++;
          end
          @(negedge clk);
          check(valid16 && valid4, $sformatf("count_valid after window %0d", win));
          check(count16 == 16'(exp_count),
                $sformatf("window %0d: count=%0d expected %0d", win, count16, exp_count));
          exp_sat = (exp_count > 15) ? 15 : exp_count;
          check(count4 == 4'(exp_sat),
                $sformatf("window %0d: 4-bit count=%0d expected %0d", win, count4, exp_sat));
        end else begin
          @(negedge clk);
          check(!valid16, "no count_valid inside a window");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
