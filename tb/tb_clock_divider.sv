// tb_clock_divider: checks the window strobe period, its single-cycle width,
// the phase of the first strobe after reset and that clock_out toggles on
// each strobe, for windows of 7 and 10 cycles.
module tb_clock_divider;
  logic clk = 0, rst_n = 0;
  logic we7, co7, we10, co10;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  clock_divider #(.WINDOW_CYCLES(7))  dut7  (.clk(clk), .rst_n(rst_n), .window_end(we7),  .clock_out(co7));
  clock_divider #(.WINDOW_CYCLES(10)) dut10 (.clk(clk), .rst_n(rst_n), .window_end(we10), .clock_out(co10));

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic bit exp_co7 = 0, exp_co10 = 0;
    repeat (2) @(negedge clk);
    check(!co7 && !co10, "clock_out low in reset");
    rst_n = 1'b1;
    // Cycle c (c = 0 is the first cycle after reset release) is the last
    // cycle of a window when c mod W == W-1.
    for (int c = 0; c < 200; c++) begin
      check(we7  == ((c % 7)  == 6), $sformatf("W=7 strobe at cycle %0d", c));
      check(we10 == ((c % 10) == 9), $sformatf("W=10 strobe at cycle %0d", c));
      check(co7 == exp_co7 && co10 == exp_co10, $sformatf("clock_out at cycle %0d", c));
      if ((c % 7) == 6)  exp_co7  = !exp_co7;
      if ((c % 10) == 9) exp_co10 = !exp_co10;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
