// clock_divider: the clock counter that defines the speed measurement window.
//
// A free-running counter counts board clock cycles from 0 to WINDOW_CYCLES-1.
// On the last cycle of each window it raises window_end for exactly one cycle
// and toggles clock_out, so clock_out is the board clock divided by
// 2*WINDOW_CYCLES: high for one window, low for the next. With the defaults
// (50 MHz, 25,000,000 cycles) a window lasts 0.5 s, matching the published
// refresh interval; clock_out then has a 1 s period with 0.5 s half-periods.
// Using a strobe for the window end, rather than clocking other logic from
// clock_out, keeps the whole design in one clock domain; that and the
// asynchronous active-low reset are choices of this design.
//
// Interface: clk, rst_n (async, active low) -> window_end (1-cycle strobe),
// clock_out (divided clock, starts low after reset).
module clock_divider #(
  parameter int unsigned WINDOW_CYCLES = speedo_pkg::WINDOW_CYCLES_DEFAULT
) (
  input  logic clk,
  input  logic rst_n,
  output logic window_end,
  output logic clock_out
);

  localparam int unsigned CNT_W = (WINDOW_CYCLES > 1) ? $clog2(WINDOW_CYCLES) : 1;
  localparam logic [CNT_W-1:0] LAST = CNT_W'(WINDOW_CYCLES - 1);

  logic [CNT_W-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt       <= '0;
      clock_out <= 1'b0;
    end else if (cnt == LAST) begin
      cnt       <= '0;
      clock_out <= ~clock_out;
    end else begin
      cnt <= cnt + 1'b1;
    end
  end

  assign window_end = (cnt == LAST);

  initial begin
    assert (WINDOW_CYCLES >= 2)
      else $error("clock_divider: WINDOW_CYCLES must be at least 2");
  end

  // The window strobe is a single-cycle pulse.
  property p_strobe_single;
    @(posedge clk) disable iff (!rst_n) window_end |=> !window_end;
  endproperty
  assert property (p_strobe_single);

endmodule
