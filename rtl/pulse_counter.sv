// pulse_counter: the Hall-sensor counter of the speedometer.
//
// The raw sensor square wave is brought into the clock domain by a two-stage
// synchroniser; a third register detects rising edges, so each sensor period
// counts as one pulse. Pulses are counted in a saturating counter during the
// window. When window_end is high the count (including a pulse detected in
// that same cycle) is copied to count_out, count_valid pulses for one cycle
// and the running counter restarts from zero, so no pulse is lost or counted
// twice across a window boundary. The published design counts pulses per
// window with a pair of counters; synchronisation, rising-edge counting and
// saturation are this design's choices.
//
// Interface: hall_in (asynchronous), window_end (1-cycle strobe) ->
// count_out (N, held until the next window), count_valid (1 cycle after
// window_end). Latency from a sensor edge to its detection is 3 clock cycles.
module pulse_counter #(
  parameter int unsigned CNT_W = speedo_pkg::PULSE_CNT_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             hall_in,
  input  logic             window_end,
  output logic [CNT_W-1:0] count_out,
  output logic             count_valid
);

  logic             sync1, sync2, sync3;
  logic             pulse;
  logic [CNT_W-1:0] cnt;
  logic [CNT_W-1:0] cnt_next;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync1 <= 1'b0;
      sync2 <= 1'b0;
      sync3 <= 1'b0;
    end else begin
      sync1 <= hall_in;
      sync2 <= sync1;
      sync3 <= sync2;
    end
  end

  assign pulse = sync2 & ~sync3;

  // Count including this cycle's pulse, held at the maximum.
  always_comb begin
    cnt_next = cnt;
    if (pulse && cnt != '1) cnt_next = cnt + 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt         <= '0;
      count_out   <= '0;
      count_valid <= 1'b0;
    end else begin
      count_valid <= window_end;
      if (window_end) begin
        count_out <= cnt_next;
        cnt       <= '0;
      end else begin
        cnt <= cnt_next;
      end
    end
  end

endmodule
