// speed_calc: converts the pulse count of one window into km/h.
//
// The conversion is V = C * N / T * 3.6, with C the wheel circumference in
// metres, N the pulses in the window and T the window length in seconds.
// With C in micrometres and T = WINDOW_CYCLES / CLK_HZ this is
//   V = N * (CIRC_UM * 36 * CLK_HZ) / (10^7 * WINDOW_CYCLES).
// Both constants are formed at elaboration and reduced by their greatest
// common divisor, so the hardware is one constant multiply, one constant
// divide with round-to-nearest, and a clamp to the 0..255 km/h display range.
// The formula and the multiply/divide structure follow the published design;
// the circumference value, the rounding and the clamp are this design's own.
// With the defaults one pulse is 0.575 km/h: 150 pulses give 86 km/h and
// 200 pulses give 115 km/h.
//
// Interface: count/count_valid in; speed (held) and speed_valid out, both
// registered one clock cycle after count_valid.
module speed_calc #(
  parameter int unsigned CLK_HZ        = speedo_pkg::CLK_HZ_DEFAULT,
  parameter int unsigned WINDOW_CYCLES = speedo_pkg::WINDOW_CYCLES_DEFAULT,
  parameter int unsigned CIRC_UM       = speedo_pkg::CIRC_UM_DEFAULT,
  parameter int unsigned CNT_W         = speedo_pkg::PULSE_CNT_W
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [CNT_W-1:0]       count,
  input  logic                   count_valid,
  output speedo_pkg::speed_t     speed,
  output logic                   speed_valid
);
  import speedo_pkg::*;

  function automatic longint unsigned gcd(longint unsigned a, longint unsigned b);
    longint unsigned t;
    while (b != 0) begin
      t = a % b;
      a = b;
      b = t;
    end
    return a;
  endfunction

  localparam longint unsigned NUM_RAW = longint'(CIRC_UM) * 36 * longint'(CLK_HZ);
  localparam longint unsigned DEN_RAW = 64'd10_000_000 * longint'(WINDOW_CYCLES);
  localparam longint unsigned G       = gcd(NUM_RAW, DEN_RAW);
  localparam longint unsigned K_NUM   = NUM_RAW / G;
  localparam longint unsigned K_DEN   = DEN_RAW / G;

  localparam int unsigned NUM_W  = $clog2(K_NUM + 1);
  localparam int unsigned PROD_W = CNT_W + NUM_W + 1;
  localparam longint unsigned SPEED_MAX = (64'd1 << SPEED_W) - 1;

  logic [PROD_W-1:0] product;
  logic [PROD_W-1:0] quotient;
  speed_t            speed_next;

  always_comb begin
    product  = PROD_W'(count) * PROD_W'(K_NUM) + PROD_W'(K_DEN / 2);
    quotient = product / PROD_W'(K_DEN);
    if (quotient > PROD_W'(SPEED_MAX)) speed_next = '1;
    else                               speed_next = speed_t'(quotient);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      speed       <= '0;
      speed_valid <= 1'b0;
    end else begin
      speed_valid <= count_valid;
      if (count_valid) speed <= speed_next;
    end
  end

endmodule
