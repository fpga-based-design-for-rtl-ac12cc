// speed_limit_compare: the over-speed warning.
//
// Drives red_led high while the displayed speed is strictly greater than
// LIMIT_KMH (110 km/h by default), as the published design specifies; at
// exactly the limit the LED stays off. Purely combinational: the LED follows
// the registered speed in the same cycle.
module speed_limit_compare #(
  parameter int unsigned LIMIT_KMH = speedo_pkg::SPEED_LIMIT_KMH_DEFAULT
) (
  input  speedo_pkg::speed_t speed,
  output logic               red_led
);

  assign red_led = ({24'd0, speed} > LIMIT_KMH);

endmodule
