// add3: one cell of the shift-and-add-3 binary-to-BCD converter.
//
// A 4-bit value of 5 or more gets 3 added, so that the following left shift
// (done by the wiring in bin2bcd) carries correctly into the next decimal
// digit. Inputs 0..4 pass unchanged. Only inputs 0..9 occur in the converter;
// for 10..15 the sum is taken modulo 16. Combinational.
module add3 (
  input  logic [3:0] in,
  output logic [3:0] out
);

  always_comb begin
    if (in >= 4'd5) out = in + 4'd3;
    else            out = in;
  end

endmodule
