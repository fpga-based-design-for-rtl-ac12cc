// bin2bcd: 8-bit binary to three BCD digits (HUNDREDS, TENS, ONES).
//
// A combinational shift-and-add-3 ("double dabble") array of seven add3
// cells, m1..m7, as in the published design. Cells m1..m5 form the chain that
// builds the ones and tens digits as the binary bits are shifted in from the
// most significant end; m6 and m7 correct the upper digit formed by the bits
// shifted out of that chain. The cell wiring is the standard arrangement for
// eight input bits:
//   m1 <- {0,b7,b6,b5}      m2 <- {m1[2:0],b4}   m3 <- {m2[2:0],b3}
//   m4 <- {m3[2:0],b2}      m5 <- {m4[2:0],b1}
//   m6 <- {0,m1[3],m2[3],m3[3]}                  m7 <- {m6[2:0],m4[3]}
//   ones = {m5[2:0],b0}  tens = {m7[2:0],m5[3]}  hundreds = {00,m6[3],m7[3]}
// Interface: bin (0..255) -> bcd (struct of three digits). No clock.
module bin2bcd (
  input  speedo_pkg::speed_t bin,
  output speedo_pkg::bcd3_t  bcd
);

  logic [3:0] c1, c2, c3, c4, c5, c6, c7;

  add3 m1 (.in({1'b0, bin[7:5]}),              .out(c1));
  add3 m2 (.in({c1[2:0], bin[4]}),             .out(c2));
  add3 m3 (.in({c2[2:0], bin[3]}),             .out(c3));
  add3 m4 (.in({c3[2:0], bin[2]}),             .out(c4));
  add3 m5 (.in({c4[2:0], bin[1]}),             .out(c5));
  add3 m6 (.in({1'b0, c1[3], c2[3], c3[3]}),   .out(c6));
  add3 m7 (.in({c6[2:0], c4[3]}),              .out(c7));

  assign bcd.ones     = {c5[2:0], bin[0]};
  assign bcd.tens     = {c7[2:0], c5[3]};
  assign bcd.hundreds = {2'b00, c6[3], c7[3]};

endmodule
