// seg7_decoder: BCD digit to seven-segment pattern.
//
// Output bit order is {G,F,E,D,C,B,A}; a segment is lit by a 0 (the display
// is active low), giving for 0..9 the codes 40,79,24,30,19,12,02,78,00,10
// (hex) of the published segment table. Inputs 10..15 never occur for a
// BCD digit; this design blanks the digit for them. Combinational.
module seg7_decoder (
  input  logic [3:0]        digit,
  output speedo_pkg::seg7_t seg
);

  always_comb begin
    unique case (digit)
      4'd0:    seg = 7'b100_0000;
      4'd1:    seg = 7'b111_1001;
      4'd2:    seg = 7'b010_0100;
      4'd3:    seg = 7'b011_0000;
      4'd4:    seg = 7'b001_1001;
      4'd5:    seg = 7'b001_0010;
      4'd6:    seg = 7'b000_0010;
      4'd7:    seg = 7'b111_1000;
      4'd8:    seg = 7'b000_0000;
      4'd9:    seg = 7'b001_0000;
      default: seg = speedo_pkg::SEG_BLANK;
    endcase
  end

endmodule
