// tb_seg7_decoder: checks every digit against the segment table written out
// segment by segment (A..G lit or dark for each digit), converted here to the
// active-low {G,F,E,D,C,B,A} code, and checks that 10..15 blank the digit.
module tb_seg7_decoder;
  import speedo_pkg::*;
  logic [3:0] digit;
  seg7_t      seg;
  int checks = 0, failures = 0;

  // Lit segments per digit as strings over "ABCDEFG".
  string lit [10] = '{"ABCDEF", "BC", "ABDEG", "ABCDG", "BCFG",
                      "ACDFG", "ACDEFG", "ABC", "ABCDEFG", "ABCDFG"};

  seg7_decoder dut (.digit(digit), .seg(seg));

  function automatic seg7_t expected(string s);
    seg7_t e = '1;
    for (int i = 0; i < s.len(); i++) e[3'(s[i] - "A")] = 1'b0;
    return e;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int d = 0; d < 16; d++) begin
      seg7_t e;
      digit = 4'(d);
      #1;
      e = (d < 10) ? expected(lit[d]) : 7'b111_1111;
      checks++;
      if (seg !== e) begin
        failures++;
        $display("FAIL digit %0d: seg=%b expected %b", d, seg, e);
      end
    end
    // Codes quoted for the two simulation scenarios: 0, 8, 6 and 1, 1, 5.
    digit = 4'd0; #1; checks++; if (seg !== 7'b1000000) failures++;
    digit = 4'd8; #1; checks++; if (seg !== 7'b0000000) failures++;
    digit = 4'd6; #1; checks++; if (seg !== 7'b0000010) failures++;
    digit = 4'd1; #1; checks++; if (seg !== 7'b1111001) failures++;
    digit = 4'd5; #1; checks++; if (seg !== 7'b0010010) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
