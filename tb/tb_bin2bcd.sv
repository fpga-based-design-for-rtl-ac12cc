// tb_bin2bcd: exhaustive check of the 8-bit binary to BCD converter. Every
// value 0..255 is compared with digits obtained by integer division by 100
// and 10.
module tb_bin2bcd;
  import speedo_pkg::*;
  speed_t bin;
  bcd3_t  bcd;
  int checks = 0, failures = 0;

  bin2bcd dut (.bin(bin), .bcd(bcd));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      bin = speed_t'(v);
      #1;
      checks++;
      if (bcd.hundreds != 4'(v / 100) || bcd.tens != 4'((v / 10) % 10) ||
          bcd.ones != 4'(v % 10)) begin
        failures++;
        $display("FAIL %0d -> %0d%0d%0d", v, bcd.hundreds, bcd.tens, bcd.ones);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
