// tb_add3: exhaustive check of the add-3 cell against "add 3 when 5 or more,
// modulo 16" for all sixteen inputs.
module tb_add3;
  logic [3:0] in, out;
  int checks = 0, failures = 0;

  add3 dut (.in(in), .out(out));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      int exp;
      in = 4'(v);
      #1;
      exp = (v >= 5) ? (v + 3) % 16 : v;
      checks++;
      if (out !== 4'(exp)) begin
        failures++;
        $display("FAIL add3(%0d) = %0d, expected %0d", v, out, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
