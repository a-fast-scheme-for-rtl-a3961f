// tb_cordic_atan_lut: checks every table entry against
// round(2^15/pi * atan(2^-n)) computed in real arithmetic, and entry 15
// (wait state) against 0.
module tb_cordic_atan_lut;
  import cordic_pkg::*;
  state_t n;
  word_t  angle;
  int checks = 0, failures = 0;

  cordic_atan_lut dut (.n, .angle);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      int exp;
      real pi = 3.14159265358979323846;
      exp = (i == 15) ? 0 : int'($floor(32768.0 / pi * $atan(2.0 ** (-i)) + 0.5));
      n = state_t'(i);
      #1;
      checks++;
      if (int'(angle) != exp) begin
        failures++;
        $display("FAIL n=%0d angle=%0d exp=%0d", i, angle, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
