// tb_cordic_quadrant: checks the angle reduction (theta or theta - pi) for
// every 16-bit angle and the sign inversion of the outputs after a load.
module tb_cordic_quadrant;
  import cordic_pkg::*;
  logic clk = 0, res = 1, load_en = 0;
  word_t z_in, z_red, x_acc, y_acc, x_out, y_out;
  int checks = 0, failures = 0;

  cordic_quadrant dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    z_in = 0; x_acc = 0; y_acc = 0;
    repeat (2) @(posedge clk);
    res = 0;
    // Combinational reduction, all angles.
    for (int t = -32768; t < 32768; t++) begin
      int exp;
      bit out;
      z_in = word_t'(t);
      #1;
      out = (t > 16384) || (t < -16384);
      exp = out ? ((t >= 0) ? t - 32768 : t + 32768) : t;
      checks++;
      if (int'(z_red) != exp) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d z_red=%0d exp=%0d", t, z_red, exp);
      end
    end
    // Output sign inversion, registered at load.
    for (int k = 0; k < 200; k++) begin
      int t, xa, ya;
      bit out;
      t = int'($signed(16'($urandom)));
      if (k % 4 == 0) t = (k % 8 == 0) ? 20000 : 16384;
      @(negedge clk);
      z_in = word_t'(t); load_en = 1;
      @(negedge clk);
      load_en = 0; z_in = word_t'($urandom);   // flag must be held
      xa = $urandom_range(0, 40000) - 20000; ya = $urandom_range(0, 40000) - 20000;
      x_acc = word_t'(xa); y_acc = word_t'(ya);
      #1;
      out = (t > 16384) || (t < -16384);
      checks++;
      if (int'(x_out) != (out ? -xa : xa) || int'(y_out) != (out ? -ya : ya)) begin
        failures++;
        $display("FAIL t=%0d x_out=%0d y_out=%0d", t, x_out, y_out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
