// tb_cordic_alu: checks the add/subtract unit against integer arithmetic
// reduced to 16 bits, for random operands in both modes.
module tb_cordic_alu;
  logic signed [15:0] a, b, y;
  logic sub;
  int checks = 0, failures = 0;

  cordic_alu dut (.a, .b, .sub, .y);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 2000; k++) begin
      int ia, ib, exp;
      ia = (k < 1000) ? int'($urandom_range(0, 20000)) - 10000 : int'($signed(16'($urandom)));
      ib = (k < 1000) ? int'($urandom_range(0, 20000)) - 10000 : int'($signed(16'($urandom)));
      a = 16'(ia); b = 16'(ib); sub = k[0];
      #1;
      exp = sub ? ia - ib : ia + ib;
      checks++;
      if (y != 16'(exp)) begin
        failures++;
        $display("FAIL a=%0d b=%0d sub=%0d y=%0d exp=%0d", ia, ib, sub, y, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
