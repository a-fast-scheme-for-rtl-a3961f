// tb_cordic_acc_z: drives random load/step/hold cycles into the angle
// accumulator and checks the register and the operator (pos = z >= 0).
module tb_cordic_acc_z;
  import cordic_pkg::*;
  logic clk = 0, res = 1, load_en = 0, step_en = 0, pos;
  word_t z_in, alu_z, z, mz;
  int checks = 0, failures = 0;

  cordic_acc_z dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    z_in = 0; alu_z = 0;
    repeat (2) @(posedge clk);
    #1;
    checks++; if (z != 0 || pos != 1) failures++;
    res = 0; mz = 0;
    for (int k = 0; k < 1000; k++) begin
      int op = $urandom_range(0, 2);
      @(negedge clk);
      load_en = (op == 0); step_en = (op == 1);
      z_in = word_t'($urandom); alu_z = word_t'($urandom);
      if (k % 5 == 0) begin z_in = 0; alu_z = 0; end
      @(posedge clk);
      if (op == 0) mz = z_in;
      else if (op == 1) mz = alu_z;
      #1;
      checks++;
      if (z != mz || pos != (int'(mz) >= 0)) begin
        failures++;
        $display("FAIL op=%0d z=%0d pos=%0d exp %0d", op, z, pos, mz);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
