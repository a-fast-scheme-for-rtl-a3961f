// tb_cordic_acc_xy: drives random load/step/hold cycles into the x/y
// accumulators and compares them with a model kept in the testbench.
module tb_cordic_acc_xy;
  import cordic_pkg::*;
  logic clk = 0, res = 1, load_en = 0, step_en = 0;
  word_t x_in, y_in, alu_x, alu_y, x, y;
  word_t mx, my;
  int checks = 0, failures = 0;

  cordic_acc_xy dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    x_in = 0; y_in = 0; alu_x = 0; alu_y = 0;
    repeat (2) @(posedge clk);
    #1;
    checks++; if (x != 0 || y != 0) failures++;
    res = 0; mx = 0; my = 0;
    for (int k = 0; k < 1000; k++) begin
      int op = $urandom_range(0, 2);
      @(negedge clk);
      load_en = (op == 0); step_en = (op == 1);
      x_in = word_t'($urandom); y_in = word_t'($urandom);
      alu_x = word_t'($urandom); alu_y = word_t'($urandom);
      @(posedge clk);
      if (op == 0) begin mx = x_in; my = y_in; end
      else if (op == 1) begin mx = alu_x; my = alu_y; end
      #1;
      checks++;
      if (x != mx || y != my) begin
        failures++;
        $display("FAIL op=%0d x=%0d y=%0d exp %0d %0d", op, x, y, mx, my);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
