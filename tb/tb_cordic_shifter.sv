// tb_cordic_shifter: checks the static arithmetic right shifter against
// floor(a / 2^n), computed with integer arithmetic, for every shift count
// and a mix of random and edge-case words.
module tb_cordic_shifter;
  logic signed [15:0] a, y;
  logic        [3:0]  sh;
  int checks = 0, failures = 0;

  cordic_shifter dut (.a, .sh, .y);

  function automatic int floor_div_pow2(int v, int n);
    int d = 1 << n;
    if (v >= 0) return v / d;
    return -((-v + d - 1) / d);
  endfunction

  task automatic check(int v, int n);
    a = 16'(v); sh = 4'(n);
    #1;
    checks++;
    if (int'(y) != floor_div_pow2(v, n)) begin
      failures++;
      $display("FAIL a=%0d n=%0d y=%0d exp=%0d", v, n, y, floor_div_pow2(v, n));
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 16; n++) begin
      check(12345, n); check(-12345, n); check(1, n); check(-1, n);
      check(32767, n); check(-32768, n); check(0, n);
      for (int k = 0; k < 50; k++) check(int'($signed(16'($urandom))), n);
    end
    // The worked examples of the design: 12345/2 = 6172, -12345/2 = -6173.
    a = 16'sd12345;  sh = 4'd1; #1; checks++; if (y != 16'sd6172)  failures++;
    a = -16'sd12345; sh = 4'd1; #1; checks++; if (y != -16'sd6173) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
