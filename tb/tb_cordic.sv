// tb_cordic: end-to-end test of the CORDIC rotation unit at its default
// (and only) size.
//
// Each operation loads a vector and an angle, waits for END_CYCLE and checks:
//   * x_out/y_out bit-exactly against an integer model of the algorithm
//     written here (floor division for the shifts, the angle table from
//     real arithmetic, range reduction by pi with sign inversion);
//   * x_out/y_out against the exact rotation K*(x + jy)*e^{j theta} in real
//     arithmetic, within a small tolerance;
//   * the number of clocks from load to END_CYCLE: one per microrotation plus
//     one to detect the end, at most 15.
// It also counts how often each mechanism of the design happened and fails
// if any never did: angles needing the pi reduction and angles not needing
// it, early termination, the full 15-step cycle, termination with a
// coordinate settled at -1, LOAD held during a computation (ignored), and
// the two iteration counts the design quotes (about 14 and about 8 clocks).
module tb_cordic;
  import cordic_pkg::*;

  localparam real PI = 3.14159265358979323846;

  logic  clk = 0, load = 0, res = 1;
  word_t x_in, y_in, z_in, x_out, y_out;
  logic  end_cycle;

  int checks = 0, failures = 0;
  real max_err = 0.0;

  // Mechanism counters.
  int n_flip = 0, n_noflip = 0, n_early = 0, n_full = 0, n_minus1 = 0;
  int n_load_busy = 0, n_n14 = 0, n_n8 = 0;
  int hist[0:15] = '{default: 0};

  cordic dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int wrap16(int v);
    return int'($signed(16'(v)));
  endfunction

  function automatic int fdiv(int v, int n);
    int d = 1 << n;
    if (v >= 0) return v / d;
    return -((-v + d - 1) / d);
  endfunction

  function automatic int atan_entry(int n);
    return int'($floor(32768.0 / PI * $atan(2.0 ** (-n)) + 0.5));
  endfunction

  // Integer model: returns results, step count, and whether the last check
  // saw a coordinate at -1.
  task automatic model(input int x0, y0, z0, output int xr, yr, steps,
                       output bit flip, output bit minus1);
    int x = x0, y = y0, z = z0;
    flip = (z0 > 16384) || (z0 < -16384);
    if (flip) z = (z0 >= 0) ? z0 - 32768 : z0 + 32768;
    steps = 0;
    minus1 = 0;
    for (int n = 0; n < 15; n++) begin
      int xs = fdiv(x, n), ys = fdiv(y, n);
      int xn, yn, zn;
      if ((xs == 0 || xs == -1) && (ys == 0 || ys == -1)) begin
        minus1 = (xs == -1 || ys == -1);
        break;
      end
      if (z >= 0) begin
        xn = x - ys; yn = y + xs; zn = z - atan_entry(n);
      end else begin
        xn = x + ys; yn = y - xs; zn = z + atan_entry(n);
      end
      x = wrap16(xn); y = wrap16(yn); z = wrap16(zn);
      steps++;
    end
    xr = flip ? wrap16(-x) : x;
    yr = flip ? wrap16(-y) : y;
  endtask

  task automatic check(string what, bit cond);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic rotate(int x0, int y0, int z0, bit hold_load = 0);
    int xr, yr, steps, cycles;
    bit flip, minus1;
    real th, k, ex, ey, err;
    model(x0, y0, z0, xr, yr, steps, flip, minus1);
    @(negedge clk);
    check("idle before load", end_cycle);
    x_in = word_t'(x0); y_in = word_t'(y0); z_in = word_t'(z0); load = 1;
    @(negedge clk);
    load = hold_load;
    if (hold_load) begin
      // Different data offered while busy; it must be ignored.
      x_in = word_t'($urandom); y_in = word_t'($urandom); z_in = word_t'($urandom);
    end
    cycles = 1;
    while (!end_cycle) begin
      if (hold_load) n_load_busy++;
      @(negedge clk);
      cycles++;
    end
    load = 0;
    // cycles counts edges from the load edge to END_CYCLE, minus the load.
    cycles = cycles - 1;
    check($sformatf("cycles (%0d,%0d,%0d): %0d, expected %0d", x0, y0, z0, cycles,
                    (steps < 15) ? steps + 1 : 15),
          cycles == ((steps < 15) ? steps + 1 : 15));
    check($sformatf("bit-exact (%0d,%0d,%0d): got (%0d,%0d) expected (%0d,%0d)",
                    x0, y0, z0, x_out, y_out, xr, yr),
          int'(x_out) == xr && int'(y_out) == yr);
    // Exact rotation including the CORDIC gain.
    k = 1.0;
    for (int n = 0; n < 40; n++) k = k * $sqrt(1.0 + 2.0 ** (-2 * n));
    th = real'(z0) * PI / 32768.0;
    ex = k * (x0 * $cos(th) - y0 * $sin(th));
    ey = k * (x0 * $sin(th) + y0 * $cos(th));
    err = $sqrt((ex - x_out) ** 2 + (ey - y_out) ** 2);
    if (err > max_err) max_err = err;
    check($sformatf("accuracy (%0d,%0d,%0d): got (%0d,%0d) exact (%f,%f)",
                    x0, y0, z0, x_out, y_out, ex, ey), err <= 12.0);
    // Outputs hold while idle.
    repeat (2) @(negedge clk);
    check("result holds", int'(x_out) == xr && int'(y_out) == yr && end_cycle);
    if (flip) n_flip++; else n_noflip++;
    if (steps < 15) n_early++; else n_full++;
    if (minus1) n_minus1++;
    hist[cycles]++;
    if (cycles >= 13 && cycles <= 15) n_n14++;
    if (cycles >= 7 && cycles <= 9) n_n8++;
  endtask

  function automatic int rnd(int lo, int hi);
    return lo + int'($urandom_range(0, hi - lo));
  endfunction

  initial begin
    x_in = 0; y_in = 0; z_in = 0;
    repeat (2) @(negedge clk);
    check("end_cycle after reset", end_cycle);
    res = 0;

    // Table I angles on simple vectors.
    rotate(10000, 0, 0);
    rotate(10000, 0, 16384);      //  pi/2
    rotate(10000, 0, -16384);     // -pi/2
    rotate(10000, 0, 32767);      //  ~pi
    rotate(10000, 0, -32768);     // -pi
    rotate(0, 10000, 8192);       //  pi/4
    rotate(-7000, 9000, 20000);
    rotate(-7000, -9000, -25000);
    rotate(0, 0, 1234);
    rotate(-1, 0, 5000);
    rotate(3, -5, 10000);
    // Full-scale inputs: about 14 clocks.
    rotate(13000, -12000, 3000);
    rotate(-13500, 13500, -31000, 1);
    // Inputs near 2^7: about 8 clocks.
    rotate(150, 90, 7000);
    rotate(-120, 140, -22000, 1);
    // Random vectors, random magnitudes and angles.
    for (int i = 0; i < 3000; i++) begin
      int mag;
      mag = 1 << rnd(0, 13);
      rotate(rnd(-mag, mag), rnd(-mag, mag), int'($signed(16'($urandom))), (i % 10) == 0);
    end

    for (int c = 0; c < 16; c++) $display("cycles %0d: %0d operations", c, hist[c]);
    $display("max error vs exact rotation: %f LSB", max_err);
    $display("mechanisms: pi-reduction=%0d direct=%0d early-end=%0d full-15=%0d end-at-minus1=%0d load-while-busy-cycles=%0d N~14=%0d N~8=%0d",
             n_flip, n_noflip, n_early, n_full, n_minus1, n_load_busy, n_n14, n_n8);
    check("pi reduction exercised", n_flip > 0);
    check("direct angle exercised", n_noflip > 0);
    check("early termination exercised", n_early > 0);
    check("full 15-step cycle exercised", n_full > 0);
    check("termination at -1 exercised", n_minus1 > 0);
    check("LOAD while busy exercised", n_load_busy > 0);
    check("N about 14 exercised", n_n14 > 0);
    check("N about 8 exercised", n_n8 > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
