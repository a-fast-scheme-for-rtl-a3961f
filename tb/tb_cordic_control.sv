// tb_cordic_control: drives the control block with shifted-coordinate values
// chosen per state and checks the state sequence, the load/step enables,
// END_CYCLE, early termination (including the -1 case) and the 15-step limit.
module tb_cordic_control;
  import cordic_pkg::*;
  logic   clk = 0, res = 1, load = 0;
  word_t  xs, ys;
  state_t state;
  logic   load_en, step_en, end_cycle;
  int checks = 0, failures = 0;

  cordic_control dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (state=%0d load_en=%0d step_en=%0d end=%0d) at %0t",
               what, state, load_en, step_en, end_cycle, $time);
    end
  endtask

  // Run one computing cycle in which the shifted coordinates stay "useful"
  // for the first `useful_steps` states; settled values are 0 or -1.
  task automatic run(int useful_steps);
    int steps = 0, cycles = 0;
    @(negedge clk);
    expect_(end_cycle && state == WAIT_STATE, "idle before load");
    load = 1; xs = 0; ys = 0;
    #1 expect_(load_en && !step_en, "load_en in wait state");
    @(negedge clk);
    load = 1;   // LOAD held high while busy must be ignored
    while (1) begin
      bit settled;
      cycles++;
      expect_(!end_cycle, "end_cycle low while busy");
      expect_(!load_en, "load ignored while busy");
      expect_(int'(state) == steps, "states in order");
      settled = (steps >= useful_steps);
      xs = settled ? (($urandom_range(0, 1) != 0) ? '1 : '0) : word_t'($urandom_range(1, 30000));
      ys = settled ? '1 : (($urandom_range(0, 1) != 0) ? word_t'(-2) : '0);
      #1 expect_(step_en == !settled, "step_en only for useful step");
      if (!settled) steps++;
      @(negedge clk);
      if (settled || steps == 15) break;
    end
    load = 0;
    expect_(end_cycle && state == WAIT_STATE, "back to wait state");
    expect_(steps == ((useful_steps > 15) ? 15 : useful_steps), "step count");
    expect_(cycles == ((useful_steps >= 15) ? 15 : useful_steps + 1), "cycle count");
  endtask

  initial begin
    xs = 0; ys = 0;
    @(negedge clk);
    expect_(state == WAIT_STATE && end_cycle, "reset to wait state");
    res = 0;
    // No load: stays in wait.
    repeat (3) @(negedge clk);
    expect_(state == WAIT_STATE && end_cycle, "waits without load");
    for (int u = 0; u <= 17; u++) run(u);
    for (int k = 0; k < 30; k++) run($urandom_range(0, 16));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
