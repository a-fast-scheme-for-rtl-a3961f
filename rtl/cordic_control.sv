// cordic_control: the control block, a 16-state machine.
//
// States 0..14 are microrotation steps and state 15 is the wait state. After
// reset the machine waits in state 15. When LOAD is high in state 15 the
// accumulators load the inputs and the machine enters state 0. In state n the
// datapath offers the point after microrotation n; the step is taken (the
// accumulators load the ALU results) only if it would change the point, and
// the machine then moves to state n+1. A step changes nothing once both
// shifted coordinates x_n*2^-n and y_n*2^-n are 0 or, for negative values
// whose sign bits fill the word, -1. When that happens, or after the step of
// state 14, the cycle is over and the machine returns to state 15, where
// END_CYCLE is high and the outputs hold the result. The number of steps thus
// follows the magnitude of the coordinates, about log2(max(|x|,|y|)), and is
// not fixed.
//
// The state doubles as the shift count of both static shifters and as the
// address of the arctangent table. LOAD is ignored outside the wait state.
// res is asynchronous and active high. end_cycle is a level, high whenever
// the machine is idle in state 15 (also right after reset).
//
// The 16 states, the wait state 15, the sequential order of the steps and the
// stopping rule follow the design. The level form of end_cycle, ignoring LOAD
// while busy, the reset polarity and the extra clock spent detecting the end
// are this design's choices.
module cordic_control
  import cordic_pkg::*;
(
  input  logic   clk,
  input  logic   res,
  input  logic   load,
  input  word_t  xs,        // x_n >>> n, from static shifter X
  input  word_t  ys,        // y_n >>> n, from static shifter Y
  output state_t state,
  output logic   load_en,
  output logic   step_en,
  output logic   end_cycle
);

  state_t state_q, state_d;
  logic   idle, useful;

  // A shifted coordinate of 0 or -1 no longer moves the point.
  function automatic logic negligible(word_t v);
    return (v == '0) || (v == '1);
  endfunction

  always_comb begin
    idle    = (state_q == WAIT_STATE);
    useful  = !(negligible(xs) && negligible(ys));
    load_en = idle && load;
    step_en = !idle && useful;
    state_d = state_q;
    if (idle) begin
      if (load) state_d = '0;
    end else if (useful && state_q != LAST_STEP) begin
      state_d = state_q + state_t'(1);
    end else begin
      state_d = WAIT_STATE;
    end
  end

  always_ff @(posedge clk or posedge res) begin
    if (res) state_q <= WAIT_STATE;
    else     state_q <= state_d;
  end

  assign state     = state_q;
  assign end_cycle = idle;

  // From the wait state the only way out is to step 0.
  assert property (@(posedge clk) disable iff (res)
                   (state_q == WAIT_STATE) |=> (state_q == WAIT_STATE || state_q == '0))
    else $error("cordic_control: illegal exit from the wait state");

endmodule
