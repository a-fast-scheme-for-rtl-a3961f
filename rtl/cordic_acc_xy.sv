// cordic_acc_xy: the x and y accumulators.
//
// Two 16-bit registers that hold the current point (x_n, y_n) of the
// rotation. On a load cycle (LOAD seen in the wait state) they take the input
// coordinates; on a step cycle they take the ALU-X and ALU-Y results, i.e.
// the point after one microrotation; otherwise they hold. Both registers are
// written on the same clock edge, so a microrotation uses the old x and old y
// together as the algorithm requires.
//
// The design does not reset these registers (only the control block sees the
// reset); here res clears them as well so that the outputs are defined from
// reset onward. res is asynchronous and active high.
//
// Interface: load_en and step_en come from the control block and are never
// active together. x and y are valid from the clock edge after the enable.
module cordic_acc_xy
  import cordic_pkg::*;
(
  input  logic  clk,
  input  logic  res,
  input  logic  load_en,
  input  logic  step_en,
  input  word_t x_in,
  input  word_t y_in,
  input  word_t alu_x,
  input  word_t alu_y,
  output word_t x,
  output word_t y
);

  always_ff @(posedge clk or posedge res) begin
    if (res) begin
      x <= '0;
      y <= '0;
    end else if (load_en) begin
      x <= x_in;
      y <= y_in;
    end else if (step_en) begin
      x <= alu_x;
      y <= alu_y;
    end
  end

  assert property (@(posedge clk) disable iff (res) !(load_en && step_en))
    else $error("cordic_acc_xy: load and step requested in the same cycle");

endmodule
