// cordic_acc_z: the angle accumulator and operator generator.
//
// Holds the residual angle z_n, the part of the requested rotation that has
// not been performed yet. On a load cycle it takes the (range-reduced) input
// angle; on each step cycle it takes the ALU-Z result z_n - s_n*atan(2^-n).
// It also produces the operator shared by the three ALUs: the direction of
// microrotation n, s_n = +1 when z_n >= 0 and -1 when z_n < 0, output as
// pos = 1 for s_n = +1. pos is a combinational function of the register, so
// it is valid throughout the step cycle that uses it.
//
// As with the coordinate accumulators, the asynchronous active-high res
// clearing the register is this design's choice.
module cordic_acc_z
  import cordic_pkg::*;
(
  input  logic  clk,
  input  logic  res,
  input  logic  load_en,
  input  logic  step_en,
  input  word_t z_in,
  input  word_t alu_z,
  output word_t z,
  output logic  pos
);

  always_ff @(posedge clk or posedge res) begin
    if (res)          z <= '0;
    else if (load_en) z <= z_in;
    else if (step_en) z <= alu_z;
  end

  // s_n = sign(z_n), with zero counted as positive.
  always_comb pos = ~z[W-1];

endmodule
