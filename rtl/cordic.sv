// cordic: iterative CORDIC unit for complex rotation.
//
// Rotates the vector (x_in, y_in) by the angle z_in, i.e. computes
//   x_out + j*y_out = K * (x_in + j*y_in) * e^{j*theta},
// with theta = z_in * pi / 2^15 and K = prod_n sqrt(1 + 2^-2n) ~ 1.6468.
// The rotation is built from microrotations by +-atan(2^-n), each needing
// only shifts and additions:
//   x_{n+1} = x_n - s_n * (y_n >>> n)
//   y_{n+1} = y_n + s_n * (x_n >>> n)
//   z_{n+1} = z_n - s_n * atan(2^-n),   s_n = sign(z_n)
// One microrotation is done per clock. Like the design it follows, the unit
// does not multiply the result by 1/K = 0.607253; a user who needs the true
// rotation scales the outputs (or pre-scales the inputs) by that constant.
//
// Structure: x/y accumulators and a z accumulator, two static shifters, three
// add/subtract ALUs, an arctangent table, a 16-state control block, and an
// angle range stage that extends the angle range to [-pi, pi).
//
// Timing: while end_cycle is high the unit is idle and x_out/y_out hold the
// last result. A clock edge with load high loads the inputs and starts a
// computing cycle; end_cycle falls. Each following clock performs one
// microrotation for as long as a microrotation still changes the point (at
// most 15), then one more clock finds the point settled and returns to the
// wait state, raising end_cycle. Inputs need only be valid at the load edge.
// Inputs must be small enough that K*|v| fits 16 bits (|x_in|,|y_in| up to
// about 14000 for any angle); the datapath wraps on overflow.
module cordic
  import cordic_pkg::*;
(
  input  logic  clk,
  input  logic  load,
  input  logic  res,
  input  word_t x_in,
  input  word_t y_in,
  input  word_t z_in,
  output word_t x_out,
  output word_t y_out,
  output logic  end_cycle
);

  state_t state;
  logic   load_en, step_en, pos;
  word_t  x, y, z, z_red;
  word_t  xs, ys, atan_n;
  word_t  alu_x, alu_y, alu_z;

  cordic_control u_control (
    .clk, .res, .load, .xs, .ys, .state, .load_en, .step_en, .end_cycle
  );

  cordic_quadrant u_quadrant (
    .clk, .res, .load_en, .z_in, .z_red,
    .x_acc(x), .y_acc(y), .x_out, .y_out
  );

  cordic_acc_xy u_acc_xy (
    .clk, .res, .load_en, .step_en, .x_in, .y_in, .alu_x, .alu_y, .x, .y
  );

  cordic_acc_z u_acc_z (
    .clk, .res, .load_en, .step_en, .z_in(z_red), .alu_z, .z, .pos
  );

  cordic_shifter u_shift_x (.a(x), .sh(state), .y(xs));
  cordic_shifter u_shift_y (.a(y), .sh(state), .y(ys));

  cordic_atan_lut u_lut (.n(state), .angle(atan_n));

  cordic_alu u_alu_x (.a(x), .b(ys),     .sub(pos),  .y(alu_x));
  cordic_alu u_alu_y (.a(y), .b(xs),     .sub(!pos), .y(alu_y));
  cordic_alu u_alu_z (.a(z), .b(atan_n), .sub(pos),  .y(alu_z));

endmodule
