// cordic_quadrant: range extension of the rotation angle.
//
// The microrotation angles sum to about 99.9 degrees, so the iteration alone
// can only reach angles in [-pi/2, pi/2]. For an angle theta outside that
// interval the unit rotates by theta' = theta - pi instead and inverts the
// signs of the result, since e^{j theta} = -e^{j theta'}. In the 2^15/pi angle
// scale, subtracting pi is the same as adding 2^15 modulo 2^16, i.e.
// inverting the angle's sign bit, so the reduction is a single inverter.
// The angle -32768 (= -pi) is treated as outside the interval and becomes 0.
//
// The reduced angle goes to the z accumulator. A flag register, written on
// the load cycle, remembers whether the result must be negated; x_out and
// y_out are then the two's complement negations of the accumulators.
// Negating -32768 wraps to -32768, like any 16-bit negation.
//
// Interface: z_in/z_red are combinational; the flag is written on load_en;
// x_out/y_out follow x_acc/y_acc combinationally. res is asynchronous, active
// high. The sign inversion of the result follows the design; placing it at
// the output and the single-inverter reduction are this design's choices.
module cordic_quadrant
  import cordic_pkg::*;
(
  input  logic  clk,
  input  logic  res,
  input  logic  load_en,
  input  word_t z_in,
  output word_t z_red,
  input  word_t x_acc,
  input  word_t y_acc,
  output word_t x_out,
  output word_t y_out
);

  logic flip, neg_q;

  always_comb begin
    flip  = (z_in > HALF_PI) || (z_in < NEG_HALF_PI);
    z_red = flip ? {~z_in[W-1], z_in[W-2:0]} : z_in;
  end

  always_ff @(posedge clk or posedge res) begin
    if (res)          neg_q <= 1'b0;
    else if (load_en) neg_q <= flip;
  end

  always_comb begin
    x_out = neg_q ? -x_acc : x_acc;
    y_out = neg_q ? -y_acc : y_acc;
  end

endmodule
