// cordic_alu: adder/subtractor of the CORDIC datapath.
//
// Each microrotation adds a shifted operand to an accumulator or subtracts it,
// the choice being made by the operator signal that the z accumulator derives
// from the sign of the residual angle. Three copies are used:
//   ALU-X: x - s*(y >>> n)   (sub = 1 when s = +1)
//   ALU-Y: y + s*(x >>> n)   (sub = 1 when s = -1)
//   ALU-Z: z - s*atan(2^-n)  (sub = 1 when s = +1)
// The result wraps modulo 2^W. For the angle this is the intended behaviour
// (the 16-bit angle scale is circular); for the coordinates the caller must
// keep the inputs small enough that the CORDIC gain of about 1.647 does not
// overflow the word, since the design has no saturation or guard bits.
//
// Interface: y = sub ? a - b : a + b. Purely combinational.
// The operations are those of the algorithm; the plain adder/subtractor
// structure and the wrap-around behaviour are this design's choices.
module cordic_alu #(
  parameter int W = cordic_pkg::W
) (
  input  logic signed [W-1:0] a,
  input  logic signed [W-1:0] b,
  input  logic                sub,
  output logic signed [W-1:0] y
);

  always_comb y = sub ? a - b : a + b;

endmodule
