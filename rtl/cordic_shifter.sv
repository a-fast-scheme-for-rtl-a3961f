// cordic_shifter: static (combinational) arithmetic right shifter.
//
// Computes v * 2^-n for a signed word v by shifting it n places to the right
// and filling the freed positions with copies of the sign bit. A negative
// number whose magnitude is below 2^n therefore becomes -1, not 0; the
// control block relies on this when it decides whether another microrotation
// would still change the coordinates. The shift happens in one pass through
// a barrel structure rather than n sequential one-bit shifts, so a whole
// microrotation fits in a single clock period.
//
// Interface: a is the word to shift, sh the shift count (the machine state),
// y the shifted word. Purely combinational, no latency.
// The sign-filling shift and its single-pass (static) form are the design's;
// writing it as one >>> operator is left to synthesis.
module cordic_shifter #(
  parameter int W  = cordic_pkg::W,
  parameter int SW = cordic_pkg::SW
) (
  input  logic signed [W-1:0]  a,
  input  logic        [SW-1:0] sh,
  output logic signed [W-1:0]  y
);

  always_comb y = a >>> sh;

endmodule
