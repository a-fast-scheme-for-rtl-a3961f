// cordic_atan_lut: table of microrotation angles.
//
// Entry n holds the angle of microrotation n, arctan(2^-n), in the integer
// angle scale of the design (2^15/pi per radian):
//   LUT(n) = round( (2^15/pi) * arctan(2^-n) )
// Entry 0 is 8192 (pi/4). Rounding to the nearest integer leaves entries 13
// and 14 at 1 and entry 15 at 0; only states 0..14 ever address the table
// during a computation, so fewer than 16 entries are non-zero. The table is
// combinational logic addressed by the machine state.
//
// Interface: n is the state, angle the table entry. No latency.
// The table contents and its combinational form follow the design; rounding
// to nearest is this design's choice.
module cordic_atan_lut
  import cordic_pkg::*;
(
  input  state_t n,
  output word_t  angle
);

  always_comb begin
    unique case (n)
      4'd0:    angle = 16'sd8192;
      4'd1:    angle = 16'sd4836;
      4'd2:    angle = 16'sd2555;
      4'd3:    angle = 16'sd1297;
      4'd4:    angle = 16'sd651;
      4'd5:    angle = 16'sd326;
      4'd6:    angle = 16'sd163;
      4'd7:    angle = 16'sd81;
      4'd8:    angle = 16'sd41;
      4'd9:    angle = 16'sd20;
      4'd10:   angle = 16'sd10;
      4'd11:   angle = 16'sd5;
      4'd12:   angle = 16'sd3;
      4'd13:   angle = 16'sd1;
      4'd14:   angle = 16'sd1;
      default: angle = 16'sd0;   // state 15, the wait state
    endcase
  end

endmodule
