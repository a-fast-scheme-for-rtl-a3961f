// cordic_pkg: types and constants shared by the blocks of the iterative
// CORDIC rotator.
//
// All data words (the coordinates x, y and the angle z) are 16-bit two's
// complement numbers, as the design specifies. The control block is a
// 16-state machine whose states 0..14 are the microrotation steps (the state
// number is also the shift count and the arctangent table address) and whose
// state 15 is the wait state. Angles use the integer scale
// theta_int = theta_rad * 2^15 / pi, so the 16-bit range covers [-pi, pi).
package cordic_pkg;

  // Word width of coordinates and angle.
  localparam int W = 16;

  // Machine state: 4 bits, 16 states.
  localparam int SW = 4;
  typedef logic [SW-1:0] state_t;

  // State 15 waits for LOAD; states 0..LAST_STEP are microrotations.
  localparam state_t WAIT_STATE = state_t'(15);
  localparam state_t LAST_STEP  = state_t'(14);

  // Signed data word.
  typedef logic signed [W-1:0] word_t;

  // Angle constants in the 2^15/pi scale.
  localparam word_t HALF_PI     = word_t'(16384);   //  pi/2
  localparam word_t NEG_HALF_PI = word_t'(-16384);  // -pi/2

endpackage
