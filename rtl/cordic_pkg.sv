// CORDIC constants (circular rotation mode).
//
// The 51-bit operand is three 17-bit two's complement words x, y, z. x and y
// are fixed point with 15 fraction bits; z is an angle in radians with 14
// fraction bits (range about +-2 rad). Iteration i rotates (x, y) by
// +-atan(2^-i) towards z = 0:
//   d = (z >= 0) ? +1 : -1
//   x' = x - d*(y >>> i),  y' = y + d*(x >>> i),  z' = z - d*ATAN[i]
// with ATAN[i] = round(atan(2^-i) * 2^14). After 15 iterations
// (x, y) = K * (x0 cos z0 - y0 sin z0, y0 cos z0 + x0 sin z0), K ~ 1.6468.
package cordic_pkg;
  timeunit 1ns; timeprecision 1ps;

  localparam int unsigned ITER = 15;
  localparam int unsigned W    = 17;
  localparam int unsigned ZFRAC = 14;

  typedef struct packed {
    logic signed [W-1:0] x;
    logic signed [W-1:0] y;
    logic signed [W-1:0] z;
  } cordic_state_t;

  localparam int unsigned STATE_W = $bits(cordic_state_t);   // 51

  // round(atan(2^-i) * 2^14), i = 0..14
  localparam logic [W-1:0] ATAN [ITER] = '{
    17'd12868, 17'd7596, 17'd4014, 17'd2037, 17'd1023, 17'd512, 17'd256, 17'd128,
    17'd64, 17'd32, 17'd16, 17'd8, 17'd4, 17'd2, 17'd1};
endpackage
