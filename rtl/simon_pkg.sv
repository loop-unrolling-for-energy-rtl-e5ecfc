// SIMON-128/128 constants and round functions.
//
// SIMON is a balanced Feistel cipher. For the 128-bit block, 128-bit key
// variant the words are 64 bits, there are 68 rounds and the key schedule
// uses m = 2 key words and the constant sequence z2. One round maps
// (x, y, k_i) to (y ^ f(x) ^ k_i, x) with f(x) = (x<<<1 & x<<<8) ^ x<<<2.
// The key schedule makes k_{i+2} = ~k_i ^ 3 ^ z2[i mod 62] ^ t ^ (t>>>1)
// with t = k_{i+1}>>>3.
package simon_pkg;
  timeunit 1ns; timeprecision 1ps;

  localparam int unsigned ROUNDS = 68;
  localparam int unsigned WORD   = 64;

  // z2, first bit of the sequence in bit 61 (written left to right).
  localparam logic [61:0] Z2 = 62'b10101111011100000011010010011000101000010001111110010110110011;

  // Loop state carried between iterations: the two data words and the two
  // key words needed by the next round.
  typedef struct packed {
    logic [WORD-1:0] x;
    logic [WORD-1:0] y;
    logic [WORD-1:0] ka;   // k_i, used by this round
    logic [WORD-1:0] kb;   // k_{i+1}
  } simon_state_t;

  localparam int unsigned STATE_W = $bits(simon_state_t);

  function automatic logic [WORD-1:0] rol(input logic [WORD-1:0] v, input int unsigned s);
    return (v << s) | (v >> (WORD - s));
  endfunction

  function automatic logic [WORD-1:0] ror(input logic [WORD-1:0] v, input int unsigned s);
    return (v >> s) | (v << (WORD - s));
  endfunction

  function automatic logic [WORD-1:0] f(input logic [WORD-1:0] x);
    return (rol(x, 1) & rol(x, 8)) ^ rol(x, 2);
  endfunction

  function automatic logic zbit(input logic [6:0] i);
    logic [5:0] m;
    m = 6'((i >= 7'd62) ? i - 7'd62 : i);
    return Z2[6'd61 - m];
  endfunction
endpackage
