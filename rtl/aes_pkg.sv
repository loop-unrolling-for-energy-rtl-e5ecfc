// AES-256 constants and round functions (FIPS-197).
//
// The 128-bit state is held as 16 bytes, byte 0 in bits [127:120], column c
// made of bytes 4c..4c+3. The S-box is not stored as a literal table: it is
// computed once at elaboration as the multiplicative inverse in GF(2^8)
// (modulus x^8+x^4+x^3+x+1, inverse of 0 taken as 0) followed by the affine
// map b ^ (b<<<1) ^ (b<<<2) ^ (b<<<3) ^ (b<<<4) ^ 0x63, and then used as a
// constant 256-entry lookup. The inverses are found by stepping through the
// powers of the generator 3 and of its inverse together.
package aes_pkg;
  timeunit 1ns; timeprecision 1ps;

  localparam int unsigned ROUNDS = 14;

  // Loop state carried between iterations: the cipher state and the round
  // keys of the previous and the current round (AES-256 derives round key
  // r+1 from round keys r-1 and r).
  typedef struct packed {
    logic [127:0] s;
    logic [127:0] rk_prev;
    logic [127:0] rk_cur;
  } aes_state_t;

  localparam int unsigned STATE_W = $bits(aes_state_t);

  function automatic logic [7:0] rotl8(input logic [7:0] v, input int s);
    return (v << s) | (v >> (8 - s));
  endfunction

  // Walk p over the powers of the generator 3 and q over the powers of its
  // inverse, so q = 1/p at every step; 0 has no inverse and maps to 0x63.
  function automatic logic [255:0][7:0] make_sbox();
    logic [255:0][7:0] t;
    logic [7:0] p, q;
    t    = '0;
    t[0] = 8'h63;
    p    = 8'h01;
    q    = 8'h01;
    for (int n = 0; n < 255; n++) begin
      p = p ^ {p[6:0], 1'b0} ^ (p[7] ? 8'h1b : 8'h00);   // p * 3
      q = q ^ (q << 1);                                  // q / 3
      q = q ^ (q << 2);
      q = q ^ (q << 4);
      if (q[7]) q = q ^ 8'h09;
      t[p] = q ^ rotl8(q, 1) ^ rotl8(q, 2) ^ rotl8(q, 3) ^ rotl8(q, 4) ^ 8'h63;
    end
    return t;
  endfunction

  localparam logic [255:0][7:0] SBOX = make_sbox();

  function automatic logic [31:0] sub_word(input logic [31:0] w);
    return {SBOX[w[31:24]], SBOX[w[23:16]], SBOX[w[15:8]], SBOX[w[7:0]]};
  endfunction

  function automatic logic [7:0] xtime(input logic [7:0] a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  function automatic logic [31:0] mix_column(input logic [31:0] c);
    logic [7:0] a0, a1, a2, a3;
    {a0, a1, a2, a3} = c;
    return {xtime(a0) ^ xtime(a1) ^ a1 ^ a2 ^ a3,
            a0 ^ xtime(a1) ^ xtime(a2) ^ a2 ^ a3,
            a0 ^ a1 ^ xtime(a2) ^ xtime(a3) ^ a3,
            xtime(a0) ^ a0 ^ a1 ^ a2 ^ xtime(a3)};
  endfunction
endpackage
