// One AES-256 iteration: a cipher round and one key-expansion step.
//
// Purely combinational. Iteration r (1..14) applies SubBytes, ShiftRows,
// MixColumns (left out when r = 14) and AddRoundKey with round key r, and
// derives round key r+1 from round keys r-1 and r: the first word of the new
// key takes SubWord(RotWord(.)) ^ Rcon[(r+1)/2] when r+1 is even and
// SubWord(.) alone when r+1 is odd. The round index is a constant per copy
// in a fully unrolled loop, so the selection and the last-round mux fold away.
module aes_round (
  input  logic [3:0]          round,
  input  aes_pkg::aes_state_t d,
  output aes_pkg::aes_state_t q
);
  timeunit 1ns; timeprecision 1ps;
  import aes_pkg::*;

  logic [15:0][7:0] sb, sr;   // index 15 = byte 0
  logic [127:0]     mc;
  logic [31:0]      w0, w1, w2, w3, t;
  logic [7:0]       rcon;
  logic [4:0]       next_r;

  always_comb begin
    // SubBytes
    for (int b = 0; b < 16; b++) sb[15-b] = SBOX[d.s[127-8*b -: 8]];
    // ShiftRows: row r of column c takes row r of column c+r.
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        sr[15-(4*c+r)] = sb[15-(4*((c+r)%4)+r)];
    // MixColumns
    for (int c = 0; c < 4; c++) mc[127-32*c -: 32] = mix_column(sr[15-4*c -: 4]);
    q.s = ((round == 4'd14) ? 128'(sr) : mc) ^ d.rk_cur;

    // Key expansion
    next_r = 5'(round) + 5'd1;
    rcon   = 8'h01 << (next_r[4:1] - 4'd1);
    if (!next_r[0]) t = sub_word({d.rk_cur[23:0], d.rk_cur[31:24]}) ^ {rcon, 24'h0};
    else            t = sub_word(d.rk_cur[31:0]);
    w0 = d.rk_prev[127:96] ^ t;
    w1 = d.rk_prev[95:64]  ^ w0;
    w2 = d.rk_prev[63:32]  ^ w1;
    w3 = d.rk_prev[31:0]   ^ w2;
    q.rk_prev = d.rk_cur;
    q.rk_cur  = {w0, w1, w2, w3};
  end
endmodule
