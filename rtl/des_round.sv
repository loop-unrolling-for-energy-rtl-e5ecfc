// One DES iteration: a Feistel round and one subkey-generation step.
//
// Purely combinational. Round r rotates both 28-bit key halves left by the
// scheduled amount (1 or 2), selects the 48-bit subkey with PC-2, and maps
// (L, R) to (R, L ^ f(R, K_r)). The round index only selects the rotation
// amount, which is a constant per copy in a fully unrolled loop.
module des_round (
  input  logic [3:0]          round,
  input  des_pkg::des_state_t d,
  output des_pkg::des_state_t q
);
  timeunit 1ns; timeprecision 1ps;
  import des_pkg::*;

  logic [27:0] c, dd;

  always_comb begin
    if (SHIFTS[round] == 2'd2) begin
      c  = {d.c[25:0], d.c[27:26]};
      dd = {d.d[25:0], d.d[27:26]};
    end else begin
      c  = {d.c[26:0], d.c[27]};
      dd = {d.d[26:0], d.d[27]};
    end
    q.c = c;
    q.d = dd;
    q.l = d.r;
    q.r = d.l ^ feistel(d.r, perm_pc2({c, dd}));
  end
endmodule
