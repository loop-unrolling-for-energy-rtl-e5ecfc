// One SIMON-128/128 iteration: a cipher round and one key-schedule step.
//
// Purely combinational. The round index selects the z2 constant bit of the
// key-schedule step; in a fully unrolled loop it is a constant and the
// selection disappears. Key words are computed on the fly, one per round, so
// the unrolled datapath needs no stored round keys.
module simon_round (
  input  logic [6:0]                        round,
  input  simon_pkg::simon_state_t           d,
  output simon_pkg::simon_state_t           q
);
  timeunit 1ns; timeprecision 1ps;
  import simon_pkg::*;

  logic [WORD-1:0] t;

  always_comb begin
    t    = ror(d.kb, 3);
    t    = t ^ ror(t, 1);
    q.x  = d.y ^ f(d.x) ^ d.ka;
    q.y  = d.x;
    q.ka = d.kb;
    q.kb = ~d.ka ^ WORD'(3) ^ WORD'(zbit(round)) ^ t;
  end
endmodule
