// Bitonic sorting network constants.
//
// NUM keys of KEY_W bits are sorted in ascending order by log2(NUM) merge
// phases; phase p (1..log2 NUM) has p compare-swap stages, so 32 keys take
// 1+2+3+4+5 = 15 stages. Stage s belongs to phase p and compares keys i and
// i ^ 2^j for one j in p-1 down to 0; the pair is put in ascending order
// when bit p of i is 0 and in descending order otherwise.
package bitonic_pkg;
  timeunit 1ns; timeprecision 1ps;

  localparam int unsigned NUM    = 32;
  localparam int unsigned KEY_W  = 16;
  localparam int unsigned LOG_N  = $clog2(NUM);
  localparam int unsigned STAGES = LOG_N * (LOG_N + 1) / 2;
  localparam int unsigned DATA_W = NUM * KEY_W;

  // Phase p (block size 2^p) and compare distance exponent j of stage s.
  function automatic void stage_params(input int unsigned s, output int unsigned p,
                                       output int unsigned j);
    int unsigned n = 0;
    p = 1;
    j = 0;
    for (int unsigned pp = 1; pp <= LOG_N; pp++)
      for (int jj = int'(pp) - 1; jj >= 0; jj--) begin
        if (n == s) begin
          p = pp;
          j = unsigned'(jj);
        end
        n++;
      end
  endfunction
endpackage
