// One CORDIC iteration: shift, add/subtract and angle update.
//
// Purely combinational; the iteration index sets the shift distance and the
// arctangent constant (see cordic_pkg). In a fully unrolled loop each copy
// has a constant index, so the shifts are wiring and the constants fold.
module cordic_iter (
  input  logic [3:0]                 iter,
  input  cordic_pkg::cordic_state_t  d,
  output cordic_pkg::cordic_state_t  q
);
  timeunit 1ns; timeprecision 1ps;
  import cordic_pkg::*;

  logic signed [W-1:0] xs, ys, at;

  always_comb begin
    xs = d.x >>> iter;
    ys = d.y >>> iter;
    at = (iter < 4'(ITER)) ? ATAN[iter] : '0;
    if (!d.z[W-1]) begin
      q.x = d.x - ys;
      q.y = d.y + xs;
      q.z = d.z - at;
    end else begin
      q.x = d.x + ys;
      q.y = d.y - xs;
      q.z = d.z + at;
    end
  end
endmodule
