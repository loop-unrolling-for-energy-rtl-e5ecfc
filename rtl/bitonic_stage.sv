// One bitonic sort iteration: NUM/2 compare-swap units working in parallel.
//
// Purely combinational. The stage index selects which keys are paired and
// in which direction they are ordered (see bitonic_pkg). Every stage has the
// same compare-swap units but a different wiring between them, so when the
// index is not a constant (sequential form) the wiring becomes multiplexers;
// in the fully unrolled form each copy has a constant index and only wires
// remain.
module bitonic_stage (
  input  logic [3:0]                   stage,
  input  logic [bitonic_pkg::DATA_W-1:0] d,
  output logic [bitonic_pkg::DATA_W-1:0] q
);
  timeunit 1ns; timeprecision 1ps;
  import bitonic_pkg::*;

  logic [NUM-1:0][KEY_W-1:0] a, b;

  always_comb begin
    int unsigned p, j, l;
    logic asc;
    p = 1;
    j = 0;
    a = d;
    b = a;
    stage_params(int'(stage), p, j);
    for (int unsigned i = 0; i < NUM; i++) begin
      l   = i ^ (1 << j);
      asc = ((i >> p) & 1) == 0;
      if (l > i) begin
        if (asc ? (a[i] > a[l]) : (a[i] < a[l])) begin
          b[i] = a[l];
          b[l] = a[i];
        end
      end
    end
    q = b;
  end
endmodule
