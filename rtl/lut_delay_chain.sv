// Behavioural model of a Cyclone IV style LUT delay chain.
//
// In the device the chain is N_LUTS adjacent logic elements of one logic
// array block wired output-to-input through a fixed LUT input pin, so that
// every stage has the same, predictable delay; past 16 elements the chain
// continues in the vertically adjacent block. A LUT that only forwards its
// input has no logic function that simulation can show, so this model is the
// timing only: N_LUTS stages, each delaying by LUT_PS + ROUTE_PS picoseconds.
// It is not synthesizable as a delay; an implementation places real LUT
// primitives with placement constraints instead.
//
// The per-LUT delay (155 ps) and local routing delay (390 ps) are the
// measured figures for the EP4CGX150 device; the 36-LUT default is the chain
// length used for the larger benchmarks (18 for SIMON-128). Each stage is an
// inertial delay, so a pulse must be wider than one stage to pass, as in the
// device.
//
// Interface: d in, q out, q(t) = d(t - N_LUTS * (LUT_PS + ROUTE_PS)).
module lut_delay_chain #(
  parameter int unsigned N_LUTS   = 36,
  parameter int unsigned LUT_PS   = unroll_pkg::CYC4_LUT_PS,
  parameter int unsigned ROUTE_PS = unroll_pkg::CYC4_ROUTE_PS
) (
  input  logic d,
  output logic q
);
  timeunit 1ns; timeprecision 1ps;

  localparam realtime STAGE = (LUT_PS + ROUTE_PS) * 1ps;

  logic [N_LUTS:0] node;

  assign node[0] = d;
  for (genvar k = 0; k < N_LUTS; k++) begin : g_lut
    assign #(STAGE) node[k+1] = node[k];
  end
  assign q = node[N_LUTS];
endmodule
