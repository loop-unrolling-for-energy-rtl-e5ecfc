// Behavioural model of an Artix-7 style carry-chain delay line.
//
// In the device every slice has four carry multiplexers (MUXCY) whose select
// lines are tied so that the carry input propagates; the enable pulse enters
// the carry input of the first slice, slices are cascaded through the fast
// carry path between adjacent slices, and the tap is taken at the third MUXCY
// of the last slice. That buffer path has no logic function to simulate, so
// this model keeps only its timing: N_SLICES stages, each delaying by
// SLICE_PS, plus ROUTE_PS between adjacent slices.
//
// SLICE_PS = 86 ps (carry-in to third-MUXCY output) is the measured figure
// for the XC7A35T; the slice-to-slice routing delay is not given, so ROUTE_PS
// is this design's assumption and defaults to 0. The 7-slice default is the
// chain used for AES-256, bitonic sort and CORDIC (3 for SIMON-128, 6 for DES).
// Each stage is an inertial delay, so a pulse narrower than one slice delay
// is swallowed.
//
// Interface: d in, q out, q(t) = d(t - N_SLICES*SLICE_PS - (N_SLICES-1)*ROUTE_PS).
module carry_delay_chain #(
  parameter int unsigned N_SLICES = 7,
  parameter int unsigned SLICE_PS = unroll_pkg::A7_SLICE_PS,
  parameter int unsigned ROUTE_PS = 0
) (
  input  logic d,
  output logic q
);
  timeunit 1ns; timeprecision 1ps;

  localparam realtime STAGE = SLICE_PS * 1ps;
  localparam realtime HOP   = ROUTE_PS * 1ps;

  logic [N_SLICES-1:0] slice_in, slice_out;

  assign slice_in[0] = d;
  for (genvar k = 0; k < N_SLICES; k++) begin : g_slice
    assign #(STAGE) slice_out[k] = slice_in[k];
    if (k + 1 < N_SLICES && ROUTE_PS > 0) begin : g_hop
      assign #(HOP) slice_in[k+1] = slice_out[k];
    end else if (k + 1 < N_SLICES) begin : g_abut
      assign slice_in[k+1] = slice_out[k];
    end
  end
  assign q = slice_out[N_SLICES-1];
endmodule
