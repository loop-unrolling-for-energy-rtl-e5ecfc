// Filter enable chain: one delayed copy of the enable pulse per glitch filter.
//
// The pulse from enable_pulse_gen passes through N_TAPS delay elements in
// series. The output of element k drives the enable of glitch filter k and
// the input of element k+1, so filter k opens (k+1) * Tc after the clock
// edge, where Tc is the delay of one element. Tc must exceed the delay of the
// iterations between two filters so that each filter opens only after its
// input has settled. Each element is TAP_LUTS LUTs (Cyclone IV) or TAP_SLICES
// carry slices (Artix-7); the defaults are the chain lengths used for
// AES-256, bitonic sort and CORDIC.
//
// Interface: pulse in, en[N_TAPS-1:0] out. N_TAPS = 0 is allowed and gives a
// single unused output bit tied low.
module filter_enable_chain #(
  parameter int unsigned N_TAPS = 4,
  parameter unroll_pkg::fpga_target_e TARGET = unroll_pkg::TARGET_ARTIX7,
  parameter int unsigned TAP_LUTS   = 36,
  parameter int unsigned TAP_SLICES = 7,
  localparam int unsigned NW = (N_TAPS == 0) ? 1 : N_TAPS
) (
  input  logic          pulse,
  output logic [NW-1:0] en
);
  timeunit 1ns; timeprecision 1ps;

  if (N_TAPS == 0) begin : g_none
    assign en = '0;
  end else begin : g_taps
    logic [N_TAPS:0] node;
    assign node[0] = pulse;
    for (genvar k = 0; k < N_TAPS; k++) begin : g_tap
      if (TARGET == unroll_pkg::TARGET_CYCLONE4) begin : g_lut
        lut_delay_chain #(.N_LUTS(TAP_LUTS)) u_dly (.d(node[k]), .q(node[k+1]));
      end else begin : g_carry
        carry_delay_chain #(.N_SLICES(TAP_SLICES)) u_dly (.d(node[k]), .q(node[k+1]));
      end
    end
    assign en = node[N_TAPS:1];
  end
endmodule
