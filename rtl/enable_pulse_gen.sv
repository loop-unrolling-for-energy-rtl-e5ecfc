// Enable pulse generator for the glitch filters.
//
// The pulse is the AND of the system clock with an inverted, delayed copy of
// itself: it rises with each rising clock edge and falls one delay element
// later, so its width equals that delay. The pulse then travels down the
// filter enable chain. The AND sits in one LUT with fixed input pins; the
// delay element is the target's own delay structure: four LUTs on a
// Cyclone IV (five logic elements in all with the AND) or four carry
// multiplexers on an Artix-7. Four multiplexers are taken as 4/3 of the
// 86 ps measured from carry-in to the third multiplexer, about 115 ps. The
// pulse is thereby wider than one stage of the enable delay chain, which
// would otherwise swallow it.
//
// Interface: clk in, pulse out; pulse width = PW_LUTS LUT stages or
// PW_A7_PS picoseconds. Purely combinational apart from the delay.
//
// The delay is a behavioural model (see the delay chain modules). A generic
// synthesis tool sees zero delay and reduces the pulse to a constant 0; on
// the FPGA the delay element is a placed macro of kept LUT or carry cells.
module enable_pulse_gen #(
  parameter unroll_pkg::fpga_target_e TARGET = unroll_pkg::TARGET_ARTIX7,
  parameter int unsigned PW_LUTS   = 4,
  parameter int unsigned PW_A7_PS  = (4 * unroll_pkg::A7_SLICE_PS + 2) / 3
) (
  input  logic clk,
  output logic pulse
);
  timeunit 1ns; timeprecision 1ps;

  logic clk_dly;

  if (TARGET == unroll_pkg::TARGET_CYCLONE4) begin : g_lut
    lut_delay_chain #(.N_LUTS(PW_LUTS)) u_dly (.d(clk), .q(clk_dly));
  end else begin : g_carry
    carry_delay_chain #(.N_SLICES(1), .SLICE_PS(PW_A7_PS)) u_dly (.d(clk), .q(clk_dly));
  end

  assign pulse = clk & ~clk_dly;
endmodule
