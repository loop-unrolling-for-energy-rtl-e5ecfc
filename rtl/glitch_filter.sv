// Glitch filter: the storage element placed between unrolled iterations.
//
// The combinational output of one (or several) unrolled iterations toggles
// many times before it settles. The filter forwards it to the next iteration
// only when the delayed enable pulse for this position arrives, which is
// timed to come after the iteration output has settled, so the glitches stop
// here instead of spreading through the rest of the chain.
//
// KIND = FILTER_LATCH (default): a level-sensitive latch, transparent while
// en is high. Data that settles at any time before the pulse ends is still
// passed correctly, which is why the latch is the preferred filter.
// KIND = FILTER_FF: an edge-triggered flip-flop clocked by the rising edge of
// en. Data must already be stable at that edge, otherwise a wrong value is
// passed on until the next pulse.
//
// Interface: d (WIDTH bits) from the iteration, en from the enable chain,
// q to the next iteration. No reset: the value is overwritten by every
// enable pulse, and nothing reads it before the first pulse.
//
// The latch in this module is intended: it is the filter, and synthesis
// maps it to WIDTH latch bits. Verilator's lint, when it sees this module
// inside a kernel, can still report that the always_latch block holds no
// latch (NOLATCH); that report is wrong for this block and the warning is
// left to stand.
module glitch_filter #(
  parameter int unsigned WIDTH = 128,
  parameter unroll_pkg::filter_kind_e KIND = unroll_pkg::FILTER_LATCH
) (
  input  logic             en,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  timeunit 1ns; timeprecision 1ps;

  if (KIND == unroll_pkg::FILTER_LATCH) begin : g_latch
    always_latch begin
      if (en) q = d;
    end
  end else begin : g_ff
    always_ff @(posedge en) q <= d;
  end
endmodule
