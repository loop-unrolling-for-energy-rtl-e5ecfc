// Testbench helper: watches one glitch filter from outside.
//
// Counts the enable pulses the filter receives, the changes of its input
// while it is closed (transitions the filter held back from the next
// iteration) and the changes of its output while it is closed, which must
// never happen for a latch filter. It also records how long after the last
// rising clock edge the enable pulse ended, so a testbench can check that
// the filter closed inside the clock period. Nothing is counted while
// active is low, so the settling of the delay chains after power-up is
// left out.
module filter_monitor #(
  parameter int unsigned WIDTH = 8
) (
  input logic             clk,
  input logic             active,
  input logic             en,
  input logic [WIDTH-1:0] d,
  input logic [WIDTH-1:0] q
);
  timeunit 1ns; timeprecision 1ps;

  int      pulses = 0;
  int      held = 0;
  int      leaks = 0;
  realtime t_edge = 0;
  realtime t_close_max = 0;
  realtime t_open_min = 1.0e9;

  always @(posedge clk) t_edge = $realtime;

  always @(en) if (active) begin
    if (en) begin
      pulses++;
      if ($realtime - t_edge < t_open_min) t_open_min = $realtime - t_edge;
    end else begin
      if ($realtime - t_edge > t_close_max) t_close_max = $realtime - t_edge;
    end
  end

  always @(d) if (active && !en) held++;

  always @(q) if (active && !en) leaks++;
endmodule
