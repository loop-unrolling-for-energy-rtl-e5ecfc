// Shared types and constants for the unrolled, glitch-filtered loop datapaths.
//
// filter_kind_e selects how a glitch filter stores an iteration result: a
// level-sensitive latch (the default, because it gives a window for late
// data) or an edge-triggered flip-flop. fpga_target_e selects the delay
// element used to delay the filter enables: a LUT chain (Cyclone IV style)
// or a carry chain (Artix-7 style).
//
// choose_unroll() is the area/energy-aware unrolling rule: keep the loop
// sequential when one iteration per system clock meets the latency bound,
// otherwise increase the unroll factor U until ceil(N/U) clock periods fit
// the required latency, as long as U filtered iterations still fit one clock
// period. All times are in picoseconds. It returns 0 when no U fits, meaning
// the system clock is too slow or too fast for the constraint without a
// separate clock.
package unroll_pkg;
  timeunit 1ns; timeprecision 1ps;

  typedef enum logic {FILTER_LATCH = 1'b0, FILTER_FF = 1'b1} filter_kind_e;
  typedef enum logic {TARGET_CYCLONE4 = 1'b0, TARGET_ARTIX7 = 1'b1} fpga_target_e;

  // Cyclone IV: one LUT (155 ps) plus the local LAB routing to the next LUT (390 ps).
  localparam int unsigned CYC4_LUT_PS   = 155;
  localparam int unsigned CYC4_ROUTE_PS = 390;
  // Artix-7: carry-in to the third MUXCY output of one slice.
  localparam int unsigned A7_SLICE_PS   = 86;

  function automatic int unsigned ceil_div(input int unsigned a, input int unsigned b);
    return (a + b - 1) / b;
  endfunction

  // Number of glitch filters in a chain of U iterations with a filter after
  // every SPACING iterations; no filter follows the last iteration because the
  // loop register takes that value.
  function automatic int unsigned num_filters(input int unsigned u, input int unsigned spacing);
    return (u - 1) / spacing;
  endfunction

  // L: required latency, C: clock period, N: iterations, R: one iteration,
  // G: glitch filter per iteration, F: flip-flop clock-to-out plus setup.
  function automatic int unsigned choose_unroll(
      input longint unsigned l_ps, input longint unsigned c_ps, input int unsigned n,
      input longint unsigned r_ps, input longint unsigned g_ps, input longint unsigned f_ps);
    int unsigned u;
    if (l_ps >= n * c_ps && c_ps >= r_ps + f_ps) return 1;
    u = 2;
    while (u <= n && c_ps >= f_ps + u * (r_ps + g_ps)) begin
      if (l_ps >= longint'(ceil_div(n, u)) * c_ps) return u;
      u++;
    end
    return 0;
  endfunction
endpackage
