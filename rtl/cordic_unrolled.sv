// CORDIC rotation as an unrolled loop with glitch filters.
//
// The 15 shift-and-add iterations on the 51-bit operand (x, y, z, 17 bits
// each) are computed U per system clock cycle by U chained copies of
// cordic_iter, so one rotation takes ceil(15/U) cycles; U = 15 (the default)
// is the fully unrolled form, one result per cycle. A glitch filter (latch
// by default) follows every SPACING-th copy; the defaults, a filter after
// every iteration and 7 carry slices per delay element (36 LUTs on
// Cyclone IV), are the lowest-energy settings found for this loop. With
// U = 1 the loop is sequential and has no filters.
//
// Interface: start/ready handshake (unroll_ctrl); din = {x, y, z} is sampled
// when start is taken; dout = {x, y, z} after 15 iterations is valid while
// done is high, ceil(15/U) cycles after that edge. Reset (active low,
// synchronous) clears only the control state.
module cordic_unrolled #(
  parameter int unsigned U       = cordic_pkg::ITER,
  parameter int unsigned SPACING = 1,
  parameter unroll_pkg::filter_kind_e KIND   = unroll_pkg::FILTER_LATCH,
  parameter unroll_pkg::fpga_target_e TARGET = unroll_pkg::TARGET_ARTIX7,
  parameter int unsigned TAP_LUTS   = 36,
  parameter int unsigned TAP_SLICES = 7
) (
  input  logic                             clk,
  input  logic                             rst_n,
  input  logic                             start,
  output logic                             ready,
  input  logic [cordic_pkg::STATE_W-1:0]   din,
  output logic                             done,
  output logic [cordic_pkg::STATE_W-1:0]   dout
);
  timeunit 1ns; timeprecision 1ps;
  import cordic_pkg::*;

  localparam int unsigned N  = ITER;
  localparam int unsigned NF = unroll_pkg::num_filters(U, SPACING);
  localparam int unsigned IW = $clog2(N + U + 1);

  logic          load, busy, last;
  logic [IW-1:0] base;
  cordic_state_t loop_q, res_q;
  cordic_state_t stage [U+1];

  unroll_ctrl #(.N(N), .U(U)) u_ctrl (
    .clk, .rst_n, .start, .ready, .load, .busy, .last, .done, .base
  );

  logic [(NF == 0 ? 1 : NF)-1:0] en;
  if (NF > 0) begin : g_enables
    logic pulse;
    enable_pulse_gen #(.TARGET(TARGET)) u_pulse (.clk, .pulse);
    filter_enable_chain #(.N_TAPS(NF), .TARGET(TARGET), .TAP_LUTS(TAP_LUTS),
                          .TAP_SLICES(TAP_SLICES)) u_chain (.pulse, .en);
  end else begin : g_no_enables
    assign en = '0;
  end

  assign stage[0] = loop_q;

  for (genvar j = 0; j < U; j++) begin : g_iter
    cordic_state_t it_q, act_q;
    logic [IW-1:0] idx;
    assign idx = base + IW'(j);
    cordic_iter u_iter (.iter(4'(idx)), .d(stage[j]), .q(it_q));
    if (N % U != 0) begin : g_bypass
      assign act_q = (idx < IW'(N)) ? it_q : stage[j];
    end else begin : g_all
      // Without a bypass the top index bits are only there for it.
      logic unused_idx;
      assign act_q = it_q;
      assign unused_idx = ^idx;
    end
    if ((j + 1) % SPACING == 0 && j + 1 < U) begin : g_filter
      glitch_filter #(.WIDTH(STATE_W), .KIND(KIND)) u_gf (
        .en(en[(j + 1) / SPACING - 1]), .d(act_q), .q(stage[j+1]));
    end else begin : g_wire
      assign stage[j+1] = act_q;
    end
  end

  always_ff @(posedge clk) begin
    if (load)      loop_q <= din;
    else if (busy) loop_q <= stage[U];
    if (last)      res_q  <= stage[U];
  end

  assign dout = res_q;
endmodule
