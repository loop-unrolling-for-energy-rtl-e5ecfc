// AES-256 encryption as an unrolled loop with glitch filters.
//
// The 14 rounds are computed U per system clock cycle by U chained copies of
// aes_round, so one block takes ceil(14/U) cycles; U = 14 (the default) is
// the fully unrolled form, one block per cycle. The round keys are expanded
// on the fly inside the same chain, so no key memory is needed. A glitch
// filter (latch by default) follows every SPACING-th copy; filter k opens
// (k+1) delay elements after each rising clock edge. The defaults, a filter
// every 2 rounds and 7 carry slices per delay element (36 LUTs on
// Cyclone IV), are the lowest-energy settings found for this cipher on the
// Artix-7. With U = 1 the loop is sequential and has no filters.
//
// Interface: start/ready handshake (unroll_ctrl); pt and key are sampled when
// start is taken (key byte 0 in bits [255:248], FIPS-197 order); ct is valid
// while done is high, ceil(14/U) cycles after that edge, and stays until the
// next result. Reset (active low, synchronous) clears only the control state.
module aes_unrolled #(
  parameter int unsigned U       = aes_pkg::ROUNDS,
  parameter int unsigned SPACING = 2,
  parameter unroll_pkg::filter_kind_e KIND   = unroll_pkg::FILTER_LATCH,
  parameter unroll_pkg::fpga_target_e TARGET = unroll_pkg::TARGET_ARTIX7,
  parameter int unsigned TAP_LUTS   = 36,
  parameter int unsigned TAP_SLICES = 7
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  output logic         ready,
  input  logic [127:0] pt,
  input  logic [255:0] key,
  output logic         done,
  output logic [127:0] ct
);
  timeunit 1ns; timeprecision 1ps;
  import aes_pkg::*;

  localparam int unsigned N  = ROUNDS;
  localparam int unsigned NF = unroll_pkg::num_filters(U, SPACING);
  localparam int unsigned IW = $clog2(N + U + 1);

  logic          load, busy, last;
  logic [IW-1:0] base;
  aes_state_t    loop_q, res_q;
  aes_state_t    stage [U+1];

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
    aes_state_t    it_q, act_q;
    logic [IW-1:0] idx;
    assign idx = base + IW'(j);
    aes_round u_round (.round(4'(idx + 1'b1)), .d(stage[j]), .q(it_q));
    if (N % U != 0) begin : g_bypass
      assign act_q = (idx < IW'(N)) ? it_q : stage[j];
    end else begin : g_all
      assign act_q = it_q;
    end
    if ((j + 1) % SPACING == 0 && j + 1 < U) begin : g_filter
      glitch_filter #(.WIDTH(STATE_W), .KIND(KIND)) u_gf (
        .en(en[(j + 1) / SPACING - 1]), .d(act_q), .q(stage[j+1]));
    end else begin : g_wire
      assign stage[j+1] = act_q;
    end
  end

  always_ff @(posedge clk) begin
    if (load)      loop_q <= '{s: pt ^ key[255:128], rk_prev: key[255:128], rk_cur: key[127:0]};
    else if (busy) loop_q <= stage[U];
    if (last)      res_q  <= stage[U];
  end

  assign ct = res_q.s;

  logic unused_keys;
  assign unused_keys = ^{res_q.rk_prev, res_q.rk_cur};
endmodule
