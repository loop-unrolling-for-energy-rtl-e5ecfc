// SIMON-128/128 encryption as an unrolled loop with glitch filters.
//
// The 68 rounds are computed U per system clock cycle by U chained copies of
// simon_round, so one block takes ceil(68/U) cycles. U = 68 (the default) is
// the fully unrolled form: one block per cycle, one clock cycle of latency.
// A glitch filter (latch by default) sits after every SPACING-th copy; the
// filters open in order, one delay element apart, after each rising clock
// edge, so each copy only ever sees settled data. The loop register holds the
// data and key words between cycles; with U = 1 the loop is sequential and no
// filter, pulse generator or delay chain is built. SPACING = 2 is the spacing
// that gave the lowest energy for this cipher; the delay element per filter
// is 3 carry slices (Artix-7) or 18 LUTs (Cyclone IV).
//
// Interface: start/ready handshake (unroll_ctrl); pt = {x, y} and
// key = {k1, k0} are sampled when start is taken; ct = {x, y} is valid while
// done is high, ceil(68/U) cycles after that edge, and stays until the next
// result. Reset (active low, synchronous) clears only the control state.
module simon_unrolled #(
  parameter int unsigned U       = simon_pkg::ROUNDS,
  parameter int unsigned SPACING = 2,
  parameter unroll_pkg::filter_kind_e KIND   = unroll_pkg::FILTER_LATCH,
  parameter unroll_pkg::fpga_target_e TARGET = unroll_pkg::TARGET_ARTIX7,
  parameter int unsigned TAP_LUTS   = 18,
  parameter int unsigned TAP_SLICES = 3
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  output logic         ready,
  input  logic [127:0] pt,
  input  logic [127:0] key,
  output logic         done,
  output logic [127:0] ct
);
  timeunit 1ns; timeprecision 1ps;
  import simon_pkg::*;

  localparam int unsigned N  = ROUNDS;
  localparam int unsigned NF = unroll_pkg::num_filters(U, SPACING);
  localparam int unsigned IW = $clog2(N + U + 1);

  logic          load, busy, last;
  logic [IW-1:0] base;
  simon_state_t  loop_q, res_q;
  simon_state_t  stage [U+1];

  unroll_ctrl #(.N(N), .U(U)) u_ctrl (
    .clk, .rst_n, .start, .ready, .load, .busy, .last, .done, .base
  );

  // Enable pulses for the filters, only when there is a filter.
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
    simon_state_t it_q, act_q;
    logic [IW-1:0] idx;
    assign idx = base + IW'(j);
    simon_round u_round (.round(7'(idx)), .d(stage[j]), .q(it_q));
    // Copies past the last round in the final cycle pass their input on.
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
    if (load)      loop_q <= '{x: pt[127:64], y: pt[63:0], ka: key[63:0], kb: key[127:64]};
    else if (busy) loop_q <= stage[U];
    if (last)      res_q  <= stage[U];
  end

  assign ct = {res_q.x, res_q.y};

  // ka/kb of the result are not part of the ciphertext.
  logic unused_keys;
  assign unused_keys = ^{res_q.ka, res_q.kb};
endmodule
