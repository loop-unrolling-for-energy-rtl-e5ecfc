// Bitonic sort of 32 16-bit keys as an unrolled loop with glitch filters.
//
// The 15 compare-swap stages are computed U per system clock cycle by U
// chained copies of bitonic_stage, so one sort takes ceil(15/U) cycles.
// U = 15 (the default) is the fully unrolled network, one sort per cycle;
// U = 1 is the sequential form, one stage per cycle with the stage wiring
// selected by the cycle count. Because the wiring changes from stage to
// stage, only these two forms are natural for this loop; other U values
// work but need the same multiplexed wiring. A glitch filter (latch by
// default) follows every SPACING-th stage; the defaults, a filter every 2
// stages and 7 carry slices per delay element (36 LUTs on Cyclone IV), are
// the lowest-energy settings found for this network on the Artix-7.
//
// Interface: start/ready handshake (unroll_ctrl); keys_in (key i in bits
// [16i+15:16i]) is sampled when start is taken; keys_out holds the keys in
// ascending order (smallest in key 0) while done is high, ceil(15/U) cycles
// after that edge. Reset (active low, synchronous) clears the control state.
module bitonic_unrolled #(
  parameter int unsigned U       = bitonic_pkg::STAGES,
  parameter int unsigned SPACING = 2,
  parameter unroll_pkg::filter_kind_e KIND   = unroll_pkg::FILTER_LATCH,
  parameter unroll_pkg::fpga_target_e TARGET = unroll_pkg::TARGET_ARTIX7,
  parameter int unsigned TAP_LUTS   = 36,
  parameter int unsigned TAP_SLICES = 7
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           start,
  output logic                           ready,
  input  logic [bitonic_pkg::DATA_W-1:0] keys_in,
  output logic                           done,
  output logic [bitonic_pkg::DATA_W-1:0] keys_out
);
  timeunit 1ns; timeprecision 1ps;
  import bitonic_pkg::*;

  localparam int unsigned N  = STAGES;
  localparam int unsigned NF = unroll_pkg::num_filters(U, SPACING);
  localparam int unsigned IW = $clog2(N + U + 1);

  logic              load, busy, last;
  logic [IW-1:0]     base;
  logic [DATA_W-1:0] loop_q, res_q;
  logic [DATA_W-1:0] stage [U+1];

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
    logic [DATA_W-1:0] it_q, act_q;
    logic [IW-1:0]     idx;
    assign idx = base + IW'(j);
    bitonic_stage u_stage (.stage(4'(idx)), .d(stage[j]), .q(it_q));
    if (N % U != 0) begin : g_bypass
      assign act_q = (idx < IW'(N)) ? it_q : stage[j];
    end else begin : g_all
      // Without a bypass the top index bits are only there for it.
      logic unused_idx;
      assign act_q = it_q;
      assign unused_idx = ^idx;
    end
    if ((j + 1) % SPACING == 0 && j + 1 < U) begin : g_filter
      glitch_filter #(.WIDTH(DATA_W), .KIND(KIND)) u_gf (
        .en(en[(j + 1) / SPACING - 1]), .d(act_q), .q(stage[j+1]));
    end else begin : g_wire
      assign stage[j+1] = act_q;
    end
  end

  always_ff @(posedge clk) begin
    if (load)      loop_q <= keys_in;
    else if (busy) loop_q <= stage[U];
    if (last)      res_q  <= stage[U];
  end

  assign keys_out = res_q;
endmodule
