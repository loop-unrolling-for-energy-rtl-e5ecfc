// Five loop-based kernels, each unrolled with glitch filters, side by side.
//
// Every kernel is an iterative computation (three block ciphers, a sorting
// network and CORDIC) whose iterations are chained combinationally inside
// one system clock period instead of being run one per cycle on a fast,
// PLL-generated clock. Between the chained iterations sit glitch filters,
// latches whose enables are a pulse made from the system clock and delayed
// by a chain of delay elements, so each filter opens only once its input
// has settled and glitches do not ripple down the whole chain. In this top
// every kernel is in its fully unrolled form (one result per system clock
// cycle) with the filter spacing and delay-element length that gave the
// lowest energy for it; the kernels share only the clock and reset.
//
//   kernel    iterations  data in       filter every  delay element
//   SIMON-128 68          128 + key 128 2 rounds      3 slices / 18 LUTs
//   AES-256   14          128 + key 256 2 rounds      7 slices / 36 LUTs
//   DES       16           64 + key 64  1 round       6 slices / 36 LUTs
//   bitonic   15          32 x 16 bit   2 stages      7 slices / 36 LUTs
//   CORDIC    15          3 x 17 bit    1 iteration   7 slices / 36 LUTs
//
// KIND selects latch or flip-flop filters and TARGET the delay-element
// style (carry chain or LUT chain) for all kernels at once.
//
// Interface: each kernel has its own start/ready handshake, operands and
// done-qualified result, with the timing of its *_unrolled module: operands
// sampled on the edge where start and ready are high, result valid with done
// one cycle later.
module loop_unroll_top #(
  parameter unroll_pkg::filter_kind_e KIND   = unroll_pkg::FILTER_LATCH,
  parameter unroll_pkg::fpga_target_e TARGET = unroll_pkg::TARGET_ARTIX7
) (
  input  logic         clk,
  input  logic         rst_n,
  // SIMON-128/128
  input  logic         simon_start,
  output logic         simon_ready,
  input  logic [127:0] simon_pt,
  input  logic [127:0] simon_key,
  output logic         simon_done,
  output logic [127:0] simon_ct,
  // AES-256
  input  logic         aes_start,
  output logic         aes_ready,
  input  logic [127:0] aes_pt,
  input  logic [255:0] aes_key,
  output logic         aes_done,
  output logic [127:0] aes_ct,
  // DES
  input  logic         des_start,
  output logic         des_ready,
  input  logic [63:0]  des_pt,
  input  logic [63:0]  des_key,
  output logic         des_done,
  output logic [63:0]  des_ct,
  // Bitonic sort, 32 x 16 bit
  input  logic         sort_start,
  output logic         sort_ready,
  input  logic [bitonic_pkg::DATA_W-1:0] sort_in,
  output logic         sort_done,
  output logic [bitonic_pkg::DATA_W-1:0] sort_out,
  // CORDIC rotation, {x, y, z}
  input  logic         cordic_start,
  output logic         cordic_ready,
  input  logic [cordic_pkg::STATE_W-1:0] cordic_in,
  output logic         cordic_done,
  output logic [cordic_pkg::STATE_W-1:0] cordic_out
);
  timeunit 1ns; timeprecision 1ps;

  simon_unrolled #(.KIND(KIND), .TARGET(TARGET)) u_simon (
    .clk, .rst_n, .start(simon_start), .ready(simon_ready), .pt(simon_pt), .key(simon_key),
    .done(simon_done), .ct(simon_ct));

  aes_unrolled #(.KIND(KIND), .TARGET(TARGET)) u_aes (
    .clk, .rst_n, .start(aes_start), .ready(aes_ready), .pt(aes_pt), .key(aes_key),
    .done(aes_done), .ct(aes_ct));

  des_unrolled #(.KIND(KIND), .TARGET(TARGET)) u_des (
    .clk, .rst_n, .start(des_start), .ready(des_ready), .pt(des_pt), .key(des_key),
    .done(des_done), .ct(des_ct));

  bitonic_unrolled #(.KIND(KIND), .TARGET(TARGET)) u_sort (
    .clk, .rst_n, .start(sort_start), .ready(sort_ready), .keys_in(sort_in),
    .done(sort_done), .keys_out(sort_out));

  cordic_unrolled #(.KIND(KIND), .TARGET(TARGET)) u_cordic (
    .clk, .rst_n, .start(cordic_start), .ready(cordic_ready), .din(cordic_in),
    .done(cordic_done), .dout(cordic_out));
endmodule
