// Self-checking testbench for des_unrolled.
//
// Three instances on one clock: fully unrolled (default, latch filters after
// every round), U = 4 with flip-flop filters every 2 rounds (4 cycles) and
// U = 3 with latch filters (6 cycles, the last bypasses 2 copies), plus a
// sequential one (U = 1, 16 cycles). Each encrypts two published DES
// known-answer vectors and random blocks. Results are compared with a
// reference model here that first derives all 16 subkeys from the key
// schedule and then runs the rounds on bit arrays, and the cycles from
// start to done are checked.
module tb_des_unrolled;
  timeunit 1ns; timeprecision 1ps;
  import des_pkg::*;

  localparam realtime TCLK = 100ns;   // fully unrolled period on Artix-7
  localparam int NRAND = 6;
  localparam int ND = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  always #(TCLK / 2) clk = ~clk;

  int checks = 0, failures = 0;
  int finished = 0;

  function automatic logic [63:0] ref_des(input logic [63:0] p, input logic [63:0] k);
    logic b [1:64];
    logic kb [1:64];
    logic cd [1:56];
    logic sk [16][1:48];
    logic l [1:32], r [1:32], er [1:48], fo [1:32], so [1:32], t [1:56], pre [1:64];
    int row, col, v;
    for (int i = 1; i <= 64; i++) begin
      b[i]  = p[64-i];
      kb[i] = k[64-i];
    end
    for (int i = 1; i <= 56; i++) cd[i] = kb[PC1_T[i-1]];
    for (int n = 0; n < 16; n++) begin
      for (int s = 0; s < SHIFTS[n]; s++) begin
        t = cd;
        for (int i = 1; i <= 28; i++) begin
          cd[i]      = t[(i % 28) + 1];
          cd[i + 28] = t[(i % 28) + 29];
        end
      end
      for (int i = 1; i <= 48; i++) sk[n][i] = cd[PC2_T[i-1]];
    end
    for (int i = 1; i <= 32; i++) begin
      l[i] = b[IP_T[i-1]];
      r[i] = b[IP_T[i+31]];
    end
    for (int n = 0; n < 16; n++) begin
      for (int i = 1; i <= 48; i++) er[i] = r[E_T[i-1]] ^ sk[n][i];
      for (int g = 0; g < 8; g++) begin
        row = 2 * er[6*g+1] + er[6*g+6];
        col = 8 * er[6*g+2] + 4 * er[6*g+3] + 2 * er[6*g+4] + er[6*g+5];
        v = SBOX[64*g + 16*row + col];
        for (int i = 0; i < 4; i++) so[4*g+1+i] = v[3-i];
      end
      for (int i = 1; i <= 32; i++) fo[i] = so[P_T[i-1]] ^ l[i];
      l = r;
      r = fo;
    end
    for (int i = 1; i <= 32; i++) begin
      pre[i]      = r[i];
      pre[i + 32] = l[i];
    end
    for (int i = 1; i <= 64; i++) ref_des[64 - IP_T[i-1]] = pre[i];
  endfunction

  logic        start [ND];
  logic        ready [ND];
  logic        done  [ND];
  logic [63:0] pt [ND], key [ND], ct [ND];

  des_unrolled dut_full (
    .clk, .rst_n, .start(start[0]), .ready(ready[0]), .pt(pt[0]), .key(key[0]), .done(done[0]), .ct(ct[0]));
  des_unrolled #(.U(4), .SPACING(2), .KIND(unroll_pkg::FILTER_FF)) dut_part4 (
    .clk, .rst_n, .start(start[1]), .ready(ready[1]), .pt(pt[1]), .key(key[1]), .done(done[1]), .ct(ct[1]));
  des_unrolled #(.U(3)) dut_part3 (
    .clk, .rst_n, .start(start[2]), .ready(ready[2]), .pt(pt[2]), .key(key[2]), .done(done[2]), .ct(ct[2]));
  des_unrolled #(.U(1)) dut_seq (
    .clk, .rst_n, .start(start[3]), .ready(ready[3]), .pt(pt[3]), .key(key[3]), .done(done[3]), .ct(ct[3]));

  localparam int NCYC [ND] = '{1, 4, 6, 16};

  task automatic run_one(input int d, input logic [63:0] p, input logic [63:0] k);
    int cyc;
    logic [63:0] exp_ct;
    @(negedge clk);
    pt[d] = p; key[d] = k; start[d] = 1'b1;
    @(posedge clk);
    while (!ready[d]) @(posedge clk);
    @(negedge clk);
    start[d] = 1'b0;
    cyc = 0;
    while (!done[d]) begin
      @(negedge clk);
      cyc++;
    end
    exp_ct = ref_des(p, k);
    checks += 2;
    if (ct[d] !== exp_ct) begin
      failures++;
      $display("FAIL dut%0d ct=%h expected %h", d, ct[d], exp_ct);
    end
    if (cyc != NCYC[d]) begin
      failures++;
      $display("FAIL dut%0d latency %0d cycles, expected %0d", d, cyc, NCYC[d]);
    end
  endtask

  localparam logic [63:0] KAT_KEY [2] = '{64'h133457799BBCDFF1, 64'h0E329232EA6D0D73};
  localparam logic [63:0] KAT_PT  [2] = '{64'h0123456789ABCDEF, 64'h8787878787878787};
  localparam logic [63:0] KAT_CT  [2] = '{64'h85E813540F0AB405, 64'h0000000000000000};

  initial begin
    for (int d = 0; d < ND; d++) begin
      start[d] = 1'b0; pt[d] = '0; key[d] = '0;
    end
    for (int n = 0; n < 2; n++) begin
      checks++;
      if (ref_des(KAT_PT[n], KAT_KEY[n]) !== KAT_CT[n]) begin
        failures++;
        $display("FAIL reference model disagrees with known-answer vector %0d", n);
      end
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    begin
      for (int d = 0; d < ND; d++) begin
        automatic int dd = d;
        fork
          begin
            for (int n = 0; n < 2; n++) begin
              run_one(dd, KAT_PT[n], KAT_KEY[n]);
              checks++;
              if (ct[dd] !== KAT_CT[n]) begin
                failures++;
                $display("FAIL dut%0d known-answer vector %0d ct=%h", dd, n, ct[dd]);
              end
            end
            for (int n = 0; n < NRAND; n++) run_one(dd, {$urandom, $urandom}, {$urandom, $urandom});
            finished++;
          end
        join_none
      end
      wait (finished == ND);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
