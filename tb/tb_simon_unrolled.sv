// Self-checking testbench for simon_unrolled.
//
// Four instances run side by side on one clock: the fully unrolled default
// (68 rounds per cycle, latch filters every 2 rounds), a partially unrolled
// one with U = 5 (14 cycles, the last cycle bypasses 2 copies) and flip-flop
// filters every round, a sequential one (U = 1, 68 cycles), and the fully
// unrolled one with LUT-chain delay elements (Cyclone IV style, 18 LUTs per
// element: the 33rd filter opens about 326 ns after the edge, inside the
// 340 ns period). Each is given
// the published SIMON-128/128 test vector and then random blocks; every
// ciphertext is compared with a reference model in this file that expands the
// whole key schedule first and then runs the rounds, and the number of cycles
// from the start edge to done is checked against ceil(68/U).
module tb_simon_unrolled;
  timeunit 1ns; timeprecision 1ps;

  localparam realtime TCLK = 340ns;   // fully unrolled period on Artix-7
  localparam int NRAND = 6;

  logic clk = 1'b0, rst_n = 1'b0;
  always #(TCLK / 2) clk = ~clk;

  int checks = 0, failures = 0;
  int finished = 0;

  function automatic logic [63:0] rl(input logic [63:0] v, input int s);
    return (v << s) | (v >> (64 - s));
  endfunction

  function automatic logic [127:0] ref_simon(input logic [127:0] p, input logic [127:0] k);
    localparam string Z2S = "10101111011100000011010010011000101000010001111110010110110011";
    logic [63:0] ks [68];
    logic [63:0] x, y, t, tmp;
    ks[0] = k[63:0];
    ks[1] = k[127:64];
    for (int i = 0; i < 66; i++) begin
      tmp = rl(ks[i+1], 61);
      tmp = tmp ^ rl(tmp, 63);
      ks[i+2] = ~ks[i] ^ 64'd3 ^ tmp ^ ((Z2S[i % 62] == "1") ? 64'd1 : 64'd0);
    end
    x = p[127:64];
    y = p[63:0];
    for (int i = 0; i < 68; i++) begin
      t = x;
      x = y ^ ((rl(x, 1) & rl(x, 8)) ^ rl(x, 2)) ^ ks[i];
      y = t;
    end
    return {x, y};
  endfunction

  logic         start [4];
  logic         ready [4];
  logic         done  [4];
  logic [127:0] pt [4], key [4], ct [4];

  simon_unrolled dut_full (
    .clk, .rst_n, .start(start[0]), .ready(ready[0]), .pt(pt[0]), .key(key[0]), .done(done[0]), .ct(ct[0]));
  simon_unrolled #(.U(5), .SPACING(1), .KIND(unroll_pkg::FILTER_FF)) dut_part (
    .clk, .rst_n, .start(start[1]), .ready(ready[1]), .pt(pt[1]), .key(key[1]), .done(done[1]), .ct(ct[1]));
  simon_unrolled #(.U(1)) dut_seq (
    .clk, .rst_n, .start(start[2]), .ready(ready[2]), .pt(pt[2]), .key(key[2]), .done(done[2]), .ct(ct[2]));
  simon_unrolled #(.TARGET(unroll_pkg::TARGET_CYCLONE4)) dut_c4 (
    .clk, .rst_n, .start(start[3]), .ready(ready[3]), .pt(pt[3]), .key(key[3]), .done(done[3]), .ct(ct[3]));

  localparam int NCYC [4] = '{1, 14, 68, 1};

  task automatic run_one(input int d, input logic [127:0] p, input logic [127:0] k);
    int cyc;
    logic [127:0] exp_ct;
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
    exp_ct = ref_simon(p, k);
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

  localparam logic [127:0] KAT_KEY = 128'h0f0e0d0c0b0a0908_0706050403020100;
  localparam logic [127:0] KAT_PT  = 128'h6373656420737265_6c6c657661727420;
  localparam logic [127:0] KAT_CT  = 128'h49681b1e1e54fe3f_65aa832af84e0bbc;

  initial begin
    for (int d = 0; d < 4; d++) begin
      start[d] = 1'b0; pt[d] = '0; key[d] = '0;
    end
    checks++;
    if (ref_simon(KAT_PT, KAT_KEY) !== KAT_CT) begin
      failures++;
      $display("FAIL reference model disagrees with the published test vector");
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    begin
      for (int d = 0; d < 4; d++) begin
        automatic int dd = d;
        fork
          begin
            run_one(dd, KAT_PT, KAT_KEY);
            checks++;
            if (ct[dd] !== KAT_CT) begin
              failures++;
              $display("FAIL dut%0d test vector ct=%h", dd, ct[dd]);
            end
            for (int n = 0; n < NRAND; n++)
              run_one(dd, {$urandom, $urandom, $urandom, $urandom}, {$urandom, $urandom, $urandom, $urandom});
            finished++;
          end
        join_none
      end
      wait (finished == 4);
    end
    // Back-to-back blocks through the fully unrolled loop: one per cycle.
    begin
      logic [127:0] ps [4], ks [4];
      for (int n = 0; n < 4; n++) begin
        ps[n] = {$urandom, $urandom, $urandom, $urandom};
        ks[n] = {$urandom, $urandom, $urandom, $urandom};
      end
      @(negedge clk);
      for (int n = 0; n < 4; n++) begin
        pt[0] = ps[n]; key[0] = ks[n]; start[0] = 1'b1;
        @(negedge clk);
        if (n > 0) begin
          checks += 2;
          if (!done[0]) begin failures++; $display("FAIL no done in streaming cycle %0d", n); end
          if (ct[0] !== ref_simon(ps[n-1], ks[n-1])) begin
            failures++; $display("FAIL streaming block %0d", n - 1);
          end
        end
      end
      start[0] = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
