// Self-checking testbench for aes_unrolled.
//
// Three instances on one clock: fully unrolled (default: 14 rounds per cycle,
// latch filters every 2 rounds), partially unrolled with U = 4 (4 cycles, the
// last one bypasses 2 copies) and flip-flop filters after every round, and
// sequential (U = 1, 14 cycles). Each encrypts the FIPS-197 AES-256 example
// and random blocks; results are compared with a reference model in this
// file (S-box built with the generator-3 power walk, key schedule expanded
// into 60 words up front), and the cycles from start to done are checked.
module tb_aes_unrolled;
  timeunit 1ns; timeprecision 1ps;

  localparam realtime TCLK = 175ns;   // fully unrolled period on Artix-7
  localparam int NRAND = 5;

  logic clk = 1'b0, rst_n = 1'b0;
  always #(TCLK / 2) clk = ~clk;

  int checks = 0, failures = 0;
  int finished = 0;
  logic [7:0] rsb [256];

  function automatic logic [7:0] r8(input logic [7:0] v, input int s);
    return (v << s) | (v >> (8 - s));
  endfunction

  // Walk p over the powers of 3 and q over the powers of 1/3 together.
  task automatic build_sbox();
    logic [7:0] p = 8'h01, q = 8'h01, x;
    do begin
      p = p ^ {p[6:0], 1'b0} ^ (p[7] ? 8'h1b : 8'h00);
      q ^= q << 1; q ^= q << 2; q ^= q << 4;
      if (q[7]) q ^= 8'h09;
      x = q ^ r8(q, 1) ^ r8(q, 2) ^ r8(q, 3) ^ r8(q, 4);
      rsb[p] = x ^ 8'h63;
    end while (p != 8'h01);
    rsb[0] = 8'h63;
  endtask

  function automatic logic [7:0] xt(input logic [7:0] a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  function automatic logic [127:0] ref_aes(input logic [127:0] p, input logic [255:0] k);
    logic [31:0] w [60];
    logic [31:0] t;
    logic [7:0] st [16], tmp [16];
    for (int i = 0; i < 8; i++) w[i] = k[255-32*i -: 32];
    for (int i = 8; i < 60; i++) begin
      t = w[i-1];
      if (i % 8 == 0) begin
        t = {t[23:0], t[31:24]};
        t = {rsb[t[31:24]], rsb[t[23:16]], rsb[t[15:8]], rsb[t[7:0]]};
        t[31:24] ^= 8'h01 << (i / 8 - 1);
      end else if (i % 8 == 4) begin
        t = {rsb[t[31:24]], rsb[t[23:16]], rsb[t[15:8]], rsb[t[7:0]]};
      end
      w[i] = w[i-8] ^ t;
    end
    for (int b = 0; b < 16; b++) st[b] = p[127-8*b -: 8] ^ w[b/4][31-8*(b%4) -: 8];
    for (int r = 1; r <= 14; r++) begin
      for (int b = 0; b < 16; b++) st[b] = rsb[st[b]];
      for (int b = 0; b < 16; b++) tmp[b] = st[4*(((b/4) + (b%4)) % 4) + b%4];
      st = tmp;
      if (r != 14)
        for (int c = 0; c < 4; c++) begin
          logic [7:0] a0, a1, a2, a3;
          a0 = st[4*c]; a1 = st[4*c+1]; a2 = st[4*c+2]; a3 = st[4*c+3];
          st[4*c]   = xt(a0) ^ (xt(a1) ^ a1) ^ a2 ^ a3;
          st[4*c+1] = a0 ^ xt(a1) ^ (xt(a2) ^ a2) ^ a3;
          st[4*c+2] = a0 ^ a1 ^ xt(a2) ^ (xt(a3) ^ a3);
          st[4*c+3] = (xt(a0) ^ a0) ^ a1 ^ a2 ^ xt(a3);
        end
      for (int b = 0; b < 16; b++) st[b] ^= w[4*r + b/4][31-8*(b%4) -: 8];
    end
    for (int b = 0; b < 16; b++) ref_aes[127-8*b -: 8] = st[b];
  endfunction

  logic         start [3];
  logic         ready [3];
  logic         done  [3];
  logic [127:0] pt [3], ct [3];
  logic [255:0] key [3];

  aes_unrolled dut_full (
    .clk, .rst_n, .start(start[0]), .ready(ready[0]), .pt(pt[0]), .key(key[0]), .done(done[0]), .ct(ct[0]));
  aes_unrolled #(.U(4), .SPACING(1), .KIND(unroll_pkg::FILTER_FF)) dut_part (
    .clk, .rst_n, .start(start[1]), .ready(ready[1]), .pt(pt[1]), .key(key[1]), .done(done[1]), .ct(ct[1]));
  aes_unrolled #(.U(1)) dut_seq (
    .clk, .rst_n, .start(start[2]), .ready(ready[2]), .pt(pt[2]), .key(key[2]), .done(done[2]), .ct(ct[2]));

  localparam int NCYC [3] = '{1, 4, 14};

  task automatic run_one(input int d, input logic [127:0] p, input logic [255:0] k);
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
    exp_ct = ref_aes(p, k);
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

  localparam logic [255:0] KAT_KEY = 256'h000102030405060708090a0b0c0d0e0f101112131415161718191a1b1c1d1e1f;
  localparam logic [127:0] KAT_PT  = 128'h00112233445566778899aabbccddeeff;
  localparam logic [127:0] KAT_CT  = 128'h8ea2b7ca516745bfeafc49904b496089;

  initial begin
    build_sbox();
    for (int d = 0; d < 3; d++) begin
      start[d] = 1'b0; pt[d] = '0; key[d] = '0;
    end
    checks++;
    if (ref_aes(KAT_PT, KAT_KEY) !== KAT_CT) begin
      failures++;
      $display("FAIL reference model disagrees with the FIPS-197 example: %h", ref_aes(KAT_PT, KAT_KEY));
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    begin
    for (int d = 0; d < 3; d++) begin
      automatic int dd = d;
      fork
        begin
          run_one(dd, KAT_PT, KAT_KEY);
          checks++;
          if (ct[dd] !== KAT_CT) begin
            failures++;
            $display("FAIL dut%0d FIPS-197 example ct=%h", dd, ct[dd]);
          end
          for (int n = 0; n < NRAND; n++)
            run_one(dd, {$urandom, $urandom, $urandom, $urandom},
                    {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom});
          finished++;
        end
      join_none
    end
    wait (finished == 3);
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
