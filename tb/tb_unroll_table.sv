// Workload testbench: the partially unrolled, glitch-filtered configurations
// of the block ciphers and CORDIC, each at the system clock it is meant for.
//
// Every configuration pairs an unroll factor U with the Artix-7 system clock
// chosen for it so that the loop roughly keeps the latency of the fully
// unrolled kernel (340, 175, 100 and 120 ns):
//   SIMON-128  U = 2, 5, 10, 17  at 100, 41, 20.5, 11.7 MHz
//   AES-256    U = 2, 4, 6, 8    at  40, 23, 17, 11 MHz
//   DES        U = 2, 4, 8       at  80, 40, 20 MHz
//   CORDIC     U = 3, 5          at  40, 24 MHz
// Each instance has its own clock and filters at the kernel's default
// spacing. It gets NOPS random operands, one after the other. Every result is
// compared with the reference models of tb_ref_pkg, and the cycles from the
// start edge to done must be exactly ceil(N/U). The time per result is
// printed next to the latency target, for comparison only: with whole
// cycles it can exceed the target by a fraction of a cycle (SIMON U = 5:
// 14 x 24.4 ns = 341 ns; CORDIC U = 3: 5 x 25 ns = 125 ns).
module tb_unroll_table;
  timeunit 1ns; timeprecision 1ps;
  import tb_ref_pkg::*;

  localparam int NOPS = 4;
  localparam int NCFG = 13;

  int checks = 0, failures = 0;
  int finished = 0;
  logic rst_n = 1'b0;

  task automatic check(input string what, input int u, input int cyc, input int exp_cyc,
                       input logic [127:0] got, input logic [127:0] exp);
    checks += 2;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s U=%0d result %h expected %h", what, u, got, exp);
    end
    if (cyc != exp_cyc) begin
      failures++;
      $display("FAIL %s U=%0d latency %0d cycles, expected %0d", what, u, cyc, exp_cyc);
    end
  endtask

  // ---------------------------------------------------------------- SIMON-128
  localparam int SIMON_U [4]   = '{2, 5, 10, 17};
  localparam int SIMON_PS [4]  = '{10_000, 24_390, 48_780, 85_470};
  for (genvar c = 0; c < 4; c++) begin : g_simon
    logic clk = 1'b0;
    always #(SIMON_PS[c] * 1ps / 2) clk = ~clk;
    logic start = 1'b0, ready, done;
    logic [127:0] pt = '0, key = '0, ct;
    simon_unrolled #(.U(SIMON_U[c])) dut (.clk, .rst_n, .start, .ready, .pt, .key, .done, .ct);
    initial begin
      int cyc;
      wait (rst_n);
      repeat (NOPS) begin
        @(negedge clk);
        pt = {$urandom, $urandom, $urandom, $urandom};
        key = {$urandom, $urandom, $urandom, $urandom};
        start = 1'b1;
        @(negedge clk);
        start = 1'b0;
        cyc = 0;
        while (!done) begin @(negedge clk); cyc++; end
        check("SIMON", SIMON_U[c], cyc, (68 + SIMON_U[c] - 1) / SIMON_U[c], ct, simon(pt, key));
      end
      $display("SIMON-128 U=%0d: %0d cycles x %0d ps = %0d ns per block (target 340 ns)",
               SIMON_U[c], (68 + SIMON_U[c] - 1) / SIMON_U[c], SIMON_PS[c],
               ((68 + SIMON_U[c] - 1) / SIMON_U[c]) * SIMON_PS[c] / 1000);
      finished++;
    end
  end

  // ---------------------------------------------------------------- AES-256
  localparam int AES_U [4]  = '{2, 4, 6, 8};
  localparam int AES_PS [4] = '{25_000, 43_480, 58_820, 90_910};
  for (genvar c = 0; c < 4; c++) begin : g_aes
    logic clk = 1'b0;
    always #(AES_PS[c] * 1ps / 2) clk = ~clk;
    logic start = 1'b0, ready, done;
    logic [127:0] pt = '0, ct;
    logic [255:0] key = '0;
    aes_unrolled #(.U(AES_U[c])) dut (.clk, .rst_n, .start, .ready, .pt, .key, .done, .ct);
    initial begin
      int cyc;
      wait (rst_n);
      repeat (NOPS) begin
        @(negedge clk);
        pt = {$urandom, $urandom, $urandom, $urandom};
        key = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
        start = 1'b1;
        @(negedge clk);
        start = 1'b0;
        cyc = 0;
        while (!done) begin @(negedge clk); cyc++; end
        check("AES", AES_U[c], cyc, (14 + AES_U[c] - 1) / AES_U[c], ct, aes256(pt, key));
      end
      $display("AES-256 U=%0d: %0d cycles x %0d ps = %0d ns per block (target 175 ns)",
               AES_U[c], (14 + AES_U[c] - 1) / AES_U[c], AES_PS[c],
               ((14 + AES_U[c] - 1) / AES_U[c]) * AES_PS[c] / 1000);
      finished++;
    end
  end

  // ---------------------------------------------------------------- DES
  localparam int DES_U [3]  = '{2, 4, 8};
  localparam int DES_PS [3] = '{12_500, 25_000, 50_000};
  for (genvar c = 0; c < 3; c++) begin : g_des
    logic clk = 1'b0;
    always #(DES_PS[c] * 1ps / 2) clk = ~clk;
    logic start = 1'b0, ready, done;
    logic [63:0] pt = '0, key = '0, ct;
    des_unrolled #(.U(DES_U[c])) dut (.clk, .rst_n, .start, .ready, .pt, .key, .done, .ct);
    initial begin
      int cyc;
      wait (rst_n);
      repeat (NOPS) begin
        @(negedge clk);
        pt = {$urandom, $urandom};
        key = {$urandom, $urandom};
        start = 1'b1;
        @(negedge clk);
        start = 1'b0;
        cyc = 0;
        while (!done) begin @(negedge clk); cyc++; end
        check("DES", DES_U[c], cyc, 16 / DES_U[c], 128'(ct), 128'(des(pt, key)));
      end
      $display("DES U=%0d: %0d cycles x %0d ps = %0d ns per block (target 100 ns)",
               DES_U[c], 16 / DES_U[c], DES_PS[c], (16 / DES_U[c]) * DES_PS[c] / 1000);
      finished++;
    end
  end

  // ---------------------------------------------------------------- CORDIC
  localparam int CORDIC_U [2]  = '{3, 5};
  localparam int CORDIC_PS [2] = '{25_000, 41_670};
  for (genvar c = 0; c < 2; c++) begin : g_cordic
    logic clk = 1'b0;
    always #(CORDIC_PS[c] * 1ps / 2) clk = ~clk;
    logic start = 1'b0, ready, done;
    logic [50:0] din = '0, dout;
    cordic_unrolled #(.U(CORDIC_U[c])) dut (.clk, .rst_n, .start, .ready, .din, .dout, .done);
    initial begin
      int cyc;
      wait (rst_n);
      repeat (NOPS) begin
        @(negedge clk);
        // x = 1/K, y = 0, z random in about +-1.5 rad.
        din = {17'sd19898, 17'sd0, 17'($signed($urandom_range(0, 49_152)) - 24_576)};
        start = 1'b1;
        @(negedge clk);
        start = 1'b0;
        cyc = 0;
        while (!done) begin @(negedge clk); cyc++; end
        check("CORDIC", CORDIC_U[c], cyc, 15 / CORDIC_U[c], 128'(dout), 128'(cordic(din)));
      end
      $display("CORDIC U=%0d: %0d cycles x %0d ps = %0d ns per result (target 120 ns)",
               CORDIC_U[c], 15 / CORDIC_U[c], CORDIC_PS[c], (15 / CORDIC_U[c]) * CORDIC_PS[c] / 1000);
      finished++;
    end
  end

  initial begin
    #100ns rst_n = 1'b1;
    wait (finished == NCFG);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Watchdog: 20000 cycles of a 100 ns reference clock.
  logic wclk = 1'b0;
  always #50ns wclk = ~wclk;
  initial begin
    repeat (20_000) @(posedge wclk);
    failures++;
    $display("FAIL watchdog: %0d of %0d configurations finished", finished, NCFG);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
