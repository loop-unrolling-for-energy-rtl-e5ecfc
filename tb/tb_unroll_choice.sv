// Self-checking testbench for unroll_pkg::choose_unroll, the rule that picks
// the unroll factor U from the required latency L, the system clock period C,
// the iteration count N and the delays of one iteration (R), one glitch
// filter (G) and the loop register (F).
//
// Hand-worked cases come first: a loop slow enough to stay sequential, the
// SIMON-128 unroll factors of 2 and 5 at 100 MHz and 41 MHz, full unrolling
// on a slow clock, and a clock too fast for any U. Then random cases are
// compared with a brute-force search written independently here: the
// smallest U in 2..N whose U filtered iterations fit one clock period and
// whose ceil(N/U) periods meet the latency. For every U returned, the
// latency in clock cycles, ceil(N/U), is checked against L / C.
//
// There is no clock in the function under test; the 10 ns clock here only
// paces the random cases and drives the watchdog.
module tb_unroll_choice;
  timeunit 1ns; timeprecision 1ps;
  import unroll_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  function automatic int unsigned brute(longint unsigned l, longint unsigned c, int unsigned n,
                                        longint unsigned r, longint unsigned g, longint unsigned f);
    if (l >= longint'(n) * c && c >= r + f) return 1;
    for (int unsigned u = 2; u <= n; u++) begin
      longint unsigned cycles = (longint'(n) + u - 1) / u;
      if (c >= f + longint'(u) * (r + g) && l >= cycles * c) return u;
    end
    return 0;
  endfunction

  task automatic expect_u(string what, longint unsigned l, longint unsigned c, int unsigned n,
                          longint unsigned r, longint unsigned g, longint unsigned f,
                          int unsigned exp);
    int unsigned got = choose_unroll(l, c, n, r, g, f);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: U=%0d expected %0d", what, got, exp);
    end
    if (got > 0) begin
      // Cycle count of the chosen form must meet the latency bound.
      checks++;
      if (longint'(ceil_div(n, got)) * c > l) begin
        failures++;
        $display("FAIL %s: %0d cycles of %0d ps exceed %0d ps", what, ceil_div(n, got), c, l);
      end
    end
  endtask

  initial begin
    // Sequential: 16 iterations of 4 ns at 100 MHz, 200 ns allowed.
    expect_u("sequential", 200_000, 10_000, 16, 4_000, 300, 600, 1);
    // SIMON-128 at 100 MHz with 340 ns latency: 34 cycles of 2 rounds.
    expect_u("simon U=2", 340_000, 10_000, 68, 4_000, 300, 600, 2);
    // SIMON-128 at 41 MHz (24.39 ns), 345 ns allowed: 14 cycles of 5 rounds.
    expect_u("simon U=5", 345_000, 24_390, 68, 4_000, 300, 600, 5);
    // Whole loop in one 340 ns period: full unrolling.
    expect_u("simon full", 340_000, 340_000, 68, 4_000, 300, 600, 68);
    // Clock too fast for even the sequential loop: nothing fits.
    expect_u("too fast", 1_000_000, 3_000, 16, 4_000, 300, 600, 0);
    // Latency bound too tight for any U at this clock.
    expect_u("latency too tight", 5_000, 10_000, 16, 500, 100, 200, 0);

    repeat (2000) begin
      longint unsigned l, c, r, g, f;
      int unsigned n;
      @(posedge clk);
      n = 1 + $urandom_range(0, 79);
      r = 200 + $urandom_range(0, 9_800);
      g = $urandom_range(0, 1_000);
      f = 100 + $urandom_range(0, 900);
      c = 1_000 + $urandom_range(0, 399_000);
      l = longint'($urandom_range(1, 80)) * c + $urandom_range(0, 9_999);
      expect_u("random", l, c, n, r, g, f, brute(l, c, n, r, g, f));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
