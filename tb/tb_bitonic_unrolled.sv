// Self-checking testbench for bitonic_unrolled.
//
// Three instances on one clock: the fully unrolled network (default, latch
// filters every 2 stages), U = 4 with flip-flop filters after every stage
// (4 cycles, the last bypasses one copy) and the sequential form (U = 1,
// 15 cycles). Each sorts random key sets, sets with many equal keys, sorted
// and reverse-sorted sets; the result is compared with an insertion sort
// done here, and the cycles from start to done are checked.
module tb_bitonic_unrolled;
  timeunit 1ns; timeprecision 1ps;
  import bitonic_pkg::*;

  localparam realtime TCLK = 120ns;   // fully unrolled period on Artix-7
  localparam int NSETS = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  always #(TCLK / 2) clk = ~clk;

  int checks = 0, failures = 0;
  int finished = 0;

  function automatic logic [DATA_W-1:0] ref_sort(input logic [DATA_W-1:0] v);
    logic [KEY_W-1:0] a [NUM];
    logic [KEY_W-1:0] t;
    int k;
    for (int i = 0; i < NUM; i++) a[i] = v[KEY_W*i +: KEY_W];
    for (int i = 1; i < NUM; i++) begin
      t = a[i];
      k = i - 1;
      while (k >= 0 && a[k] > t) begin
        a[k+1] = a[k];
        k--;
      end
      a[k+1] = t;
    end
    for (int i = 0; i < NUM; i++) ref_sort[KEY_W*i +: KEY_W] = a[i];
  endfunction

  function automatic logic [DATA_W-1:0] make_set(input int n);
    for (int i = 0; i < NUM; i++) begin
      case (n % 4)
        0:       make_set[KEY_W*i +: KEY_W] = KEY_W'($urandom);
        1:       make_set[KEY_W*i +: KEY_W] = KEY_W'($urandom % 4);        // many ties
        2:       make_set[KEY_W*i +: KEY_W] = KEY_W'(i * 100);             // sorted
        default: make_set[KEY_W*i +: KEY_W] = KEY_W'(16'hffff - i * 7);    // reversed
      endcase
    end
  endfunction

  logic              start [3];
  logic              ready [3];
  logic              done  [3];
  logic [DATA_W-1:0] din [3], dout [3];

  bitonic_unrolled dut_full (
    .clk, .rst_n, .start(start[0]), .ready(ready[0]), .keys_in(din[0]), .done(done[0]), .keys_out(dout[0]));
  bitonic_unrolled #(.U(4), .SPACING(1), .KIND(unroll_pkg::FILTER_FF)) dut_part (
    .clk, .rst_n, .start(start[1]), .ready(ready[1]), .keys_in(din[1]), .done(done[1]), .keys_out(dout[1]));
  bitonic_unrolled #(.U(1)) dut_seq (
    .clk, .rst_n, .start(start[2]), .ready(ready[2]), .keys_in(din[2]), .done(done[2]), .keys_out(dout[2]));

  localparam int NCYC [3] = '{1, 4, 15};

  task automatic run_one(input int d, input logic [DATA_W-1:0] v);
    int cyc;
    logic [DATA_W-1:0] exp_v;
    @(negedge clk);
    din[d] = v; start[d] = 1'b1;
    @(posedge clk);
    while (!ready[d]) @(posedge clk);
    @(negedge clk);
    start[d] = 1'b0;
    cyc = 0;
    while (!done[d]) begin
      @(negedge clk);
      cyc++;
    end
    exp_v = ref_sort(v);
    checks += 2;
    if (dout[d] !== exp_v) begin
      failures++;
      $display("FAIL dut%0d sort result %h expected %h", d, dout[d], exp_v);
    end
    if (cyc != NCYC[d]) begin
      failures++;
      $display("FAIL dut%0d latency %0d cycles, expected %0d", d, cyc, NCYC[d]);
    end
  endtask

  initial begin
    for (int d = 0; d < 3; d++) begin
      start[d] = 1'b0; din[d] = '0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    begin
      for (int d = 0; d < 3; d++) begin
        automatic int dd = d;
        fork
          begin
            for (int n = 0; n < NSETS; n++) run_one(dd, make_set(n));
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
