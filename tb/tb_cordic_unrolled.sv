// Self-checking testbench for cordic_unrolled.
//
// Three instances on one clock: fully unrolled (default, latch filters after
// every iteration), U = 4 with flip-flop filters every 2 iterations (4
// cycles, the last bypasses one copy) and sequential (U = 1, 15 cycles).
// Each rotates random vectors by random angles. Results are compared bit for
// bit with an integer model here whose arctangent constants come from $atan,
// and, within a small tolerance, with K * (x cos z - y sin z, ...) computed
// in floating point. The cycles from start to done are checked too.
module tb_cordic_unrolled;
  timeunit 1ns; timeprecision 1ps;
  import cordic_pkg::*;

  localparam realtime TCLK = 120ns;   // fully unrolled period on Artix-7
  localparam int NVEC = 8;
  localparam real KGAIN = 1.6467602;

  logic clk = 1'b0, rst_n = 1'b0;
  always #(TCLK / 2) clk = ~clk;

  int checks = 0, failures = 0;
  int finished = 0;

  function automatic logic [STATE_W-1:0] ref_cordic(input logic [STATE_W-1:0] v);
    logic signed [W-1:0] x, y, z, xn, yn, a;
    {x, y, z} = v;
    for (int i = 0; i < ITER; i++) begin
      a = W'($rtoi($atan(1.0 / (2.0 ** i)) * 16384.0 + 0.5));
      if (z >= 0) begin
        xn = x - (y >>> i); yn = y + (x >>> i); z = z - a;
      end else begin
        xn = x + (y >>> i); yn = y - (x >>> i); z = z + a;
      end
      x = xn; y = yn;
    end
    return {x, y, z};
  endfunction

  logic               start [3];
  logic               ready [3];
  logic               done  [3];
  logic [STATE_W-1:0] din [3], dout [3];

  cordic_unrolled dut_full (
    .clk, .rst_n, .start(start[0]), .ready(ready[0]), .din(din[0]), .done(done[0]), .dout(dout[0]));
  cordic_unrolled #(.U(4), .SPACING(2), .KIND(unroll_pkg::FILTER_FF)) dut_part (
    .clk, .rst_n, .start(start[1]), .ready(ready[1]), .din(din[1]), .done(done[1]), .dout(dout[1]));
  cordic_unrolled #(.U(1)) dut_seq (
    .clk, .rst_n, .start(start[2]), .ready(ready[2]), .din(din[2]), .done(done[2]), .dout(dout[2]));

  localparam int NCYC [3] = '{1, 4, 15};

  task automatic run_one(input int d, input real xr, input real yr, input real zr);
    int cyc;
    logic [STATE_W-1:0] v, exp_v;
    logic signed [W-1:0] xo, yo, zo;
    real xe, ye;
    v = {W'($rtoi(xr * 32768.0)), W'($rtoi(yr * 32768.0)), W'($rtoi(zr * 16384.0))};
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
    exp_v = ref_cordic(v);
    {xo, yo, zo} = dout[d];
    xe = KGAIN * (xr * $cos(zr) - yr * $sin(zr));
    ye = KGAIN * (yr * $cos(zr) + xr * $sin(zr));
    checks += 3;
    if (dout[d] !== exp_v) begin
      failures++;
      $display("FAIL dut%0d result %h expected %h", d, dout[d], exp_v);
    end
    if (fabs(real'(xo) / 32768.0 - xe) > 0.002 || fabs(real'(yo) / 32768.0 - ye) > 0.002) begin
      failures++;
      $display("FAIL dut%0d rotation off: got (%f, %f) expected (%f, %f)", d,
               real'(xo) / 32768.0, real'(yo) / 32768.0, xe, ye);
    end
    if (cyc != NCYC[d]) begin
      failures++;
      $display("FAIL dut%0d latency %0d cycles, expected %0d", d, cyc, NCYC[d]);
    end
  endtask

  function automatic real fabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  function automatic real rnd(input real lo, input real hi);
    return lo + (hi - lo) * real'($urandom % 10000) / 10000.0;
  endfunction

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
            run_one(dd, 0.6, 0.0, 0.5235988);   // (0.6, 0) by 30 degrees
            for (int n = 0; n < NVEC; n++)
              run_one(dd, rnd(-0.55, 0.55), rnd(-0.55, 0.55), rnd(-1.5, 1.5));
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
