// Self-checking testbench for filter_enable_chain, both targets.
//
// A 200 ns clock drives enable_pulse_gen and two 5-tap chains, one of 36-LUT
// elements and one of 7-slice carry elements. Every enable k must rise
// (k+1) element delays after the clock edge, keep the pulse width, and come
// once per cycle, so the filters open strictly in order.
module tb_filter_enable_chain;
  timeunit 1ns; timeprecision 1ps;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  logic pulse_c4, pulse_a7;
  logic [4:0] en_c4, en_a7;
  realtime t_edge;
  int n_rise [2][5];

  always #100 clk = ~clk;
  always @(posedge clk) t_edge = $realtime;

  enable_pulse_gen #(.TARGET(unroll_pkg::TARGET_CYCLONE4)) pg_c4 (.clk, .pulse(pulse_c4));
  enable_pulse_gen pg_a7 (.clk, .pulse(pulse_a7));
  filter_enable_chain #(.N_TAPS(5), .TARGET(unroll_pkg::TARGET_CYCLONE4)) dut_c4 (.pulse(pulse_c4), .en(en_c4));
  filter_enable_chain #(.N_TAPS(5)) dut_a7 (.pulse(pulse_a7), .en(en_a7));

  localparam realtime TC [2] = '{36 * 0.545, 7 * 0.086};

  function automatic bit near(input realtime a, input realtime b);
    return (a - b < 0.002) && (b - a < 0.002);
  endfunction

  task automatic on_rise(input int t, input int k);
    n_rise[t][k]++;
    checks++;
    if (!near($realtime - t_edge, (k + 1) * TC[t])) begin
      failures++;
      $display("FAIL target %0d tap %0d rose %0t after the edge, expected %0t", t, k,
               $realtime - t_edge, (k + 1) * TC[t]);
    end
  endtask

  logic counting = 1'b0;
  for (genvar k = 0; k < 5; k++) begin : g_watch
    always @(posedge en_c4[k]) if (counting) on_rise(0, k);
    always @(posedge en_a7[k]) if (counting) on_rise(1, k);
  end

  initial begin
    @(posedge clk);
    #0.001;
    counting = 1'b1;
    repeat (10) @(posedge clk);
    #0.001;
    for (int t = 0; t < 2; t++)
      for (int k = 0; k < 5; k++) begin
        checks++;
        if (n_rise[t][k] != 10) begin
          failures++;
          $display("FAIL target %0d tap %0d rose %0d times in 10 cycles", t, k, n_rise[t][k]);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #50000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
