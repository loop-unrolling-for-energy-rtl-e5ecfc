// Self-checking testbench for enable_pulse_gen, both targets.
//
// Runs a clock with a 20 ns period and measures every pulse: it must start
// at the rising clock edge and last four LUT stages (4 * 545 ps) for the
// Cyclone IV form and about 115 ps for the Artix-7 form, once per clock
// cycle, and never at the falling edge.
module tb_enable_pulse_gen;
  timeunit 1ns; timeprecision 1ps;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  logic p_c4, p_a7;
  realtime t_up [2];
  int n_pulses [2] = '{0, 0};

  always #10 clk = ~clk;

  enable_pulse_gen #(.TARGET(unroll_pkg::TARGET_CYCLONE4)) dut_c4 (.clk, .pulse(p_c4));
  enable_pulse_gen dut_a7 (.clk, .pulse(p_a7));

  localparam realtime WIDTH [2] = '{2.180, 0.115};

  function automatic bit near(input realtime a, input realtime b);
    return (a - b < 0.002) && (b - a < 0.002);
  endfunction

  task automatic on_rise(input int k);
    longint ps;
    t_up[k] = $realtime;
    ps = longint'(t_up[k] * 1000.0);
    checks++;
    // Rising clock edges are at 10 + 20n ns.
    if ((ps - 10000) % 20000 != 0 || clk !== 1'b1) begin
      failures++;
      $display("FAIL target %0d pulse rose at %0t, not at a rising clock edge", k, t_up[k]);
    end
  endtask

  task automatic on_fall(input int k);
    n_pulses[k]++;
    checks++;
    if (!near($realtime - t_up[k], WIDTH[k])) begin
      failures++;
      $display("FAIL target %0d pulse width %0t", k, $realtime - t_up[k]);
    end
  endtask

  initial begin
    @(negedge clk);
    fork
      forever @(posedge p_c4) on_rise(0);
      forever @(negedge p_c4) on_fall(0);
      forever @(posedge p_a7) on_rise(1);
      forever @(negedge p_a7) on_fall(1);
    join_none
    repeat (20) @(posedge clk);
    #5;
    for (int k = 0; k < 2; k++) begin
      checks++;
      if (n_pulses[k] != 20) begin
        failures++;
        $display("FAIL target %0d gave %0d pulses in 20 cycles", k, n_pulses[k]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
