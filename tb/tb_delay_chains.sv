// Self-checking testbench for lut_delay_chain.
//
// Sends single edges and narrow pulses into chains of several lengths and
// measures when they come out: the delay must be N * (155 + 390) ps, the
// pulse must keep its width, and a pulse narrower than one stage must be
// swallowed.
module tb_delay_chains;
  timeunit 1ns; timeprecision 1ps;

  int checks = 0, failures = 0;
  logic d = 1'b0;
  logic q4, q18, q36;
  realtime t_in, t_rise [3], t_fall [3];

  lut_delay_chain #(.N_LUTS(4))  dut4  (.d, .q(q4));
  lut_delay_chain #(.N_LUTS(18)) dut18 (.d, .q(q18));
  lut_delay_chain dut36 (.d, .q(q36));

  always @(posedge q4)  t_rise[0] = $realtime;
  always @(posedge q18) t_rise[1] = $realtime;
  always @(posedge q36) t_rise[2] = $realtime;
  always @(negedge q4)  t_fall[0] = $realtime;
  always @(negedge q18) t_fall[1] = $realtime;
  always @(negedge q36) t_fall[2] = $realtime;

  localparam int LEN [3] = '{4, 18, 36};

  function automatic bit near(input realtime a, input realtime b);
    return (a - b < 0.002) && (b - a < 0.002);
  endfunction

  initial begin
    #5;
    for (int w = 1; w <= 4; w++) begin
      realtime width;
      width = w * 0.6;   // wider than one 0.545 ns stage
      t_rise = '{0, 0, 0};
      t_fall = '{0, 0, 0};
      t_in = $realtime;
      d = 1'b1;
      #(width);
      d = 1'b0;
      #40;
      for (int k = 0; k < 3; k++) begin
        checks += 2;
        if (!near(t_rise[k] - t_in, LEN[k] * 0.545)) begin
          failures++;
          $display("FAIL chain %0d delay %0t", LEN[k], t_rise[k] - t_in);
        end
        if (!near(t_fall[k] - t_rise[k], width)) begin
          failures++;
          $display("FAIL chain %0d pulse width %0t, expected %0t", LEN[k], t_fall[k] - t_rise[k], width);
        end
      end
    end
    // A pulse narrower than one stage does not come out.
    t_rise = '{0, 0, 0};
    d = 1'b1;
    #0.2;
    d = 1'b0;
    #40;
    checks++;
    if (t_rise[0] != 0 || q4 !== 1'b0) begin
      failures++;
      $display("FAIL narrow pulse passed");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
