// Self-checking testbench for carry_delay_chain.
//
// Sends edges and pulses into chains of 3, 6 and 7 slices (the 6-slice one
// with 40 ps between slices) and measures when they come out: the delay must
// be N * 86 ps plus the routing between slices, the pulse must keep its
// width, and a pulse narrower than one slice must be swallowed.
module tb_carry_delay_chain;
  timeunit 1ns; timeprecision 1ps;

  int checks = 0, failures = 0;
  logic d = 1'b0;
  logic q3, q6, q7;
  realtime t_in, t_rise [3], t_fall [3];

  carry_delay_chain #(.N_SLICES(3))  dut3  (.d, .q(q3));
  carry_delay_chain #(.N_SLICES(6), .ROUTE_PS(40)) dut6 (.d, .q(q6));
  carry_delay_chain dut7 (.d, .q(q7));

  always @(posedge q3)  t_rise[0] = $realtime;
  always @(posedge q6) t_rise[1] = $realtime;
  always @(posedge q7) t_rise[2] = $realtime;
  always @(negedge q3)  t_fall[0] = $realtime;
  always @(negedge q6) t_fall[1] = $realtime;
  always @(negedge q7) t_fall[2] = $realtime;

  localparam int LEN [3] = '{3, 6, 7};

  function automatic bit near(input realtime a, input realtime b);
    return (a - b < 0.002) && (b - a < 0.002);
  endfunction

  initial begin
    #5;
    for (int w = 1; w <= 4; w++) begin
      realtime width;
      width = w * 0.1;   // wider than one 0.086 ns stage
      t_rise = '{0, 0, 0};
      t_fall = '{0, 0, 0};
      t_in = $realtime;
      d = 1'b1;
      #(width);
      d = 1'b0;
      #40;
      for (int k = 0; k < 3; k++) begin
        checks += 2;
        if (!near(t_rise[k] - t_in, LEN[k] * 0.086 + ((k == 1) ? 5 * 0.040 : 0.0))) begin
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
    #0.05;
    d = 1'b0;
    #40;
    checks++;
    if (t_rise[0] != 0 || q3 !== 1'b0) begin
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
