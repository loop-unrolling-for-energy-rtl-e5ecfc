// Self-checking testbench for glitch_filter, latch and flip-flop forms.
//
// The input is toggled many times while the enable is low (a burst of
// glitches): neither output may move. Then the enable pulse comes: the latch
// must follow the input while the pulse is high, including a late change
// inside the pulse window, and keep the last value after it; the flip-flop
// must take the value present at the rising edge of the pulse only, so a
// change inside the window is not passed on.
module tb_glitch_filter;
  timeunit 1ns; timeprecision 1ps;

  int checks = 0, failures = 0;
  logic        en = 1'b0;
  logic [15:0] d = '0, q_lat, q_ff;

  glitch_filter #(.WIDTH(16)) dut_lat (.en, .d, .q(q_lat));
  glitch_filter #(.WIDTH(16), .KIND(unroll_pkg::FILTER_FF)) dut_ff (.en, .d, .q(q_ff));

  task automatic expect_eq(input logic [15:0] got, input logic [15:0] want, input string what);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, want);
    end
  endtask

  initial begin
    logic [15:0] v, held_lat, held_ff;
    // Load a known value first.
    d = 16'h1234; #1; en = 1'b1; #1; en = 1'b0; #1;
    expect_eq(q_lat, 16'h1234, "latch initial load");
    expect_eq(q_ff, 16'h1234, "flip-flop initial load");
    for (int n = 0; n < 20; n++) begin
      v = 16'($urandom);
      held_lat = q_lat;
      held_ff  = q_ff;
      // Glitch burst while closed.
      repeat (10) begin
        d = 16'($urandom);
        #0.05;
        expect_eq(q_lat, held_lat, "latch closed during glitches");
        expect_eq(q_ff, held_ff, "flip-flop closed during glitches");
      end
      d = v;
      #0.1;
      en = 1'b1;
      #0.05;
      expect_eq(q_lat, v, "latch transparent");
      expect_eq(q_ff, v, "flip-flop captured at edge");
      // Late arrival inside the window.
      d = v ^ 16'h00ff;
      #0.05;
      expect_eq(q_lat, v ^ 16'h00ff, "latch takes late data inside the window");
      expect_eq(q_ff, v, "flip-flop ignores data after its edge");
      en = 1'b0;
      #0.05;
      d = ~v;
      #0.05;
      expect_eq(q_lat, v ^ 16'h00ff, "latch holds after the pulse");
      expect_eq(q_ff, v, "flip-flop holds after the pulse");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
