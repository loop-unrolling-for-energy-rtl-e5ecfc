// Self-checking testbench for unroll_ctrl.
//
// Three controllers (N = 15 with U = 4, N = 68 with U = 68, N = 16 with
// U = 1) get a random start request every cycle. A cycle-by-cycle model
// here predicts ready, load, last, done and base; every output is compared
// every cycle, and each accepted computation must end with done exactly
// ceil(N/U) cycles after its load edge.
module tb_unroll_ctrl;
  timeunit 1ns; timeprecision 1ps;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic start [3];
  logic ready [3], load [3], busy [3], last [3], done [3];
  logic [4:0] base0;
  logic [7:0] base1;
  logic [4:0] base2;

  unroll_ctrl #(.N(15), .U(4))  dut0 (.clk, .rst_n, .start(start[0]), .ready(ready[0]), .load(load[0]),
                                      .busy(busy[0]), .last(last[0]), .done(done[0]), .base(base0));
  unroll_ctrl #(.N(68), .U(68)) dut1 (.clk, .rst_n, .start(start[1]), .ready(ready[1]), .load(load[1]),
                                      .busy(busy[1]), .last(last[1]), .done(done[1]), .base(base1));
  unroll_ctrl #(.N(16), .U(1))  dut2 (.clk, .rst_n, .start(start[2]), .ready(ready[2]), .load(load[2]),
                                      .busy(busy[2]), .last(last[2]), .done(done[2]), .base(base2));

  localparam int NN [3] = '{15, 68, 16};
  localparam int UU [3] = '{4, 68, 1};

  int  m_busy [3], m_cnt [3], m_done [3];
  int  load_q [3][$];
  int  cycle = 0;
  int  completed [3] = '{0, 0, 0};

  initial begin
    for (int k = 0; k < 3; k++) begin
      start[k] = 1'b0; m_busy[k] = 0; m_cnt[k] = 0; m_done[k] = 0;
    end
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    repeat (400) begin
      int ncyc, base;
      logic m_last, m_ready, m_load;
      for (int k = 0; k < 3; k++) start[k] = ($urandom % 3) != 0;
      #1;
      for (int k = 0; k < 3; k++) begin
        ncyc    = (NN[k] + UU[k] - 1) / UU[k];
        m_last  = m_busy[k] && m_cnt[k] == ncyc - 1;
        m_ready = !m_busy[k] || m_last;
        m_load  = start[k] && m_ready;
        base    = m_cnt[k] * UU[k];
        checks += 5;
        if (ready[k] !== m_ready) begin failures++; $display("FAIL ctrl%0d ready", k); end
        if (load[k]  !== m_load)  begin failures++; $display("FAIL ctrl%0d load", k); end
        if (last[k]  !== m_last)  begin failures++; $display("FAIL ctrl%0d last", k); end
        if (done[k]  !== 1'(m_done[k])) begin failures++; $display("FAIL ctrl%0d done", k); end
        if (m_busy[k] && int'((k == 0) ? base0 : (k == 1) ? base1 : base2) != base) begin
          failures++; $display("FAIL ctrl%0d base", k);
        end
        if (m_done[k]) begin
          checks++;
          completed[k]++;
          if (load_q[k].size() == 0 || cycle - load_q[k][0] != ncyc + 1) begin
            failures++;
            $display("FAIL ctrl%0d done without a load %0d cycles before", k, ncyc + 1);
          end
          if (load_q[k].size() != 0) void'(load_q[k].pop_front());
        end
        // Advance the model to the next cycle.
        m_done[k] = m_last;
        if (m_load) begin
          m_busy[k] = 1; m_cnt[k] = 0;
          load_q[k].push_back(cycle);
        end else if (m_last) m_busy[k] = 0;
        else if (m_busy[k]) m_cnt[k]++;
      end
      @(negedge clk);
      cycle++;
    end
    for (int k = 0; k < 3; k++) begin
      checks++;
      if (completed[k] == 0) begin failures++; $display("FAIL ctrl%0d completed nothing", k); end
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
