// End-to-end testbench for loop_unroll_top at its default parameters.
//
// All five fully unrolled kernels run at once on a 340 ns system clock (the
// fully unrolled SIMON-128 period on an Artix-7). Each kernel first gets its
// published test vectors (SIMON-128, AES-256 and DES), then a stream of
// random operands with start held high, so a new operand enters every cycle,
// then a pause and a second stream. Every result is compared with the
// behavioural models of tb_ref_pkg, in order, through a queue of expected
// values. The testbench also watches glitch filters inside the kernels and
// counts each mechanism of the design, failing any that never happens:
//   - one result per clock cycle while streaming (full unrolling),
//   - enable pulses reaching the filters,
//   - input transitions held back while a filter was closed,
//   - the enable of a later filter arriving after that of an earlier one,
// and it fails if a latch output ever moved while closed or a filter was
// still open at the next clock edge.
module tb_loop_unroll_top;
  timeunit 1ns; timeprecision 1ps;
  import tb_ref_pkg::*;

  localparam realtime TCLK = 340ns;
  localparam int NSTREAM = 12;

  logic clk = 1'b0, rst_n = 1'b0;
  always #(TCLK / 2) clk = ~clk;

  int checks = 0, failures = 0;
  int results [5];
  int streamed [5];
  int finished = 0;

  logic         simon_start = 0, simon_ready, simon_done;
  logic [127:0] simon_pt = '0, simon_key = '0, simon_ct;
  logic         aes_start = 0, aes_ready, aes_done;
  logic [127:0] aes_pt = '0, aes_ct;
  logic [255:0] aes_key = '0;
  logic         des_start = 0, des_ready, des_done;
  logic [63:0]  des_pt = '0, des_key = '0, des_ct;
  logic         sort_start = 0, sort_ready, sort_done;
  logic [511:0] sort_in = '0, sort_out;
  logic         cordic_start = 0, cordic_ready, cordic_done;
  logic [50:0]  cordic_in = '0, cordic_out;

  loop_unroll_top dut (.*);

  // ---- filter monitors -------------------------------------------------
  filter_monitor #(.WIDTH(simon_pkg::STATE_W)) mon_simon_first (.clk, .active(rst_n),
    .en(dut.u_simon.g_iter[1].g_filter.u_gf.en), .d(dut.u_simon.g_iter[1].g_filter.u_gf.d),
    .q(dut.u_simon.g_iter[1].g_filter.u_gf.q));
  filter_monitor #(.WIDTH(simon_pkg::STATE_W)) mon_simon_last (.clk, .active(rst_n),
    .en(dut.u_simon.g_iter[65].g_filter.u_gf.en), .d(dut.u_simon.g_iter[65].g_filter.u_gf.d),
    .q(dut.u_simon.g_iter[65].g_filter.u_gf.q));
  filter_monitor #(.WIDTH(aes_pkg::STATE_W)) mon_aes (.clk, .active(rst_n),
    .en(dut.u_aes.g_iter[11].g_filter.u_gf.en), .d(dut.u_aes.g_iter[11].g_filter.u_gf.d),
    .q(dut.u_aes.g_iter[11].g_filter.u_gf.q));
  filter_monitor #(.WIDTH(des_pkg::STATE_W)) mon_des (.clk, .active(rst_n),
    .en(dut.u_des.g_iter[14].g_filter.u_gf.en), .d(dut.u_des.g_iter[14].g_filter.u_gf.d),
    .q(dut.u_des.g_iter[14].g_filter.u_gf.q));
  filter_monitor #(.WIDTH(512)) mon_sort (.clk, .active(rst_n),
    .en(dut.u_sort.g_iter[13].g_filter.u_gf.en), .d(dut.u_sort.g_iter[13].g_filter.u_gf.d),
    .q(dut.u_sort.g_iter[13].g_filter.u_gf.q));
  filter_monitor #(.WIDTH(51)) mon_cordic (.clk, .active(rst_n),
    .en(dut.u_cordic.g_iter[13].g_filter.u_gf.en), .d(dut.u_cordic.g_iter[13].g_filter.u_gf.d),
    .q(dut.u_cordic.g_iter[13].g_filter.u_gf.q));

  // ---- expected-result queues -------------------------------------------
  logic [127:0] q_simon [$], q_aes [$];
  logic [63:0]  q_des [$];
  logic [511:0] q_sort [$];
  logic [50:0]  q_cordic [$];
  logic         prev_done [5];

  task automatic check_result(input int k, input logic done_now, input logic [511:0] got,
                              input logic [511:0] expv, input logic have, input string name);
    if (!done_now) return;
    checks++;
    results[k]++;
    if (prev_done[k]) streamed[k]++;
    if (!have) begin
      failures++;
      $display("FAIL %s: result with nothing expected", name);
    end else if (got !== expv) begin
      failures++;
      $display("FAIL %s: got %h expected %h", name, got, expv);
    end
  endtask

  always @(negedge clk) if (rst_n) begin
    logic [511:0] e;
    logic h;
    h = q_simon.size() > 0;  e = h ? 512'(q_simon[0]) : '0;
    check_result(0, simon_done, 512'(simon_ct), e, h, "SIMON-128");
    if (simon_done && h) void'(q_simon.pop_front());
    h = q_aes.size() > 0;    e = h ? 512'(q_aes[0]) : '0;
    check_result(1, aes_done, 512'(aes_ct), e, h, "AES-256");
    if (aes_done && h) void'(q_aes.pop_front());
    h = q_des.size() > 0;    e = h ? 512'(q_des[0]) : '0;
    check_result(2, des_done, 512'(des_ct), e, h, "DES");
    if (des_done && h) void'(q_des.pop_front());
    h = q_sort.size() > 0;   e = h ? q_sort[0] : '0;
    check_result(3, sort_done, sort_out, e, h, "bitonic");
    if (sort_done && h) void'(q_sort.pop_front());
    h = q_cordic.size() > 0; e = h ? 512'(q_cordic[0]) : '0;
    check_result(4, cordic_done, 512'(cordic_out), e, h, "CORDIC");
    if (cordic_done && h) void'(q_cordic.pop_front());
    prev_done = '{simon_done, aes_done, des_done, sort_done, cordic_done};
  end

  // Operands are applied after the falling edge and taken on the rising edge.
  task automatic drive_simon(input logic [127:0] p, input logic [127:0] k);
    simon_pt = p; simon_key = k; simon_start = 1'b1; q_simon.push_back(simon(p, k));
    @(negedge clk);
  endtask
  task automatic drive_aes(input logic [127:0] p, input logic [255:0] k);
    aes_pt = p; aes_key = k; aes_start = 1'b1; q_aes.push_back(aes256(p, k));
    @(negedge clk);
  endtask
  task automatic drive_des(input logic [63:0] p, input logic [63:0] k);
    des_pt = p; des_key = k; des_start = 1'b1; q_des.push_back(des(p, k));
    @(negedge clk);
  endtask
  task automatic drive_sort(input logic [511:0] v);
    sort_in = v; sort_start = 1'b1; q_sort.push_back(sort32(v));
    @(negedge clk);
  endtask
  task automatic drive_cordic(input logic [50:0] v);
    cordic_in = v; cordic_start = 1'b1; q_cordic.push_back(cordic(v));
    @(negedge clk);
  endtask

  function automatic logic [511:0] rnd512();
    for (int i = 0; i < 16; i++) rnd512[32*i +: 32] = $urandom;
  endfunction

  // x, y in [-0.5, 0.5) with 15 fraction bits, z in [-1.5, 1.5) rad.
  function automatic logic [50:0] rnd_cordic();
    logic signed [16:0] x, y, z;
    x = 17'(int'($urandom % 32768) - 16384);
    y = 17'(int'($urandom % 32768) - 16384);
    z = 17'(int'($urandom % 49152) - 24576);
    return {x, y, z};
  endfunction

  task automatic stream(input int n);
    fork
      begin
        drive_simon(128'h6373656420737265_6c6c657661727420, 128'h0f0e0d0c0b0a0908_0706050403020100);
        for (int i = 0; i < n; i++) drive_simon(rnd512()[127:0], rnd512()[127:0]);
        simon_start = 1'b0;
      end
      begin
        drive_aes(128'h00112233445566778899aabbccddeeff,
                  256'h000102030405060708090a0b0c0d0e0f101112131415161718191a1b1c1d1e1f);
        for (int i = 0; i < n; i++) drive_aes(rnd512()[127:0], rnd512()[255:0]);
        aes_start = 1'b0;
      end
      begin
        drive_des(64'h0123456789ABCDEF, 64'h133457799BBCDFF1);
        drive_des(64'h8787878787878787, 64'h0E329232EA6D0D73);
        for (int i = 0; i < n; i++) drive_des(rnd512()[63:0], rnd512()[63:0]);
        des_start = 1'b0;
      end
      begin
        for (int i = 0; i < n; i++) drive_sort(rnd512());
        sort_start = 1'b0;
      end
      begin
        for (int i = 0; i < n; i++) drive_cordic(rnd_cordic());
        cordic_start = 1'b0;
      end
    join
  endtask

  initial begin
    // The reference models against the published vectors.
    checks += 4;
    if (simon(128'h6373656420737265_6c6c657661727420, 128'h0f0e0d0c0b0a0908_0706050403020100)
        !== 128'h49681b1e1e54fe3f_65aa832af84e0bbc) begin failures++; $display("FAIL SIMON model"); end
    if (aes256(128'h00112233445566778899aabbccddeeff,
               256'h000102030405060708090a0b0c0d0e0f101112131415161718191a1b1c1d1e1f)
        !== 128'h8ea2b7ca516745bfeafc49904b496089) begin failures++; $display("FAIL AES model"); end
    if (des(64'h0123456789ABCDEF, 64'h133457799BBCDFF1) !== 64'h85E813540F0AB405) begin
      failures++; $display("FAIL DES model"); end
    if (des(64'h8787878787878787, 64'h0E329232EA6D0D73) !== 64'h0) begin
      failures++; $display("FAIL DES model 2"); end

    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    stream(NSTREAM);
    repeat (3) @(negedge clk);
    stream(NSTREAM / 2);
    repeat (4) @(negedge clk);

    // Everything expected has come out.
    checks++;
    if (q_simon.size() + q_aes.size() + q_des.size() + q_sort.size() + q_cordic.size() != 0) begin
      failures++;
      $display("FAIL results missing: %0d %0d %0d %0d %0d", q_simon.size(), q_aes.size(),
               q_des.size(), q_sort.size(), q_cordic.size());
    end

    // Mechanisms.
    for (int k = 0; k < 5; k++) begin
      checks++;
      if (streamed[k] == 0) begin failures++; $display("FAIL kernel %0d never gave back-to-back results", k); end
    end
    begin
      int pulses [6], held [6], leaks [6];
      realtime close_max [6], open_min [6];
      pulses    = '{mon_simon_first.pulses, mon_simon_last.pulses, mon_aes.pulses, mon_des.pulses,
                    mon_sort.pulses, mon_cordic.pulses};
      held      = '{mon_simon_first.held, mon_simon_last.held, mon_aes.held, mon_des.held,
                    mon_sort.held, mon_cordic.held};
      leaks     = '{mon_simon_first.leaks, mon_simon_last.leaks, mon_aes.leaks, mon_des.leaks,
                    mon_sort.leaks, mon_cordic.leaks};
      close_max = '{mon_simon_first.t_close_max, mon_simon_last.t_close_max, mon_aes.t_close_max,
                    mon_des.t_close_max, mon_sort.t_close_max, mon_cordic.t_close_max};
      open_min  = '{mon_simon_first.t_open_min, mon_simon_last.t_open_min, mon_aes.t_open_min,
                    mon_des.t_open_min, mon_sort.t_open_min, mon_cordic.t_open_min};
      for (int m = 0; m < 6; m++) begin
        checks += 4;
        if (pulses[m] == 0) begin failures++; $display("FAIL monitor %0d saw no enable pulse", m); end
        if (held[m] == 0)   begin failures++; $display("FAIL monitor %0d never held back a transition", m); end
        if (leaks[m] != 0)  begin failures++; $display("FAIL monitor %0d output moved while closed", m); end
        if (close_max[m] >= TCLK) begin failures++; $display("FAIL monitor %0d open past the clock period", m); end
        $display("monitor %0d: %0d pulses, %0d held transitions, closes %0t after the edge, opens %0t",
                 m, pulses[m], held[m], close_max[m], open_min[m]);
      end
      checks++;
      if (!(mon_simon_last.t_open_min > mon_simon_first.t_open_min)) begin
        failures++;
        $display("FAIL the last SIMON filter did not open after the first");
      end
    end
    $display("results: SIMON %0d AES %0d DES %0d bitonic %0d CORDIC %0d; back-to-back %0d %0d %0d %0d %0d",
             results[0], results[1], results[2], results[3], results[4],
             streamed[0], streamed[1], streamed[2], streamed[3], streamed[4]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
