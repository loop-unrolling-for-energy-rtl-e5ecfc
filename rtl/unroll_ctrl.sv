// Loop controller for a loop of N iterations unrolled U times.
//
// With U iterations chained combinationally, one computation takes
// NCYC = ceil(N/U) system clock cycles. The controller accepts a new input
// when idle or in the last cycle of the current computation (so a fully
// unrolled loop, NCYC = 1, takes a new input every cycle), counts the cycles
// and tells the datapath which iteration index the first of its U copies
// computes in this cycle (base = cnt * U). When U does not divide N, copies
// whose index base + j reaches N are bypassed by the datapath.
//
// Interface:
//   start  - request to begin a computation; taken when ready is high
//   load   - start taken this cycle: the datapath loads its loop register
//   busy   - a computation is in progress; the loop register advances
//   last   - this cycle computes the final iterations: the datapath captures
//            its result register at the next clock edge
//   done   - one-cycle pulse, high the cycle after last, with the result
//   base   - index of the first iteration computed this cycle
// Timing: the result is in the result register NCYC clock edges after the
// edge that loaded the input. Reset is active-low and synchronous.
module unroll_ctrl #(
  parameter int unsigned N = 68,
  parameter int unsigned U = 68,
  localparam int unsigned NCYC = (N + U - 1) / U,
  localparam int unsigned CW   = (NCYC > 1) ? $clog2(NCYC) : 1,
  localparam int unsigned IW   = $clog2(N + U + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  output logic          ready,
  output logic          load,
  output logic          busy,
  output logic          last,
  output logic          done,
  output logic [IW-1:0] base
);
  timeunit 1ns; timeprecision 1ps;

  logic [CW-1:0] cnt;

  assign last  = busy && (cnt == CW'(NCYC - 1));
  assign ready = !busy || last;
  assign load  = start && ready;
  assign base  = IW'(cnt) * IW'(U);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy <= 1'b0;
      cnt  <= '0;
      done <= 1'b0;
    end else begin
      done <= last;
      if (load) begin
        busy <= 1'b1;
        cnt  <= '0;
      end else if (last) begin
        busy <= 1'b0;
      end else if (busy) begin
        cnt <= cnt + 1'b1;
      end
    end
  end

  // The cycle counter never passes the last cycle of a computation.
  a_cnt_range: assert property (@(posedge clk) disable iff (!rst_n) int'(cnt) < int'(NCYC));
endmodule
