// octavo_thread_ctr: fixed round-robin thread counter.
//
// Octavo issues one instruction per cycle and takes the threads strictly in
// turn, so the thread that issues is simply a free-running counter modulo
// THREADS. There is no scheduler and no stall: every thread gets exactly one
// issue slot every THREADS cycles. Each core (and, in a partitioned SIMD
// core, each place that needs it) keeps its own small counter instead of
// sharing one across the chip.
//
// Interface: tid is the thread issuing in the current cycle. After reset,
// thread 0 issues first. Reset is synchronous, active high (this design's
// choice).
module octavo_thread_ctr
  import octavo_pkg::*;
#(
  parameter int N_THREADS = THREADS
) (
  input  logic                         clk,
  input  logic                         rst,
  output logic [$clog2(N_THREADS)-1:0] tid
);
  always_ff @(posedge clk) begin
    if (rst)                              tid <= '0;
    else if (32'(tid) == N_THREADS - 1)   tid <= '0;
    else                                  tid <= tid + 1'b1;
  end
endmodule
