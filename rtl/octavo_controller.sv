// octavo_controller: Octavo's 2-stage controller (next-PC unit).
//
// Holds one program counter per thread and computes each thread's next PC
// from the instruction that thread just executed. The branch condition is
// evaluated on operand A as read from the A memory, the target is the
// instruction's D field:
//   JMP  PC <- D
//   JZE  PC <- D if A == 0
//   JNZ  PC <- D if A != 0
//   JPO  PC <- D if A >= 0 (sign bit clear)
//   JNE  PC <- D if A <  0 (sign bit set)
//   any other opcode, or a branch not taken: PC <- PC + 1.
// JMP and JZE are the published encodings; the other three conditions are
// this design's choice for the remaining opcodes.
//
// Stages:  CTL0 (cycle n)  : condition evaluated and registered.
//          CTL1 (cycle n+1): next PC selected and written to pc[tid] at
//                            the end of the cycle.
// The fetch port (fetch_tid -> fetch_pc) is combinational. With the
// processor's 8-stage control loop the thread's next fetch is in cycle n+2,
// so it sees the new PC with no bubble.
// An instruction annulled by I/O predication (in_go low) leaves its
// thread's PC unchanged, so the thread fetches it again on its next turn.
// After reset thread t starts at PC t (this design's choice), so words
// 0..7 of the instruction memory act as a per-thread entry table.
module octavo_controller
  import octavo_pkg::*;
#(
  parameter int N_THREADS = THREADS,
  parameter int W         = WORD_W
) (
  input  logic                         clk,
  input  logic                         rst,
  // CTL0 inputs
  input  logic                         in_valid,
  input  opcode_e                      in_op,
  input  addr_t                        in_d,
  input  logic [W-1:0]                 in_a,
  input  addr_t                        in_pc,
  input  logic [$clog2(N_THREADS)-1:0] in_tid,
  input  logic                         in_go,     // 0: annulled by I/O predication
  // fetch port
  input  logic [$clog2(N_THREADS)-1:0] fetch_tid,
  output addr_t                        fetch_pc,
  // observation: a branch was taken / not taken in CTL1 this cycle
  output logic                         taken,
  output logic                         not_taken,
  output logic                         annulled
);
  localparam int TW = $clog2(N_THREADS);

  addr_t pc [N_THREADS];

  // CTL0
  logic cond;
  always_comb begin
    unique case (in_op)
      OP_JMP:  cond = 1'b1;
      OP_JZE:  cond = (in_a == '0);
      OP_JNZ:  cond = (in_a != '0);
      OP_JPO:  cond = ~in_a[W-1];
      OP_JNE:  cond =  in_a[W-1];
      default: cond = 1'b0;
    endcase
  end

  logic          c1_valid, c1_take, c1_branch, c1_go;
  addr_t         c1_target, c1_pc;
  logic [TW-1:0] c1_tid;
  always_ff @(posedge clk) begin
    if (rst) begin
      c1_valid <= 1'b0;
      c1_take  <= 1'b0;
      c1_branch <= 1'b0;
      c1_go     <= 1'b1;
    end else begin
      c1_valid  <= in_valid;
      c1_take   <= in_valid && in_go && cond;
      c1_branch <= in_valid && in_go && op_is_branch(in_op);
      c1_go     <= in_go;
    end
    c1_target <= in_d;
    c1_pc     <= in_pc;
    c1_tid    <= in_tid;
  end

  // CTL1
  always_ff @(posedge clk) begin
    if (rst) begin
      for (int t = 0; t < N_THREADS; t++) pc[t] <= addr_t'(t);
    end else if (c1_valid) begin
      if (!c1_go)       pc[c1_tid] <= c1_pc;   // annulled: re-issue
      else if (c1_take) pc[c1_tid] <= c1_target;
      else              pc[c1_tid] <= c1_pc + 1'b1;
    end
  end

  assign fetch_pc  = pc[fetch_tid];
  assign taken     = c1_take;
  assign not_taken = c1_branch && !c1_take;
  assign annulled  = c1_valid && !c1_go;
endmodule
