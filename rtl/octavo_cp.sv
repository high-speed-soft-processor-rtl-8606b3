// octavo_cp: Octavo control path.
//
// Issues one instruction per cycle, taking the 8 threads in fixed
// round-robin order, and computes every thread's next PC. It holds the
// thread counter, the instruction memory, the controller and the
// instruction pipeline registers that line the instruction up with the
// data path. Stage numbers below are relative to the fetch cycle n of one
// instruction:
//   0      thread counter picks tid, its PC reads the I memory
//   1      pipeline register; the instruction is sent to the data paths
//   2..5   pipeline registers (2 and 3 are the empty stages that cover the
//          A/B memory read, 4 and 5 run alongside that read)
//   6, 7   controller CTL0/CTL1; the new PC is written at the end of 7
//   n+8    the same thread fetches again, with its new PC
// The control loop is therefore 8 stages long, exactly one per thread,
// which is why no branch needs a delay slot or a prediction.
// The ALU result R of data path 0 comes back in cycle n+10 and is written
// into the I memory at address D; the same thread's fetch in cycle n+8 has
// already happened, so an instruction written by a thread is seen by that
// thread's second instruction after the write, not the first
// (a one-instruction read-after-write hazard from ALU to I memory).
//
// Interface: out_valid/out_instr carry the instruction to the data paths in
// cycle n+2; br_a is operand A of data path 0 for the same instruction,
// expected in cycle n+6; imem_we/imem_d/imem_r are data path 0's result in
// cycle n+10. Reset is synchronous and active high; issuing starts the
// cycle after reset is released.
module octavo_cp
  import octavo_pkg::*;
#(
  parameter int    N_THREADS = THREADS,
  parameter int    W         = WORD_W,
  parameter int    DEPTH     = 1024,
  parameter string INIT_FILE = ""
) (
  input  logic                         clk,
  input  logic                         rst,
  output logic                         out_valid,
  output logic [W-1:0]                 out_instr,
  input  logic [W-1:0]                 br_a,
  input  logic                         imem_we,
  input  addr_t                        imem_d,
  input  logic [W-1:0]                 imem_r,
  input  logic                         io_go,     // n+4: I/O predication decision
  // observation
  output logic [$clog2(N_THREADS)-1:0] issue_tid,
  output addr_t                        issue_pc,
  output logic                         br_taken,
  output logic                         br_not_taken,
  output logic                         annulled
);
  localparam int TW = $clog2(N_THREADS);

  typedef struct packed {
    logic          valid;
    addr_t         pc;
    logic [TW-1:0] tid;
  } side_t;

  // stage 0: fetch
  logic [TW-1:0] tid0;
  addr_t         pc0;
  logic          run;

  octavo_thread_ctr #(.N_THREADS(N_THREADS)) u_tc (
    .clk (clk), .rst (rst), .tid (tid0)
  );

  always_ff @(posedge clk) begin
    if (rst) run <= 1'b0;
    else     run <= 1'b1;
  end

  logic [W-1:0] instr1;
  octavo_imem #(.DEPTH(DEPTH), .W(W), .INIT_FILE(INIT_FILE)) u_imem (
    .clk   (clk),
    .raddr (pc0),
    .rdata (instr1),
    .we    (imem_we && !rst),   // no write while reset is applied
    .waddr (imem_d),
    .wdata (imem_r)
  );

  side_t side1, side2;
  octavo_delay #(.W($bits(side_t)), .STAGES(1)) u_side0 (
    .clk (clk), .rst (rst),
    .d   ({run && !rst, pc0, tid0}),
    .q   (side1)
  );

  // stage 1: register, then fan out to the data paths
  logic [W-1:0] instr2;
  always_ff @(posedge clk) begin
    if (rst) begin
      side2  <= '0;
      instr2 <= '0;
    end else begin
      side2  <= side1;
      instr2 <= instr1;
    end
  end
  assign out_valid = side2.valid;
  assign out_instr = instr2;

  // stages 2..5
  instr_t i2, i6;
  side_t  side6;
  assign i2 = instr_t'(instr2[$bits(instr_t)-1:0]);
  octavo_delay #(.W($bits(side_t) + $bits(instr_t)), .STAGES(4)) u_pipe (
    .clk (clk), .rst (rst),
    .d   ({side2, i2}),
    .q   ({side6, i6})
  );

  // I/O predication decision, from RD0 (n+4) to CTL0 (n+6)
  logic go6;
  octavo_delay #(.W(1), .STAGES(2)) u_go (
    .clk (clk), .rst (rst), .d (io_go), .q (go6)
  );

  // stages 6, 7: controller
  octavo_controller #(.N_THREADS(N_THREADS), .W(W)) u_ctl (
    .clk       (clk),
    .rst       (rst),
    .in_valid  (side6.valid),
    .in_op     (i6.op),
    .in_d      (i6.d),
    .in_a      (br_a),
    .in_pc     (side6.pc),
    .in_tid    (side6.tid),
    .in_go     (go6),
    .fetch_tid (tid0),
    .fetch_pc  (pc0),
    .taken     (br_taken),
    .not_taken (br_not_taken),
    .annulled  (annulled)
  );

  assign issue_tid = tid0;
  assign issue_pc  = pc0;
endmodule
