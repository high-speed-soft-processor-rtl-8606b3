// octavo_core: one Octavo core, scalar (LANES = 1) or SIMD (LANES > 1).
//
// A single control path fetches and sequences the instructions of the 8
// threads; LANES data paths execute every instruction side by side, each on
// its own A and B memories (SIMD). Lane 0 doubles as the scalar data path:
// its operand A decides branches and its results are the ones written into
// the instruction memory. The instruction leaves the control path after one
// register and then passes two registers inside each lane before the lane
// reads its operands, so each lane can be placed and optimised as its own
// partition.
//
// Each data path carries the two accelerators of the benchmark setup on its
// B-memory I/O ports: an accumulator on B port 0 and an array reversal
// channel on B port 1 (addresses IO_BASE_B and IO_BASE_B+1). The A-memory
// I/O ports of every lane are brought out (the mesh uses ports 0..3 as the
// north, east, south and west links). B ports 2 and up read as zero. This
// port assignment is this design's choice.
//
// I/O predication: every port has a readiness bit (A ports from outside,
// the reversal channel from its empty/full flags, the accumulator and the
// unused B ports always ready). Each lane checks the ports its instruction
// addresses; if any lane finds one not ready, the instruction is annulled
// in all lanes and the thread re-issues it on its next turn (`annulled`
// pulses in the controller's CTL1 cycle).
//
// Interface timing is that of octavo_cp and octavo_dp; wb_* shows each
// lane's result as it enters the write stages (for observation).
module octavo_core
  import octavo_pkg::*;
#(
  parameter int    LANES     = 1,
  parameter int    W         = WORD_W,
  parameter int    DEPTH     = 1024,
  parameter int    N_IO      = IO_PORTS,
  parameter int    REV_DEPTH = 1024,
  parameter string INIT_FILE = ""
) (
  input  logic            clk,
  input  logic            rst,
  // A-memory I/O ports, per lane
  input  logic [W-1:0]    a_io_in    [LANES][N_IO],
  output logic [N_IO-1:0] a_io_rd    [LANES],
  output logic [W-1:0]    a_io_wdata [LANES],
  output logic [N_IO-1:0] a_io_wr    [LANES],
  // A-memory port readiness for I/O predication: input holds a word /
  // output can take one
  input  logic [N_IO-1:0] a_io_in_valid  [LANES],
  input  logic [N_IO-1:0] a_io_out_ready [LANES],
  // observation
  output logic [TID_W-1:0] issue_tid,
  output addr_t           issue_pc,
  output logic            br_taken,
  output logic            br_not_taken,
  output logic            annulled,
  output logic            wb_we [LANES],
  output addr_t           wb_d  [LANES],
  output logic [W-1:0]    wb_r  [LANES],
  output logic            acc_rd  [LANES],
  output logic            rev_rd  [LANES]
);
  logic         i_valid;
  logic [W-1:0] i_word;
  logic [W-1:0] br_a [LANES];
  logic [LANES-1:0] lane_ready;
  logic             go;

  // an instruction goes ahead only if its ports are ready in every lane
  assign go = &lane_ready;

  octavo_cp #(.N_THREADS(THREADS), .W(W), .DEPTH(DEPTH), .INIT_FILE(INIT_FILE)) u_cp (
    .clk          (clk),
    .rst          (rst),
    .out_valid    (i_valid),
    .out_instr    (i_word),
    .br_a         (br_a[0]),
    .imem_we      (wb_we[0]),
    .imem_d       (wb_d[0]),
    .imem_r       (wb_r[0]),
    .io_go        (go),
    .issue_tid    (issue_tid),
    .issue_pc     (issue_pc),
    .br_taken     (br_taken),
    .br_not_taken (br_not_taken),
    .annulled     (annulled)
  );

  for (genvar l = 0; l < LANES; l++) begin : g_lane
    logic [W-1:0]    b_in [N_IO];
    logic [N_IO-1:0] b_rd, b_wr;
    logic [W-1:0]    b_wdata;
    logic [W-1:0]    acc_q, rev_q;
    logic            rev_empty, rev_full;
    logic [N_IO-1:0] b_in_valid, b_out_ready;

    always_comb begin
      for (int p = 0; p < N_IO; p++) b_in[p] = '0;
      b_in[0] = acc_q;
      b_in[1] = rev_q;
      // accumulator always ready; reversal channel predicated on its
      // empty/full state; unused B ports always ready
      b_in_valid     = '1;
      b_out_ready    = '1;
      b_in_valid[1]  = !rev_empty;
      b_out_ready[1] = !rev_full;
    end

    octavo_dp #(.W(W), .DEPTH(DEPTH), .N_IO(N_IO), .INIT_FILE(INIT_FILE)) u_dp (
      .clk        (clk),
      .rst        (rst),
      .in_valid   (i_valid),
      .in_instr   (i_word),
      .br_a       (br_a[l]),
      .r_we       (wb_we[l]),
      .r_d        (wb_d[l]),
      .r          (wb_r[l]),
      .a_io_in    (a_io_in[l]),
      .a_io_rd    (a_io_rd[l]),
      .a_io_wdata (a_io_wdata[l]),
      .a_io_wr    (a_io_wr[l]),
      .a_io_in_valid  (a_io_in_valid[l]),
      .a_io_out_ready (a_io_out_ready[l]),
      .b_io_in_valid  (b_in_valid),
      .b_io_out_ready (b_out_ready),
      .io_ready       (lane_ready[l]),
      .io_go          (go),
      .b_io_in    (b_in),
      .b_io_rd    (b_rd),
      .b_io_wdata (b_wdata),
      .b_io_wr    (b_wr)
    );

    octavo_accumulator #(.W(W)) u_acc (
      .clk (clk), .rst (rst),
      .wr (b_wr[0]), .wdata (b_wdata), .rd (b_rd[0]), .rdata (acc_q)
    );

    octavo_reverse_channel #(.W(W), .DEPTH(REV_DEPTH)) u_rev (
      .clk (clk), .rst (rst),
      .wr (b_wr[1]), .wdata (b_wdata), .rd (b_rd[1]), .rdata (rev_q),
      .empty (rev_empty), .full (rev_full)
    );

    assign acc_rd[l] = b_rd[0];
    assign rev_rd[l] = b_rd[1];
  end
endmodule
