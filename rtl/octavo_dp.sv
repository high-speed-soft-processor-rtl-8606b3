// octavo_dp: one Octavo data path (one SIMD lane).
//
// Receives each instruction from the control path, reads its two operands
// from the A and B memories, executes it in the 4-stage ALU and writes the
// result R back to address D of both memories. Relative to the cycle k in
// which the instruction arrives (k = n+2 for fetch cycle n):
//   k, k+1     two pipeline registers held inside the lane (so that each
//              lane is its own netlist partition and the CAD tool cannot
//              merge the lanes' copies into one long-wire driver)
//   k+2, k+3   A/B memory read RD0, RD1; the instruction's OP and D ride
//              along in two more registers
//   k+4..k+7   ALU stages 0..3
//   k+8, k+9   write stages WR0, WR1 into A and B
// That is 8 stages from the first read to the last write (2 read,
// 4 compute, 2 write), one per thread, so a thread's result is in memory
// before the same thread's next read: data hazards cannot occur.
// Operand A (cycle k+4) is given to the controller for branches, and the
// result (cycle k+8) to the instruction memory; in a SIMD core only lane 0
// drives those. The A and B memories each carry IO_PORTS memory-mapped
// ports (see octavo_dmem). A and B start with the same image, since every
// write goes to both.
// I/O predication: in RD0 the lane reports through io_ready whether every
// I/O port the instruction addresses is ready (octavo_io_pred); the core
// answers with io_go for all lanes. An instruction with io_go low pops no
// port and reaches the ALU as invalid, so it writes nothing.
module octavo_dp
  import octavo_pkg::*;
#(
  parameter int    W         = WORD_W,
  parameter int    DEPTH     = 1024,
  parameter int    N_IO      = IO_PORTS,
  parameter string INIT_FILE = ""
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           in_valid,
  input  logic [W-1:0]   in_instr,
  // to the control path
  output logic [W-1:0]   br_a,
  output logic           r_we,
  output addr_t          r_d,
  output logic [W-1:0]   r,
  // A memory I/O ports
  input  logic [W-1:0]   a_io_in [N_IO],
  output logic [N_IO-1:0] a_io_rd,
  output logic [W-1:0]   a_io_wdata,
  output logic [N_IO-1:0] a_io_wr,
  // B memory I/O ports
  input  logic [W-1:0]   b_io_in [N_IO],
  output logic [N_IO-1:0] b_io_rd,
  output logic [W-1:0]   b_io_wdata,
  output logic [N_IO-1:0] b_io_wr,
  // I/O predication: port readiness in, lane readiness out, core decision in
  input  logic [N_IO-1:0] a_io_in_valid,
  input  logic [N_IO-1:0] a_io_out_ready,
  input  logic [N_IO-1:0] b_io_in_valid,
  input  logic [N_IO-1:0] b_io_out_ready,
  output logic           io_ready,
  input  logic           io_go
);
  typedef struct packed {
    logic   valid;
    instr_t i;
  } st_t;

  // lane-local instruction registers (stages 2, 3)
  st_t s_in, s4, s6;
  assign s_in = '{valid: in_valid, i: instr_t'(in_instr[$bits(instr_t)-1:0])};
  octavo_delay #(.W($bits(st_t)), .STAGES(2)) u_in (
    .clk (clk), .rst (rst), .d (s_in), .q (s4)
  );

  // OP/D alongside the memory read (stages 4, 5)
  octavo_delay #(.W($bits(st_t)), .STAGES(2)) u_opd (
    .clk (clk), .rst (rst), .d (s4), .q (s6)
  );

  logic [W-1:0] a_val, b_val;

  // I/O predication in RD0: an annulled instruction reads no port and
  // writes nothing
  octavo_io_pred #(.N_IO(N_IO)) u_pred (
    .clk         (clk),
    .rst         (rst),
    .valid       (s4.valid),
    .a           (s4.i.a),
    .b           (s4.i.b),
    .d           (s4.i.d),
    .writes      (op_writes(s4.i.op)),
    .a_in_valid  (a_io_in_valid),
    .b_in_valid  (b_io_in_valid),
    .a_out_ready (a_io_out_ready),
    .b_out_ready (b_io_out_ready),
    .ready       (io_ready),
    .go          (io_go)
  );

  logic go5, go6;
  always_ff @(posedge clk) begin
    if (rst) begin
      go5 <= 1'b0;
      go6 <= 1'b0;
    end else begin
      go5 <= io_go;
      go6 <= go5;
    end
  end

  octavo_dmem #(.DEPTH(DEPTH), .W(W), .N_IO(N_IO),
                .IO_BASE(32'(IO_BASE_A)), .INIT_FILE(INIT_FILE)) u_amem (
    .clk      (clk),
    .rst      (rst),
    .rd_en    (s4.valid && io_go),
    .raddr    (s4.i.a),
    .rdata    (a_val),
    .we       (r_we),
    .waddr    (r_d),
    .wdata    (r),
    .io_in    (a_io_in),
    .io_rd    (a_io_rd),
    .io_wdata (a_io_wdata),
    .io_wr    (a_io_wr)
  );

  octavo_dmem #(.DEPTH(DEPTH), .W(W), .N_IO(N_IO),
                .IO_BASE(32'(IO_BASE_B)), .INIT_FILE(INIT_FILE)) u_bmem (
    .clk      (clk),
    .rst      (rst),
    .rd_en    (s4.valid && io_go),
    .raddr    (s4.i.b),
    .rdata    (b_val),
    .we       (r_we),
    .waddr    (r_d),
    .wdata    (r),
    .io_in    (b_io_in),
    .io_rd    (b_io_rd),
    .io_wdata (b_io_wdata),
    .io_wr    (b_io_wr)
  );

  octavo_alu #(.W(W)) u_alu (
    .clk      (clk),
    .rst      (rst),
    .in_valid (s6.valid && go6),
    .in_op    (s6.i.op),
    .in_d     (s6.i.d),
    .in_a     (a_val),
    .in_b     (b_val),
    .we       (r_we),
    .d        (r_d),
    .r        (r)
  );

  assign br_a = a_val;
endmodule
