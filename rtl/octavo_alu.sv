// octavo_alu: Octavo's fully pipelined 4-stage ALU.
//
// Executes the computing opcodes: XOR, AND, OR, SUB (A-B), ADD (A+B) in the
// logic unit and MHS/MLS/MHU in the multiplier. Both units have four
// register stages; the logic unit computes in its first stage and its
// result is carried through three more registers so that every instruction
// leaves the ALU exactly four cycles after it entered, whatever it does.
// This fixed latency is what lets eight threads share the pipeline with no
// interlocks. Arithmetic wraps modulo 2^W.
//
// The ALU also carries the instruction's valid bit and destination address
// D so that the result R leaves together with its write enable: we is high
// for a valid instruction whose opcode writes a result (not for flow
// control or the unused opcodes, which is this design's choice).
//
// Interface: in_* in cycle n, r/we/d valid in cycle n+4.
module octavo_alu
  import octavo_pkg::*;
#(
  parameter int W = WORD_W
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         in_valid,
  input  opcode_e      in_op,
  input  addr_t        in_d,
  input  logic [W-1:0] in_a,
  input  logic [W-1:0] in_b,
  output logic         we,
  output addr_t        d,
  output logic [W-1:0] r
);
  // logic unit, stage 1
  logic [W-1:0] lu;
  always_comb begin
    unique case (in_op)
      OP_XOR:  lu = in_a ^ in_b;
      OP_AND:  lu = in_a & in_b;
      OP_OR:   lu = in_a | in_b;
      OP_SUB:  lu = in_a - in_b;
      OP_ADD:  lu = in_a + in_b;
      default: lu = '0;
    endcase
  end

  typedef struct packed {
    logic         we;
    logic         mul;
    addr_t        d;
    logic [W-1:0] lu;
  } stage_t;

  stage_t s_in, s1, s2, s3, s4;
  assign s_in = '{we:  in_valid && op_writes(in_op),
                  mul: in_op inside {OP_MHS, OP_MLS, OP_MHU},
                  d:   in_d,
                  lu:  lu};

  always_ff @(posedge clk) begin
    if (rst) begin
      s1 <= '0; s2 <= '0; s3 <= '0; s4 <= '0;
    end else begin
      s1 <= s_in; s2 <= s1; s3 <= s2; s4 <= s3;
    end
  end

  logic [W-1:0] p;
  octavo_mult #(.W(W)) u_mult (
    .clk       (clk),
    .a         (in_a),
    .b         (in_b),
    .is_signed (in_op == OP_MHS),
    .sel_high  (in_op != OP_MLS),
    .p         (p)
  );

  assign we = s4.we;
  assign d  = s4.d;
  assign r  = s4.mul ? p : s4.lu;
endmodule
