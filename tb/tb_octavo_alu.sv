// tb_octavo_alu: issues a random opcode with random operands every cycle
// and checks, exactly 4 cycles later, the result R, the destination D and
// the write enable against a reference model of the instruction set.
module tb_octavo_alu;
  import octavo_pkg::*;
  logic clk = 0, rst = 1;
  logic in_valid, we;
  opcode_e in_op;
  addr_t in_d, d;
  logic [35:0] in_a, in_b, r;
  typedef struct { logic we; addr_t d; logic [35:0] r; } exp_t;
  exp_t expq [$];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  octavo_alu dut (.clk(clk), .rst(rst), .in_valid(in_valid), .in_op(in_op), .in_d(in_d),
                  .in_a(in_a), .in_b(in_b), .we(we), .d(d), .r(r));

  function automatic exp_t model(logic v, opcode_e op, addr_t dd, logic [35:0] a, logic [35:0] b);
    exp_t e;
    logic signed [71:0] ps;
    logic [71:0] pu;
    ps = $signed({{36{a[35]}}, a}) * $signed({{36{b[35]}}, b});
    pu = {36'd0, a} * {36'd0, b};
    e.d = dd;
    e.we = v;
    case (op)
      OP_XOR: e.r = a ^ b;
      OP_AND: e.r = a & b;
      OP_OR:  e.r = a | b;
      OP_SUB: e.r = a - b;
      OP_ADD: e.r = a + b;
      OP_MHS: e.r = ps[71:36];
      OP_MLS: e.r = pu[35:0];
      OP_MHU: e.r = pu[71:36];
      default: begin e.r = 'x; e.we = 1'b0; end
    endcase
    return e;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; in_op = OP_XOR; in_d = 0; in_a = 0; in_b = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int i = 0; i < 600; i++) begin
      in_valid = ($urandom_range(0, 9) != 0);
      in_op = opcode_e'(4'($urandom));
      in_d = addr_t'($urandom);
      in_a = {4'($urandom), 32'($urandom)};
      in_b = (i % 7 == 0) ? in_a : {4'($urandom), 32'($urandom)};
      expq.push_back(model(in_valid, in_op, in_d, in_a, in_b));
      @(posedge clk); #1;
      if (expq.size() == 4) begin
        checks++;
        if (we !== expq[0].we || (expq[0].we && (r !== expq[0].r || d !== expq[0].d))) begin
          failures++;
          $display("FAIL i=%0d we=%b d=%0d r=%h exp we=%b d=%0d r=%h", i, we, d, r,
                   expq[0].we, expq[0].d, expq[0].r);
        end
        void'(expq.pop_front());
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
