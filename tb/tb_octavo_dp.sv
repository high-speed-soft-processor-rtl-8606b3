// tb_octavo_dp: drives one data path as the control path would, one random
// instruction per cycle for 8 interleaved threads, each thread using its own
// block of 8 addresses plus the I/O windows. A reference model executes the
// same instructions one thread at a time. Checks: operand A reaches the
// branch output 4 cycles after the instruction arrives; result, write
// enable and destination leave the ALU 8 cycles after arrival; a thread
// always reads its own latest result (no hazard with 8 threads); I/O
// reads pulse the port's read strobe, and writes to the windows pulse the
// output port with the result 9 cycles after arrival. All ports report
// ready and the lane is always told to go ahead; I/O predication is tested
// in its own testbench and with the core and the mesh.
module tb_octavo_dp;
  import octavo_pkg::*;
  localparam int N = 3000;
  logic clk = 0, rst = 1;
  logic in_valid, r_we, io_ready;
  logic [35:0] in_instr, br_a, r, a_io_wdata, b_io_wdata;
  addr_t r_d;
  logic [35:0] a_io_in [8], b_io_in [8];
  logic [7:0] a_io_rd, a_io_wr, b_io_rd, b_io_wr;
  logic [35:0] mem [1024];
  // expectations indexed by cycle
  logic [35:0] e_bra [N + 16];
  logic        e_brv [N + 16];
  logic        e_we  [N + 16];
  addr_t       e_d   [N + 16];
  logic [35:0] e_r   [N + 16];
  logic [7:0]  e_awr [N + 16], e_bwr [N + 16], e_ard [N + 16], e_brd [N + 16];
  int checks = 0, failures = 0, n_io = 0;
  always #5 clk = ~clk;

  octavo_dp dut (.clk(clk), .rst(rst), .in_valid(in_valid), .in_instr(in_instr),
    .br_a(br_a), .r_we(r_we), .r_d(r_d), .r(r),
    .a_io_in(a_io_in), .a_io_rd(a_io_rd), .a_io_wdata(a_io_wdata), .a_io_wr(a_io_wr),
    .b_io_in(b_io_in), .b_io_rd(b_io_rd), .b_io_wdata(b_io_wdata), .b_io_wr(b_io_wr),
    .a_io_in_valid('1), .a_io_out_ready('1), .b_io_in_valid('1), .b_io_out_ready('1),
    .io_ready(io_ready), .io_go(1'b1));

  function automatic logic [35:0] exec(opcode_e op, logic [35:0] a, logic [35:0] b);
    logic signed [71:0] ps = $signed({{36{a[35]}}, a}) * $signed({{36{b[35]}}, b});
    logic [71:0] pu = {36'd0, a} * {36'd0, b};
    case (op)
      OP_XOR: return a ^ b;
      OP_AND: return a & b;
      OP_OR:  return a | b;
      OP_SUB: return a - b;
      OP_ADD: return a + b;
      OP_MHS: return ps[71:36];
      OP_MLS: return pu[35:0];
      OP_MHU: return pu[71:36];
      default: return '0;
    endcase
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 1024; i++) mem[i] = '0;
    for (int i = 0; i < N + 16; i++) begin
      e_bra[i] = '0; e_brv[i] = 0; e_we[i] = 0; e_d[i] = 0; e_r[i] = 0;
      e_awr[i] = 0; e_bwr[i] = 0; e_ard[i] = 0; e_brd[i] = 0;
    end
    for (int p = 0; p < 8; p++) begin
      a_io_in[p] = {4'($urandom), 32'($urandom)};
      b_io_in[p] = {4'($urandom), 32'($urandom)};
    end
    in_valid = 0; in_instr = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int k = 0; k < N; k++) begin
      automatic int t = k % 8;
      automatic instr_t ins;
      automatic logic [35:0] av, bv, rv;
      automatic int sel = $urandom_range(0, 9);
      ins.spare = '0;
      ins.op = opcode_e'(4'($urandom));
      ins.d = (sel == 0) ? addr_t'(IO_BASE_A + 10'($urandom_range(0, 7))) :
              (sel == 1) ? addr_t'(IO_BASE_B + 10'($urandom_range(0, 7))) :
                           addr_t'(t * 8 + $urandom_range(0, 7));
      ins.a = ($urandom_range(0, 5) == 0) ? addr_t'(IO_BASE_A + 10'($urandom_range(0, 7)))
                                          : addr_t'(t * 8 + $urandom_range(0, 7));
      ins.b = ($urandom_range(0, 5) == 0) ? addr_t'(IO_BASE_B + 10'($urandom_range(0, 7)))
                                          : addr_t'(t * 8 + $urandom_range(0, 7));
      in_valid = ($urandom_range(0, 15) != 0);
      in_instr = 36'(ins);
      // reference execution
      av = (ins.a >= IO_BASE_A && ins.a < IO_BASE_A + 8) ? a_io_in[ins.a - IO_BASE_A] : mem[ins.a];
      bv = (ins.b >= IO_BASE_B) ? b_io_in[ins.b - IO_BASE_B] : mem[ins.b];
      rv = exec(ins.op, av, bv);
      if (in_valid) begin
        e_bra[k + 4] = av; e_brv[k + 4] = 1;
        if (ins.a >= IO_BASE_A && ins.a < IO_BASE_A + 8) e_ard[k + 2] = 8'(1 << (ins.a - IO_BASE_A));
        if (ins.b >= IO_BASE_B) e_brd[k + 2] = 8'(1 << (ins.b - IO_BASE_B));
        if (op_writes(ins.op)) begin
          e_we[k + 8] = 1; e_d[k + 8] = ins.d; e_r[k + 8] = rv;
          mem[ins.d] = rv;
          if (ins.d >= IO_BASE_A && ins.d < IO_BASE_A + 8) e_awr[k + 9] = 8'(1 << (ins.d - IO_BASE_A));
          if (ins.d >= IO_BASE_B) e_bwr[k + 9] = 8'(1 << (ins.d - IO_BASE_B));
        end
      end
      #1;
      // compare this cycle's outputs
      checks++;
      if (a_io_rd !== e_ard[k] || b_io_rd !== e_brd[k]) begin
        failures++; $display("FAIL k=%0d io_rd a=%b/%b b=%b/%b", k, a_io_rd, e_ard[k], b_io_rd, e_brd[k]);
      end
      if (e_ard[k] != 0 || e_brd[k] != 0) n_io++;
      if (k >= 4 && e_brv[k]) begin
        checks++;
        if (br_a !== e_bra[k]) begin failures++; $display("FAIL k=%0d br_a %h exp %h", k, br_a, e_bra[k]); end
      end
      checks++;
      if (r_we !== e_we[k] || (e_we[k] && (r_d !== e_d[k] || r !== e_r[k]))) begin
        failures++; $display("FAIL k=%0d we=%b d=%0d r=%h exp we=%b d=%0d r=%h", k, r_we, r_d, r, e_we[k], e_d[k], e_r[k]);
      end
      checks++;
      if (a_io_wr !== e_awr[k] || b_io_wr !== e_bwr[k] ||
          (e_awr[k] != 0 && a_io_wdata !== e_r[k - 1]) || (e_bwr[k] != 0 && b_io_wdata !== e_r[k - 1])) begin
        failures++; $display("FAIL k=%0d io_wr a=%b/%b b=%b/%b", k, a_io_wr, e_awr[k], b_io_wr, e_bwr[k]);
      end
      @(negedge clk);
    end
    checks++;
    if (n_io == 0) begin failures++; $display("FAIL no I/O reads exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
