// tb_octavo_cp: runs the control path on the test program image with
// operand A held at zero, and checks every fetch against an instruction-
// level model of the 8 threads: the threads issue in strict round-robin
// order, each thread's PC follows the program (taken and not-taken
// branches), and the fetched word reaches the data paths two cycles after
// the fetch. It then writes a new instruction into the I memory on the
// result port, 10 cycles after a fetch of thread 6, and checks that the
// thread's next fetch still sees the old word while the one after sees the
// new word (the one-instruction write-to-fetch hazard).
module tb_octavo_cp;
  import octavo_pkg::*;
  logic clk = 0, rst = 1;
  logic out_valid, imem_we, br_taken, br_not_taken, annulled;
  logic [35:0] out_instr, imem_r;
  addr_t imem_d, issue_pc;
  logic [2:0] issue_tid;
  logic [35:0] mem [1024];
  addr_t model_pc [8];
  typedef struct { logic [2:0] tid; addr_t pc; logic [35:0] word; } fetch_t;
  fetch_t hist [$];
  int checks = 0, failures = 0, n_fetch = 0, n_taken = 0, n_not = 0;
  int cyc = 0, t6_fetch_cyc = -1, write_cyc = -1, t6_after_write = 0;
  always #5 clk = ~clk;

  octavo_cp #(.INIT_FILE("tb/prog_octavo.hex")) dut (
    .clk(clk), .rst(rst), .out_valid(out_valid), .out_instr(out_instr), .br_a(36'd0),
    .imem_we(imem_we), .imem_d(imem_d), .imem_r(imem_r), .io_go(1'b1),
    .issue_tid(issue_tid), .issue_pc(issue_pc), .br_taken(br_taken), .br_not_taken(br_not_taken),
    .annulled(annulled));

  function automatic addr_t next_pc(addr_t pc, logic [35:0] w);
    instr_t i = instr_t'(w);
    case (i.op)
      OP_JMP, OP_JZE, OP_JPO: return i.d;     // operand A is zero
      default: return pc + 1;
    endcase
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (br_taken) n_taken++;
    if (br_not_taken) n_not++;
  end

  initial begin
    for (int i = 0; i < 1024; i++) mem[i] = '0;
    $readmemh("tb/prog_octavo.hex", mem);
    for (int t = 0; t < 8; t++) model_pc[t] = addr_t'(t);
    imem_we = 0; imem_d = 0; imem_r = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (cyc = 0; cyc < 400; cyc++) begin
      @(negedge clk);
      // this cycle's fetch, with the memory as it is before this cycle's write
      hist.push_back('{issue_tid, issue_pc, mem[issue_pc]});
      if (hist.size() > 3) void'(hist.pop_front());
      // out_valid now marks the fetch of two cycles ago as a real issue
      if (out_valid && hist.size() == 3) begin
        automatic fetch_t f = hist[0];
        n_fetch++;
        checks++;
        if (f.pc != model_pc[f.tid]) begin
          failures++; $display("FAIL cyc=%0d thread %0d fetched pc %0d exp %0d", cyc, f.tid, f.pc, model_pc[f.tid]);
        end
        checks++;
        if (out_instr != f.word) begin
          failures++; $display("FAIL cyc=%0d instr %h exp %h", cyc, out_instr, f.word);
        end
        if (n_fetch > 1) begin
          checks++;
          if (hist[1].tid != f.tid + 3'd1) begin failures++; $display("FAIL round robin %0d after %0d", hist[1].tid, f.tid); end
        end
        model_pc[f.tid] = next_pc(f.pc, f.word);
        if (f.tid == 6 && write_cyc >= 0 && cyc - 2 > write_cyc) t6_after_write++;
      end
      // schedule the I-memory write 10 cycles after a thread-6 fetch
      if (issue_tid == 6 && cyc > 100 && t6_fetch_cyc < 0) t6_fetch_cyc = cyc;
      imem_we = 0;
      if (t6_fetch_cyc >= 0 && cyc == t6_fetch_cyc + 10) begin
        imem_we = 1; imem_d = 10'd200; imem_r = mk_instr(OP_JMP, 10'd300, '0, '0);
        write_cyc = cyc;
      end
      #1;
      if (imem_we) mem[imem_d] = imem_r;   // takes effect at the coming edge
      @(posedge clk); #1;
      if (imem_we) begin imem_we = 0; end
    end
    // thread 6: fetch at t6_fetch_cyc+8 still saw JMP 200, the one after saw JMP 300
    checks++;
    if (!(model_pc[6] >= 300)) begin failures++; $display("FAIL thread 6 never took the written jump, pc=%0d", model_pc[6]); end
    checks++;
    if (n_taken == 0 || n_not == 0 || n_fetch < 390) begin
      failures++; $display("FAIL taken=%0d not=%0d fetches=%0d", n_taken, n_not, n_fetch);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
