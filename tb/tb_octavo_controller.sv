// tb_octavo_controller: checks the per-thread PCs after reset (thread t at
// PC t), then drives instructions as the pipeline would (thread i mod 8 in
// CTL0 at cycle i) and checks that each thread's PC, read two cycles later
// through the fetch port, is D for a taken branch and PC+1 otherwise, for
// every opcode and operand sign/zero case. About one instruction in eight
// is annulled (in_go low); its thread's PC must then stay where it was.
module tb_octavo_controller;
  import octavo_pkg::*;
  logic clk = 0, rst = 1;
  logic in_valid, in_go, taken, not_taken, annulled;
  opcode_e in_op;
  addr_t in_d, in_pc, fetch_pc;
  logic [35:0] in_a;
  logic [2:0] in_tid, fetch_tid;
  addr_t model_pc [8];
  int checks = 0, failures = 0, n_taken = 0, n_not = 0, n_annul = 0;
  always #5 clk = ~clk;

  octavo_controller dut (.clk(clk), .rst(rst), .in_valid(in_valid), .in_op(in_op), .in_d(in_d),
    .in_a(in_a), .in_pc(in_pc), .in_tid(in_tid), .in_go(in_go), .fetch_tid(fetch_tid), .fetch_pc(fetch_pc),
    .taken(taken), .not_taken(not_taken), .annulled(annulled));

  function automatic logic cond(opcode_e op, logic [35:0] a);
    case (op)
      OP_JMP: return 1;
      OP_JZE: return a == 0;
      OP_JNZ: return a != 0;
      OP_JPO: return a[35] == 0;
      OP_JNE: return a[35] == 1;
      default: return 0;
    endcase
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (taken) n_taken++;
    if (not_taken) n_not++;
    if (annulled) n_annul++;
  end

  initial begin
    logic [35:0] avals [4] = '{36'd0, 36'd5, 36'h800000001, 36'hFFFFFFFFF};
    in_valid = 0; in_go = 1; in_op = OP_ADD; in_d = 0; in_a = 0; in_pc = 0; in_tid = 0; fetch_tid = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int t = 0; t < 8; t++) begin
      fetch_tid = 3'(t); #1;
      checks++;
      if (fetch_pc != addr_t'(t)) begin failures++; $display("FAIL reset pc[%0d]=%0d", t, fetch_pc); end
      model_pc[t] = addr_t'(t);
    end
    @(negedge clk);
    for (int i = 0; i < 800; i++) begin
      automatic int t = i % 8;
      in_valid = 1;
      in_tid = 3'(t);
      in_op = opcode_e'(4'($urandom));
      in_d = addr_t'($urandom);
      in_a = avals[$urandom_range(0, 3)];
      in_pc = model_pc[t];
      in_go = ($urandom_range(0, 7) != 0);
      if (in_go) model_pc[t] = cond(in_op, in_a) ? in_d : in_pc + 1;
      @(negedge clk);
      // thread t's new PC must be visible two cycles after CTL0
      if (i >= 1) begin
        automatic int tp = (i - 1) % 8;
        fetch_tid = 3'(tp); #1;
        checks++;
        if (fetch_pc != model_pc[tp]) begin
          failures++; $display("FAIL i=%0d pc[%0d]=%0d exp %0d", i, tp, fetch_pc, model_pc[tp]);
        end
      end
    end
    in_valid = 0;
    checks++;
    if (n_taken == 0 || n_not == 0 || n_annul == 0) begin
      failures++; $display("FAIL taken/not-taken/annul never seen");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
