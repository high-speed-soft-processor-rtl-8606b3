// tb_octavo_workloads: runs three of the benchmark kernels on a 2-lane
// SIMD core, written in the base instruction set. Octavo has no indirect
// addressing, so each loop walks its array by adding 1 to the address field
// of its own load or store instruction (the instruction word is also
// present in the A memory, and the result is written back to all three
// memories).
//   thread 0, Increment: 16 words at 600..615, each incremented in place;
//   thread 1, Reverse:   16 words at 640..655 pushed into the array
//                        reversal channel, then popped to 700..715;
//   thread 2, Hailstone: one Collatz step (odd: 3x+1, even: x/2 as the
//                        upper word of x * 2^35) on 8 words at 720..727.
// The program is tb/prog_workloads.hex: entry table at 0..7, loops at 16
// (Increment), 32 (Reverse) and 48 (Hailstone), counters at 990..993 and
// constants at 1000..1006 (0, 1, 1<<10, 3, 1<<20, 1<<20|1<<10, 1<<35); the
// address-field increments 1<<10 (A), 1<<20 (D) step a load or a store.
// Checks: every result word in both lanes, and the rate: the Increment
// loop (4 instructions per element) must take exactly 8 cycles per
// instruction, i.e. 16 * 4 * 8 cycles from its first to its final fetch.
module tb_octavo_workloads;
  import octavo_pkg::*;
  localparam int L = 2;
  logic clk = 0, rst = 1;
  logic [35:0] a_io_in [L][8];
  logic [7:0]  a_io_rd [L], a_io_wr [L], a_io_in_valid [L], a_io_out_ready [L];
  logic [35:0] a_io_wdata [L];
  logic [2:0]  issue_tid;
  addr_t       issue_pc;
  logic        br_taken, br_not_taken, annulled;
  logic        wb_we [L];
  addr_t       wb_d [L];
  logic [35:0] wb_r [L];
  logic        acc_rd [L], rev_rd [L];
  logic [35:0] last [L][1024];
  int checks = 0, failures = 0, cyc = 0, first16 = -1, done20 = -1, n_rev = 0;
  always #5 clk = ~clk;

  octavo_core #(.LANES(L), .INIT_FILE("tb/prog_workloads.hex")) dut (
    .clk(clk), .rst(rst), .a_io_in(a_io_in), .a_io_rd(a_io_rd), .a_io_wdata(a_io_wdata),
    .a_io_wr(a_io_wr), .a_io_in_valid(a_io_in_valid), .a_io_out_ready(a_io_out_ready),
    .issue_tid(issue_tid), .issue_pc(issue_pc), .br_taken(br_taken),
    .br_not_taken(br_not_taken), .annulled(annulled), .wb_we(wb_we), .wb_d(wb_d), .wb_r(wb_r),
    .acc_rd(acc_rd), .rev_rd(rev_rd));

  task automatic chk(input logic [35:0] got, input logic [35:0] exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %0d exp %0d", what, got, exp); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (!rst) begin
    cyc <= cyc + 1;
    for (int l = 0; l < L; l++) begin
      if (wb_we[l]) last[l][wb_d[l]] = wb_r[l];
      if (rev_rd[l]) n_rev++;
    end
    if (issue_tid == 3'd0 && issue_pc == 10'd16 && first16 < 0) first16 = cyc;
    if (issue_tid == 3'd0 && issue_pc == 10'd20 && done20 < 0) done20 = cyc;
  end

  initial begin
    int hs [8] = '{7, 10, 27, 1, 2, 97, 64, 3};
    for (int l = 0; l < L; l++) begin
      for (int a = 0; a < 1024; a++) last[l][a] = '0;
      for (int p = 0; p < 8; p++) a_io_in[l][p] = '0;
      a_io_in_valid[l] = '1;
      a_io_out_ready[l] = '1;
    end
    repeat (3) @(negedge clk);
    rst = 0;
    repeat (3000) @(negedge clk);
    for (int l = 0; l < L; l++) begin
      for (int i = 0; i < 16; i++) begin
        chk(last[l][600 + i], 36'(100 + 7 * i + 1), $sformatf("increment[%0d] lane %0d", i, l));
        chk(last[l][700 + i], 36'(5000 + 3 * (15 - i)), $sformatf("reverse[%0d] lane %0d", i, l));
      end
      for (int i = 0; i < 8; i++)
        chk(last[l][720 + i], 36'((hs[i] % 2 == 1) ? 3 * hs[i] + 1 : hs[i] / 2),
            $sformatf("hailstone[%0d] lane %0d", i, l));
    end
    chk(36'(done20 - first16), 36'(16 * 4 * 8), "increment loop cycles");
    chk(36'(n_rev), 36'(16 * L), "reversal channel pops");
    $display("COUNT increment_cycles=%0d rev_pops=%0d", done20 - first16, n_rev);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
