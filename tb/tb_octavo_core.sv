// tb_octavo_core: runs the test program on a 2-lane SIMD core. The eight
// threads exercise every computing opcode, every branch condition, a loop,
// self-modifying code, the accumulator and the array reversal channel, and
// per-lane I/O. Checks, against values worked out here from the program:
//   - thread 4's XOR/AND/OR/SUB/ADD/MHS/MLS/MHU results in both lanes;
//   - the result of an instruction fetched in cycle n leaves the ALU in
//     cycle n+10;
//   - thread 3 sees its own code written one instruction ahead only from
//     the second instruction on (R5 keeps the old value 1, R3 the new 2)
//     and sends 3 to its west port;
//   - thread 2's accumulator sum (12), reversed pops (2 then 1) and its
//     final 22 on the north port;
//   - threads 0, 1 and 5 turn each lane's own port inputs into that lane's
//     own outputs (SIMD: one instruction stream, different data);
//   - I/O predication: while lane 1's input port 4 is empty, thread 5 is
//     annulled in both lanes (no port-4 read, no port-5 write) and resumes
//     with the new input once it is valid; likewise while lane 0's output
//     port 5 is full.
module tb_octavo_core;
  import octavo_pkg::*;
  localparam int L = 2;
  logic clk = 0, rst = 1;
  logic [35:0] a_io_in [L][8];
  logic [7:0]  a_io_in_valid [L], a_io_out_ready [L];
  logic        annulled, quiet;
  int          n_annul = 0, n_quiet_io = 0;
  logic [7:0]  a_io_rd [L], a_io_wr [L];
  logic [35:0] a_io_wdata [L];
  logic [2:0]  issue_tid;
  addr_t       issue_pc;
  logic        br_taken, br_not_taken;
  logic        wb_we [L];
  addr_t       wb_d [L];
  logic [35:0] wb_r [L];
  logic        acc_rd [L], rev_rd [L];
  logic [35:0] last [L][1024];
  logic [35:0] port_last [L][8];
  int checks = 0, failures = 0, cyc = 0;
  int n_taken = 0, n_not = 0, n_acc = 0, n_rev = 0;
  int fetch128 = -1, wb920 = -1;
  always #5 clk = ~clk;

  octavo_core #(.LANES(L), .INIT_FILE("tb/prog_octavo.hex")) dut (
    .clk(clk), .rst(rst), .a_io_in(a_io_in), .a_io_rd(a_io_rd), .a_io_wdata(a_io_wdata),
    .a_io_wr(a_io_wr), .issue_tid(issue_tid), .issue_pc(issue_pc), .br_taken(br_taken),
    .br_not_taken(br_not_taken), .wb_we(wb_we), .wb_d(wb_d), .wb_r(wb_r),
    .acc_rd(acc_rd), .rev_rd(rev_rd), .a_io_in_valid(a_io_in_valid),
    .a_io_out_ready(a_io_out_ready), .annulled(annulled));

  task automatic chk(input logic [35:0] got, input logic [35:0] exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (!rst) begin
    cyc <= cyc + 1;
    if (br_taken) n_taken++;
    if (br_not_taken) n_not++;
    if (annulled) n_annul++;
    // while a port is withheld no port-4 read or port-5 write may happen
    if (quiet) for (int l = 0; l < L; l++) if (a_io_rd[l][4] || a_io_wr[l][5]) n_quiet_io++;
    for (int l = 0; l < L; l++) begin
      if (wb_we[l]) last[l][wb_d[l]] = wb_r[l];
      for (int p = 0; p < 8; p++) if (a_io_wr[l][p]) port_last[l][p] = a_io_wdata[l];
      if (acc_rd[l]) n_acc++;
      if (rev_rd[l]) n_rev++;
    end
    if (issue_pc == 10'd128 && fetch128 < 0) fetch128 = cyc;
    if (wb_we[0] && wb_d[0] == 10'd920 && wb920 < 0) wb920 = cyc;
  end

  initial begin
    logic [35:0] x = 36'h912345678, y = 36'h00ABCDEF1;
    logic signed [71:0] ps;
    logic [71:0] pu;
    for (int l = 0; l < L; l++) begin
      for (int a = 0; a < 1024; a++) last[l][a] = '0;
      for (int p = 0; p < 8; p++) begin port_last[l][p] = '0; a_io_in[l][p] = '0; end
      a_io_in[l][0] = 36'd1000 + 36'(l);   // north in
      a_io_in[l][3] = 36'd50 + 36'(l);     // west in
      a_io_in[l][4] = 36'd100 + 36'(7 * l);
      a_io_in_valid[l] = '1;
      a_io_out_ready[l] = '1;
    end
    quiet = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    repeat (1500) @(negedge clk);
    ps = $signed({{36{x[35]}}, x}) * $signed({{36{y[35]}}, y});
    pu = {36'd0, x} * {36'd0, y};
    for (int l = 0; l < L; l++) begin
      chk(last[l][920], x ^ y, "XOR");
      chk(last[l][921], x & y, "AND");
      chk(last[l][922], x | y, "OR");
      chk(last[l][923], x - y, "SUB");
      chk(last[l][924], x + y, "ADD");
      chk(last[l][925], ps[71:36], "MHS");
      chk(last[l][926], pu[35:0], "MLS");
      chk(last[l][927], pu[71:36], "MHU");
      chk(last[l][930], 0, "loop counter");
      chk(last[l][932], 1, "R5: old instruction ran (hazard)");
      chk(last[l][931], 2, "R3: new instruction ran");
      chk(port_last[l][3], 3, "west out");
      chk(last[l][940], 12, "accumulator sum");
      chk(last[l][941], 2, "first pop");
      chk(last[l][942], 1, "second pop");
      chk(port_last[l][0], 22, "north out");
      chk(port_last[l][1], 36'd51 + 36'(l), "east out, per lane");
      chk(port_last[l][2], 36'd1002 + 36'(l), "south out, per lane");
      chk(last[l][970], 36'(3 * (100 + 7 * l)), "lane-specific product");
      chk(port_last[l][5], 36'(3 * (100 + 7 * l)), "lane-specific port 5");
    end
    chk(36'(wb920 - fetch128), 10, "fetch to result latency");
    chk(36'(n_annul), 0, "no annul while all ports ready");
    // input port empty in lane 1: thread 5 waits in both lanes
    for (int l = 0; l < L; l++) a_io_in[l][4] = 36'd200 + 36'(l);
    a_io_in_valid[1][4] = 0;
    repeat (12) @(negedge clk);
    quiet = 1;
    repeat (400) @(negedge clk);
    quiet = 0;
    a_io_in_valid[1][4] = 1;
    repeat (100) @(negedge clk);
    for (int l = 0; l < L; l++) chk(port_last[l][5], 36'(3 * (200 + l)), "port 5 after input became valid");
    checks++;
    if (n_annul < 40) begin failures++; $display("FAIL too few annulled: %0d", n_annul); end
    // output port full in lane 0
    a_io_out_ready[0][5] = 0;
    for (int l = 0; l < L; l++) a_io_in[l][4] = 36'd300 + 36'(l);
    repeat (12) @(negedge clk);
    for (int l = 0; l < L; l++) port_last[l][5] = '0;
    quiet = 1;
    repeat (400) @(negedge clk);
    quiet = 0;
    for (int l = 0; l < L; l++) chk(port_last[l][5], 0, "no port 5 write while full");
    a_io_out_ready[0][5] = 1;
    repeat (100) @(negedge clk);
    for (int l = 0; l < L; l++) chk(port_last[l][5], 36'(3 * (300 + l)), "port 5 after output became ready");
    chk(36'(n_quiet_io), 0, "no port traffic while withheld");
    checks++;
    if (n_taken == 0 || n_not == 0 || n_acc == 0 || n_rev == 0 || n_annul == 0) begin
      failures++; $display("FAIL mechanism missing taken=%0d not=%0d acc=%0d rev=%0d", n_taken, n_not, n_acc, n_rev);
    end
    $display("COUNT taken=%0d not_taken=%0d acc_reads=%0d rev_reads=%0d annulled=%0d", n_taken, n_not, n_acc, n_rev, n_annul);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
