// Shared body of the mesh testbenches: signals, stimulus and checks.
// Expects localparams R, C and L (rows, columns, lanes); the including
// testbench instantiates the mesh as dut after this text.
  logic clk = 0, rst = 1;
  logic [35:0] n_in [C][L], s_in [C][L], e_in [R][L], w_in [R][L];
  logic [35:0] n_out [C][L], s_out [C][L], e_out [R][L], w_out [R][L];
  logic        n_in_rd [C][L], s_in_rd [C][L], e_in_rd [R][L], w_in_rd [R][L];
  logic        n_out_we [C][L], s_out_we [C][L], e_out_we [R][L], w_out_we [R][L];
  logic        obs_br_taken [R][C], obs_br_not_taken [R][C], obs_link_wr [R][C];
  logic        obs_acc_rd [R][C], obs_rev_rd [R][C], obs_annul [R][C];
  // edge readiness: inputs always hold a word; outputs accept unless held
  logic        n_in_valid [C][L], s_in_valid [C][L], e_in_valid [R][L], w_in_valid [R][L];
  logic        n_out_ready [C][L], s_out_ready [C][L], e_out_ready [R][L], w_out_ready [R][L];
  logic        hold_east;
  int          n_annul = 0, n_held_wr = 0;
  logic [35:0] n_last [C][L], s_last [C][L], e_last [R][L], w_last [R][L];
  int checks = 0, failures = 0;
  int n_taken = 0, n_not = 0, n_link = 0, n_acc = 0, n_rev = 0, n_edge_rd = 0, n_edge_wr = 0;
  always #5 clk = ~clk;



  task automatic chk(input logic [35:0] got, input logic [35:0] exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %0d exp %0d", what, got, exp); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (!rst) begin
    for (int r = 0; r < R; r++) for (int c = 0; c < C; c++) begin
      if (obs_br_taken[r][c]) n_taken++;
      if (obs_br_not_taken[r][c]) n_not++;
      if (obs_link_wr[r][c]) n_link++;
      if (obs_acc_rd[r][c]) n_acc++;
      if (obs_rev_rd[r][c]) n_rev++;
      if (obs_annul[r][c]) n_annul++;
    end
    for (int l = 0; l < L; l++) begin
      for (int c = 0; c < C; c++) begin
        if (n_out_we[c][l]) begin n_last[c][l] = n_out[c][l]; n_edge_wr++; end
        if (s_out_we[c][l]) begin s_last[c][l] = s_out[c][l]; n_edge_wr++; end
        if (n_in_rd[c][l] || s_in_rd[c][l]) n_edge_rd++;
      end
      for (int r = 0; r < R; r++) begin
        if (e_out_we[r][l]) begin e_last[r][l] = e_out[r][l]; n_edge_wr++; if (hold_east) n_held_wr++; end
        if (w_out_we[r][l]) begin w_last[r][l] = w_out[r][l]; n_edge_wr++; end
        if (e_in_rd[r][l] || w_in_rd[r][l]) n_edge_rd++;
      end
    end
  end

  task automatic set_inputs(input int base);
    for (int l = 0; l < L; l++) begin
      for (int c = 0; c < C; c++) begin n_in[c][l] = 36'(base + 2000 + 10 * c + l); s_in[c][l] = '0; end
      for (int r = 0; r < R; r++) begin w_in[r][l] = 36'(base + 500 + 10 * r + l); e_in[r][l] = '0; end
    end
  endtask

  task automatic check_outputs(input int base, input string phase);
    for (int l = 0; l < L; l++) begin
      for (int c = 0; c < C; c++) begin
        chk(s_last[c][l], 36'(base + 2000 + 10 * c + l + 2 * R), {phase, " south edge"});
        chk(n_last[c][l], 36'd22, {phase, " north edge"});
      end
      for (int r = 0; r < R; r++) begin
        chk(e_last[r][l], 36'(base + 500 + 10 * r + l + C), {phase, " east edge"});
        chk(w_last[r][l], 36'd3, {phase, " west edge"});
      end
    end
  endtask

  initial begin
    for (int l = 0; l < L; l++) begin
      for (int c = 0; c < C; c++) begin n_last[c][l] = '0; s_last[c][l] = '0; end
      for (int r = 0; r < R; r++) begin e_last[r][l] = '0; w_last[r][l] = '0; end
    end
    for (int l = 0; l < L; l++) begin
      for (int c = 0; c < C; c++) begin
        n_in_valid[c][l] = 1; s_in_valid[c][l] = 1; n_out_ready[c][l] = 1; s_out_ready[c][l] = 1;
      end
      for (int r = 0; r < R; r++) begin
        e_in_valid[r][l] = 1; w_in_valid[r][l] = 1; e_out_ready[r][l] = 1; w_out_ready[r][l] = 1;
      end
    end
    hold_east = 0;
    set_inputs(0);
    repeat (3) @(negedge clk);
    rst = 0;
    repeat (40 * (R + C) + 200) @(negedge clk);
    check_outputs(0, "first");
    set_inputs(100000);
    repeat (40 * (R + C) + 200) @(negedge clk);
    check_outputs(100000, "second");
    // back-pressure: the east edge refuses words; the west-to-east chains
    // fill up and stall, then drain with the new inputs once released
    for (int r = 0; r < R; r++) for (int l = 0; l < L; l++) e_out_ready[r][l] = 0;
    set_inputs(200000);
    repeat (12) @(negedge clk);
    hold_east = 1;
    repeat (300) @(negedge clk);
    hold_east = 0;
    for (int r = 0; r < R; r++) for (int l = 0; l < L; l++) e_out_ready[r][l] = 1;
    repeat (40 * (R + C) + 200) @(negedge clk);
    check_outputs(200000, "after back-pressure");
    chk(36'(n_held_wr), 0, "no east edge write while held");
    checks++;
    if (n_taken == 0 || n_not == 0 || n_link == 0 || n_acc == 0 || n_rev == 0 ||
        n_edge_rd == 0 || n_edge_wr == 0 || n_annul == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("COUNT taken=%0d not_taken=%0d link_writes=%0d acc_reads=%0d rev_reads=%0d edge_reads=%0d edge_writes=%0d annulled=%0d",
             n_taken, n_not, n_link, n_acc, n_rev, n_edge_rd, n_edge_wr, n_annul);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
