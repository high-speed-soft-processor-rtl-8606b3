// tb_octavo_mesh: end-to-end test of a 2 x 3 mesh of 2-lane SIMD Octavo
// cores running the test program. Words entering at the west edge travel
// east through every core, each adding 1; words entering at the north edge
// travel south, each core adding 2; every top-row core reports its
// accumulator/reversal/multiply result (22) north, every left-column core
// its branch and self-modifying-code result (3) west. The edge inputs are
// changed half-way and the new values must arrive too. Counts, and
// requires at least once: link transfers between cores, edge reads and
// writes, taken and not-taken branches, accumulator and reversal reads,
// and instructions annulled by I/O predication (a core waiting for a link
// word, and a back-pressure phase in which the east edge refuses words).
module tb_octavo_mesh;
  import octavo_pkg::*;
  localparam int R = 2, C = 3, L = 2;
`include "tb_octavo_mesh_body.svh"

  octavo_mesh #(.ROWS(R), .COLS(C), .LANES(L), .INIT_FILE("tb/prog_octavo.hex")) dut (
    .clk(clk), .rst(rst),
    .n_in(n_in), .n_in_rd(n_in_rd), .n_out(n_out), .n_out_we(n_out_we),
    .s_in(s_in), .s_in_rd(s_in_rd), .s_out(s_out), .s_out_we(s_out_we),
    .e_in(e_in), .e_in_rd(e_in_rd), .e_out(e_out), .e_out_we(e_out_we),
    .w_in(w_in), .w_in_rd(w_in_rd), .w_out(w_out), .w_out_we(w_out_we),
    .obs_br_taken(obs_br_taken), .obs_br_not_taken(obs_br_not_taken),
    .obs_link_wr(obs_link_wr), .obs_acc_rd(obs_acc_rd), .obs_rev_rd(obs_rev_rd),
    .obs_annul(obs_annul),
    .n_in_valid(n_in_valid), .n_out_ready(n_out_ready), .s_in_valid(s_in_valid), .s_out_ready(s_out_ready),
    .e_in_valid(e_in_valid), .e_out_ready(e_out_ready), .w_in_valid(w_in_valid), .w_out_ready(w_out_ready));
endmodule
