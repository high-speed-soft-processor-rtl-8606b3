// tb_octavo_mesh_full: the end-to-end mesh test at the default size,
// a 4 x 8 mesh of scalar Octavo cores (32 data paths), with the top's
// parameters left at their defaults. Same stimulus and checks as
// tb_octavo_mesh: west-to-east and north-to-south chains through every
// core, per-core results on the north and west edges, edge inputs changed
// half-way, and every mechanism required to occur at least once.
module tb_octavo_mesh_full;
  import octavo_pkg::*;
  localparam int R = 4, C = 8, L = 1;
`include "tb_octavo_mesh_body.svh"

  octavo_mesh dut (
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

  // The top is left at its defaults, whose memories start empty: load the
  // program image into every core's I, A and B memories before reset ends.
  for (genvar r = 0; r < R; r++) begin : g_load_r
    for (genvar c = 0; c < C; c++) begin : g_load_c
      initial begin
        #1;
        $readmemh("tb/prog_octavo.hex", dut.g_row[r].g_col[c].u_core.u_cp.u_imem.mem);
        $readmemh("tb/prog_octavo.hex", dut.g_row[r].g_col[c].u_core.g_lane[0].u_dp.u_amem.mem);
        $readmemh("tb/prog_octavo.hex", dut.g_row[r].g_col[c].u_core.g_lane[0].u_dp.u_bmem.mem);
      end
    end
  end
endmodule
