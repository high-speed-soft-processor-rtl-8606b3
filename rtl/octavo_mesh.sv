// octavo_mesh: a ROWS x COLS mesh of Octavo cores (the top level).
//
// Larger overlays are built by tiling Octavo cores in two dimensions. Every
// core talks to its four neighbours through memory-mapped I/O ports of its
// A memories: A port 0 is the north link, 1 east, 2 south and 3 west. A
// word a thread writes to its out-port in direction X lands in a one-word
// link register on the neighbour's opposite side; a thread of the
// neighbour reads that register through its own in-port. Each link
// register has a full bit, set by the write and cleared by the read; it is
// the port's empty/full bit for I/O predication, so a thread that reads an
// empty link or writes a full one is annulled and retries on its next turn.
// With SIMD cores (LANES > 1) each lane has
// its own links to the same lane of the neighbour, forming LANES parallel
// meshes driven by one instruction stream per core. Every core starts from
// the same program image, INIT_FILE; cores differ only by the data that
// reaches them over the links.
//
// At the mesh boundary the links become ports: *_in words are read by the
// boundary cores (the *_in_rd strobe marks a read), and words written by a
// boundary core towards the outside appear on *_out with a one-cycle
// *_out_we strobe. *_in_valid says a boundary input holds a word and
// *_out_ready that the outside can take one. Index [i][l] is row or column
// i, lane l.
// Defaults: 4 x 8 scalar cores (32 data paths), the largest scalar mesh of
// the 32-datapath comparison. The link registers and port numbering are
// this design's choices.
//
// Observation outputs show, per core, branches taken and not taken this
// cycle, any word written to a link, and instructions annulled by I/O
// predication.
module octavo_mesh
  import octavo_pkg::*;
#(
  parameter int    ROWS      = 4,
  parameter int    COLS      = 8,
  parameter int    LANES     = 1,
  parameter int    W         = WORD_W,
  parameter int    REV_DEPTH = 1024,
  parameter string INIT_FILE = ""
) (
  input  logic         clk,
  input  logic         rst,
  // north boundary (row 0)
  input  logic [W-1:0] n_in     [COLS][LANES],
  output logic         n_in_rd  [COLS][LANES],
  output logic [W-1:0] n_out    [COLS][LANES],
  output logic         n_out_we [COLS][LANES],
  input  logic         n_in_valid  [COLS][LANES],
  input  logic         n_out_ready [COLS][LANES],
  // south boundary (row ROWS-1)
  input  logic [W-1:0] s_in     [COLS][LANES],
  output logic         s_in_rd  [COLS][LANES],
  output logic [W-1:0] s_out    [COLS][LANES],
  output logic         s_out_we [COLS][LANES],
  input  logic         s_in_valid  [COLS][LANES],
  input  logic         s_out_ready [COLS][LANES],
  // east boundary (column COLS-1)
  input  logic [W-1:0] e_in     [ROWS][LANES],
  output logic         e_in_rd  [ROWS][LANES],
  output logic [W-1:0] e_out    [ROWS][LANES],
  output logic         e_out_we [ROWS][LANES],
  input  logic         e_in_valid  [ROWS][LANES],
  input  logic         e_out_ready [ROWS][LANES],
  // west boundary (column 0)
  input  logic [W-1:0] w_in     [ROWS][LANES],
  output logic         w_in_rd  [ROWS][LANES],
  output logic [W-1:0] w_out    [ROWS][LANES],
  output logic         w_out_we [ROWS][LANES],
  input  logic         w_in_valid  [ROWS][LANES],
  input  logic         w_out_ready [ROWS][LANES],
  // observation
  output logic         obs_br_taken     [ROWS][COLS],
  output logic         obs_br_not_taken [ROWS][COLS],
  output logic         obs_link_wr      [ROWS][COLS],
  output logic         obs_acc_rd       [ROWS][COLS],
  output logic         obs_rev_rd       [ROWS][COLS],
  output logic         obs_annul        [ROWS][COLS]
);
  localparam int N_IO = IO_PORTS;
  localparam int DN = 0, DE = 1, DS = 2, DW = 3;

  // per-core A I/O port bundles
  logic [W-1:0]    io_in    [ROWS][COLS][LANES][N_IO];
  logic [N_IO-1:0] io_rd    [ROWS][COLS][LANES];
  logic [W-1:0]    io_wdata [ROWS][COLS][LANES];
  logic [N_IO-1:0] io_wr    [ROWS][COLS][LANES];
  // link register at each core's in-port, per direction
  logic [W-1:0]    link     [ROWS][COLS][LANES][4];
  logic            lfull    [ROWS][COLS][LANES][4];
  // port readiness for I/O predication
  logic [N_IO-1:0] in_valid  [ROWS][COLS][LANES];
  logic [N_IO-1:0] out_ready [ROWS][COLS][LANES];

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col
      logic         wb_we [LANES];
      addr_t        wb_d  [LANES];
      logic [W-1:0] wb_r  [LANES];
      logic         acc_rd [LANES];
      logic         rev_rd [LANES];
      logic [TID_W-1:0] issue_tid;
      addr_t        issue_pc;

      octavo_core #(.LANES(LANES), .W(W), .N_IO(N_IO), .REV_DEPTH(REV_DEPTH),
                    .INIT_FILE(INIT_FILE)) u_core (
        .clk          (clk),
        .rst          (rst),
        .a_io_in      (io_in[r][c]),
        .a_io_rd      (io_rd[r][c]),
        .a_io_wdata   (io_wdata[r][c]),
        .a_io_wr      (io_wr[r][c]),
        .a_io_in_valid  (in_valid[r][c]),
        .a_io_out_ready (out_ready[r][c]),
        .issue_tid    (issue_tid),
        .issue_pc     (issue_pc),
        .br_taken     (obs_br_taken[r][c]),
        .br_not_taken (obs_br_not_taken[r][c]),
        .annulled     (obs_annul[r][c]),
        .wb_we        (wb_we),
        .wb_d         (wb_d),
        .wb_r         (wb_r),
        .acc_rd       (acc_rd),
        .rev_rd       (rev_rd)
      );

      always_comb begin
        obs_link_wr[r][c] = 1'b0;
        obs_acc_rd[r][c]  = 1'b0;
        obs_rev_rd[r][c]  = 1'b0;
        for (int l = 0; l < LANES; l++) begin
          obs_link_wr[r][c] |= |io_wr[r][c][l][3:0];
          obs_acc_rd[r][c]  |= acc_rd[l];
          obs_rev_rd[r][c]  |= rev_rd[l];
        end
      end

      for (genvar l = 0; l < LANES; l++) begin : g_lane
        // in-port values: link registers inside the mesh, ports at the edge
        always_comb begin
          for (int p = 0; p < N_IO; p++) io_in[r][c][l][p] = '0;
          io_in[r][c][l][DN] = (r == 0)        ? n_in[c][l] : link[r][c][l][DN];
          io_in[r][c][l][DS] = (r == ROWS - 1) ? s_in[c][l] : link[r][c][l][DS];
          io_in[r][c][l][DE] = (c == COLS - 1) ? e_in[r][l] : link[r][c][l][DE];
          io_in[r][c][l][DW] = (c == 0)        ? w_in[r][l] : link[r][c][l][DW];
        end

        // port readiness: a link holds a word when its full bit is set; an
        // out-port is ready when the neighbour's link register is empty
        always_comb begin
          in_valid[r][c][l]      = '1;
          out_ready[r][c][l]     = '1;
          in_valid[r][c][l][DN]  = (r == 0)        ? n_in_valid[c][l]  : lfull[r][c][l][DN];
          in_valid[r][c][l][DS]  = (r == ROWS - 1) ? s_in_valid[c][l]  : lfull[r][c][l][DS];
          in_valid[r][c][l][DE]  = (c == COLS - 1) ? e_in_valid[r][l]  : lfull[r][c][l][DE];
          in_valid[r][c][l][DW]  = (c == 0)        ? w_in_valid[r][l]  : lfull[r][c][l][DW];
          out_ready[r][c][l][DN] = (r == 0)        ? n_out_ready[c][l] : !lfull[(r > 0) ? r - 1 : 0][c][l][DS];
          out_ready[r][c][l][DS] = (r == ROWS - 1) ? s_out_ready[c][l] : !lfull[(r < ROWS - 1) ? r + 1 : r][c][l][DN];
          out_ready[r][c][l][DE] = (c == COLS - 1) ? e_out_ready[r][l] : !lfull[r][(c < COLS - 1) ? c + 1 : c][l][DW];
          out_ready[r][c][l][DW] = (c == 0)        ? w_out_ready[r][l] : !lfull[r][(c > 0) ? c - 1 : 0][l][DE];
        end

        // link registers written by the neighbour on each side; the full
        // bit is set by the write and cleared when this core reads the port
        logic [3:0] wr_in;
        always_comb begin
          wr_in[DN] = (r > 0)        && io_wr[(r > 0) ? r - 1 : 0][c][l][DS];
          wr_in[DS] = (r < ROWS - 1) && io_wr[(r < ROWS - 1) ? r + 1 : r][c][l][DN];
          wr_in[DE] = (c < COLS - 1) && io_wr[r][(c < COLS - 1) ? c + 1 : c][l][DW];
          wr_in[DW] = (c > 0)        && io_wr[r][(c > 0) ? c - 1 : 0][l][DE];
        end

        always_ff @(posedge clk) begin
          if (rst) begin
            for (int k = 0; k < 4; k++) begin
              link[r][c][l][k]  <= '0;
              lfull[r][c][l][k] <= 1'b0;
            end
          end else begin
            if (wr_in[DN]) link[r][c][l][DN] <= io_wdata[(r > 0) ? r - 1 : 0][c][l];
            if (wr_in[DS]) link[r][c][l][DS] <= io_wdata[(r < ROWS - 1) ? r + 1 : r][c][l];
            if (wr_in[DE]) link[r][c][l][DE] <= io_wdata[r][(c < COLS - 1) ? c + 1 : c][l];
            if (wr_in[DW]) link[r][c][l][DW] <= io_wdata[r][(c > 0) ? c - 1 : 0][l];
            for (int k = 0; k < 4; k++) begin
              if (wr_in[k])                lfull[r][c][l][k] <= 1'b1;
              else if (io_rd[r][c][l][k])  lfull[r][c][l][k] <= 1'b0;
            end
          end
        end

        // boundary ports
        if (r == 0) begin : g_n
          assign n_in_rd[c][l]  = io_rd[r][c][l][DN];
          assign n_out[c][l]    = io_wdata[r][c][l];
          assign n_out_we[c][l] = io_wr[r][c][l][DN];
        end
        if (r == ROWS - 1) begin : g_s
          assign s_in_rd[c][l]  = io_rd[r][c][l][DS];
          assign s_out[c][l]    = io_wdata[r][c][l];
          assign s_out_we[c][l] = io_wr[r][c][l][DS];
        end
        if (c == 0) begin : g_w
          assign w_in_rd[r][l]  = io_rd[r][c][l][DW];
          assign w_out[r][l]    = io_wdata[r][c][l];
          assign w_out_we[r][l] = io_wr[r][c][l][DW];
        end
        if (c == COLS - 1) begin : g_e
          assign e_in_rd[r][l]  = io_rd[r][c][l][DE];
          assign e_out[r][l]    = io_wdata[r][c][l];
          assign e_out_we[r][l] = io_wr[r][c][l][DE];
        end
      end
    end
  end
endmodule
