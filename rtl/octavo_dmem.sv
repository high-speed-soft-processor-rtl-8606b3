// octavo_dmem: one Octavo data memory (the A or the B memory).
//
// DEPTH words of WORD_W bits with N_IO memory-mapped I/O ports. An operand
// address inside the window [IO_BASE, IO_BASE+N_IO) reads input port
// (address - IO_BASE) instead of the RAM; a write to an address inside the
// window also drives output port (address - IO_BASE). The I/O ports are
// where accelerators and neighbouring cores attach.
//
// The read takes two stages (RD0, RD1) and the write two stages (WR0, WR1),
// matching the processor's 8-stage data path (2 read, 4 compute, 2 write):
//   RD0  cycle n  : raddr/rd_en presented; RAM read registered; an input
//                   port in the window is sampled and io_rd[k] pulses so a
//                   port can treat the read as a pop.
//   RD1  cycle n+1: RAM or port word selected and registered.
//                   rdata is valid in cycle n+2.
//   WR0  cycle m  : we/waddr/wdata presented and registered.
//   WR1  cycle m+1: RAM written at the end of the cycle; io_wr[k] pulses
//                   with io_wdata for a window address.
// With 8 threads in the pipeline, a thread's write completes just before
// the same thread's next read, so no hazard is visible to software.
// The I/O window position, the port count and the pop/push strobes are
// this design's choices; contents start at zero or come from INIT_FILE.
module octavo_dmem
  import octavo_pkg::*;
#(
  parameter int          DEPTH     = 1024,
  parameter int          W         = WORD_W,
  parameter int          N_IO      = IO_PORTS,
  parameter int unsigned IO_BASE   = 1008,
  parameter string       INIT_FILE = ""
) (
  input  logic                     clk,
  input  logic                     rst,
  // read port
  input  logic                     rd_en,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [W-1:0]             rdata,
  // write port
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [W-1:0]             wdata,
  // memory-mapped I/O
  input  logic [W-1:0]             io_in [N_IO],
  output logic [N_IO-1:0]          io_rd,
  output logic [W-1:0]             io_wdata,
  output logic [N_IO-1:0]          io_wr
);
  localparam int AW = $clog2(DEPTH);
  localparam int PW = (N_IO > 1) ? $clog2(N_IO) : 1;

  logic [W-1:0] mem [DEPTH];

  initial begin
    for (int i = 0; i < DEPTH; i++) mem[i] = '0;
    if (INIT_FILE != "") $readmemh(INIT_FILE, mem);
  end

  function automatic logic in_window(logic [AW-1:0] a);
    return (32'(a) >= IO_BASE) && (32'(a) < IO_BASE + N_IO);
  endfunction

  // ---------------- read: RD0 ----------------
  logic          rd_io;
  logic [PW-1:0] rd_port;
  assign rd_io   = rd_en && in_window(raddr);
  assign rd_port = PW'(32'(raddr) - IO_BASE);

  always_comb begin
    io_rd = '0;
    if (rd_io) io_rd[rd_port] = 1'b1;
  end

  logic [W-1:0] rd0_ram, rd0_io;
  logic         rd0_sel_io;
  always_ff @(posedge clk) begin
    rd0_ram    <= mem[raddr];
    rd0_sel_io <= rd_io;
    rd0_io     <= io_in[rd_port];
  end

  // ---------------- read: RD1 ----------------
  always_ff @(posedge clk) begin
    if (rst) rdata <= '0;
    else     rdata <= rd0_sel_io ? rd0_io : rd0_ram;
  end

  // ---------------- write: WR0 ----------------
  logic          wr0_we;
  logic [AW-1:0] wr0_addr;
  logic [W-1:0]  wr0_data;
  always_ff @(posedge clk) begin
    if (rst) wr0_we <= 1'b0;
    else     wr0_we <= we;
    wr0_addr <= waddr;
    wr0_data <= wdata;
  end

  // ---------------- write: WR1 ----------------
  always_ff @(posedge clk) begin
    // gated by rst as well, so that no write happens before the write
    // stage itself has been reset
    if (wr0_we && !rst) mem[wr0_addr] <= wr0_data;
  end

  assign io_wdata = wr0_data;
  always_comb begin
    io_wr = '0;
    if (wr0_we && !rst && in_window(wr0_addr)) io_wr[PW'(32'(wr0_addr) - IO_BASE)] = 1'b1;
  end
endmodule
