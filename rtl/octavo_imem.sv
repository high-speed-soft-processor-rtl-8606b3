// octavo_imem: Octavo instruction memory (I memory).
//
// DEPTH words of WORD_W bits, one synchronous read port and one write port,
// as one block RAM. The read port is addressed by the PC of the issuing
// thread and its registered output is the fetched instruction, one cycle
// after the address. The write port takes the ALU result R at destination
// address D: every result is written to all of Octavo's memories, which is
// how a program builds or changes its own code (self-modifying code is the
// only way to form computed addresses in the base processor).
//
// Timing: read data appears on rdata the cycle after raddr; a write takes
// effect at the clock edge where we is high. A read of the word being
// written in the same cycle returns the old contents.
// Contents start at zero, or are loaded from INIT_FILE (hexadecimal, one
// word per line) when it is not empty; the loading is this design's choice.
module octavo_imem
  import octavo_pkg::*;
#(
  parameter int    DEPTH     = 1024,
  parameter int    W         = WORD_W,
  parameter string INIT_FILE = ""
) (
  input  logic                     clk,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [W-1:0]             rdata,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [W-1:0]             wdata
);
  logic [W-1:0] mem [DEPTH];

  initial begin
    for (int i = 0; i < DEPTH; i++) mem[i] = '0;
    if (INIT_FILE != "") $readmemh(INIT_FILE, mem);
  end

  always_ff @(posedge clk) begin
    rdata <= mem[raddr];
    if (we) mem[waddr] <= wdata;
  end
endmodule
