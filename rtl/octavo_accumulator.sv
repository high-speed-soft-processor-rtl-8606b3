// octavo_accumulator: accumulator accelerator on a data-memory I/O port.
//
// Each word the processor writes to the port is added to a running sum;
// reading the port returns the sum and clears it in the same cycle, so a
// thread can collect one sum after another. If a write and a read arrive in
// the same cycle, the read returns the old sum and the sum restarts from the
// written word. The sum wraps modulo 2^W. The read-clears behaviour is this
// design's choice; the accelerator is only named by the processor's
// benchmark setup.
//
// Interface: wr/wdata from the memory's write stage, rd from its first read
// stage; rdata is combinational from the sum register and is sampled by
// the memory at the same clock edge at which rd clears it.
module octavo_accumulator
  import octavo_pkg::*;
#(
  parameter int W = WORD_W
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         wr,
  input  logic [W-1:0] wdata,
  input  logic         rd,
  output logic [W-1:0] rdata
);
  logic [W-1:0] sum;

  always_ff @(posedge clk) begin
    if (rst)           sum <= '0;
    else if (rd && wr) sum <= wdata;
    else if (rd)       sum <= '0;
    else if (wr)       sum <= sum + wdata;
  end

  assign rdata = sum;
endmodule
