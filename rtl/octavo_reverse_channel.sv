// octavo_reverse_channel: array reversal channel on a data-memory I/O port.
//
// A last-in, first-out buffer of DEPTH words: a thread writes an array to
// the port word by word and reads it back from the port in reverse order.
// Reading an empty channel returns zero and changes nothing; writing a full
// channel drops the word. The LIFO organisation, the depth (one data-memory
// worth of words) and the empty/full behaviour are this design's choices;
// the accelerator is only named by the processor's benchmark setup.
//
// Interface: wr/wdata push, rd pops. rdata is the current top of the stack,
// combinational, sampled by the memory on the clock edge at which rd pops.
// A push and a pop in the same cycle replace the top word.
module octavo_reverse_channel
  import octavo_pkg::*;
#(
  parameter int W     = WORD_W,
  parameter int DEPTH = 1024
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         wr,
  input  logic [W-1:0] wdata,
  input  logic         rd,
  output logic [W-1:0] rdata,
  output logic         empty,
  output logic         full
);
  localparam int CW = $clog2(DEPTH + 1);

  logic [W-1:0]  mem [DEPTH];
  logic [CW-1:0] count;

  assign empty = (count == '0);
  assign full  = (32'(count) == DEPTH);
  assign rdata = empty ? '0 : mem[$clog2(DEPTH)'(count - 1'b1)];

  always_ff @(posedge clk) begin
    if (rst) begin
      count <= '0;
    end else if (wr && rd && !empty) begin
      mem[$clog2(DEPTH)'(count - 1'b1)] <= wdata;
    end else if (wr && !full) begin
      mem[$clog2(DEPTH)'(count)] <= wdata;
      count <= count + 1'b1;
    end else if (rd && !empty) begin
      count <= count - 1'b1;
    end
  end
endmodule
