// octavo_delay: a chain of STAGES pipeline registers.
//
// Octavo's instruction pipeline holds stages that do no work: they only
// delay the instruction so that it lines up with the two-cycle data-memory
// read, and they are kept because the block-RAM self-loop timing sets the
// pipeline depth. This module is that chain of registers. It is also used
// to align side signals (valid bits, thread ids, PCs) with the datapath.
//
// Interface: d enters, q leaves STAGES cycles later. A synchronous,
// active-high reset clears every stage to zero so that valid bits carried
// through the chain start cleared.
module octavo_delay #(
  parameter int W      = 1,
  parameter int STAGES = 1
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  logic [W-1:0] pipe [STAGES];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < STAGES; i++) pipe[i] <= '0;
    end else begin
      pipe[0] <= d;
      for (int i = 1; i < STAGES; i++) pipe[i] <= pipe[i-1];
    end
  end

  assign q = pipe[STAGES-1];
endmodule
