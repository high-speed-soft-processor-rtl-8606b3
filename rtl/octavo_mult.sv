// octavo_mult: Octavo's 4-stage dual-pipeline multiplier.
//
// Multiplies two W-bit words and returns one W-bit word of the 2W-bit
// product: the high word signed (MHS), the low word (MLS; identical for
// signed and unsigned operands) or the high word unsigned (MHU).
// The operands are widened by one bit (sign or zero extension) so that one
// signed multiplier serves both signednesses. The product is split across
// two parallel pipelines, one multiplying A by the low half of B and one by
// the high half, so that each partial product fits the FPGA's hard
// multipliers; the halves are then summed. The split into two B halves is
// this design's reading of "dual-pipeline"; the processor only names it.
//
// Stages (one register each, latency 4, one new operation every cycle):
//   1  operands extended and registered
//   2  the two partial products
//   3  partial products aligned and summed
//   4  word selected
module octavo_mult
  import octavo_pkg::*;
#(
  parameter int W = WORD_W
) (
  input  logic         clk,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         is_signed, // MHS: 1, MLS/MHU: 0
  input  logic         sel_high,  // MHS/MHU: 1, MLS: 0
  output logic [W-1:0] p
);
  localparam int LW = W / 2;        // low half of B, unsigned
  localparam int HW = W - LW + 1;   // high half of extended B, signed

  // stage 1
  logic signed [W:0]    a1;
  logic signed [HW-1:0] bh1;
  logic        [LW-1:0] bl1;
  logic                 high1;
  always_ff @(posedge clk) begin
    a1    <= $signed({is_signed & a[W-1], a});
    bh1   <= $signed({is_signed & b[W-1], b[W-1:LW]});
    bl1   <= b[LW-1:0];
    high1 <= sel_high;
  end

  // stage 2: two partial-product pipelines
  logic signed [W+HW:0]   ph2;
  logic signed [W+LW+1:0] pl2;
  logic                   high2;
  always_ff @(posedge clk) begin
    ph2   <= a1 * bh1;
    pl2   <= a1 * $signed({1'b0, bl1});
    high2 <= high1;
  end

  // stage 3: combine
  logic signed [2*W+1:0] prod3;
  logic                  high3;
  always_ff @(posedge clk) begin
    prod3 <= ((2*W+2)'(ph2) <<< LW) + (2*W+2)'(pl2);
    high3 <= high2;
  end

  // stage 4: select
  always_ff @(posedge clk) begin
    p <= high3 ? prod3[2*W-1:W] : prod3[W-1:0];
  end
endmodule
