// octavo_io_pred: instruction I/O predication check for one data path.
//
// Every I/O port carries a readiness bit: an input port is ready when it
// holds a word (not empty), an output port when it can take one (not full).
// In cycle RD0 of an instruction this unit looks at the ports the
// instruction addresses (operand A in the A window, operand B in the B
// window, destination D in either window) and raises `ready` only if all of
// them are ready. The core ANDs `ready` over its lanes into `go`: with go
// low the instruction is annulled (it reads no port, writes nothing and
// leaves its thread's PC where it was), so the thread issues the same
// instruction again on its next turn, eight cycles later.
//
// An output port is checked in RD0 but written seven cycles later in WR1.
// So that two instructions in flight cannot both claim the same free slot
// of a one-word link, the unit remembers which A output ports have a
// committed write on its way and treats them as not ready until that write
// has happened. B output ports (the on-core accelerators, which accept a
// word every cycle or hold many) are not tracked, so back-to-back writes
// to them keep full speed; a stack that is one word from full can
// therefore still receive the writes already in flight, and drops them.
//
// The per-port empty/full bits, the annul and the re-issue on the thread's
// next turn follow the original Octavo; the in-flight write tracking is
// this design's own addition to make the full check hold over the pipeline.
//
// Interface: addresses and port bits are sampled combinationally in RD0;
// `ready` is combinational; `go` is the core's decision for the same cycle.
module octavo_io_pred
  import octavo_pkg::*;
#(
  parameter int          N_IO      = IO_PORTS,
  parameter int unsigned A_BASE    = 32'(IO_BASE_A),
  parameter int unsigned B_BASE    = 32'(IO_BASE_B),
  parameter int          WR_STAGES = 7   // RD0 to WR1
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            valid,
  input  addr_t           a,
  input  addr_t           b,
  input  addr_t           d,
  input  logic            writes,
  input  logic [N_IO-1:0] a_in_valid,
  input  logic [N_IO-1:0] b_in_valid,
  input  logic [N_IO-1:0] a_out_ready,
  input  logic [N_IO-1:0] b_out_ready,
  output logic            ready,
  input  logic            go
);
  localparam int PW = (N_IO > 1) ? $clog2(N_IO) : 1;

  function automatic logic in_win(addr_t x, int unsigned base);
    return (32'(x) >= base) && (32'(x) < base + N_IO);
  endfunction

  function automatic logic [PW-1:0] port_of(addr_t x, int unsigned base);
    return PW'(32'(x) - base);
  endfunction

  // output ports with a committed write still in the pipeline
  logic [N_IO-1:0] pend [WR_STAGES];
  logic [N_IO-1:0] busy, claim;

  always_comb begin
    busy = '0;
    for (int s = 0; s < WR_STAGES; s++) busy |= pend[s];
  end

  logic a_ok, b_ok, d_ok;
  always_comb begin
    a_ok  = !in_win(a, A_BASE) || a_in_valid[port_of(a, A_BASE)];
    b_ok  = !in_win(b, B_BASE) || b_in_valid[port_of(b, B_BASE)];
    d_ok  = 1'b1;
    claim = '0;
    if (writes && in_win(d, A_BASE)) begin
      d_ok = a_out_ready[port_of(d, A_BASE)] && !busy[port_of(d, A_BASE)];
      claim[port_of(d, A_BASE)] = 1'b1;
    end
    if (writes && in_win(d, B_BASE)) begin
      d_ok = b_out_ready[port_of(d, B_BASE)];
    end
  end

  assign ready = !valid || (a_ok && b_ok && d_ok);

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int s = 0; s < WR_STAGES; s++) pend[s] <= '0;
    end else begin
      pend[0] <= (valid && go) ? claim : '0;
      for (int s = 1; s < WR_STAGES; s++) pend[s] <= pend[s-1];
    end
  end
endmodule
