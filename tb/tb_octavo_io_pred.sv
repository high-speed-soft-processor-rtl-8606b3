// tb_octavo_io_pred: random test of the I/O predication check. Each cycle
// it drives random operand and destination addresses (mostly inside the
// A and B port windows), random empty/full bits and a random decision `go`,
// and compares `ready` with a model that computes the rule directly: an
// addressed input port must hold a word, an addressed output port must
// accept one, and an A output port with a committed write still in the
// 7-cycle write pipeline counts as not ready. Both a ready and an annulled
// outcome, and a refusal caused only by an in-flight write, must occur.
module tb_octavo_io_pred;
  import octavo_pkg::*;
  logic clk = 0, rst = 1;
  logic valid, writes, ready, go;
  addr_t a, b, d;
  logic [7:0] a_in_valid, b_in_valid, a_out_ready, b_out_ready;
  logic [7:0] hist [7];   // model: committed A-port writes, newest first
  int checks = 0, failures = 0, n_ready = 0, n_refused = 0, n_busy = 0;
  always #5 clk = ~clk;

  octavo_io_pred dut (.clk(clk), .rst(rst), .valid(valid), .a(a), .b(b), .d(d),
    .writes(writes), .a_in_valid(a_in_valid), .b_in_valid(b_in_valid),
    .a_out_ready(a_out_ready), .b_out_ready(b_out_ready), .ready(ready), .go(go));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic addr_t pick();
    case ($urandom_range(0, 3))
      0: return addr_t'($urandom_range(0, 1023));
      1: return addr_t'(1008 + $urandom_range(0, 7));
      2: return addr_t'(1016 + $urandom_range(0, 7));
      default: return addr_t'($urandom_range(1000, 1023));
    endcase
  endfunction

  initial begin
    logic exp, busy_only;
    logic [7:0] busy, claim;
    valid = 0; writes = 0; go = 0; a = 0; b = 0; d = 0;
    a_in_valid = '1; b_in_valid = '1; a_out_ready = '1; b_out_ready = '1;
    for (int s = 0; s < 7; s++) hist[s] = '0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int i = 0; i < 5000; i++) begin
      valid  = ($urandom_range(0, 9) != 0);
      writes = $urandom_range(0, 1);
      a = pick(); b = pick(); d = pick();
      // ports are mostly ready so that in-flight writes matter
      a_in_valid  = 8'($urandom) | 8'($urandom);
      b_in_valid  = 8'($urandom) | 8'($urandom);
      a_out_ready = 8'($urandom) | 8'($urandom) | 8'($urandom);
      b_out_ready = 8'($urandom) | 8'($urandom);
      go = ($urandom_range(0, 3) != 0);
      #1;
      busy = '0;
      for (int s = 0; s < 7; s++) busy |= hist[s];
      claim = '0;
      exp = 1;
      busy_only = 0;
      if (valid) begin
        if (a >= 1008 && a < 1016 && !a_in_valid[a - 1008]) exp = 0;
        if (b >= 1016 && b < 1024 && !b_in_valid[b - 1016]) exp = 0;
        if (writes && d >= 1008 && d < 1016) begin
          claim[d - 1008] = 1;
          if (!a_out_ready[d - 1008]) exp = 0;
          else if (busy[d - 1008] && exp) begin exp = 0; busy_only = 1; end
        end
        if (writes && d >= 1016 && d < 1024 && !b_out_ready[d - 1016]) exp = 0;
      end
      checks++;
      if (ready !== exp) begin
        failures++;
        $display("FAIL i=%0d a=%0d b=%0d d=%0d w=%0d ready=%0d exp=%0d", i, a, b, d, writes, ready, exp);
      end
      if (valid && ready) n_ready++;
      if (valid && !ready) n_refused++;
      if (busy_only) n_busy++;
      @(negedge clk);
      for (int s = 6; s > 0; s--) hist[s] = hist[s-1];
      hist[0] = (valid && go) ? claim : '0;
    end
    checks++;
    if (n_ready == 0 || n_refused == 0 || n_busy == 0) begin
      failures++; $display("FAIL outcome never seen ready=%0d refused=%0d busy=%0d", n_ready, n_refused, n_busy);
    end
    $display("COUNT ready=%0d refused=%0d refused_in_flight=%0d", n_ready, n_refused, n_busy);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
