// tb_octavo_mult: feeds a new random multiplication every cycle and checks
// each result 4 cycles later against a 72-bit reference product, for the
// high signed, low, and high unsigned words, including corner operands.
module tb_octavo_mult;
  logic clk = 0;
  logic [35:0] a, b, p;
  logic is_signed, sel_high;
  logic [35:0] expq [$];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  octavo_mult dut (.clk(clk), .a(a), .b(b), .is_signed(is_signed), .sel_high(sel_high), .p(p));

  function automatic logic [35:0] ref_mul(logic [35:0] x, logic [35:0] y, int mode);
    logic signed [71:0] ps;
    logic [71:0] pu;
    ps = $signed({{36{x[35]}}, x}) * $signed({{36{y[35]}}, y});
    pu = {36'd0, x} * {36'd0, y};
    case (mode)
      0: return ps[71:36];
      1: return pu[35:0];
      default: return pu[71:36];
    endcase
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [35:0] corner [6] = '{36'h0, 36'h1, 36'hFFFFFFFFF, 36'h800000000, 36'h7FFFFFFFF, 36'h3FFFF};
    a = 0; b = 0; is_signed = 0; sel_high = 0;
    @(negedge clk);
    for (int i = 0; i < 400; i++) begin
      automatic int mode = i % 3;
      if (i < 108) begin
        a = corner[(i / 3) % 6]; b = corner[(i / 18) % 6];
      end else begin
        a = {4'($urandom), 32'($urandom)}; b = {4'($urandom), 32'($urandom)};
      end
      is_signed = (mode == 0);
      sel_high  = (mode != 1);
      expq.push_back(ref_mul(a, b, mode));
      @(posedge clk); #1;
      if (expq.size() == 4) begin
        checks++;
        if (p !== expq[0]) begin failures++; $display("FAIL i=%0d p=%h exp=%h", i, p, expq[0]); end
        void'(expq.pop_front());
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
