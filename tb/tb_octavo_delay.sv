// tb_octavo_delay: drives random words into a 3-stage delay chain and
// checks each comes out exactly 3 cycles later; also checks reset clears.
module tb_octavo_delay;
  localparam int W = 12, S = 3;
  logic clk = 0, rst = 1;
  logic [W-1:0] d, q;
  logic [W-1:0] hist [$];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  octavo_delay #(.W(W), .STAGES(S)) dut (.clk(clk), .rst(rst), .d(d), .q(q));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    checks++;
    if (q != '0) begin failures++; $display("FAIL reset q=%h", q); end
    rst = 0;
    for (int i = 0; i < 200; i++) begin
      d = W'($urandom);
      hist.push_back(d);
      @(posedge clk);
      #1;
      if (hist.size() == S) begin
        checks++;
        if (q != hist[0]) begin failures++; $display("FAIL i=%0d q=%h exp=%h", i, q, hist[0]); end
        void'(hist.pop_front());
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
