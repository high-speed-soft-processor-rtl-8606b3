// tb_octavo_thread_ctr: checks that the thread counter visits threads
// 0..7 in order, one per cycle, restarting at 0 after reset.
module tb_octavo_thread_ctr;
  logic clk = 0, rst = 1;
  logic [2:0] tid;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  octavo_thread_ctr dut (.clk(clk), .rst(rst), .tid(tid));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    @(negedge clk);
    for (int i = 0; i < 40; i++) begin
      checks++;
      if (tid != 3'(i % 8)) begin
        failures++;
        $display("FAIL cycle %0d tid=%0d expected %0d", i, tid, i % 8);
      end
      @(negedge clk);
    end
    rst <= 1; @(negedge clk); rst <= 0;
    checks++;
    if (tid != 0) begin failures++; $display("FAIL tid after reset %0d", tid); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
