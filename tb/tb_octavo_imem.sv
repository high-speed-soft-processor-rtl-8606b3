// tb_octavo_imem: writes words into the instruction memory, reads them back
// with the one-cycle read latency, and checks that a read of a word being
// written in the same cycle returns the old contents.
module tb_octavo_imem;
  logic clk = 0;
  logic [9:0] raddr, waddr;
  logic [35:0] rdata, wdata;
  logic we;
  logic [35:0] model [1024];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  octavo_imem dut (.clk(clk), .raddr(raddr), .rdata(rdata), .we(we),
                   .waddr(waddr), .wdata(wdata));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 1024; i++) model[i] = '0;
    we = 0; raddr = 0; waddr = 0; wdata = 0;
    @(negedge clk);
    // fill some addresses
    for (int i = 0; i < 64; i++) begin
      we = 1; waddr = 10'($urandom); wdata = {4'($urandom), 32'($urandom)};
      model[waddr] = wdata;
      @(negedge clk);
    end
    we = 0;
    // read all back, including untouched zero words
    for (int i = 0; i < 1024; i++) begin
      raddr = 10'(i);
      @(posedge clk); #1;
      checks++;
      if (rdata != model[i]) begin failures++; $display("FAIL a=%0d got %h exp %h", i, rdata, model[i]); end
      @(negedge clk);
    end
    // read-during-write to the same address returns the old word
    raddr = 10'd5; waddr = 10'd5; we = 1; wdata = 36'h123456789;
    @(posedge clk); #1;
    checks++;
    if (rdata != model[5]) begin failures++; $display("FAIL collision got %h", rdata); end
    model[5] = 36'h123456789;
    @(negedge clk); we = 0;
    @(posedge clk); #1;
    checks++;
    if (rdata != 36'h123456789) begin failures++; $display("FAIL after write got %h", rdata); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
