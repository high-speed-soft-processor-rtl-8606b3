// tb_octavo_reverse_channel: pushes arrays of random words and checks they
// pop back in reverse order; checks empty reads return zero, full pushes are
// dropped, and a same-cycle push and pop replaces the top word. Uses a
// depth of 16 to reach the full condition quickly.
module tb_octavo_reverse_channel;
  localparam int D = 16;
  logic clk = 0, rst = 1;
  logic wr, rd, empty, full;
  logic [35:0] wdata, rdata;
  logic [35:0] arr [$];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  octavo_reverse_channel #(.DEPTH(D)) dut (.clk(clk), .rst(rst), .wr(wr), .wdata(wdata),
    .rd(rd), .rdata(rdata), .empty(empty), .full(full));

  task automatic chk(input logic [35:0] got, input logic [35:0] exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr = 0; rd = 0; wdata = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    #1 chk(rdata, 0, "empty reads zero");
    chk(36'(empty), 1, "empty flag");
    for (int round = 0; round < 10; round++) begin
      automatic int n = 1 + (round * 3) % D;
      arr.delete();
      for (int i = 0; i < n; i++) begin
        wr = 1; wdata = {4'($urandom), 32'($urandom)}; arr.push_back(wdata);
        @(negedge clk);
      end
      wr = 0;
      for (int i = n - 1; i >= 0; i--) begin
        rd = 1; #1;
        chk(rdata, arr[i], "reversed order");
        @(negedge clk);
      end
      rd = 0; #1;
      chk(36'(empty), 1, "empty after pops");
    end
    // fill, overflow is dropped
    for (int i = 0; i < D + 3; i++) begin
      wr = 1; wdata = 36'(i + 1); @(negedge clk);
    end
    wr = 0; #1;
    chk(36'(full), 1, "full flag");
    chk(rdata, 36'(D), "top after overflow");
    // push and pop together replace the top
    wr = 1; rd = 1; wdata = 36'hDEAD; @(negedge clk);
    wr = 0; rd = 0; #1;
    chk(rdata, 36'hDEAD, "replace top");
    chk(36'(full), 1, "still full");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
