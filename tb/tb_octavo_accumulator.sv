// tb_octavo_accumulator: writes random words, checks that a read returns
// their wrapped sum and clears it, and that a same-cycle read and write
// returns the old sum and restarts from the written word.
module tb_octavo_accumulator;
  logic clk = 0, rst = 1;
  logic wr, rd;
  logic [35:0] wdata, rdata, sum;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  octavo_accumulator dut (.clk(clk), .rst(rst), .wr(wr), .wdata(wdata), .rd(rd), .rdata(rdata));

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
    for (int round = 0; round < 20; round++) begin
      sum = 0;
      for (int i = 0; i < 1 + round % 7; i++) begin
        wr = 1; wdata = {4'($urandom), 32'($urandom)}; sum = sum + wdata;
        @(negedge clk);
      end
      wr = 0;
      if (round % 5 == 4) begin
        // read and write together
        rd = 1; wr = 1; wdata = 36'd77; #1;
        checks++;
        if (rdata !== sum) begin failures++; $display("FAIL rd+wr old sum %h exp %h", rdata, sum); end
        @(negedge clk); rd = 0; wr = 0;
        checks++;
        if (rdata !== 36'd77) begin failures++; $display("FAIL restart %h", rdata); end
        rd = 1; @(negedge clk); rd = 0;
      end else begin
        rd = 1; #1;
        checks++;
        if (rdata !== sum) begin failures++; $display("FAIL sum %h exp %h", rdata, sum); end
        @(negedge clk); rd = 0;
        checks++;
        if (rdata !== 36'd0) begin failures++; $display("FAIL not cleared %h", rdata); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
