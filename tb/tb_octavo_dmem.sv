// tb_octavo_dmem: checks the data memory's two-stage write and two-stage
// read (data two cycles after the address), the write-before-next-read
// timing the pipeline relies on, and the memory-mapped I/O window: reads
// in the window return the input port and pulse its read strobe, writes in
// the window pulse the output port's write strobe with the word.
module tb_octavo_dmem;
  localparam int BASE = 1008;
  logic clk = 0, rst = 1;
  logic rd_en, we;
  logic [9:0] raddr, waddr;
  logic [35:0] rdata, wdata, io_wdata;
  logic [35:0] io_in [8];
  logic [7:0] io_rd, io_wr;
  logic [35:0] model [1024];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  octavo_dmem #(.IO_BASE(BASE)) dut (
    .clk(clk), .rst(rst), .rd_en(rd_en), .raddr(raddr), .rdata(rdata),
    .we(we), .waddr(waddr), .wdata(wdata),
    .io_in(io_in), .io_rd(io_rd), .io_wdata(io_wdata), .io_wr(io_wr));

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
    for (int i = 0; i < 1024; i++) model[i] = '0;
    for (int p = 0; p < 8; p++) io_in[p] = 36'h100 + 36'(p);
    rd_en = 0; we = 0; raddr = 0; waddr = 0; wdata = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    // write a word at cycle m; it must be readable by a read issued at m+2
    for (int i = 0; i < 50; i++) begin
      automatic logic [9:0] a = 10'($urandom_range(0, 1000));
      automatic logic [35:0] v = {4'($urandom), 32'($urandom)};
      we = 1; waddr = a; wdata = v; model[a] = v;
      @(negedge clk); we = 0;
      @(negedge clk);
      rd_en = 1; raddr = a;              // read issued two cycles after the write
      @(negedge clk); rd_en = 0;
      @(negedge clk);
      chk(rdata, v, "write then read");
    end
    // I/O read: strobe in RD0, port word two cycles later
    for (int p = 0; p < 8; p++) begin
      rd_en = 1; raddr = 10'(BASE + p);
      #1;
      chk(36'(io_rd), 36'(1 << p), "io_rd strobe");
      @(negedge clk); rd_en = 0;
      #1 chk(36'(io_rd), 36'd0, "io_rd idle");
      @(negedge clk);
      chk(rdata, 36'h100 + 36'(p), "io read data");
    end
    // rd_en low: no strobe
    rd_en = 0; raddr = 10'(BASE); #1;
    chk(36'(io_rd), 36'd0, "no strobe without rd_en");
    // I/O write: strobe and data one cycle after presenting the write
    for (int p = 0; p < 8; p++) begin
      we = 1; waddr = 10'(BASE + p); wdata = 36'hABC0 + 36'(p);
      #1 chk(36'(io_wr), 36'd0, "io_wr not yet");
      @(negedge clk); we = 0;
      chk(36'(io_wr), 36'(1 << p), "io_wr strobe");
      chk(io_wdata, 36'hABC0 + 36'(p), "io_wdata");
      @(negedge clk);
    end
    // an ordinary write does not strobe the ports
    we = 1; waddr = 10'd3; wdata = 36'h5;
    @(negedge clk); we = 0;
    chk(36'(io_wr), 36'd0, "no io_wr outside window");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
