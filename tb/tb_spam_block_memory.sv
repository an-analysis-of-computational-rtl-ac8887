// tb_spam_block_memory: self-checking test of the dual-read image memory.
//
// A 64-word memory is filled with random words, then both read ports read
// random addresses every cycle; each result is compared, one cycle later,
// with a shadow copy kept by the testbench. Writes continue during the reads,
// including writes to the address being read, which must return the old word.
module tb_spam_block_memory;

  localparam int DEPTH = 64;
  localparam int AW = $clog2(DEPTH);

  logic clk = 1'b0;
  logic we = 1'b0;
  logic [AW-1:0] waddr = '0, raddr1 = '0, raddr2 = '0;
  logic [31:0] wdata = '0, rdata1, rdata2;
  logic [31:0] shadow [DEPTH];
  int checks = 0, failures = 0, cycle = 0;

  spam_block_memory #(.DEPTH(DEPTH), .WIDTH(32)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    logic [31:0] exp1, exp2;
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = 1'b1; waddr = AW'(a); wdata = $urandom;
      shadow[a] = wdata;
    end
    @(negedge clk);
    we = 1'b0;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      raddr1 = AW'($urandom);
      raddr2 = AW'($urandom);
      we     = ($urandom_range(0, 1) == 1);
      waddr  = ($urandom_range(0, 3) == 0) ? raddr1 : AW'($urandom);
      wdata  = $urandom;
      exp1 = shadow[raddr1];
      exp2 = shadow[raddr2];
      @(posedge clk);
      if (we) shadow[waddr] = wdata;
      #1;
      checks += 2;
      if (rdata1 !== exp1) begin failures++; $display("FAIL port1 addr %0d", raddr1); end
      if (rdata2 !== exp2) begin failures++; $display("FAIL port2 addr %0d", raddr2); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    while (cycle < 5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
