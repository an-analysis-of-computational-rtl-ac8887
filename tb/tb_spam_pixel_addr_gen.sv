// tb_spam_pixel_addr_gen: self-checking test of the scan address generator.
//
// For a 6 x 16 image (4 words per row) it checks that, after start, the
// generator issues ADD1 = r*4 + w and ADD2 = ADD1 + 4 (ADD2 = ADD1 on the last
// row) in raster order, one word per cycle, that the tag follows one cycle
// later with the same row and word, that scan_done pulses with the last tag,
// and that the scan takes exactly ROWS*COLS/4 cycles. It runs two scans.
module tb_spam_pixel_addr_gen;

  localparam int ROWS = 6;
  localparam int COLS = 16;
  localparam int WORDS = COLS / 4;
  localparam int AW = $clog2(ROWS*WORDS);
  localparam int RW = $clog2(ROWS);
  localparam int WW = $clog2(WORDS);

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [AW-1:0] add1, add2;
  logic busy, tag_valid, scan_done;
  logic [RW-1:0] tag_row;
  logic [WW-1:0] tag_word;
  int checks = 0, failures = 0, cycle = 0;

  spam_pixel_addr_gen #(.ROWS(ROWS), .COLS(COLS)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int scan = 0; scan < 2; scan++) begin
      int n_addr, n_tag, n_done, exp_r, exp_w, tag_r, tag_w;
      n_addr = 0; n_tag = 0; n_done = 0;
      exp_r = 0; exp_w = 0; tag_r = 0; tag_w = 0;
      @(negedge clk);
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      while (busy || tag_valid) begin
        if (busy) begin
          check(int'(add1) == exp_r*WORDS + exp_w, $sformatf("add1 %0d at r%0d w%0d", add1, exp_r, exp_w));
          check(int'(add2) == ((exp_r == ROWS-1) ? exp_r : exp_r + 1)*WORDS + exp_w,
                $sformatf("add2 %0d at r%0d w%0d", add2, exp_r, exp_w));
          n_addr++;
          if (++exp_w == WORDS) begin exp_w = 0; exp_r++; end
        end
        if (tag_valid) begin
          check(int'(tag_row) == tag_r && int'(tag_word) == tag_w, "tag position");
          check(scan_done == (tag_r == ROWS-1 && tag_w == WORDS-1), "scan_done with last tag");
          n_tag++;
          if (++tag_w == WORDS) begin tag_w = 0; tag_r++; end
        end
        if (scan_done) n_done++;
        @(negedge clk);
      end
      check(n_addr == ROWS*WORDS, $sformatf("address cycles %0d", n_addr));
      check(n_tag == ROWS*WORDS, $sformatf("tag cycles %0d", n_tag));
      check(n_done == 1, "one scan_done");
      repeat (3) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    while (cycle < 2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
