// tb_spam_diff_filter: self-checking test of the eight difference filters.
//
// One filter per direction A..H is fed a random 5 x 16 image in scan order
// (row pair (r, r+1), word w), exactly as the memory delivers it. Every
// lane's difference and valid flag are compared with the SPAM definition
// D_X(p) = I(p) - I(p + step_X) from spam_ref_pkg, at the pixel position the
// lane stands for:
//   A, G: (r, 4w+k-1)   B, D, F: (r, 4w+k)   C, H: (r+1, 4w+k)   E: (r+1, 4w+k-1)
// A lane is valid exactly when p and p + step_X both lie inside the image.
module tb_spam_diff_filter;
  import spam_pkg::*;
  import spam_ref_pkg::*;

  localparam int ROWS = 5;
  localparam int COLS = 16;
  localparam int WORDS = COLS / 4;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, first_word = 1'b0, r2_valid = 1'b0;
  pix_t r1 [LANES];
  pix_t r2 [LANES];
  diff_t d_all [8][LANES];
  logic  v_all [8][LANES];
  int checks = 0, failures = 0, cycle = 0;
  int img[];

  for (genvar g = 0; g < 8; g++) begin : g_dut
    spam_diff_filter #(.DIR(dir_e'(g))) dut (
      .clk, .rst_n, .in_valid, .first_word, .r2_valid, .r1, .r2,
      .d(d_all[g]), .dvalid(v_all[g])
    );
  end

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  function automatic int lane_row(int dir, int r);
    return (dir == 2 || dir == 4 || dir == 7) ? r + 1 : r;
  endfunction

  function automatic int lane_col(int dir, int w, int k);
    return (dir == 0 || dir == 4 || dir == 6) ? 4*w + k - 1 : 4*w + k;
  endfunction

  initial begin
    img = new[ROWS*COLS];
    foreach (img[i]) img[i] = int'($urandom_range(0, 255));
    foreach (r1[k]) begin r1[k] = '0; r2[k] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < ROWS; r++)
      for (int w = 0; w < WORDS; w++) begin
        @(negedge clk);
        in_valid   = 1'b1;
        first_word = (w == 0);
        r2_valid   = (r < ROWS - 1);
        for (int k = 0; k < LANES; k++) begin
          r1[k] = pix_t'(img[r*COLS + 4*w + k]);
          r2[k] = (r < ROWS - 1) ? pix_t'(img[(r+1)*COLS + 4*w + k]) : '0;
        end
        #1;
        for (int g = 0; g < 8; g++)
          for (int k = 0; k < LANES; k++) begin
            int pr, pc;
            bit ev;
            pr = lane_row(g, r);
            pc = lane_col(g, w, k);
            ev = inside_img(ROWS, COLS, pr, pc) &&
                 inside_img(ROWS, COLS, pr + step_r(g), pc + step_c(g));
            checks++;
            if (v_all[g][k] !== ev) begin
              failures++;
              $display("FAIL dir %0d r%0d w%0d lane %0d valid %0b expected %0b", g, r, w, k, v_all[g][k], ev);
            end else if (ev) begin
              checks++;
              if (int'(d_all[g][k]) != diff(img, COLS, g, pr, pc)) begin
                failures++;
                $display("FAIL dir %0d r%0d w%0d lane %0d diff %0d expected %0d", g, r, w, k,
                         d_all[g][k], diff(img, COLS, g, pr, pc));
              end
            end
          end
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
