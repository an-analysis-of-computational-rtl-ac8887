// tb_spam_addr_gen: self-checking test of the eight register-file address
// generators.
//
// The testbench plays the difference filters: for a smooth random 7 x 16
// image it computes each lane's difference from the SPAM definition (same
// lane positions as the filters) and drives one address generator per
// direction in scan order, twice (two images back to back, so the line
// buffer must not carry pairs across images). It histograms the ADDP/ADDF
// outputs and compares them with the reference counts P[y] and F[y][x] of
// spam_ref_pkg, which pairs D_X(p) with D_X(p + step_X) pixel by pixel. It
// also checks that every enabled address is in range and that the outputs
// follow the inputs by one cycle (no enable before the first input).
module tb_spam_addr_gen;
  import spam_pkg::*;
  import spam_ref_pkg::*;

  localparam int ROWS = 7;
  localparam int COLS = 16;
  localparam int T = 4;
  localparam int NB = 2*T + 1;
  localparam int NF = NB*NB;
  localparam int WORDS = COLS / 4;
  localparam int IW = $clog2(NB);
  localparam int FW = $clog2(NF);
  localparam int WW = $clog2(WORDS);

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, first_row = 1'b0;
  logic [WW-1:0] word = '0;
  diff_t d_in [8][LANES];
  logic  v_in [8][LANES];
  logic          p_en   [8][LANES];
  logic [IW-1:0] p_addr [8][LANES];
  logic          f_en   [8][LANES];
  logic [FW-1:0] f_addr [8][LANES];
  int checks = 0, failures = 0, cycle = 0;
  int hp [8][NB];
  int hf [8][NF];
  bit counting = 1'b0;
  int early = 0;

  for (genvar g = 0; g < 8; g++) begin : g_dut
    spam_addr_gen #(.DIR(dir_e'(g)), .T(T), .COLS(COLS)) dut (
      .clk, .rst_n, .in_valid, .first_row, .word,
      .d(d_in[g]), .dvalid(v_in[g]),
      .p_en(p_en[g]), .p_addr(p_addr[g]), .f_en(f_en[g]), .f_addr(f_addr[g])
    );
  end

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  always @(posedge clk) if (rst_n) begin
    for (int g = 0; g < 8; g++)
      for (int k = 0; k < LANES; k++) begin
        if (!counting && (p_en[g][k] || f_en[g][k])) early++;
        if (counting && p_en[g][k]) begin
          if (int'(p_addr[g][k]) < NB) hp[g][p_addr[g][k]]++; else failures++;
        end
        if (counting && f_en[g][k]) begin
          if (int'(f_addr[g][k]) < NF) hf[g][f_addr[g][k]]++; else failures++;
          if (!p_en[g][k] || int'(f_addr[g][k]) / NB != int'(p_addr[g][k])) failures++;
        end
      end
  end

  function automatic int lane_row(int dir, int r);
    return (dir == 2 || dir == 4 || dir == 7) ? r + 1 : r;
  endfunction

  function automatic int lane_col(int dir, int w, int k);
    return (dir == 0 || dir == 4 || dir == 6) ? 4*w + k - 1 : 4*w + k;
  endfunction

  task automatic run_image();
    int img[];
    make_image(img, ROWS, COLS, 1'b0);
    foreach (hp[g, i]) hp[g][i] = 0;
    foreach (hf[g, i]) hf[g][i] = 0;
    @(negedge clk);
    counting = 1'b1;
    for (int r = 0; r < ROWS; r++)
      for (int w = 0; w < WORDS; w++) begin
        in_valid  = 1'b1;
        first_row = (r == 0);
        word      = WW'(w);
        for (int g = 0; g < 8; g++)
          for (int k = 0; k < LANES; k++) begin
            int pr, pc;
            pr = lane_row(g, r);
            pc = lane_col(g, w, k);
            v_in[g][k] = inside_img(ROWS, COLS, pr, pc) &&
                         inside_img(ROWS, COLS, pr + step_r(g), pc + step_c(g));
            d_in[g][k] = v_in[g][k] ? diff_t'(diff(img, COLS, g, pr, pc))
                                    : diff_t'($urandom_range(0, 511));
          end
        @(negedge clk);
      end
    in_valid = 1'b0;
    repeat (2) @(negedge clk);
    counting = 1'b0;
    for (int g = 0; g < 8; g++) begin
      int p[], f[];
      p = new[NB];
      f = new[NF];
      foreach (p[i]) p[i] = 0;
      foreach (f[i]) f[i] = 0;
      counts(img, ROWS, COLS, T, g, p, f);
      for (int i = 0; i < NB; i++) begin
        checks++;
        if (hp[g][i] != p[i]) begin
          failures++;
          $display("FAIL dir %0d P[%0d] = %0d expected %0d", g, i, hp[g][i], p[i]);
        end
      end
      for (int i = 0; i < NF; i++) begin
        checks++;
        if (hf[g][i] != f[i]) begin
          failures++;
          $display("FAIL dir %0d F[%0d] = %0d expected %0d", g, i, hf[g][i], f[i]);
        end
      end
    end
  endtask

  initial begin
    foreach (d_in[g, k]) begin d_in[g][k] = '0; v_in[g][k] = 1'b0; end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);
    run_image();
    run_image();
    checks++;
    if (early != 0) begin failures++; $display("FAIL enables outside the scan"); end
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
