// tb_spam_top: end-to-end test of the SPAM feature extractor at a reduced
// image size (32 x 32 pixels, T = 4).
//
// Two images are processed back to back: a textured one, then a uniform one
// whose differences are all zero (empty P entries, so divisions by zero; it
// also checks that the register files are cleared between runs). For each,
// the testbench loads the image
// through the write port, pulses start, collects the 81 + 81 features and
// compares them with the reference model in spam_ref_pkg, which works from
// the SPAM definition pixel by pixel. It also checks the start-to-done cycle
// count, ROWS*COLS/4 + (2T+1)^2 + 18 + 6, and that the features leave one
// pair per cycle. Mechanisms counted (each must occur): differences outside
// [-T, T], lanes masked at the image border, pairs completed through the line
// buffer, several lanes hitting the same counter in one cycle, divisions by a
// zero count.
module tb_spam_top;
  import spam_pkg::*;
  import spam_ref_pkg::*;

  localparam int ROWS = 32;
  localparam int COLS = 32;
  localparam int T    = 4;
  localparam int NB   = 2*T + 1;
  localparam int NF   = NB*NB;
  localparam int AW   = $clog2(ROWS*COLS/4);
  localparam int FW   = $clog2(NF);
  localparam int NIMG = 2;
  localparam longint WATCHDOG = 64'(NIMG) * (2*ROWS*COLS/4 + 400) + 1000;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic img_we = 1'b0;
  logic [AW-1:0] img_waddr = '0;
  logic [31:0] img_wdata = '0;
  logic start = 1'b0;
  logic busy, done, feat_valid;
  logic [FW-1:0] feat_idx;
  prob_t feat_hv, feat_diag;

  int checks = 0;
  int failures = 0;
  longint cycle = 0;

  spam_top #(.ROWS(ROWS), .COLS(COLS), .T(T)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  // mechanism counters from the datapath
  int n_out_of_range = 0, n_border = 0, n_vertical = 0, n_multi_hit = 0, n_zero_div = 0;
  always @(posedge clk) if (rst_n) begin
    for (int g = 0; g < 8; g++) begin
      for (int k = 0; k < LANES; k++) begin
        if (dut.tag_valid && dut.dvalid[g][k] && (dut.d[g][k] > T || dut.d[g][k] < -T))
          n_out_of_range++;
        if (dut.tag_valid && !dut.dvalid[g][k]) n_border++;
        if (g >= 2 && dut.p_en[g][k]) n_vertical++;
        for (int j = k + 1; j < LANES; j++)
          if (dut.p_en[g][k] && dut.p_en[g][j] && dut.p_addr[g][k] == dut.p_addr[g][j])
            n_multi_hit++;
      end
      if (dut.rd_ena[g] && dut.rd_p[g] == 0) n_zero_div++;
    end
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  task automatic run_image(bit flat);
    int img[];
    int ref_hv[], ref_dg[];
    int zero_p = 0, pairs_in = 0, pairs_half = 0;
    int got_hv[], got_dg[];
    int n_feat = 0;
    longint t0, t_done;
    longint last_feat_cycle;
    bit contiguous = 1'b1;

    make_image(img, ROWS, COLS, flat);
    features(img, ROWS, COLS, T, FRAC_W, ref_hv, ref_dg, zero_p, pairs_in, pairs_half);
    got_hv = new[NF];
    got_dg = new[NF];

    for (int a = 0; a < ROWS*COLS/4; a++) begin
      @(negedge clk);
      img_we    = 1'b1;
      img_waddr = AW'(a);
      img_wdata = {img[a*4+3][7:0], img[a*4+2][7:0], img[a*4+1][7:0], img[a*4][7:0]};
    end
    @(negedge clk);
    img_we = 1'b0;
    start  = 1'b1;
    @(posedge clk);
    t0 = cycle;
    @(negedge clk);
    start = 1'b0;
    check(busy, "busy after start");

    last_feat_cycle = -1;
    forever begin
      @(posedge clk);
      #1;
      if (feat_valid) begin
        if (last_feat_cycle >= 0 && cycle != last_feat_cycle + 1) contiguous = 1'b0;
        last_feat_cycle = cycle;
        check(int'(feat_idx) == n_feat, $sformatf("feature order %0d vs %0d", feat_idx, n_feat));
        got_hv[feat_idx] = int'(feat_hv);
        got_dg[feat_idx] = int'(feat_diag);
        n_feat++;
      end
      if (done) begin
        t_done = cycle;
        break;
      end
    end
    check(n_feat == NF, $sformatf("feature count %0d", n_feat));
    check(contiguous, "one feature pair per cycle");
    check(t_done - t0 == longint'(ROWS*COLS/4 + NF + DIV_LAT + 6),
          $sformatf("latency %0d cycles, expected %0d", t_done - t0, ROWS*COLS/4 + NF + DIV_LAT + 6));
    for (int i = 0; i < NF; i++) begin
      check(got_hv[i] == ref_hv[i], $sformatf("hv feature %0d: %0d vs %0d", i, got_hv[i], ref_hv[i]));
      check(got_dg[i] == ref_dg[i], $sformatf("diag feature %0d: %0d vs %0d", i, got_dg[i], ref_dg[i]));
    end
    @(posedge clk);
    #1;
    check(!busy, "idle after done");
    $display("image done: %0d cycles, %0d in-range pairs, %0d pairs with x out of range, %0d empty P entries",
             t_done - t0, pairs_in, pairs_half, zero_p);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);
    for (int n = 0; n < NIMG; n++) run_image(n == 1);
    $display("mechanisms: out_of_range=%0d border_masked=%0d line_buffer_pairs=%0d multi_hit=%0d zero_divisor=%0d",
             n_out_of_range, n_border, n_vertical, n_multi_hit, n_zero_div);
    check(n_out_of_range > 0, "out-of-range differences occurred");
    check(n_border > 0, "border masking occurred");
    check(n_vertical > 0, "line-buffer pairs occurred");
    check(n_multi_hit > 0, "multiple hits on one counter occurred");
    check(n_zero_div > 0, "zero divisor occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    while (cycle < WATCHDOG) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
