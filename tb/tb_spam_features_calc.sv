// tb_spam_features_calc: self-checking test of the features calculator.
//
// A burst of 81 enables with indices 0..80 is driven, and DIV_LAT = 18 cycles
// after each the four matching random probabilities (up to 1.0 = 2^16). The
// block must output, DIV_LAT + 1 cycles after each enable, the index and
// floor((a + b + c + d) / 4), and nothing at other times. A gap in the burst
// checks that the valid flag follows the enables.
module tb_spam_features_calc;
  import spam_pkg::*;

  localparam int NF = 81;
  localparam int IDX_W = 7;

  logic clk = 1'b0, rst_n = 1'b0, ena_in = 1'b0;
  logic [IDX_W-1:0] idx_in = '0;
  prob_t tp [4];
  logic feat_valid;
  logic [IDX_W-1:0] feat_idx;
  prob_t feature;
  int checks = 0, failures = 0, cycle = 0;

  // stimulus schedule, indexed by cycle
  localparam int LEN = NF + 10 + DIV_LAT + 4;
  bit    en_at  [LEN];
  int    idx_at [LEN];
  prob_t tp_at  [LEN][4];

  spam_features_calc #(.DLAT(DIV_LAT), .IDX_W(IDX_W)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    int n = 0;
    foreach (tp[k]) tp[k] = '0;
    for (int c = 0; c < LEN; c++) begin
      en_at[c] = 1'b0; idx_at[c] = 0;
      foreach (tp_at[c][k]) tp_at[c][k] = '0;
    end
    for (int c = 0; c < NF + 10; c++) begin
      if (c >= 40 && c < 50) continue;      // gap
      en_at[c]  = 1'b1;
      idx_at[c] = n++;
      for (int k = 0; k < 4; k++)
        tp_at[c + DIV_LAT][k] = ($urandom_range(0, 5) == 0) ? prob_t'(1 << FRAC_W)
                                                            : prob_t'($urandom_range(0, 1 << FRAC_W));
    end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < LEN; c++) begin
      @(negedge clk);
      ena_in = en_at[c];
      idx_in = IDX_W'(idx_at[c]);
      for (int k = 0; k < 4; k++) tp[k] = tp_at[c][k];
      if (c >= DIV_LAT + 1) begin
        int s;
        s = c - DIV_LAT - 1;
        checks++;
        if (feat_valid !== en_at[s]) begin
          failures++;
          $display("FAIL valid at step %0d", s);
        end else if (en_at[s]) begin
          int e;
          e = (int'(tp_at[s + DIV_LAT][0]) + int'(tp_at[s + DIV_LAT][1]) +
                   int'(tp_at[s + DIV_LAT][2]) + int'(tp_at[s + DIV_LAT][3])) >> 2;
          checks++;
          if (int'(feat_idx) != idx_at[s] || int'(feature) != e) begin
            failures++;
            $display("FAIL step %0d: idx %0d feature %0d expected %0d / %0d", s, feat_idx, feature, idx_at[s], e);
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
