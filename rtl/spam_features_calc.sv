// spam_features_calc: SPAM feature calculator for one group of four
// directions (A,B,C,D: horizontal and vertical; E,F,G,H: diagonal).
//
// A feature is the mean of the four transition probabilities of the group at
// the same (y, x) pair: the four probabilities are added and the sum shifted
// right by two bits, as in the published architecture. The division by four truncates.
//
// Timing: the frequency calculator's enable and pair index (ena_in, idx_in)
// reach this block DIV_LAT cycles before the matching probabilities, which
// come out of the dividers; a DIV_LAT-stage delay line realigns them. The
// feature is registered, so feat_valid/feat_idx/feature appear DIV_LAT+1
// cycles after ena_in, one feature per cycle.
module spam_features_calc
  import spam_pkg::*;
#(
  parameter int unsigned DLAT = DIV_LAT,
  parameter int unsigned IDX_W = 7
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             ena_in,
  input  logic [IDX_W-1:0] idx_in,
  input  prob_t            tp [4],
  output logic             feat_valid,
  output logic [IDX_W-1:0] feat_idx,
  output prob_t            feature
);

  logic             ena_d [DLAT];
  logic [IDX_W-1:0] idx_d [DLAT];
  logic [PROB_W+1:0] sum;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < DLAT; s++) begin
        ena_d[s] <= 1'b0;
        idx_d[s] <= '0;
      end
    end else begin
      ena_d[0] <= ena_in;
      idx_d[0] <= idx_in;
      for (int s = 1; s < DLAT; s++) begin
        ena_d[s] <= ena_d[s-1];
        idx_d[s] <= idx_d[s-1];
      end
    end
  end

  assign sum = (PROB_W+2)'(tp[0]) + (PROB_W+2)'(tp[1])
             + (PROB_W+2)'(tp[2]) + (PROB_W+2)'(tp[3]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      feat_valid <= 1'b0;
      feat_idx   <= '0;
      feature    <= '0;
    end else begin
      feat_valid <= ena_d[DLAT-1];
      feat_idx   <= idx_d[DLAT-1];
      feature    <= ena_d[DLAT-1] ? PROB_W'(sum >> 2) : '0;
    end
  end

endmodule
