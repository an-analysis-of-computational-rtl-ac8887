// spam_divider: pipelined divider for the SPAM transition probabilities.
//
// Computes quo = floor(num * 2^FRAC_W / den) for num <= den, i.e. the
// transition probability F[y][x] / P[y] as an unsigned fixed-point number
// with FRAC_W fraction bits (1.0 is 2^FRAC_W, hence FRAC_W+1 output bits).
// A zero divisor (a difference value that never occurs, so num is zero too)
// gives 0.
//
// It is a restoring divider unrolled into a pipeline: an input register, then
// one stage per quotient bit (FRAC_W+1 stages, integer bit first), each
// comparing the shifted partial remainder with the divisor and subtracting
// when it fits. The last stage is the output register, so the latency is
// FRAC_W+2 cycles (18 for FRAC_W = 16) and one division starts every cycle.
// The 18-cycle latency is the published architecture's; the algorithm and the fraction
// width are this design's choices.
module spam_divider #(
  parameter int unsigned NUM_W  = 19,
  parameter int unsigned FRAC_W = 16,
  localparam int unsigned QW = FRAC_W + 1,
  localparam int unsigned NS = FRAC_W + 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [NUM_W-1:0] num,
  input  logic [NUM_W-1:0] den,
  output logic [QW-1:0]    quo
);

  // the partial remainder stays below 2*den, so NUM_W+1 bits suffice
  logic [NUM_W:0]   rem [NS+1];
  logic [NUM_W-1:0] dv  [NS+1];
  logic [QW-1:0]    q   [NS+1];
  logic             dz  [NS+1];
  logic [NUM_W:0]   sh  [NS];     // partial remainder entering stage s

  always_comb begin
    for (int s = 0; s < NS; s++)
      sh[s] = (s == 0) ? rem[s] : {rem[s][NUM_W-1:0], 1'b0};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s <= NS; s++) begin
        rem[s] <= '0;
        dv[s]  <= '0;
        q[s]   <= '0;
        dz[s]  <= 1'b0;
      end
    end else begin
      rem[0] <= {1'b0, num};
      dv[0]  <= den;
      q[0]   <= '0;
      dz[0]  <= (den == '0);
      for (int s = 0; s < NS; s++) begin
        // stage s decides quotient bit QW-1-s
        if (sh[s] >= {1'b0, dv[s]}) begin
          rem[s+1] <= sh[s] - {1'b0, dv[s]};
          q[s+1]   <= {q[s][QW-2:0], 1'b1};
        end else begin
          rem[s+1] <= sh[s];
          q[s+1]   <= {q[s][QW-2:0], 1'b0};
        end
        dv[s+1] <= dv[s];
        dz[s+1] <= dz[s];
      end
    end
  end

  assign quo = dz[NS] ? '0 : q[NS];

endmodule
