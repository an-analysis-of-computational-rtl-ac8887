// spam_freq_calc: register files P and F plus frequency read-out for one
// SPAM direction.
//
// Accumulation: P holds 2T+1 occurrence counters, one per difference value in
// [-T, T]; F holds (2T+1)^2 counters, one per (y, x) pair. Each cycle up to
// LANES (four) increments arrive for each file; every counter adds the number
// of enabled lanes addressing it, so four pixels are accounted per cycle.
// clear zeroes both files (one cycle, before a scan).
//
// Read-out: a one-cycle rd_start steps an index through all (2T+1)^2 pairs,
// row y = 0..2T (difference -T..T) and within it x = 0..2T, one per cycle.
// For each it presents, registered, F[y][x] (rd_f), the matching P[y] (rd_p),
// the pair index y*(2T+1)+x (rd_idx) and the enable rd_ena, feeding the
// divider that forms F[y][x]/P[y]. rd_last marks the final pair. This
// sequential read-out of P and F follows the published architecture; the counter width
// CNT_W must hold rows*cols (19 bits for 512 x 512) and is this design's.
module spam_freq_calc
  import spam_pkg::*;
#(
  parameter int unsigned T     = 4,
  parameter int unsigned CNT_W = 19,
  localparam int unsigned NB = 2 * T + 1,
  localparam int unsigned NF = NB * NB,
  localparam int unsigned IW = $clog2(NB),
  localparam int unsigned FW = $clog2(NF)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             p_en   [LANES],
  input  logic [IW-1:0]    p_addr [LANES],
  input  logic             f_en   [LANES],
  input  logic [FW-1:0]    f_addr [LANES],
  input  logic             rd_start,
  output logic             rd_ena,
  output logic             rd_last,
  output logic [FW-1:0]    rd_idx,
  output logic [CNT_W-1:0] rd_p,
  output logic [CNT_W-1:0] rd_f
);

  localparam int unsigned LW = $clog2(LANES + 1);

  logic [CNT_W-1:0] p_cnt [NB];
  logic [CNT_W-1:0] f_cnt [NF];

  function automatic logic [LW-1:0] hits_p(logic [IW-1:0] e, logic en [LANES],
                                           logic [IW-1:0] a [LANES]);
    logic [LW-1:0] n = '0;
    for (int k = 0; k < LANES; k++) if (en[k] && a[k] == e) n = n + 1'b1;
    return n;
  endfunction

  function automatic logic [LW-1:0] hits_f(logic [FW-1:0] e, logic en [LANES],
                                           logic [FW-1:0] a [LANES]);
    logic [LW-1:0] n = '0;
    for (int k = 0; k < LANES; k++) if (en[k] && a[k] == e) n = n + 1'b1;
    return n;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int e = 0; e < NB; e++) p_cnt[e] <= '0;
      for (int e = 0; e < NF; e++) f_cnt[e] <= '0;
    end else if (clear) begin
      for (int e = 0; e < NB; e++) p_cnt[e] <= '0;
      for (int e = 0; e < NF; e++) f_cnt[e] <= '0;
    end else begin
      for (int e = 0; e < NB; e++) p_cnt[e] <= p_cnt[e] + CNT_W'(hits_p(IW'(e), p_en, p_addr));
      for (int e = 0; e < NF; e++) f_cnt[e] <= f_cnt[e] + CNT_W'(hits_f(FW'(e), f_en, f_addr));
    end
  end

  // read-out sequencer
  logic          busy;
  logic [IW-1:0] y, x;
  logic [FW-1:0] idx;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      y    <= '0;
      x    <= '0;
      idx  <= '0;
    end else if (rd_start && !busy) begin
      busy <= 1'b1;
      y    <= '0;
      x    <= '0;
      idx  <= '0;
    end else if (busy) begin
      idx <= idx + 1'b1;
      if (x == IW'(NB - 1)) begin
        x <= '0;
        if (y == IW'(NB - 1)) busy <= 1'b0;
        else                  y    <= y + 1'b1;
      end else begin
        x <= x + 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ena  <= 1'b0;
      rd_last <= 1'b0;
      rd_idx  <= '0;
      rd_p    <= '0;
      rd_f    <= '0;
    end else begin
      rd_ena  <= busy;
      rd_last <= busy && (idx == FW'(NF - 1));
      rd_idx  <= idx;
      rd_p    <= p_cnt[y];
      rd_f    <= f_cnt[idx];
    end
  end

endmodule
