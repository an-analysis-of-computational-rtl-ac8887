// spam_top: first-order SPAM feature extractor (Subtractive Pixel Adjacency
// Model, the steganalysis feature set of Pevny, Bas and Fridrich).
//
// The design computes, for a ROWS x COLS 8-bit grey image, the 2 x (2T+1)^2
// first-order SPAM features (162 for T = 4): for each of eight directions the
// pixel differences are modelled as a Markov chain, the transition
// probabilities P(x | y) for x, y in [-T, T] are estimated by counting, and
// the probabilities of the four horizontal/vertical directions (A,B,C,D) and
// of the four diagonal ones (E,F,G,H) are averaged into two feature vectors.
//
// Three stages, as in the architecture:
//   1. Differential filter stage: the block memory delivers four pixels of
//      rows i and i+1 per cycle; eight difference filters and eight address
//      generators turn them into register-file increments (ADDP/ADDF/ENA).
//      The scan takes ROWS*COLS/4 cycles (2^16 for 512 x 512).
//   2. Transition probability stage: each frequency calculator reads its P
//      and F files sequentially, one pair per cycle, into a divider.
//   3. Feature stage: two features calculators average the four dividers of
//      their group; two features leave per cycle after the 18-cycle divider.
//
// Interface: load the image through img_we/img_waddr/img_wdata (word w of row
// r at address r*COLS/4 + w, leftmost pixel in bits 7:0), then pulse start.
// busy stays high until done pulses, which is in the cycle of the last
// feature. Features come out on feat_valid with index feat_idx = (y+T)*(2T+1)
// + (x+T); feat_hv is the A..D mean and feat_diag the E..H mean, unsigned
// with FRAC_W = 16 fraction bits. From start to done takes ROWS*COLS/4 +
// (2T+1)^2 + DIV_LAT + 6 cycles. The start/done sequencer and the load port
// are this design's own; the published architecture does not describe the control.
module spam_top
  import spam_pkg::*;
#(
  parameter int unsigned ROWS = 512,
  parameter int unsigned COLS = 512,
  parameter int unsigned T    = 4,
  localparam int unsigned WORDS = COLS / LANES,
  localparam int unsigned DEPTH = ROWS * WORDS,
  localparam int unsigned AW    = $clog2(DEPTH),
  localparam int unsigned RW    = $clog2(ROWS),
  localparam int unsigned WW    = (WORDS > 1) ? $clog2(WORDS) : 1,
  localparam int unsigned NB    = 2 * T + 1,
  localparam int unsigned NF    = NB * NB,
  localparam int unsigned IW    = $clog2(NB),
  localparam int unsigned FW    = $clog2(NF),
  localparam int unsigned CNT_W = $clog2(ROWS * COLS + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              img_we,
  input  logic [AW-1:0]     img_waddr,
  input  logic [WORD_W-1:0] img_wdata,
  input  logic              start,
  output logic              busy,
  output logic              done,
  output logic              feat_valid,
  output logic [FW-1:0]     feat_idx,
  output prob_t             feat_hv,
  output prob_t             feat_diag
);

  // ------------------------------------------------------------------
  // control
  typedef enum logic [2:0] {S_IDLE, S_CLEAR, S_SCAN, S_DRAIN, S_READ} state_e;
  state_e     state;
  logic [1:0] drain_cnt;
  logic       clear, scan_start, rd_start, scan_done;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      drain_cnt <= '0;
    end else begin
      unique case (state)
        S_IDLE:  if (start) state <= S_CLEAR;
        S_CLEAR: state <= S_SCAN;
        S_SCAN:  if (scan_done) begin
                   state     <= S_DRAIN;
                   drain_cnt <= '0;
                 end
        S_DRAIN: begin
                   drain_cnt <= drain_cnt + 1'b1;
                   if (drain_cnt == 2'd1) state <= S_READ;
                 end
        S_READ:  if (done) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign clear      = (state == S_CLEAR);
  assign scan_start = (state == S_CLEAR);
  assign rd_start   = (state == S_DRAIN) && (drain_cnt == 2'd1);
  assign busy       = (state != S_IDLE);

  // ------------------------------------------------------------------
  // differential filter stage
  logic [AW-1:0]     add1, add2;
  logic [WORD_W-1:0] rdata1, rdata2;
  logic              ag_busy, tag_valid;
  logic [RW-1:0]     tag_row;
  logic [WW-1:0]     tag_word;
  pix_t              r1 [LANES];
  pix_t              r2 [LANES];

  spam_pixel_addr_gen #(.ROWS(ROWS), .COLS(COLS)) u_pix_ag (
    .clk, .rst_n, .start(scan_start), .add1, .add2, .busy(ag_busy),
    .tag_valid, .tag_row, .tag_word, .scan_done
  );

  spam_block_memory #(.DEPTH(DEPTH), .WIDTH(WORD_W)) u_mem (
    .clk, .we(img_we), .waddr(img_waddr), .wdata(img_wdata),
    .raddr1(add1), .raddr2(add2), .rdata1, .rdata2
  );

  always_comb begin
    for (int k = 0; k < LANES; k++) begin
      r1[k] = rdata1[PIX_W*k +: PIX_W];
      r2[k] = rdata2[PIX_W*k +: PIX_W];
    end
  end

  logic             first_word, first_row, r2_valid;
  assign first_word = (tag_word == '0);
  assign first_row  = (tag_row == '0);
  assign r2_valid   = (tag_row != RW'(ROWS - 1));

  // per-direction signals
  diff_t            d      [8][LANES];
  logic             dvalid [8][LANES];
  logic             p_en   [8][LANES];
  logic [IW-1:0]    p_addr [8][LANES];
  logic             f_en   [8][LANES];
  logic [FW-1:0]    f_addr [8][LANES];
  logic             rd_ena [8];
  logic             rd_last[8];
  logic [FW-1:0]    rd_idx [8];
  logic [CNT_W-1:0] rd_p   [8];
  logic [CNT_W-1:0] rd_f   [8];
  prob_t            tp     [8];

  for (genvar g = 0; g < 8; g++) begin : g_dir
    localparam dir_e DIR = dir_e'(g);

    spam_diff_filter #(.DIR(DIR)) u_filt (
      .clk, .rst_n, .in_valid(tag_valid), .first_word, .r2_valid,
      .r1, .r2, .d(d[g]), .dvalid(dvalid[g])
    );

    spam_addr_gen #(.DIR(DIR), .T(T), .COLS(COLS)) u_ag (
      .clk, .rst_n, .in_valid(tag_valid), .first_row, .word(tag_word),
      .d(d[g]), .dvalid(dvalid[g]),
      .p_en(p_en[g]), .p_addr(p_addr[g]), .f_en(f_en[g]), .f_addr(f_addr[g])
    );

    spam_freq_calc #(.T(T), .CNT_W(CNT_W)) u_fc (
      .clk, .rst_n, .clear,
      .p_en(p_en[g]), .p_addr(p_addr[g]), .f_en(f_en[g]), .f_addr(f_addr[g]),
      .rd_start, .rd_ena(rd_ena[g]), .rd_last(rd_last[g]), .rd_idx(rd_idx[g]),
      .rd_p(rd_p[g]), .rd_f(rd_f[g])
    );

    spam_divider #(.NUM_W(CNT_W), .FRAC_W(FRAC_W)) u_div (
      .clk, .rst_n, .num(rd_f[g]), .den(rd_p[g]), .quo(tp[g])
    );
  end

  // ------------------------------------------------------------------
  // feature stage
  logic        fv_hv, fv_diag;
  logic [FW-1:0] fi_hv, fi_diag;

  spam_features_calc #(.DLAT(DIV_LAT), .IDX_W(FW)) u_feat_hv (
    .clk, .rst_n, .ena_in(rd_ena[0]), .idx_in(rd_idx[0]),
    .tp('{tp[0], tp[1], tp[2], tp[3]}),
    .feat_valid(fv_hv), .feat_idx(fi_hv), .feature(feat_hv)
  );

  spam_features_calc #(.DLAT(DIV_LAT), .IDX_W(FW)) u_feat_diag (
    .clk, .rst_n, .ena_in(rd_ena[7]), .idx_in(rd_idx[7]),
    .tp('{tp[4], tp[5], tp[6], tp[7]}),
    .feat_valid(fv_diag), .feat_idx(fi_diag), .feature(feat_diag)
  );

  assign feat_valid = fv_hv;
  assign feat_idx   = fi_hv;
  assign done       = fv_hv && (fi_hv == FW'(NF - 1));

  // the read-out of every direction ends with its last pair
  for (genvar g = 0; g < 8; g++) begin : g_last
    a_last: assert property (@(posedge clk) disable iff (!rst_n)
      rd_last[g] |-> (rd_ena[g] && rd_idx[g] == FW'(NF - 1)));
  end

  // the scan address generator runs exactly while the sequencer is scanning
  a_scan: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_SCAN) |-> (ag_busy || scan_done));

  // the eight frequency calculators run in lockstep, and so do the two groups
  a_lockstep: assert property (@(posedge clk) disable iff (!rst_n)
    rd_ena[0] == rd_ena[7] && (!rd_ena[0] || rd_idx[0] == rd_idx[7]));
  a_groups: assert property (@(posedge clk) disable iff (!rst_n)
    fv_hv == fv_diag && (!fv_hv || fi_hv == fi_diag));

endmodule
