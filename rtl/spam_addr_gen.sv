// spam_addr_gen: register-file address generator for one SPAM direction.
//
// SPAM models the differences along a direction X as a first-order Markov
// chain: for every pixel p with p+step and p+2*step inside the image it takes
// the pair (y, x) = (D_X(p), D_X(p+step)). This block receives the four
// differences per cycle of its difference filter and forms, for each lane, the
// pair that ends or starts at that lane:
//   A, B  (horizontal): the partner is the lane to the left, or lane 3 of the
//         previous word kept in a register.
//   C..H  (vertical and diagonal): the partner lies in the previous row pair.
//         A line buffer of COLS/4 words keeps the range-checked differences of
//         the previous scan row; diagonal directions look one column left or
//         right of it (one word ahead, or lane 3 of the previous word saved
//         before it was overwritten).
// The pair is oriented by the chain direction, the conditioning value y
// coming first along the step. For each lane it outputs, one cycle later:
//   p_en/p_addr  ADDP: y+T, when the pair exists and |y| <= T,
//   f_en/f_addr  ADDF: (y+T)*(2T+1) + (x+T), when also |x| <= T.
// P thus counts only differences that have a successor, so every row of F
// sums to at most the matching P entry. The line buffer, the pairing scheme
// and this definition of P are this design's choices; the published architecture gives the
// range [-T, T], the two register files and the conversion of differences
// into their addresses.
module spam_addr_gen
  import spam_pkg::*;
#(
  parameter dir_e        DIR  = DIR_A,
  parameter int unsigned T    = 4,
  parameter int unsigned COLS = 512,
  localparam int unsigned NB    = 2 * T + 1,
  localparam int unsigned IW    = $clog2(NB),
  localparam int unsigned FW    = $clog2(NB * NB),
  localparam int unsigned WORDS = COLS / LANES,
  localparam int unsigned WW    = (WORDS > 1) ? $clog2(WORDS) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic          first_row,
  input  logic [WW-1:0] word,
  input  diff_t         d [LANES],
  input  logic          dvalid [LANES],
  output logic          p_en [LANES],
  output logic [IW-1:0] p_addr [LANES],
  output logic          f_en [LANES],
  output logic [FW-1:0] f_addr [LANES]
);

  typedef struct packed {
    logic          ex;    // difference exists (inside the image)
    logic          inr;   // and lies in [-T, T]
    logic [IW-1:0] idx;   // difference + T
  } code_t;

  localparam bit HORIZ  = (DIR == DIR_A) || (DIR == DIR_B);
  // y is the current lane for B, C, E, H; the partner for A, D, F, G
  localparam bit Y_CUR  = (DIR == DIR_B) || (DIR == DIR_C) || (DIR == DIR_E) || (DIR == DIR_H);
  // column offset of the buffered partner relative to the current lane
  localparam int SHIFT  = (DIR == DIR_E || DIR == DIR_F) ?  1 :
                          (DIR == DIR_G || DIR == DIR_H) ? -1 : 0;

  code_t cur [LANES];
  code_t nb  [LANES];
  code_t y_c [LANES];
  code_t x_c [LANES];
  logic  pair [LANES];

  code_t cur_prev3;                      // lane 3 of the previous word, this row
  code_t lbuf [WORDS][LANES];            // previous scan row
  code_t lbuf_prev3;                     // old lbuf[word-1][3]

  logic last_word;
  assign last_word = (word == WW'(WORDS - 1));

  always_comb begin
    for (int k = 0; k < LANES; k++) begin
      cur[k].ex  = dvalid[k];
      cur[k].inr = dvalid[k] && (d[k] >= -diff_t'(T)) && (d[k] <= diff_t'(T));
      cur[k].idx = IW'(d[k] + diff_t'(T));
    end
  end

  always_comb begin
    for (int k = 0; k < LANES; k++) begin
      if (HORIZ) begin
        nb[k] = (k == 0) ? cur_prev3 : cur[(k == 0) ? 0 : k-1];
      end else if (k + SHIFT < 0) begin
        nb[k] = lbuf_prev3;
        if (word == '0) nb[k].ex = 1'b0;
      end else if (k + SHIFT >= int'(LANES)) begin
        nb[k] = lbuf[last_word ? word : word + 1'b1][0];
        if (last_word) nb[k].ex = 1'b0;
      end else begin
        nb[k] = lbuf[word][k + SHIFT];
      end
      if (!HORIZ && first_row) nb[k].ex = 1'b0;
      y_c[k]  = Y_CUR ? cur[k] : nb[k];
      x_c[k]  = Y_CUR ? nb[k]  : cur[k];
      pair[k] = in_valid && y_c[k].ex && x_c[k].ex;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur_prev3  <= '0;
      lbuf_prev3 <= '0;
    end else if (in_valid) begin
      cur_prev3  <= cur[LANES-1];
      lbuf_prev3 <= lbuf[word][LANES-1];
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid && !HORIZ) begin
      for (int k = 0; k < LANES; k++) lbuf[word][k] <= cur[k];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < LANES; k++) begin
        p_en[k]   <= 1'b0;
        p_addr[k] <= '0;
        f_en[k]   <= 1'b0;
        f_addr[k] <= '0;
      end
    end else begin
      for (int k = 0; k < LANES; k++) begin
        p_en[k]   <= pair[k] && y_c[k].inr;
        p_addr[k] <= y_c[k].idx;
        f_en[k]   <= pair[k] && y_c[k].inr && x_c[k].inr;
        f_addr[k] <= FW'(y_c[k].idx) * FW'(NB) + FW'(x_c[k].idx);
      end
    end
  end

endmodule
