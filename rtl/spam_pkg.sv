// spam_pkg: types and constants shared by the first-order SPAM (Subtractive
// Pixel Adjacency Model) feature extractor.
//
// Pixels are 8-bit grey levels packed four to a 32-bit memory word; lane k of
// a word (bits 8k+7:8k) holds column 4w+k, so the lowest byte is the leftmost
// pixel (the byte order is this design's choice). Differences of two pixels
// need 9 signed bits. The eight directions A..H follow the usual SPAM set:
// A east, B west, C north, D south, E north-east, F south-west, G south-east,
// H north-west. The divider returns FRAC_W fraction bits and, being a
// restoring pipeline with one stage per quotient bit plus an input stage, has
// a latency of FRAC_W+2 = 18 cycles, the divider latency the architecture is
// built around. FRAC_W itself is this design's choice.
package spam_pkg;

  localparam int unsigned PIX_W  = 8;
  localparam int unsigned LANES  = 4;
  localparam int unsigned WORD_W = PIX_W * LANES;
  localparam int unsigned DIFF_W = PIX_W + 1;

  localparam int unsigned FRAC_W  = 16;
  localparam int unsigned PROB_W  = FRAC_W + 1;   // 1.0 needs the extra bit
  localparam int unsigned DIV_LAT = FRAC_W + 2;   // 18 cycles

  typedef logic [PIX_W-1:0]         pix_t;
  typedef logic signed [DIFF_W-1:0] diff_t;
  typedef logic [PROB_W-1:0]        prob_t;

  typedef enum logic [2:0] {
    DIR_A, DIR_B, DIR_C, DIR_D, DIR_E, DIR_F, DIR_G, DIR_H
  } dir_e;

endpackage
