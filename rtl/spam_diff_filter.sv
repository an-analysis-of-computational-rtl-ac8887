// spam_diff_filter: differential filter for one SPAM direction.
//
// Each cycle it takes the four pixels of row i (r1) and the same four columns
// of row i+1 (r2) and produces four differences, one per lane, for direction
// DIR. The subtractors are combinational; one register per row keeps the last
// pixel (lane 3) of the previous word so that lane 0 can reach across the word
// boundary, as in the east-direction filter of the architecture, where the
// first output combines lane 0 with the registered previous pixel.
//
// With w the word index and k the lane, the outputs are (I = image):
//   A  I(i,4w+k-1) - I(i,4w+k)        D_A at (i,   4w+k-1)
//   B  I(i,4w+k)   - I(i,4w+k-1)      D_B at (i,   4w+k)
//   C  I(i+1,4w+k) - I(i,4w+k)        D_C at (i+1, 4w+k)
//   D  I(i,4w+k)   - I(i+1,4w+k)      D_D at (i,   4w+k)
//   E  I(i+1,4w+k-1) - I(i,4w+k)      D_E at (i+1, 4w+k-1)
//   F  I(i,4w+k)   - I(i+1,4w+k-1)    D_F at (i,   4w+k)
//   G  I(i,4w+k-1) - I(i+1,4w+k)      D_G at (i,   4w+k-1)
//   H  I(i+1,4w+k) - I(i,4w+k-1)      D_H at (i+1, 4w+k)
// where D_X(p) = I(p) - I(p + step_X) is the SPAM difference of direction X.
// dvalid marks lanes whose two pixels lie inside the image: lane 0 of word 0
// has no left neighbour (all directions but C and D), and on the last row
// (r2_valid low) only A and B exist. The lane/position assignment and the
// validity flags are this design's choices; the subtractions are the
// published architecture's.
module spam_diff_filter
  import spam_pkg::*;
#(
  parameter dir_e DIR = DIR_A
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic        first_word,
  input  logic        r2_valid,
  input  pix_t        r1 [LANES],
  input  pix_t        r2 [LANES],
  output diff_t       d [LANES],
  output logic        dvalid [LANES]
);

  pix_t r1_prev, r2_prev;   // lane 3 of the previous word, rows i and i+1
  pix_t r1_left [LANES];    // pixel one column to the left of each lane
  pix_t r2_left [LANES];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r1_prev <= '0;
      r2_prev <= '0;
    end else if (in_valid) begin
      r1_prev <= r1[LANES-1];
      r2_prev <= r2[LANES-1];
    end
  end

  always_comb begin
    for (int k = 0; k < LANES; k++) begin
      r1_left[k] = (k == 0) ? r1_prev : r1[(k == 0) ? 0 : k-1];
      r2_left[k] = (k == 0) ? r2_prev : r2[(k == 0) ? 0 : k-1];
    end
  end

  function automatic diff_t sub(pix_t a, pix_t b);
    return diff_t'({1'b0, a}) - diff_t'({1'b0, b});
  endfunction

  always_comb begin
    for (int k = 0; k < LANES; k++) begin
      unique case (DIR)
        DIR_A: d[k] = sub(r1_left[k], r1[k]);
        DIR_B: d[k] = sub(r1[k], r1_left[k]);
        DIR_C: d[k] = sub(r2[k], r1[k]);
        DIR_D: d[k] = sub(r1[k], r2[k]);
        DIR_E: d[k] = sub(r2_left[k], r1[k]);
        DIR_F: d[k] = sub(r1[k], r2_left[k]);
        DIR_G: d[k] = sub(r1_left[k], r2[k]);
        DIR_H: d[k] = sub(r2[k], r1_left[k]);
        default: d[k] = '0;
      endcase
      dvalid[k] = in_valid;
      if (DIR != DIR_A && DIR != DIR_B && !r2_valid) dvalid[k] = 1'b0;
      if (DIR != DIR_C && DIR != DIR_D && k == 0 && first_word) dvalid[k] = 1'b0;
    end
  end

endmodule
