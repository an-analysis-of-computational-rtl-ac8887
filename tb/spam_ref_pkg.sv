// spam_ref_pkg: reference model of first-order SPAM for the testbenches.
//
// Written directly from the SPAM definition, independently of the lane and
// pipeline organisation of the RTL. For direction X with step s_X:
//   D_X(p)  = I(p) - I(p + s_X)
//   pair    (y, x) = (D_X(p), D_X(p + s_X)) for every p with p + 2 s_X inside
//   P[y]    = number of pairs whose y lies in [-T, T]
//   F[y][x] = number of pairs with both in [-T, T]
//   prob    = floor(F * 2^FRAC / P), 0 when P = 0
//   feature = floor((prob_A + prob_B + prob_C + prob_D) / 4), likewise E..H
// Steps: A (0,+1) east, B (0,-1) west, C (-1,0) north, D (+1,0) south,
// E (-1,+1) north-east, F (+1,-1) south-west, G (+1,+1) south-east,
// H (-1,-1) north-west. The image is a flat int array, row major.
package spam_ref_pkg;

  function automatic int step_r(int dir);
    case (dir)
      2, 4, 7: return -1;
      3, 5, 6: return 1;
      default: return 0;
    endcase
  endfunction

  function automatic int step_c(int dir);
    case (dir)
      0, 4, 6: return 1;
      1, 5, 7: return -1;
      default: return 0;
    endcase
  endfunction

  function automatic bit inside_img(int rows, int cols, int r, int c);
    return r >= 0 && r < rows && c >= 0 && c < cols;
  endfunction

  function automatic int diff(const ref int img[], input int cols, int dir, int r, int c);
    return img[r*cols + c] - img[(r + step_r(dir))*cols + c + step_c(dir)];
  endfunction

  // p must have 2T+1 entries and f (2T+1)^2, both zeroed by the caller
  function automatic void counts(const ref int img[], input int rows, int cols, int t,
                                 int dir, ref int p[], ref int f[]);
    int nb = 2*t + 1;
    for (int r = 0; r < rows; r++)
      for (int c = 0; c < cols; c++) begin
        int y, x;
        if (!inside_img(rows, cols, r + 2*step_r(dir), c + 2*step_c(dir))) continue;
        y = diff(img, cols, dir, r, c);
        x = diff(img, cols, dir, r + step_r(dir), c + step_c(dir));
        if (y < -t || y > t) continue;
        p[y + t]++;
        if (x >= -t && x <= t) f[(y + t)*nb + x + t]++;
      end
  endfunction

  function automatic int prob(int fv, int pv, int frac);
    longint q;
    if (pv == 0) return 0;
    q = (longint'(fv) << frac) / pv;
    return int'(q);
  endfunction

  // features: hv and diag, (2T+1)^2 entries each
  function automatic void features(const ref int img[], input int rows, int cols, int t,
                                   int frac, ref int hv[], ref int dg[],
                                   ref int zero_p, ref int pairs_in, ref int pairs_half);
    int nb = 2*t + 1;
    int nf = nb*nb;
    int p[];
    int f[];
    int sum_hv[];
    int sum_dg[];
    sum_hv = new[nf];
    sum_dg = new[nf];
    foreach (sum_hv[i]) begin sum_hv[i] = 0; sum_dg[i] = 0; end
    for (int dir = 0; dir < 8; dir++) begin
      p = new[nb];
      f = new[nf];
      foreach (p[i]) p[i] = 0;
      foreach (f[i]) f[i] = 0;
      counts(img, rows, cols, t, dir, p, f);
      foreach (p[i]) if (p[i] == 0) zero_p++;
      for (int i = 0; i < nf; i++) begin
        pairs_in += f[i];
        if (dir < 4) sum_hv[i] += prob(f[i], p[i / nb], frac);
        else         sum_dg[i] += prob(f[i], p[i / nb], frac);
      end
      for (int yy = 0; yy < nb; yy++) begin
        int s = 0;
        for (int xx = 0; xx < nb; xx++) s += f[yy*nb + xx];
        pairs_half += p[yy] - s;
      end
    end
    hv = new[nf];
    dg = new[nf];
    for (int i = 0; i < nf; i++) begin
      hv[i] = sum_hv[i] >> 2;
      dg[i] = sum_dg[i] >> 2;
    end
  endfunction

  // smooth test image: row-wise random walk with small steps and occasional
  // large jumps, so that differences fall both inside and outside [-T, T];
  // a flat band gives many identical pairs. flat = 1 gives a uniform image,
  // whose differences are all zero, leaving every other P entry empty.
  function automatic void make_image(ref int img[], input int rows, int cols, bit flat);
    img = new[rows*cols];
    if (flat) begin
      foreach (img[i]) img[i] = 128;
      return;
    end
    for (int r = 0; r < rows; r++) begin
      int v = 100 + int'($urandom_range(0, 40));
      for (int c = 0; c < cols; c++) begin
        if (r >= 2 && r < 4 && c < cols/2) v = 200;
        else if ($urandom_range(0, 15) == 0) v = v + int'($urandom_range(0, 60)) - 30;
        else v = v + int'($urandom_range(0, 8)) - 4;
        if (v < 0) v = 0;
        if (v > 255) v = 255;
        img[r*cols + c] = v;
      end
    end
  endfunction

endpackage
