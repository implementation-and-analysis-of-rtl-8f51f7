// Behavioural reference of the stereo pipeline for the test benches: plain
// integer arithmetic on whole images, written from the equations rather than
// from the RTL structure.
//   sgm_ref    census 7x7 cost, MGM update with four grouped paths
//              (top-left, top, top-right, left), division of the summed
//              smoothing terms by 4 with a shift, clip to 255, first argmin.
//              Output row r, column c is centred on input row r+WIN/2,
//              column c+WIN/2; pixels left of the image read as 0; the row
//              above the first processed row and neighbours beyond the image
//              count as cost 255.
//   remap_ref  bilinear interpolation with 5 fractional bits, round to
//              nearest, neighbours outside the image read as 0.
package sgm_ref_pkg;
  localparam int MAXC = 255;

  typedef int ivec_t[];

  function automatic int pterm(input int v[], input int dd, input int mn, input int P1, input int P2);
    int a, b, c, e, m, n;
    n = v.size();
    a = v[dd];
    b = (dd > 0) ? v[dd-1] + P1 : MAXC + P1;
    c = (dd < n - 1) ? v[dd+1] + P1 : MAXC + P1;
    e = mn + P2;
    m = a;
    if (b < m) m = b;
    if (c < m) m = c;
    if (e < m) m = e;
    return m - mn;
  endfunction

  // img_l/img_r: H*W bytes row-major; returns (H-WIN+1)*W disparities,
  // index r*W + c for output columns c < W - WIN/2
  function automatic ivec_t sgm_ref(input int W, input int H, input int D, input int WIN,
                                    input int P1, input int P2,
                                    input int img_l[], input int img_r[]);
    int offs = WIN / 2;
    ivec_t res = new[(H - WIN + 1) * W];
    int prev[][], cur[][], pmin[], cmin[], maxv[];
    bit have_prev = 0;
    prev = new[W];  cur = new[W];  pmin = new[W];  cmin = new[W];  maxv = new[D];
    foreach (maxv[i]) maxv[i] = MAXC;
    for (int c = 0; c < W; c++) begin prev[c] = new[D]; cur[c] = new[D]; end
    for (int r = WIN - 1; r < H; r++) begin
      for (int c = 0; c < W; c++) begin
        int tl[], t[], tr[], lf[];
        int mtl, mt, mtr, ml, best, bestd, cl, crr;
        tl = (have_prev && c > 0) ? prev[c-1] : maxv;     mtl = (have_prev && c > 0) ? pmin[c-1] : MAXC;
        t  = have_prev ? prev[c] : maxv;                   mt  = have_prev ? pmin[c] : MAXC;
        tr = (have_prev && c < W - 1) ? prev[c+1] : maxv;  mtr = (have_prev && c < W - 1) ? pmin[c+1] : MAXC;
        lf = (c > 0) ? cur[c-1] : maxv;                    ml  = (c > 0) ? cmin[c-1] : MAXC;
        best = 1 << 30;  bestd = 0;
        for (int dd = 0; dd < D; dd++) begin
          int ham, s, cost;
          ham = 0;
          cl  = (c - offs < 0) ? 0 : img_l[(r - offs) * W + c - offs];
          crr = (c - offs - dd < 0) ? 0 : img_r[(r - offs) * W + c - offs - dd];
          for (int i = 0; i < WIN; i++)
            for (int j = 0; j < WIN; j++) begin
              int xl, xr, pl, pr;
              xl = c - (WIN - 1) + j;
              xr = xl - dd;
              pl = (xl < 0) ? 0 : img_l[(r - (WIN - 1) + i) * W + xl];
              pr = (xr < 0) ? 0 : img_r[(r - (WIN - 1) + i) * W + xr];
              ham += ((pl > cl) != (pr > crr));
            end
          s = pterm(tl, dd, mtl, P1, P2) + pterm(t, dd, mt, P1, P2)
            + pterm(tr, dd, mtr, P1, P2) + pterm(lf, dd, ml, P1, P2);
          cost = ham + (s >> 2);
          if (cost > MAXC) cost = MAXC;
          cur[c][dd] = cost;
          if (cost < best) begin best = cost; bestd = dd; end
        end
        cmin[c] = best;
        if (c >= offs) res[(r - (WIN - 1)) * W + c - offs] = bestd;
      end
      for (int c = 0; c < W; c++) begin
        prev[c] = new[D](cur[c]);
        pmin[c] = cmin[c];
      end
      have_prev = 1;
    end
    return res;
  endfunction

  // bilinear sample of img (W x H) at fixed-point (mx, my), 5 fractional bits
  function automatic int remap_ref(input int W, input int H, input int img[], input int mx, input int my);
    int x0, y0, fx, fy, p[4], acc;
    x0 = mx >>> 5;  y0 = my >>> 5;  fx = mx & 31;  fy = my & 31;
    for (int n = 0; n < 4; n++) begin
      int x, y;
      x = x0 + (n & 1);  y = y0 + (n >> 1);
      p[n] = (x >= 0 && x < W && y >= 0 && y < H) ? img[y * W + x] : 0;
    end
    acc = p[0] * (32 - fx) * (32 - fy) + p[1] * fx * (32 - fy)
        + p[2] * (32 - fx) * fy + p[3] * fx * fy + 512;
    return acc >> 10;
  endfunction
endpackage
