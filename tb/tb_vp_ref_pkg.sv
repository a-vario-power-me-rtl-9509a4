// tb_vp_ref_pkg: reference model of the content-based subsample motion
// search, written directly from the equations and used by the testbenches.
// Blocks are flattened row-major int arrays: blk[i*n + j] is row i, column j.
// The search area of size h = n + 2p - 1 is area[r*h + c] with pixel
// S(i+u, j+v) of the current block at r = i+u+p, c = j+v+p.
package tb_vp_ref_pkg;

  // Base 4 x 4 pattern: entry is u(m - K).
  function automatic bit ref_sm(input int m, input int i, input int j);
    int K [4][4] = '{'{2, 5, 2, 6}, '{3, 7, 4, 8}, '{2, 5, 2, 6}, '{3, 7, 4, 8}};
    return (m - K[i % 4][j % 4]) >= 0;
  endfunction

  function automatic int px(input int n, const ref int blk[], input int r, input int c);
    if (r < 0) r = 0;
    if (r >= n) r = n - 1;
    if (c < 0) c = 0;
    if (c >= n) c = n - 1;
    return blk[r * n + c];
  endfunction

  // 3x3 mask filter MF(M, R)(i,j) with replicated borders.
  function automatic int mf(input int n, const ref int blk[], input int M[3][3], input int i, input int j);
    int s = 0;
    for (int a = -1; a <= 1; a++)
      for (int b = -1; b <= 1; b++)
        s += M[a+1][b+1] * px(n, blk, i + a, j + b);
    return s;
  endfunction

  function automatic int iabs(input int x);
    return x < 0 ? -x : x;
  endfunction

  // filt: 0 high-pass, 1 Sobel, 2 morphological gradient.
  function automatic int ref_grad(input int filt, input int n, const ref int blk[], input int i, input int j);
    int HPF [3][3] = '{'{-1, -1, -1}, '{-1, 8, -1}, '{-1, -1, -1}};
    int SX  [3][3] = '{'{-1, -2, -1}, '{0, 0, 0}, '{1, 2, 1}};
    int SY  [3][3] = '{'{-1, 0, 1}, '{-2, 0, 2}, '{-1, 0, 1}};
    int dil, ero;
    case (filt)
      0: return iabs(mf(n, blk, HPF, i, j));
      1: return iabs(mf(n, blk, SX, i, j)) + iabs(mf(n, blk, SY, i, j));
      default: begin
        dil = 0; ero = 255;
        for (int a = -1; a <= 1; a++)
          for (int b = -1; b <= 1; b++) begin
            if (px(n, blk, i + a, j + b) > dil) dil = px(n, blk, i + a, j + b);
            if (px(n, blk, i + a, j + b) < ero) ero = px(n, blk, i + a, j + b);
          end
        return dil - ero;
      end
    endcase
  endfunction

  // CSM from gradients: threshold = floor((m1*max + m2*min)/256), Q1.8 weights.
  function automatic void ref_csm_from_g(input int n, const ref int g[], input int m, input int m1, input int m2,
                                         ref bit csm[], output int thr, output int cnt);
    int gmax = g[0], gmin = g[0];
    for (int k = 1; k < n * n; k++) begin
      if (g[k] > gmax) gmax = g[k];
      if (g[k] < gmin) gmin = g[k];
    end
    thr = (m1 * gmax + m2 * gmin) / 256;
    cnt = 0;
    csm = new[n * n];
    for (int k = 0; k < n * n; k++) begin
      csm[k] = (g[k] >= thr) || ref_sm(m, k / n, k % n);
      cnt += csm[k];
    end
  endfunction

  function automatic void ref_csm(input int filt, input int n, const ref int blk[], input int m, input int m1, input int m2,
                                  ref bit csm[], output int thr, output int cnt);
    int g[] = new[n * n];
    for (int k = 0; k < n * n; k++) g[k] = ref_grad(filt, n, blk, k / n, k % n);
    ref_csm_from_g(n, g, m, m1, m2, csm, thr, cnt);
  endfunction

  function automatic int ref_ssad(input int n, input int p, const ref int blk[], const ref int area[],
                                  const ref bit csm[], input int u, input int v);
    int h = n + 2 * p - 1;
    int s = 0;
    for (int i = 0; i < n; i++)
      for (int j = 0; j < n; j++)
        if (csm[i * n + j])
          s += iabs(area[(i + u + p) * h + (j + v + p)] - blk[i * n + j]);
    return s;
  endfunction

  // Full search in scan order v outer, u inner; strict '<' keeps the first.
  function automatic void ref_search(input int n, input int p, const ref int blk[], const ref int area[],
                                     const ref bit csm[], output int bu, output int bv,
                                     output int bs, output int ties);
    bs = -1; bu = 0; bv = 0; ties = 0;
    for (int v = -p; v < p; v++)
      for (int u = -p; u < p; u++) begin
        int s = ref_ssad(n, p, blk, area, csm, u, v);
        if (bs < 0 || s < bs) begin
          bs = s; bu = u; bv = v;
        end else if (s == bs) ties++;
      end
  endfunction

  // Q1.8 weights of the eight power modes, m1 rounded to nearest.
  function automatic int mode_m1(input int mode);
    real r;
    case (mode)
      0: r = 1.0;  1: r = 0.75; 2: r = 0.5; 3: r = 0.4;
      4: r = 0.3;  5: r = 0.2;  6: r = 0.1; default: r = 0.0;
    endcase
    return $rtoi(r * 256.0 + 0.5);
  endfunction

endpackage
