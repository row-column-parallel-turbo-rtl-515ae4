// tb_ref_pkg: reference models used by the testbenches.
//
// Written independently of the RTL, with whole candidate codewords instead of
// difference masks and a plain selection sort for the least reliable positions:
//   * hcols       parity-check columns alpha^p of the Hamming part, generated by
//                 a shift register with its own table of primitive polynomials
//   * siso_ref    Chase-Pyndiah decision d and soft output F of one codeword
//   * elem_ref    elementary decoder: R' = R + floor(alpha*W/16), W' = F - R'
//   * encode_row  systematic encoder of the extended BCH (Hamming + parity) code
package tb_ref_pkg;

  typedef int      ivec_t[];
  typedef bit      bvec_t[];

  function automatic int clip(input int v, input int w);
    int lim = (1 << (w - 1)) - 1;
    return (v > lim) ? lim : (v < -lim) ? -lim : v;
  endfunction

  function automatic int iabs(input int v);
    return (v < 0) ? -v : v;
  endfunction

  // full primitive polynomial, x^m term included
  function automatic int full_poly(input int m);
    case (m)
      3: return 'b1011;
      4: return 'b10011;
      5: return 'b100101;
      6: return 'b1000011;
      7: return 'b10001001;
      default: return 'b100011101;
    endcase
  endfunction

  function automatic ivec_t hcols(input int n);
    ivec_t c = new[n];
    int m = $clog2(n);
    int v = 1;
    for (int p = 0; p < n - 1; p++) begin
      c[p] = v;
      v = v * 2;
      if (v >= (1 << m)) v = v ^ full_poly(m);
    end
    c[n-1] = 0;
    return c;
  endfunction

  // r: soft inputs by position; arr: arrival index of each position (ties of
  // reliability go to the earlier arrival); fw: width of F
  task automatic siso_ref(input int n, input int np, input ivec_t r, input ivec_t arr,
                          input int beta, input int fw,
                          output bvec_t d, output ivec_t f, output bvec_t comp);
    ivec_t cols = hcols(n);
    bit    y[];
    int    lrp[];
    bit    taken[];
    bit    cand[][];
    int    met[];
    int    nt = 1 << np;
    int    best;
    y = new[n]; taken = new[n]; lrp = new[np];
    cand = new[nt]; met = new[nt];
    d = new[n]; f = new[n]; comp = new[n];
    for (int p = 0; p < n; p++) begin
      y[p] = (r[p] < 0);
      taken[p] = 0;
    end
    for (int k = 0; k < np; k++) begin
      int bp = -1;
      for (int p = 0; p < n; p++)
        if (!taken[p] && (bp < 0 || iabs(r[p]) < iabs(r[bp]) ||
                          (iabs(r[p]) == iabs(r[bp]) && arr[p] < arr[bp])))
          bp = p;
      lrp[k] = bp;
      taken[bp] = 1;
    end
    best = 0;
    for (int e = 0; e < nt; e++) begin
      int s = 0;
      int par = 0;
      cand[e] = new[n];
      for (int p = 0; p < n; p++) cand[e][p] = y[p];
      for (int k = 0; k < np; k++) if (e[k]) cand[e][lrp[k]] = !cand[e][lrp[k]];
      for (int p = 0; p < n - 1; p++) if (cand[e][p]) s = s ^ cols[p];
      if (s != 0)
        for (int p = 0; p < n - 1; p++) if (cols[p] == s) cand[e][p] = !cand[e][p];
      for (int p = 0; p < n; p++) par = par ^ int'(cand[e][p]);
      if (par != 0) cand[e][n-1] = !cand[e][n-1];
      met[e] = 0;
      for (int p = 0; p < n; p++) if (cand[e][p] != y[p]) met[e] += iabs(r[p]);
      if (met[e] < met[best]) best = e;
    end
    for (int p = 0; p < n; p++) begin
      int cm = -1;
      int sg;
      d[p] = cand[best][p];
      sg = d[p] ? -1 : 1;
      for (int e = 0; e < nt; e++)
        if (cand[e][p] != d[p] && (cm < 0 || met[e] < cm)) cm = met[e];
      comp[p] = (cm >= 0);
      if (cm >= 0) f[p] = clip((cm - met[best]) * sg, fw);
      else         f[p] = clip(r[p] + beta * sg, fw);
    end
  endtask

  // elementary decoder of one codeword, q-bit R and W
  task automatic elem_ref(input int n, input int np, input int q, input ivec_t rr,
                          input ivec_t w, input ivec_t arr, input int alpha, input int beta,
                          output bvec_t d, output ivec_t wn, output bvec_t comp);
    ivec_t rp = new[n];
    ivec_t f;
    int    prod;
    wn = new[n];
    for (int p = 0; p < n; p++) begin
      prod  = w[p] * alpha;
      // floor division by 16
      prod  = (prod >= 0) ? prod / 16 : -((-prod + 15) / 16);
      rp[p] = clip(rr[p] + prod, q + 1);
    end
    siso_ref(n, np, rp, arr, beta, q + 2, d, f, comp);
    for (int p = 0; p < n; p++) wn[p] = clip(f[p] - rp[p], q);
  endtask

  // systematic encoding: info bits at positions m..n-2, checks at 0..m-1 and n-1
  function automatic bvec_t encode_row(input int n, input bvec_t info);
    ivec_t cols = hcols(n);
    int    m = $clog2(n);
    bvec_t c = new[n];
    int    s = 0;
    int    par = 0;
    for (int p = 0; p < n; p++) c[p] = (p >= m && p < n - 1) ? info[p] : 1'b0;
    for (int p = m; p < n - 1; p++) if (c[p]) s = s ^ cols[p];
    for (int p = 0; p < m; p++) c[p] = s[p];
    for (int p = 0; p < n - 1; p++) par = par ^ int'(c[p]);
    c[n-1] = par[0];
    return c;
  endfunction

endpackage
