// ldpc_ref_pkg: reference model and stimulus helpers for the decoder testbenches.
//
// The model decodes a word the way the hardware is specified to: channel LLRs
// from the quantised soft bits, flooding iterations of check-node and bit-node
// updates in the same 8-bit fixed point, hard decision, syndrome test and
// iteration limit. It is written from the equations (real-valued tables,
// plain loops over H), not from the RTL, and also returns how often the
// mechanisms the testbenches want to see occurred (saturation, nonzero
// correction). The helpers build codewords from H by Gaussian elimination
// over GF(2) and add Gaussian noise.
package ldpc_ref_pkg;
  import ldpc_pkg::*;

  localparam real S = 127.0 / 3.0;    // LSBs per unit of LLR

  // Channel LLR of a soft bit (Eq. 3.2 with sigma^2 = 1).
  function automatic int ref_llr(int s);
    real x, xq;
    int  k;
    x = 3.0 * s / 127.0;
    k = (x >= 0) ? $rtoi(x * 10.0 + 1e-9) : -$rtoi(-x * 10.0 + 1e-9);
    if (k > 30)  k = 30;
    if (k < -30) k = -30;
    xq = k / 10.0;
    return (xq >= 0) ? $rtoi(xq * S + 0.5) : -$rtoi(-xq * S + 0.5);
  endfunction

  function automatic int rnd(real v);
    return $rtoi(v * S + 0.5);
  endfunction

  // y(|x|) in LSBs for an integer argument x in LSBs, written from Tables 2.1,
  // 2.2 and the linear rule: bounds compared in real units, constants rounded
  // to LSBs, slope terms as integer shifts of x.
  function automatic int ref_y(cn_method_e m, int x);
    real xr;
    int  v;
    xr = x / S;
    v  = 0;
    case (m)
      CN_LUT: begin
        if      (xr < 0.2) v = rnd(0.65);
        else if (xr < 0.4) v = rnd(0.55);
        else if (xr < 0.7) v = rnd(0.45);
        else if (xr < 1.0) v = rnd(0.35);
        else if (xr < 1.5) v = rnd(0.25);
        else if (xr < 2.2) v = rnd(0.15);
        else if (xr < 4.5) v = rnd(0.05);
        else               v = 0;
      end
      CN_PIECEWISE: begin
        if      (xr < 0.5) v = rnd(0.7)    - (x >> 1);
        else if (xr < 1.6) v = rnd(0.575)  - (x >> 2);
        else if (xr < 2.2) v = rnd(0.375)  - (x >> 3);
        else if (xr < 3.2) v = rnd(0.2375) - (x >> 4);
        else if (xr < 4.4) v = rnd(0.1375) - (x >> 5);
        else               v = 0;
      end
      CN_LINEAR: v = rnd(0.6) - (x >> 2);
      default:   v = 0;
    endcase
    return (v < 0) ? 0 : v;
  endfunction

  function automatic int sat(int v);
    return (v > 127) ? 127 : (v < -127) ? -127 : v;
  endfunction

  typedef struct {
    logic [N-1:0] bits;
    int           iters;
    int           saturations;   // bit-node sums clipped
    int           corrections;   // check-node steps with a nonzero correction
  } ref_result_t;

  function automatic ref_result_t ref_decode(int sw [N], cn_method_e m, int max_iter);
    ref_result_t res;
    int lp [N];
    int q  [N][M];
    int r  [M][N];
    int bq [N];
    logic [N-1:0] c;
    logic synd;
    res.saturations = 0; res.corrections = 0; res.iters = 0; res.bits = '0;
    for (int i = 0; i < N; i++) begin
      lp[i] = ref_llr(sw[i]);
      for (int j = 0; j < M; j++) q[i][j] = lp[i];
    end
    for (int it = 1; it <= max_iter; it++) begin
      // check nodes
      for (int j = 0; j < M; j++)
        for (int i = 0; i < N; i++) begin
          int  mag, sgn, first;
          r[j][i] = 0;
          if (!H[j][i]) continue;
          mag = 0; sgn = 0; first = 1;
          for (int k = 0; k < N; k++) begin
            int a;
            if (!H[j][k] || k == i) continue;
            a = (q[k][j] < 0) ? -q[k][j] : q[k][j];
            if (q[k][j] < 0) sgn ^= 1;
            if (first) begin
              mag = a; first = 0;
            end else begin
              int mn, d;
              mn = (a < mag) ? a : mag;
              d  = ref_y(m, a + mag) - ref_y(m, (a > mag) ? a - mag : mag - a);
              if (d != 0) res.corrections++;
              mag = (mn + d < 0) ? 0 : mn + d;
            end
          end
          r[j][i] = sgn ? -mag : mag;
        end
      // bit nodes and output LLRs
      for (int i = 0; i < N; i++) begin
        int tot;
        tot = lp[i];
        for (int j = 0; j < M; j++) if (H[j][i]) tot += r[j][i];
        if (sat(tot) != tot) res.saturations++;
        bq[i] = sat(tot);
        for (int j = 0; j < M; j++)
          if (H[j][i]) begin
            int v;
            v = tot - r[j][i];
            if (sat(v) != v) res.saturations++;
            q[i][j] = sat(v);
          end else q[i][j] = 0;
        c[i] = (bq[i] < 0);
      end
      synd = 1'b0;
      for (int j = 0; j < M; j++) synd |= ^(c & H[j]);
      res.iters = it;
      res.bits  = c;
      if (!synd) break;
    end
    return res;
  endfunction

  function automatic logic syndrome_of(logic [N-1:0] c);
    logic s;
    s = 1'b0;
    for (int j = 0; j < M; j++) s |= ^(c & H[j]);
    return s;
  endfunction

  // Codeword from a message: H is row-reduced over GF(2); the columns without
  // a pivot carry the message bits, each pivot bit is then fixed by its row.
  function automatic logic [N-1:0] encode(logic [N-1:0] msg_seed);
    logic [N-1:0] h [M];
    int pivcol [M];
    int nrows, mi;
    logic [N-1:0] c, isfree;
    for (int j = 0; j < M; j++) h[j] = H[j];
    nrows = 0;
    for (int col = 0; col < N && nrows < M; col++) begin
      int p;
      p = -1;
      for (int j = nrows; j < M; j++) if (h[j][col] && p < 0) p = j;
      if (p < 0) continue;
      begin logic [N-1:0] t; t = h[p]; h[p] = h[nrows]; h[nrows] = t; end
      for (int j = 0; j < M; j++) if (j != nrows && h[j][col]) h[j] ^= h[nrows];
      pivcol[nrows] = col;
      nrows++;
    end
    isfree = '1;
    for (int j = 0; j < nrows; j++) isfree[pivcol[j]] = 1'b0;
    c = '0; mi = 0;
    for (int col = 0; col < N; col++)
      if (isfree[col]) begin c[col] = msg_seed[mi]; mi++; end
    for (int j = 0; j < nrows; j++) begin
      logic [N-1:0] rest;
      rest = h[j];
      rest[pivcol[j]] = 1'b0;
      c[pivcol[j]] = ^(rest & c);
    end
    return c;
  endfunction

  function automatic real gauss();
    real u1, u2;
    u1 = ($urandom % 1000000 + 1) / 1000001.0;
    u2 = ($urandom % 1000000) / 1000000.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(2.0 * 3.14159265358979 * u2);
  endfunction

  // Soft value of code bit b after BPSK (0 -> +1, 1 -> -1) and noise sigma.
  function automatic int soft_of(logic b, real sigma);
    real y;
    int  v;
    y = (b ? -1.0 : 1.0) + sigma * gauss();
    v = (y >= 0) ? $rtoi(y * 127.0 / 3.0 + 0.5) : -$rtoi(-y * 127.0 / 3.0 + 0.5);
    return (v > 127) ? 127 : (v < -128) ? -128 : v;
  endfunction

endpackage
