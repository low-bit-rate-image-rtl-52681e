// Reference models used by the testbenches, written independently of the
// RTL, straight from the algorithm:
//  * lift53       - 1-D 5/3 lifting of one line with the border rule
//                   x(-2) = x(-1) = x(0), x(N) = x(N-2);
//  * dwt_ref      - LEVELS-level 2-D transform of an N x N tile, level-1
//                   details dropped, final bands in sign-magnitude and
//                   shifted left by their normalization exponent (LL_L by L,
//                   HL_j/LH_j by j-1, HH_j by j-2), magnitudes saturated to 15
//                   bits; result row-major in an (N/2) x (N/2) array;
//  * morton       - row/column to Morton (Z-order) index;
//  * dmax_ref / gmax_ref - descendant magnitudes by explicit tree walk;
//  * nls_ref      - the modified NLS coder (RP, IPP, ISP per bit plane,
//                   markers as in the encoder's pseudo-code), producing the
//                   byte stream and counting what happened.
package tb_ref_pkg;

  typedef int int_da[];
  typedef byte unsigned byte_q[$];

  localparam int MIP = 0, MSP = 1, MD = 2, MG = 3, MN2 = 4, MN3 = 5;

  typedef struct {
    int rp_bits;       // refinement bits
    int new_sig;       // coefficients that became significant
    int d_split;       // significant D sets
    int g_split;       // significant G sets
    int planes;        // bit planes started
    bit budget_stop;   // stopped by the byte budget
    bit pad;           // last byte padded
  } nls_stats_t;

  function automatic int fdiv(int a, int sh);
    return a >>> sh;     // floor division by 2^sh
  endfunction

  // 1-D lifting of x[0..n-1]; L to lo[0..n/2-1], H to hi[0..n/2-1]
  function automatic void lift53(input int x[], input int n,
                                 output int lo[], output int hi[]);
    int xe[];
    xe = new[n + 3];
    // xe[i+2] = x(i), i = -2 .. n
    for (int i = 0; i < n; i++) xe[i + 2] = x[i];
    xe[0] = x[0]; xe[1] = x[0];    // x(-2), x(-1)
    xe[n + 2] = x[n - 2];          // x(N)
    lo = new[n / 2];
    hi = new[n / 2];
    for (int k = 0; k < n / 2; k++)
      hi[k] = xe[2*k + 3] - fdiv(xe[2*k + 2] + xe[2*k + 4], 1);
    for (int k = 0; k < n / 2; k++) begin
      int hm1;
      if (k == 0) hm1 = xe[1] - fdiv(xe[0] + xe[2], 1);   // H(-1)
      else        hm1 = hi[k - 1];
      lo[k] = xe[2*k + 2] + fdiv(hm1 + hi[k] + 2, 2);
    end
  endfunction

  function automatic int to_sm(int v, int sh);
    int m;
    m = (v < 0) ? -v : v;
    m = m << sh;
    if (m > 32767) m = 32767;
    return ((v < 0 && m != 0) ? 32768 : 0) | m;
  endfunction

  function automatic int wrap16(int v);
    return int'(shortint'(v));
  endfunction

  // pixels row-major N x N; result (N/2) x (N/2) row-major, sign-magnitude
  function automatic int_da dwt_ref(input int px[], input int n, input int levels);
    int h2, s;
    int a[];       // (N/2)x(N/2) working pyramid
    int row[], lo[], hi[], col[];
    int t[];       // N x N/2 for level 1
    int res[];
    h2 = n / 2;
    a = new[h2 * h2];
    t = new[n * h2];
    row = new[n];
    // level 1: rows, keep L
    for (int r = 0; r < n; r++) begin
      for (int c = 0; c < n; c++) row[c] = px[r*n + c];
      lift53(row, n, lo, hi);
      for (int c = 0; c < h2; c++) t[r*h2 + c] = wrap16(lo[c]);
    end
    // level 1: columns, keep L
    col = new[n];
    for (int c = 0; c < h2; c++) begin
      for (int r = 0; r < n; r++) col[r] = t[r*h2 + c];
      lift53(col, n, lo, hi);
      for (int r = 0; r < h2; r++) a[r*h2 + c] = wrap16(lo[r]);
    end
    res = new[h2 * h2];
    for (int lv = 2; lv <= levels; lv++) begin
      int b[];
      s = n >> (lv - 1);
      b = new[h2 * h2];
      foreach (a[i]) b[i] = a[i];
      row = new[s];
      for (int r = 0; r < s; r++) begin
        for (int c = 0; c < s; c++) row[c] = a[r*h2 + c];
        lift53(row, s, lo, hi);
        for (int c = 0; c < s/2; c++) begin
          b[r*h2 + c]       = wrap16(lo[c]);
          b[r*h2 + s/2 + c] = wrap16(hi[c]);
        end
      end
      col = new[s];
      for (int c = 0; c < s; c++) begin
        for (int r = 0; r < s; r++) col[r] = b[r*h2 + c];
        lift53(col, s, lo, hi);
        for (int r = 0; r < s/2; r++) begin
          a[r*h2 + c]         = wrap16(lo[r]);
          a[(s/2 + r)*h2 + c] = wrap16(hi[r]);
          // final bands of this level
          if (c >= s/2) res[r*h2 + c] = to_sm(lo[r], lv - 1);              // HL
          res[(s/2 + r)*h2 + c] = to_sm(hi[r], (c >= s/2) ? lv - 2 : lv - 1); // HH / LH
          if (c < s/2 && lv == levels) res[r*h2 + c] = to_sm(lo[r], levels); // LL
        end
      end
    end
    return res;
  endfunction

  function automatic int morton(int r, int c, int bits);
    int m = 0;
    for (int k = 0; k < bits; k++) begin
      m |= ((c >> k) & 1) << (2*k);
      m |= ((r >> k) & 1) << (2*k + 1);
    end
    return m;
  endfunction

  // OR of magnitudes of all descendants of k (Morton index)
  function automatic int dmax_ref(input int val[], input int k);
    int nc, acc;
    nc = val.size();
    acc = 0;
    if (k == 0 || 4*k >= nc) return 0;
    for (int c = 4*k; c < 4*k + 4; c++) acc |= (val[c] & 32'h7fff) | dmax_ref(val, c);
    return acc;
  endfunction

  function automatic int gmax_ref(input int val[], input int k);
    int acc = 0;
    if (k == 0 || 16*k >= val.size()) return 0;
    for (int c = 4*k; c < 4*k + 4; c++) acc |= dmax_ref(val, c);
    return acc;
  endfunction

  // initial threshold: largest power of two not above the largest magnitude
  function automatic int init_th_ref(input int w[]);
    int mx = 0, th = 0;
    foreach (w[i]) if ((w[i] & 32'h7fff) > mx) mx = w[i] & 32'h7fff;
    for (int b = 0; b < 15; b++) if ((1 << b) <= mx) th = 1 << b;
    return th;
  endfunction

  // modified NLS coder on Morton-ordered sign-magnitude coefficients
  function automatic byte_q nls_ref(input int w[], input int levels, input int desired,
                                    output nls_stats_t st);
    int nc, ndc, th, mx, nbits, acc, n;
    int mark[];
    int dm[], gm[];
    byte_q out;
    bit stop;
    nc  = w.size();
    ndc = nc >> (2 * (levels - 1));
    mark = new[nc];
    dm = new[nc / 4];
    gm = new[nc / 4];
    for (int k = 0; k < nc / 4; k++) begin
      dm[k] = dmax_ref(w, k);
      gm[k] = gmax_ref(w, k);
    end
    st = '{default: 0};
    foreach (mark[i]) mark[i] = MIP;
    for (int i = ndc; i < 4*ndc; i += 4) begin
      mark[i] = MD;
      if (4*i < nc)  mark[4*i]  = MN2;
      if (16*i < nc) mark[16*i] = MN3;
    end
    mx = 0;
    foreach (w[i]) if ((w[i] & 32'h7fff) > mx) mx = w[i] & 32'h7fff;
    th = 0;
    for (int b = 0; b < 15; b++) if ((1 << b) <= mx) th = 1 << b;
    nbits = 0; acc = 0; stop = (desired == 0);
    if (stop) st.budget_stop = 1;
    while (th > 0 && !stop) begin
      st.planes++;
      for (int pass = 0; pass < 3 && !stop; pass++) begin
        n = 0;
        while (n < nc && !stop) begin
          int m, sig;
          m = mark[n];
          if (pass == 0) begin
            if (m == MSP) begin
              emit(((w[n] & th) != 0), out, nbits, acc, desired, stop);
              st.rp_bits++;
              n++;
            end else n += skip(m);
          end else if (pass == 1) begin
            if (m == MIP) begin
              sig = ((w[n] & th) != 0);
              emit(sig, out, nbits, acc, desired, stop);
              if (sig) begin
                emit(w[n] >> 15, out, nbits, acc, desired, stop);
                mark[n] = MSP;
                st.new_sig++;
              end
              n++;
            end else n += skip(m);
          end else begin
            if (m == MD) begin
              sig = ((dm[n/4] & th) != 0);
              emit(sig, out, nbits, acc, desired, stop);
              if (sig) begin
                st.d_split++;
                if (4*n < nc) mark[4*n] = MG;
                for (int j = n; j < n + 4; j++) begin
                  int s2;
                  s2 = ((w[j] & th) != 0);
                  emit(s2, out, nbits, acc, desired, stop);
                  if (s2) begin
                    emit(w[j] >> 15, out, nbits, acc, desired, stop);
                    mark[j] = MSP;
                    st.new_sig++;
                  end else mark[j] = MIP;
                end
              end
              n += 4;
            end else if (m == MG) begin
              sig = ((gm[n/16] & th) != 0);
              emit(sig, out, nbits, acc, desired, stop);
              if (sig) begin
                st.g_split++;
                for (int j = n; j < n + 16; j += 4) begin
                  mark[j] = MD;
                  if (4*j < nc)  mark[4*j]  = MN2;
                  if (16*j < nc) mark[16*j] = MN3;
                end
              end else n += 16;
            end else n += isskip(m);
          end
        end
      end
      th = th >> 1;
    end
    if (stop) st.budget_stop = 1;
    if (!stop && nbits != 0) begin
      out.push_back(byte'(acc << (8 - nbits)));
      st.pad = 1;
    end
    return out;
  endfunction

  function automatic int skip(int m);
    case (m)
      MIP, MSP: return 1;
      MD:       return 4;
      MG, MN2:  return 16;
      default:  return 64;
    endcase
  endfunction

  function automatic int isskip(int m);
    case (m)
      MIP, MSP, MD: return 4;
      MG, MN2:      return 16;
      default:      return 64;
    endcase
  endfunction

  function automatic void emit(input int b, ref byte_q out, ref int nbits, ref int acc,
                               input int desired, ref bit stop);
    if (stop) return;
    acc = (acc << 1) | (b & 1);
    nbits++;
    if (nbits == 8) begin
      out.push_back(byte'(acc));
      nbits = 0;
      acc = 0;
      if (out.size() == desired) stop = 1;
    end
  endfunction

  // test tiles: 0 random noise, 1 smooth gradients with a bright disc and
  // mild noise (image-like), 2 flat grey, 3 sharp stripes
  function automatic int_da gen_tile(int n, int kind);
    int px[];
    px = new[n * n];
    for (int r = 0; r < n; r++)
      for (int c = 0; c < n; c++) begin
        int v;
        case (kind)
          0: v = $urandom_range(0, 255);
          1: begin
            int dr = r - n/3, dc = c - n/2;
            v = 40 + (r * 100) / n + (c * 60) / n + $urandom_range(0, 6);
            if (dr*dr + dc*dc < (n/5)*(n/5)) v += 80;
          end
          2: v = 128;
          default: v = ((c / 3) % 2) ? 230 : 20;
        endcase
        px[r*n + c] = (v > 255) ? 255 : v;
      end
    return px;
  endfunction

  // Morton-ordered copy of a row-major (h x h) coefficient array
  function automatic int_da to_morton(input int a[], input int h);
    int m[], bits;
    m = new[h * h];
    bits = $clog2(h);
    for (int r = 0; r < h; r++)
      for (int c = 0; c < h; c++) m[morton(r, c, bits)] = a[r*h + c];
    return m;
  endfunction

  // random Morton-ordered sign-magnitude coefficients whose magnitudes fall
  // off towards the finer levels, as in a wavelet pyramid; kind 1 gives a
  // sparse set, kind 2 only zeros
  function automatic int_da rand_coefs(int nc, int levels, int kind);
    int w[], ndc, g, lim;
    w = new[nc];
    ndc = nc >> (2 * (levels - 1));
    foreach (w[i]) begin
      g = 0;
      while (g < levels - 1 && i >= (ndc << (2 * g))) g++;
      lim = 4096 >> (2 * g);
      if (kind == 2 || (kind == 1 && $urandom_range(0, 3) != 0)) w[i] = 0;
      else w[i] = ($urandom_range(0, 1) << 15) | $urandom_range(0, lim);
      if ((w[i] & 32'h7fff) == 0) w[i] = 0;
    end
    return w;
  endfunction

endpackage
