// ldpc_model_pkg: reference models used by the testbenches, standing in for
// the software side of the verification flow.
//
//  * build_h / encoder: the CCSDS (128,64) parity-check matrix written out as
//    64x128 bits from its own copy of the circulant table, reduced to row
//    echelon form over GF(2); a codeword is drawn by choosing the free
//    columns at random and solving the pivot columns.
//  * channel: BPSK, additive Gaussian noise (sum of 12 uniforms), rate 1/2,
//    quantised to a 3-bit LLR q = clip(round(2*y), -4, 3).
//  * golden_decode: the layered Normalized Min-Sum schedule with the same
//    word widths and saturation as the RTL, written with plain integers and
//    a forward edge walk (the RTL uses the inverse mapping), so that its
//    bits, iteration count and parity flag must match the RTL exactly.
package ldpc_model_pkg;

  localparam int MN = 128, MM = 64, MZ = 16;
  localparam int MAX_ITER_DEF = 10;

  // (block column, shift) per block row, -1 = zero block, 100+s = I + P^s
  localparam int BASE [4][8] = '{
    '{107,   2,  14,   6,  -1,   0,  13,   0},
    '{  6, 115,   0,   1,   0,  -1,   0,   7},
    '{  4,   1, 115,  14,  11,   0,  -1,   3},
    '{  0,   1,   9, 113,  14,   1,   0,  -1}};

  typedef bit [MN-1:0] cw_t;
  typedef int          llr_t [MN];

  // Check c's variables (8 each), filled by build_h.
  int chk_var [MM][8];
  bit hmat    [MM][MN];
  // Row echelon form of H for the encoder.
  bit  rref  [MM][MN];
  int  pivot_col [MM];
  int  n_piv;
  bit  is_piv [MN];

  function automatic void build_h();
    for (int r = 0; r < MM; r++) for (int c = 0; c < MN; c++) hmat[r][c] = 0;
    for (int br = 0; br < 4; br++)
      for (int bc = 0; bc < 8; bc++) begin
        int v;
        v = BASE[br][bc];
        if (v < 0) continue;
        for (int k = 0; k < MZ; k++) begin
          if (v >= 100) begin
            hmat[br*MZ+k][bc*MZ+k] ^= 1;
            hmat[br*MZ+k][bc*MZ+(k+v-100)%MZ] ^= 1;
          end else
            hmat[br*MZ+k][bc*MZ+(k+v)%MZ] ^= 1;
        end
      end
    for (int r = 0; r < MM; r++) begin
      int n;
      n = 0;
      for (int c = 0; c < MN; c++) if (hmat[r][c]) begin
        if (n < 8) chk_var[r][n] = c;
        n++;
      end
      if (n != 8) $display("MODEL: check %0d has degree %0d", r, n);
    end
    // Gauss-Jordan elimination over GF(2)
    rref = hmat;
    n_piv = 0;
    for (int c = 0; c < MN; c++) is_piv[c] = 0;
    for (int c = 0; c < MN && n_piv < MM; c++) begin
      int p;
      p = -1;
      for (int r = n_piv; r < MM; r++) if (rref[r][c]) begin p = r; break; end
      if (p < 0) continue;
      if (p != n_piv) for (int j = 0; j < MN; j++) begin
        bit t;
        t = rref[p][j]; rref[p][j] = rref[n_piv][j]; rref[n_piv][j] = t;
      end
      for (int r = 0; r < MM; r++)
        if (r != n_piv && rref[r][c]) for (int j = 0; j < MN; j++) rref[r][j] ^= rref[n_piv][j];
      pivot_col[n_piv] = c;
      is_piv[c] = 1;
      n_piv++;
    end
  endfunction

  function automatic bit syndrome_ok(cw_t x);
    for (int r = 0; r < MM; r++) begin
      bit s;
      s = 0;
      for (int j = 0; j < 8; j++) s ^= x[chk_var[r][j]];
      if (s) return 0;
    end
    return 1;
  endfunction

  // Random codeword of the code.
  function automatic cw_t random_codeword();
    cw_t x;
    x = '0;
    for (int c = 0; c < MN; c++) if (!is_piv[c]) x[c] = $urandom_range(1, 0) == 1;
    for (int r = 0; r < n_piv; r++) begin
      bit s;
      s = 0;
      for (int c = 0; c < MN; c++) if (!is_piv[c] && rref[r][c]) s ^= x[c];
      x[pivot_col[r]] = s;
    end
    return x;
  endfunction

  function automatic real gauss();
    real s;
    s = 0.0;
    for (int i = 0; i < 12; i++) s += real'($urandom_range(1000000, 0)) / 1000000.0;
    return s - 6.0;
  endfunction

  // BPSK over AWGN at the given Eb/N0 (dB), rate 1/2, quantised to 3 bits.
  function automatic void channel(cw_t x, real ebn0_db, output llr_t q);
    real sigma, y;
    int  t;
    sigma = $sqrt(1.0 / (2.0 * 0.5 * $pow(10.0, ebn0_db / 10.0)));
    for (int i = 0; i < MN; i++) begin
      y = (x[i] ? -1.0 : 1.0) + sigma * gauss();
      t = int'($floor(2.0 * y + 0.5));
      if (t > 3) t = 3;
      if (t < -4) t = -4;
      q[i] = t;
    end
  endfunction

  function automatic int sat(int v, int lim);
    return (v > lim) ? lim : (v < -lim) ? -lim : v;
  endfunction

  // Bit-exact reference of the RTL decoder.
  function automatic void golden_decode(llr_t q, int max_iter, output cw_t bits,
                                        output int iters, output bit ok);
    int app [MN];
    int rm  [MM][8];
    int acc [MN];
    int qv  [8];
    cw_t hd;
    for (int i = 0; i < MN; i++) app[i] = q[i] * 4;
    for (int r = 0; r < MM; r++) for (int j = 0; j < 8; j++) rm[r][j] = 0;
    iters = 0;
    forever begin
      for (int i = 0; i < MN; i++) hd[i] = app[i] < 0;
      ok = syndrome_ok(hd);
      if (ok || iters == max_iter) break;
      for (int l = 0; l < 4; l++) begin
        for (int i = 0; i < MN; i++) acc[i] = 0;
        for (int k = 0; k < MZ; k++) begin
          int r, m1, m2, i1, sp, mg, rn;
          r = l*MZ + k;
          m1 = 127; m2 = 127; i1 = 0; sp = 0;
          for (int j = 0; j < 8; j++) begin
            qv[j] = sat(app[chk_var[r][j]] - rm[r][j], 127);
            mg = qv[j] < 0 ? -qv[j] : qv[j];
            if (qv[j] < 0) sp ^= 1;
            if (mg < m1) begin m2 = m1; m1 = mg; i1 = j; end
            else if (mg < m2) m2 = mg;
          end
          for (int j = 0; j < 8; j++) begin
            mg = (j == i1) ? m2 : m1;
            if (mg > 31) mg = 31;
            rn = (3 * mg) / 4;
            if ((sp ^ (qv[j] < 0 ? 1 : 0)) != 0) rn = -rn;
            acc[chk_var[r][j]] += rn - rm[r][j];
            rm[r][j] = rn;
          end
        end
        for (int i = 0; i < MN; i++) app[i] = sat(app[i] + acc[i], 127);
      end
      iters++;
    end
    bits = hd;
  endfunction

endpackage
