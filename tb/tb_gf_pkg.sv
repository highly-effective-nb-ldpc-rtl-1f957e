// tb_gf_pkg: reference arithmetic for the decoder testbenches.
//
// GF(16) is computed here bit by bit (carry-less multiply reduced by
// x^4 + x + 1), independently of the tables in the design package.  The
// package also holds reference models of the elementary min-max operation,
// of the multiplication of a message by an H entry, and a codeword
// generator (Gaussian elimination of H over GF(16)).
package tb_gf_pkg;
  import nbldpc_pkg::*;

  function automatic logic [3:0] gmul(input logic [3:0] a, input logic [3:0] b);
    logic [7:0] p;
    p = '0;
    for (int i = 0; i < 4; i++) if (b[i]) p ^= 8'(a) << i;
    for (int i = 7; i >= 4; i--) if (p[i]) p ^= 8'b0001_0011 << (i - 4);
    return p[3:0];
  endfunction

  function automatic logic [3:0] ginv(input logic [3:0] a);
    for (int x = 1; x < 16; x++) if (gmul(a, 4'(x)) == 4'd1) return 4'(x);
    return 4'd0;
  endfunction

  function automatic logic [3:0] galpha(input int e);
    logic [3:0] p;
    p = 4'd1;
    for (int i = 0; i < e; i++) p = gmul(p, 4'd2);
    return p;
  endfunction

  // power index <-> polynomial
  function automatic logic [3:0] i2p(input int k);
    return (k == 0) ? 4'd0 : galpha(k - 1);
  endfunction

  function automatic int p2i(input logic [3:0] p);
    for (int k = 0; k < 16; k++) if (i2p(k) == p) return k;
    return 0;
  endfunction

  function automatic llr_vec_t rand_vec(input int maxv);
    llr_vec_t v;
    for (int k = 0; k < 16; k++) v[k] = llr_t'($urandom_range(0, maxv));
    return v;
  endfunction

  // min over c1 + c2 = c of max(a(c1), b(c2)), vectors in power index order
  function automatic llr_vec_t ref_minmax(input llr_vec_t a, input llr_vec_t b);
    llr_vec_t o;
    for (int k = 0; k < 16; k++) o[k] = llr_t'(LLR_MAX);
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) begin
        int   c;
        llr_t mx;
        c  = p2i(i2p(i) ^ i2p(j));
        mx = (a[i] > b[j]) ? a[i] : b[j];
        if (mx < o[c]) o[c] = mx;
      end
    return o;
  endfunction

  // vector of the variable h*x given the vector of x, h = alpha^e
  function automatic llr_vec_t ref_mul(input llr_vec_t v, input int e);
    llr_vec_t o;
    for (int k = 0; k < 16; k++) o[p2i(gmul(galpha(e), i2p(k)))] = v[k];
    return o;
  endfunction

  function automatic llr_vec_t ref_div(input llr_vec_t v, input int e);
    llr_vec_t o;
    for (int k = 0; k < 16; k++) o[k] = v[p2i(gmul(galpha(e), i2p(k)))];
    return o;
  endfunction

  // ---------------- codewords of an H given as h_rom_t ------------------
  logic [3:0] hmat [M][N];
  logic [3:0] rref [M][N];
  int         pivot_col [M];
  int         rank;

  function automatic void build_h(input h_rom_t h);
    for (int m = 0; m < M; m++) for (int n = 0; n < N; n++) hmat[m][n] = 4'd0;
    for (int m = 0; m < M; m++)
      for (int s = 0; s < DC; s++) hmat[m][h[m][s].col] = galpha(int'(h[m][s].exp));
    for (int m = 0; m < M; m++) for (int n = 0; n < N; n++) rref[m][n] = hmat[m][n];
    rank = 0;
    for (int c = 0; c < N && rank < M; c++) begin
      int p;
      p = -1;
      for (int r = rank; r < M; r++) if (rref[r][c] != 0 && p < 0) p = r;
      if (p >= 0) begin
        logic [3:0] inv;
        for (int n = 0; n < N; n++) begin
          logic [3:0] t;
          t = rref[p][n]; rref[p][n] = rref[rank][n]; rref[rank][n] = t;
        end
        inv = ginv(rref[rank][c]);
        for (int n = 0; n < N; n++) rref[rank][n] = gmul(rref[rank][n], inv);
        for (int r = 0; r < M; r++)
          if (r != rank && rref[r][c] != 0) begin
            logic [3:0] f;
            f = rref[r][c];
            for (int n = 0; n < N; n++) rref[r][n] ^= gmul(f, rref[rank][n]);
          end
        pivot_col[rank] = c;
        rank++;
      end
    end
  endfunction

  function automatic logic is_codeword(input logic [3:0] w [N]);
    for (int m = 0; m < M; m++) begin
      logic [3:0] s;
      s = 4'd0;
      for (int n = 0; n < N; n++) s ^= gmul(hmat[m][n], w[n]);
      if (s != 0) return 1'b0;
    end
    return 1'b1;
  endfunction

  function automatic void random_codeword(output logic [3:0] w [N]);
    logic is_piv [N];
    for (int n = 0; n < N; n++) is_piv[n] = 1'b0;
    for (int r = 0; r < rank; r++) is_piv[pivot_col[r]] = 1'b1;
    for (int n = 0; n < N; n++) w[n] = is_piv[n] ? 4'd0 : 4'($urandom_range(0, 15));
    for (int r = 0; r < rank; r++) begin
      logic [3:0] s;
      s = 4'd0;
      for (int n = 0; n < N; n++) if (!is_piv[n]) s ^= gmul(rref[r][n], w[n]);
      w[pivot_col[r]] = s;
    end
  endfunction

endpackage
