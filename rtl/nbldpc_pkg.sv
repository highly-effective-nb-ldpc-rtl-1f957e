// nbldpc_pkg: types, constants and GF(16) helpers shared by the NB-LDPC decoder.
//
// The decoder works on a (2,4)-regular non-binary LDPC code over GF(16) with
// N = 32 symbols (128 bits) and M = 16 parity checks, decoded with the min-max
// algorithm and 5-bit message quantisation, at most 18 iterations.  Those
// numbers come from the design description; everything else here is this
// design's own choice:
//   * GF(16) is built on the primitive polynomial x^4 + x + 1.
//   * A message vector holds 16 LLRs indexed in power representation:
//     index 0 is the zero element, index k (1..15) is alpha^(k-1).  Multiplying
//     every field element by alpha then rotates entries 1..15 and leaves entry 0
//     in place, which is what lets the min-max unit use fixed wiring.
//   * LLRs are unsigned distances from the most likely symbol (0 = most likely).
//   * A symbol on the hard-decision/output side is in polynomial form (4 bits).
//   * The default parity-check matrix is a structured (2,4) code computed by
//     default_h() below; any other (2,4) 16x32 matrix can be passed to the
//     decoder as a parameter.
package nbldpc_pkg;

  localparam int unsigned Q      = 16;  // field size
  localparam int unsigned LLR_W  = 5;   // message quantisation
  localparam int unsigned N      = 32;  // code length in symbols
  localparam int unsigned M      = 16;  // parity checks (rows of H)
  localparam int unsigned DC     = 4;   // check node degree
  localparam int unsigned DV     = 2;   // variable node degree
  localparam int unsigned MAX_ITER = 18;
  localparam int unsigned LLR_MAX = (1 << LLR_W) - 1;

  typedef logic [LLR_W-1:0] llr_t;
  typedef llr_t [Q-1:0]     llr_vec_t;   // 80 bits, entry k = power index k
  typedef logic [3:0]       gf_t;        // polynomial form
  typedef logic [3:0]       gf_idx_t;    // power-representation index

  // One non-zero entry of H: its column and the exponent e of alpha^e.
  typedef struct packed {
    logic [4:0] col;
    logic [3:0] exp;
  } h_entry_t;
  typedef h_entry_t [DC-1:0] h_row_t;
  typedef h_row_t   [M-1:0]  h_rom_t;

  // Column view of H: for variable n, the two rows it is connected to and the
  // slot (0..3) of the edge inside each row.
  typedef struct packed {
    logic [3:0] row;
    logic [1:0] slot;
  } edge_ref_t;
  typedef edge_ref_t [DV-1:0] col_ref_t;
  typedef col_ref_t  [N-1:0]  col_rom_t;

  // Check node unit controls, shared by all 16 CNUs.
  typedef enum logic {SEL1_LO, SEL1_Q23} sel1_e;
  typedef enum logic [1:0] {SEL2_Q23, SEL2_SR1, SEL2_SR4} sel2_e;
  typedef struct packed {
    logic       load_sr1;   // register Q(m,n1)
    logic       load_sr4;   // register Q(m,n4)
    logic       mm_start;   // start an elementary min-max step
    logic       load_l1;
    logic       load_l2;
    sel1_e      sel1;
    sel2_e      sel2;
    logic [1:0] rd_slot;    // slot of the Q vector on the memory read port
    logic [1:0] wr_slot;    // slot of the R vector being written back
  } cnu_ctrl_t;

  // Variable node unit operating modes.
  typedef enum logic [1:0] {
    VNU_MSG_STORE,   // Q' = A + L, and keep A + L in the 16 registers
    VNU_MSG,         // Q' = A + L
    VNU_POST         // L_post = A + registers, gives the hard decision
  } vnu_mode_e;

  // Message memory map: Q vectors at 0..3, R vectors at 4..7 (by slot).
  localparam logic ADDR_Q = 1'b0;
  localparam logic ADDR_R = 1'b1;

  // alpha^e in polynomial form, e = 0..14, primitive polynomial x^4 + x + 1
  // (a 15-entry table: alpha^(e+1) = alpha^e * x reduced by x^4 = x + 1).
  function automatic gf_t gf_exp(input int unsigned e);
    unique case (e % 15)
      0:  return 4'h1;   1:  return 4'h2;   2:  return 4'h4;   3:  return 4'h8;
      4:  return 4'h3;   5:  return 4'h6;   6:  return 4'hC;   7:  return 4'hB;
      8:  return 4'h5;   9:  return 4'hA;   10: return 4'h7;   11: return 4'hE;
      12: return 4'hF;   13: return 4'hD;   default: return 4'h9;
    endcase
  endfunction

  // Discrete log of a non-zero element, 0..14 (inverse of the table above).
  function automatic int unsigned gf_log(input gf_t p);
    unique case (p)
      4'h1: return 0;   4'h2: return 1;   4'h4: return 2;   4'h8: return 3;
      4'h3: return 4;   4'h6: return 5;   4'hC: return 6;   4'hB: return 7;
      4'h5: return 8;   4'hA: return 9;   4'h7: return 10;  4'hE: return 11;
      4'hF: return 12;  4'hD: return 13;  4'h9: return 14;
      default: return 0;
    endcase
  endfunction

  function automatic gf_t idx2poly(input gf_idx_t k);
    return (k == 0) ? 4'd0 : gf_exp(int'(k) - 1);
  endfunction

  function automatic gf_idx_t poly2idx(input gf_t p);
    return (p == 0) ? 4'd0 : gf_idx_t'(gf_log(p) + 1);
  endfunction

  // Product of a field element (polynomial form) and alpha^e.
  function automatic gf_t gf_mul_exp(input gf_t p, input logic [3:0] e);
    return (p == 0) ? 4'd0 : gf_exp((gf_log(p) + int'(e)) % 15);
  endfunction

  // Power index of alpha^e times the element of power index k (k != 0).
  function automatic gf_idx_t idx_mul(input gf_idx_t k, input int unsigned e);
    return (k == 0) ? 4'd0 : gf_idx_t'(((int'(k) - 1 + e) % 15) + 1);
  endfunction

  // Multiplication of the random variable by h = alpha^e: the result V' is the
  // LLR vector of h*a, V'(h*a) = V(a).
  function automatic llr_vec_t vec_mul(input llr_vec_t v, input logic [3:0] e);
    llr_vec_t r;
    r[0] = v[0];
    for (int unsigned k = 1; k < Q; k++) r[idx_mul(gf_idx_t'(k), int'(e))] = v[k];
    return r;
  endfunction

  // Division by h = alpha^e: V(a) = V'(h*a).
  function automatic llr_vec_t vec_div(input llr_vec_t v, input logic [3:0] e);
    llr_vec_t r;
    r[0] = v[0];
    for (int unsigned k = 1; k < Q; k++) r[k] = v[idx_mul(gf_idx_t'(k), int'(e))];
    return r;
  endfunction

  // One rotation step: every field element multiplied by alpha.  After the
  // step, entry k holds the old entry of alpha*elem(k).
  function automatic llr_vec_t vec_rot(input llr_vec_t v);
    llr_vec_t r;
    r[0] = v[0];
    for (int unsigned k = 1; k < Q - 1; k++) r[k] = v[k+1];
    r[Q-1] = v[1];
    return r;
  endfunction

  // Fixed min-max wiring: index of 1 + elem(j), j = 0..15.
  function automatic gf_idx_t one_plus(input gf_idx_t j);
    return poly2idx(idx2poly(j) ^ 4'b0001);
  endfunction

  function automatic logic [LLR_W-1:0] sat_add(input llr_t a, input llr_t b);
    logic [LLR_W:0] s;
    s = {1'b0, a} + {1'b0, b};
    return s[LLR_W] ? llr_t'(LLR_MAX) : s[LLR_W-1:0];
  endfunction

  // Default parity-check matrix.  Row m holds columns m, (m+13) mod 16,
  // 16+m and 16+((m+9) mod 16), so column n < 16 meets rows n and n+3, column
  // 16+j meets rows j and j+7 (mod 16).  Entry (m, slot s) is alpha^e with
  // e = (7m + 4s + 2) mod 15.
  function automatic h_rom_t default_h();
    h_rom_t h;
    for (int unsigned m = 0; m < M; m++) begin
      h[m][0].col = 5'(m);
      h[m][1].col = 5'((m + 13) % 16);
      h[m][2].col = 5'(16 + m);
      h[m][3].col = 5'(16 + (m + 9) % 16);
      for (int unsigned s = 0; s < DC; s++)
        h[m][s].exp = 4'((7 * m + 4 * s + 2) % 15);
    end
    return h;
  endfunction

  // Column view of a row-ordered H.  The first edge found (lowest row) is
  // edge 0.
  function automatic col_rom_t col_view(input h_rom_t h);
    col_rom_t c;
    int unsigned cnt [N];
    c = '0;
    for (int unsigned n = 0; n < N; n++) cnt[n] = 0;
    for (int unsigned m = 0; m < M; m++)
      for (int unsigned s = 0; s < DC; s++) begin
        int unsigned n;
        n = int'(h[m][s].col);
        if (cnt[n] < DV) begin
          c[n][cnt[n]].row  = 4'(m);
          c[n][cnt[n]].slot = 2'(s);
          cnt[n]++;
        end
      end
    return c;
  endfunction

endpackage
