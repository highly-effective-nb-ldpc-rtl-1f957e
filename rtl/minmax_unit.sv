// minmax_unit: one elementary min-max step of the forward-backward check node
// algorithm,  Lo(c) = min over c1 + c2 = c of max(L1(c1), L2(c2)),  c in GF(16).
//
// How it works.  L1, L2 and Lo are kept in 16-entry registers in power
// representation (entry 0 = zero element, entry k = alpha^(k-1)).  Rotating
// entries 1..15 by one place multiplies every field element by alpha, and
// because alpha*x + alpha*y = alpha*(x + y) the three registers can be rotated
// together while one fixed network of 16 max and 16 min cells is applied:
// in every compute cycle, entry 1 of L1 (the element alpha^t after t
// rotations) is paired with every entry j of L2 and the result goes to the
// entry of Lo that stands for 1 + elem(j).  Pairs with c1 = 0 are handled when
// the step starts, by initialising Lo(c) = max(L1(0), L2(c)).  After 15
// rotations every register is back in its natural order and Lo is complete.
// Keeping the operands in shift registers and using a fixed min/max wiring
// follows the design description; the exact per-cycle pairing is this
// design's own.
//
// Interface and timing.  A step starts with a one-cycle pulse on start; in
// that cycle L1 and/or L2 are loaded from in_l1/in_l2 if load_l1/load_l2 are
// set, otherwise they keep their previous contents (which are back in natural
// order at the end of every step).  Lo is valid, and done is high, 16 cycles
// after start and stays so until the next start.  A new step may start in the
// cycle in which done first rises, using lo as an input.
module minmax_unit
  import nbldpc_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     start,
  input  logic     load_l1,
  input  logic     load_l2,
  input  llr_vec_t in_l1,
  input  llr_vec_t in_l2,
  output llr_vec_t lo,
  output logic     done
);

  llr_vec_t   l1_q, l2_q, lo_q;
  logic [3:0] cnt_q;        // compute cycles still to go
  llr_vec_t   l1_new, l2_new, lo_init, lo_upd;

  always_comb begin
    l1_new = load_l1 ? in_l1 : l1_q;
    l2_new = load_l2 ? in_l2 : l2_q;
    for (int unsigned j = 0; j < Q; j++)
      lo_init[j] = (l1_new[0] > l2_new[j]) ? l1_new[0] : l2_new[j];
    // fixed min-max network
    lo_upd = lo_q;
    for (int unsigned j = 0; j < Q; j++) begin
      llr_t mx;
      gf_idx_t s;
      mx = (l1_q[1] > l2_q[j]) ? l1_q[1] : l2_q[j];
      s  = one_plus(gf_idx_t'(j));
      if (mx < lo_q[s]) lo_upd[s] = mx;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      l1_q  <= '0;
      l2_q  <= '0;
      lo_q  <= '0;
      cnt_q <= '0;
    end else if (start) begin
      l1_q  <= l1_new;
      l2_q  <= l2_new;
      lo_q  <= lo_init;
      cnt_q <= 4'(Q - 1);
    end else if (cnt_q != 0) begin
      l1_q  <= vec_rot(l1_q);
      l2_q  <= vec_rot(l2_q);
      lo_q  <= vec_rot(lo_upd);
      cnt_q <= cnt_q - 1'b1;
    end
  end

  assign lo   = lo_q;
  assign done = (cnt_q == 0);

endmodule
