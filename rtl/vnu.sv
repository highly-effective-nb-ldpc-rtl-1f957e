// vnu: low-area variable node unit for degree-2 variable nodes over GF(16).
//
// One adder row adds an input A (a check message R, or zero in the first
// iteration) to an input B (the channel LLR vector L_n, or the 16 registers);
// a min tree finds the minimum of the sum and its index, and a subtractor row
// normalises the sum so that its most likely symbol has LLR 0.  With the two
// check neighbours m1, m2 of variable n, one variable node takes three cycles:
//   VNU_MSG_STORE  A = R(m2,n), B = L_n  -> Q(m1,n); registers <= R(m2,n)+L_n
//   VNU_MSG        A = R(m1,n), B = L_n  -> Q(m2,n)
//   VNU_POST       A = R(m1,n), B = registers -> a-posteriori vector; the
//                  min tree index is the hard-decision symbol.
// So each message takes one cycle and the hard decision one extra cycle that
// reuses the adders and the comparator tree, as in the design description.
// Sums saturate at the largest 5-bit value (this design's choice).
//
// Interface and timing.  Everything is combinational from the inputs except
// the 16 registers, written at the clock edge in VNU_MSG_STORE.  zero_r
// selects 0 instead of r_in (first iteration).  hd_sym is the hard decision
// in polynomial form, meaningful in VNU_POST.
module vnu
  import nbldpc_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  vnu_mode_e mode,
  input  logic      zero_r,
  input  llr_vec_t  r_in,
  input  llr_vec_t  l_in,
  output llr_vec_t  q_out,
  output gf_t       hd_sym
);

  llr_vec_t a, b, sum, regs_q;
  llr_t     mn;
  gf_idx_t  mn_idx;

  always_comb begin
    a = zero_r ? '0 : r_in;                       // multiplexer A
    b = (mode == VNU_POST) ? regs_q : l_in;       // multiplexer B
    for (int unsigned k = 0; k < Q; k++) sum[k] = sat_add(a[k], b[k]);
  end

  min_tree u_tree (.v(sum), .min_val(mn), .min_idx(mn_idx));

  always_comb
    for (int unsigned k = 0; k < Q; k++) q_out[k] = sum[k] - mn;

  assign hd_sym = idx2poly(mn_idx);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                      regs_q <= '0;
    else if (mode == VNU_MSG_STORE)  regs_q <= sum;
  end

endmodule
