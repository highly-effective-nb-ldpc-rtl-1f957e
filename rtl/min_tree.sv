// min_tree: minimum of a 16-entry LLR vector together with its index.
//
// A four-level binary comparator tree; every node passes on the smaller value
// and the index it came from, so the same tree yields the normalisation
// minimum of a message and the most likely symbol for the hard decision.  On
// a tie the lower index wins (this design's choice).  Purely combinational.
module min_tree
  import nbldpc_pkg::*;
(
  input  llr_vec_t v,
  output llr_t     min_val,
  output gf_idx_t  min_idx
);

  llr_t    val [5][Q];
  gf_idx_t idx [5][Q];

  always_comb begin
    val = '{default: '0};
    idx = '{default: '0};
    for (int unsigned i = 0; i < Q; i++) begin
      val[0][i] = v[i];
      idx[0][i] = gf_idx_t'(i);
    end
    for (int unsigned l = 0; l < 4; l++)
      for (int unsigned i = 0; i < (Q >> (l + 1)); i++) begin
        if (val[l][2*i+1] < val[l][2*i]) begin
          val[l+1][i] = val[l][2*i+1];
          idx[l+1][i] = idx[l][2*i+1];
        end else begin
          val[l+1][i] = val[l][2*i];
          idx[l+1][i] = idx[l][2*i];
        end
      end
  end

  assign min_val = val[4][0];
  assign min_idx = idx[4][0];

endmodule
