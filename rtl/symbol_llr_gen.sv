// symbol_llr_gen: symbol LLR generator for GF(16) symbols sent as 4 BPSK bits.
//
// For every received symbol the demodulator supplies four signed bit LLRs
// lambda_i = log(P(bit_i = 0) / P(bit_i = 1)), bit i being bit i of the
// symbol in polynomial form.  The most likely symbol S has bit i = 1 where
// lambda_i < 0, and the LLR of candidate a is
//     L(a) = ln P(S) - ln P(a) = sum over bits where a differs from S of |lambda_i|,
// so the most likely symbol has L = 0 and the others are positive.  The
// result is saturated to 5 bits and stored in power representation.  The
// formula follows the algorithm's initialisation; the bit order, the input
// width and the single register stage are this design's own choices.
//
// Interface and timing: one symbol per cycle on in_valid; out_valid/out_llr
// follow one cycle later.
module symbol_llr_gen
  import nbldpc_pkg::*;
#(
  parameter int unsigned CH_W = 6      // width of a bit LLR from the demodulator
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic signed [CH_W-1:0] in_llr [4],
  output logic                  out_valid,
  output llr_vec_t              out_llr
);

  llr_t     mag [4];
  logic [3:0] hard;
  llr_vec_t vec;

  always_comb begin
    for (int i = 0; i < 4; i++) begin
      logic [CH_W-1:0] ab;
      hard[i] = in_llr[i][CH_W-1];
      ab = hard[i] ? CH_W'(-in_llr[i]) : CH_W'(in_llr[i]);
      mag[i] = (ab > CH_W'(LLR_MAX)) ? llr_t'(LLR_MAX) : llr_t'(ab);
    end
    for (int unsigned k = 0; k < Q; k++) begin
      gf_t  diff;
      llr_t acc;
      diff = idx2poly(gf_idx_t'(k)) ^ hard;
      acc  = '0;
      for (int i = 0; i < 4; i++)
        if (diff[i]) acc = sat_add(acc, mag[i]);
      vec[k] = acc;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_llr   <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) out_llr <= vec;
    end
  end

endmodule
