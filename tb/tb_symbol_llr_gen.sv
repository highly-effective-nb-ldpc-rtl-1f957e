// tb_symbol_llr_gen: random bit LLRs (including the extreme values) are fed
// one symbol per cycle; one cycle later the 16-entry symbol LLR vector must
// equal  L(a) = sum over bits i where a differs from the hard decision of
// min(|lambda_i|, 31), saturated at 31, for every symbol a.
module tb_symbol_llr_gen;
  import nbldpc_pkg::*;
  import tb_gf_pkg::*;

  localparam int CH_W = 6;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic signed [CH_W-1:0] in_llr [4];
  logic out_valid;
  llr_vec_t out_llr;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  symbol_llr_gen #(.CH_W(CH_W)) dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid),
    .in_llr(in_llr), .out_valid(out_valid), .out_llr(out_llr));

  initial begin
    for (int i = 0; i < 4; i++) in_llr[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 300; t++) begin
      int lam [4];
      llr_vec_t e;
      @(negedge clk);
      in_valid = 1'b1;
      for (int i = 0; i < 4; i++) begin
        lam[i] = (t % 7 == 0) ? ($urandom_range(0, 1) ? 31 : -32) : $urandom_range(0, 63) - 32;
        in_llr[i] = CH_W'(lam[i]);
      end
      for (int k = 0; k < 16; k++) begin
        int s;
        logic [3:0] a;
        a = i2p(k);
        s = 0;
        for (int i = 0; i < 4; i++)
          if (a[i] != (lam[i] < 0)) s += (lam[i] < 0) ? ((-lam[i] > 31) ? 31 : -lam[i]) : lam[i];
        e[k] = llr_t'((s > 31) ? 31 : s);
      end
      @(negedge clk);
      in_valid = 1'b0;
      checks++;
      if (!out_valid || out_llr !== e) begin
        failures++;
        $display("FAIL: valid=%0d llr=%h expected %h", out_valid, out_llr, e);
      end
      @(negedge clk);
      checks++;
      if (out_valid) begin
        failures++;
        $display("FAIL: valid without input");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
