// tb_parity_check: loads codewords of the default H (pass expected) and
// codewords with one or more symbols changed (fail expected), starts the
// check and compares pass with an independent syndrome computation; done
// must come 17 cycles after start (start cycle, then one row per cycle), and the stored word must be output.
module tb_parity_check;
  import nbldpc_pkg::*;
  import tb_gf_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic hd_we = 1'b0, start = 1'b0;
  logic [4:0] hd_addr = '0;
  gf_t hd_sym = '0;
  logic busy, done, pass;
  gf_t [N-1:0] codeword;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  parity_check dut (.clk(clk), .rst_n(rst_n), .h(default_h()), .hd_we(hd_we),
    .hd_addr(hd_addr), .hd_sym(hd_sym), .start(start), .busy(busy), .done(done),
    .pass(pass), .codeword(codeword));

  initial begin
    logic [3:0] w [N];
    build_h(default_h());
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 60; t++) begin
      int cyc;
      random_codeword(w);
      if (t % 2 == 1) begin
        int ne;
        ne = $urandom_range(1, 3);
        for (int e = 0; e < ne; e++) begin
          int n;
          n = $urandom_range(0, N - 1);
          w[n] ^= 4'($urandom_range(1, 15));
        end
      end
      for (int n = 0; n < N; n++) begin
        @(negedge clk);
        hd_we = 1'b1; hd_addr = 5'(n); hd_sym = w[n];
      end
      @(negedge clk);
      hd_we = 1'b0; start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      checks++;
      if (pass !== is_codeword(w) || cyc != 17) begin
        failures++;
        $display("FAIL: pass=%0d expected %0d, %0d cycles", pass, is_codeword(w), cyc);
      end
      checks++;
      for (int n = 0; n < N; n++)
        if (codeword[n] !== w[n]) begin
          failures++;
          $display("FAIL: stored symbol %0d", n);
          break;
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
