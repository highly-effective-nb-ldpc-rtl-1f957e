// tb_decoder_other_h: the decoder built for a different parity-check matrix.
//
// The decoder is meant to serve any (2,4)-regular 16 x 32 code over GF(16)
// by changing only the H ROM.  Here H comes from a socket permutation: the
// 64 edge sockets (two per column) are permuted by i -> (23 i + 5) mod 64
// and dealt to the rows four at a time; entry (m, s) of column n is
// alpha^((11m + 3s + n) mod 15).  Clean frames must be decoded at the first
// check, lightly corrupted frames must be corrected to the word sent, and
// random frames must fail at the iteration limit.
module tb_decoder_other_h;
  import nbldpc_pkg::*;
  import tb_gf_pkg::*;

  function automatic h_rom_t other_h();
    h_rom_t h;
    for (int m = 0; m < 16; m++)
      for (int s = 0; s < 4; s++) begin
        int n;
        n = (((4 * m + s) * 23 + 5) % 64) / 2;
        h[m][s].col = 5'(n);
        h[m][s].exp = 4'((11 * m + 3 * s + n) % 15);
      end
    return h;
  endfunction

  localparam h_rom_t HO = other_h();
  localparam int CH_W = 6;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic ch_valid = 1'b0;
  logic signed [CH_W-1:0] ch_llr [4];
  logic ch_ready, dec_busy, dec_done, dec_success;
  logic [4:0] dec_iter;
  gf_t [N-1:0] codeword;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  nbldpc_decoder #(.H(HO)) dut (
    .clk(clk), .rst_n(rst_n), .ch_valid(ch_valid), .ch_llr(ch_llr),
    .ch_ready(ch_ready), .dec_busy(dec_busy), .dec_done(dec_done),
    .dec_success(dec_success), .dec_iter(dec_iter), .codeword(codeword)
  );

  task automatic run(input int kind);   // 0 clean, 1 noisy, 2 random
    logic [3:0] w [N];
    logic [3:0] got [N];
    logic signed [CH_W-1:0] fr [N][4];
    int k;
    random_codeword(w);
    for (int n = 0; n < N; n++)
      for (int i = 0; i < 4; i++) begin
        int mag;
        mag = $urandom_range(10, 24);
        if (kind == 2) fr[n][i] = $urandom_range(0, 1) ? CH_W'($urandom_range(0, 12)) : -CH_W'($urandom_range(0, 12));
        else           fr[n][i] = w[n][i] ? -CH_W'(mag) : CH_W'(mag);
      end
    if (kind == 1)
      for (int e = 0; e < 3; e++) begin
        int n, i;
        n = $urandom_range(0, N - 1);
        i = $urandom_range(0, 3);
        fr[n][i] = w[n][i] ? CH_W'($urandom_range(1, 5)) : -CH_W'($urandom_range(1, 5));
      end
    k = 0;
    while (k < N) begin
      @(negedge clk);
      ch_valid = 1'b1;
      for (int i = 0; i < 4; i++) ch_llr[i] = fr[k][i];
      @(posedge clk);
      if (ch_ready) k++;
    end
    @(negedge clk);
    ch_valid = 1'b0;
    while (!dec_done) begin @(posedge clk); #1; end
    for (int n = 0; n < N; n++) got[n] = codeword[n];
    checks++;
    if (kind == 0 && !(dec_success && dec_iter == 0 && got == w)) begin
      failures++;
      $display("FAIL: clean frame success=%0d iter=%0d", dec_success, dec_iter);
    end
    if (kind == 1 && !(dec_success && got == w)) begin
      failures++;
      $display("FAIL: noisy frame success=%0d iter=%0d", dec_success, dec_iter);
    end
    if (kind == 2 && !(!dec_success && dec_iter == 5'(MAX_ITER))) begin
      failures++;
      $display("FAIL: random frame success=%0d iter=%0d", dec_success, dec_iter);
    end
    $display("kind %0d: success=%0d iterations=%0d", kind, dec_success, dec_iter);
  endtask

  initial begin
    for (int i = 0; i < 4; i++) ch_llr[i] = '0;
    build_h(HO);
    $display("rank of H = %0d", rank);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run(0);
    for (int t = 0; t < 8; t++) run(1);
    run(2);
    run(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
