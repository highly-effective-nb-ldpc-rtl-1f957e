// tb_awgn_cer: codeword error rate of the decoder over a BPSK / AWGN channel.
//
// Random codewords of the default H are sent as BPSK (bit 0 -> +1, bit 1 ->
// -1, code rate 1/2) with Gaussian noise (Box-Muller) at Eb/N0 = 1, 2, 3, 4
// and 5 dB.  The channel LLR 2y/sigma^2 is scaled by 2, rounded and clipped
// to the decoder's 6-bit input.  For each point the testbench counts
// decoding failures (detected), wrong codewords (undetected) and the mean
// number of iterations.  It checks that every word reported as decoded
// satisfies all parity checks, that the error rate falls as Eb/N0 rises
// (ending below the rate at the lowest point), and that each frame's latency
// is 115 + 194 cycles per iteration.  The error rates are those of this
// design's default code, printed for information.
module tb_awgn_cer;
  import nbldpc_pkg::*;
  import tb_gf_pkg::*;

  localparam int CH_W = 6;
  localparam int FRAMES = 400;        // per Eb/N0 point
  localparam int NPTS = 5;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic ch_valid = 1'b0;
  logic signed [CH_W-1:0] ch_llr [4];
  logic ch_ready, dec_busy, dec_done, dec_success;
  logic [4:0] dec_iter;
  gf_t [N-1:0] codeword;

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  nbldpc_decoder dut (
    .clk(clk), .rst_n(rst_n), .ch_valid(ch_valid), .ch_llr(ch_llr),
    .ch_ready(ch_ready), .dec_busy(dec_busy), .dec_done(dec_done),
    .dec_success(dec_success), .dec_iter(dec_iter), .codeword(codeword)
  );

  function automatic real uniform();
    return (real'($urandom_range(0, 32'h7fff_fffe)) + 1.0) / 2147483648.0;
  endfunction

  function automatic real gauss();
    return $sqrt(-2.0 * $ln(uniform())) * $cos(6.283185307179586 * uniform());
  endfunction

  initial begin
    logic [3:0] w [N];
    logic [3:0] got [N];
    logic signed [CH_W-1:0] frame [N][4];
    int errs [NPTS];
    for (int i = 0; i < 4; i++) ch_llr[i] = '0;
    build_h(default_h());
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int p = 0; p < NPTS; p++) begin
      real ebn0, sigma2;
      int n_fail, n_wrong, iter_sum;
      ebn0   = 10.0 ** ((p + 1) / 10.0);
      sigma2 = 1.0 / (2.0 * 0.5 * ebn0);
      n_fail = 0; n_wrong = 0; iter_sum = 0;
      for (int f = 0; f < FRAMES; f++) begin
        int lat, k;
        random_codeword(w);
        for (int n = 0; n < N; n++)
          for (int i = 0; i < 4; i++) begin
            real y, l;
            int q;
            y = (w[n][i] ? -1.0 : 1.0) + $sqrt(sigma2) * gauss();
            l = 2.0 * (2.0 * y / sigma2);
            q = (l >= 0.0) ? int'(l + 0.5) : -int'(-l + 0.5);
            if (q > 31) q = 31;
            if (q < -32) q = -32;
            frame[n][i] = CH_W'(q);
          end
        // send
        k = 0;
        while (k < N) begin
          @(negedge clk);
          ch_valid = 1'b1;
          for (int i = 0; i < 4; i++) ch_llr[i] = frame[k][i];
          @(posedge clk);
          if (ch_ready) k++;
        end
        @(negedge clk);
        ch_valid = 1'b0;
        lat = 1;
        while (!dec_done) begin
          @(posedge clk);
          lat++;
          #1;
        end
        for (int n = 0; n < N; n++) got[n] = codeword[n];
        iter_sum += dec_iter;
        checks++;
        if (lat != 115 + 194 * int'(dec_iter)) begin
          failures++;
          $display("FAIL: latency %0d for %0d iterations", lat, dec_iter);
        end
        checks++;
        if (dec_success && !is_codeword(got)) begin
          failures++;
          $display("FAIL: reported success on a non-codeword");
        end
        if (!dec_success) n_fail++;
        else if (got != w) n_wrong++;
      end
      errs[p] = n_fail + n_wrong;
      $display("Eb/N0 = %0d dB: frames=%0d failed=%0d wrong=%0d CER=%f mean iterations=%f",
               p + 1, FRAMES, n_fail, n_wrong, real'(errs[p]) / FRAMES,
               real'(iter_sum) / FRAMES);
    end
    // error rate must fall with Eb/N0 (allowing for counting noise once
    // the counts are small)
    for (int p = 1; p < NPTS; p++) begin
      checks++;
      if (errs[p] > errs[p-1] + 3) begin
        failures++;
        $display("FAIL: error count rises from %0d to %0d", errs[p-1], errs[p]);
      end
    end
    checks++;
    if (errs[NPTS-1] >= errs[0] || errs[0] == 0) begin
      failures++;
      $display("FAIL: no error-rate improvement over the Eb/N0 range");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
