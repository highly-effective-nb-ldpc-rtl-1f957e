// tb_nbldpc_decoder: end-to-end test of the NB-LDPC decoder at its default size.
//
// The testbench builds codewords of the decoder's parity-check matrix itself
// (Gaussian elimination over GF(16) with bitwise GF arithmetic, tb_gf_pkg),
// maps them to BPSK bit LLRs and sends frames of several kinds:
//   clean      error-free codewords        -> success with 0 check node phases
//   noisy      codewords with a few wrong  -> success after >= 1 iteration,
//              bits (weak, wrong-sign LLRs)   decoded word = codeword sent
//   hard       codewords with many errors   -> decoded or not; a decoded
//              and weaker LLRs                word must satisfy every check
//   garbage    random LLRs                  -> failure after 18 iterations
// For every frame it checks the result against the word sent, checks the
// syndrome of the decoded word, and checks the latency: each iteration must
// add exactly 194 clock cycles (96 for the variable node phase, 98 for the
// check node phase).  It counts how often each mechanism occurred (early
// stop at the first parity check, early stop after iterating, iteration
// limit, hard frames corrected) and fails if one never did.  The decoder
// runs at its default size, with no parameter changed.
module tb_nbldpc_decoder;
  import nbldpc_pkg::*;
  import tb_gf_pkg::*;

  localparam int unsigned CH_W = 6;
  localparam int unsigned ITER_CYCLES = 194;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic ch_valid = 1'b0;
  logic signed [CH_W-1:0] ch_llr [4];
  logic ch_ready, dec_busy, dec_done, dec_success;
  logic [4:0] dec_iter;
  gf_t [N-1:0] codeword;

  int checks = 0;
  int failures = 0;
  int n_first_stop = 0, n_late_stop = 0, n_limit = 0;
  int lat0 = -1;
  int n_hard_ok = 0;

  always #5 clk = ~clk;

  nbldpc_decoder dut (
    .clk(clk), .rst_n(rst_n), .ch_valid(ch_valid), .ch_llr(ch_llr),
    .ch_ready(ch_ready), .dec_busy(dec_busy), .dec_done(dec_done),
    .dec_success(dec_success), .dec_iter(dec_iter), .codeword(codeword)
  );

  // ---------------- frame transmission ------------------------------------
  logic signed [CH_W-1:0] frame [N][4];

  task automatic make_frame(input logic [3:0] w [N], input int n_err, input bit garbage);
    for (int n = 0; n < N; n++)
      for (int i = 0; i < 4; i++) begin
        int mag;
        mag = garbage ? $urandom_range(0, 12) :
              (n_err > 6) ? $urandom_range(4, 16) : $urandom_range(10, 24);
        if (garbage) frame[n][i] = $urandom_range(0, 1) ? CH_W'(mag) : CH_W'(-mag);
        else         frame[n][i] = w[n][i] ? CH_W'(-mag) : CH_W'(mag);
      end
    for (int e = 0; e < n_err; e++) begin
      int n, i, mag;
      n = $urandom_range(0, N - 1);
      i = $urandom_range(0, 3);
      mag = (n_err > 6) ? $urandom_range(1, 10) : $urandom_range(1, 5);
      frame[n][i] = w[n][i] ? CH_W'(mag) : CH_W'(-mag);   // wrong sign, weak
    end
  endtask

  // Sends the frame; returns the cycle count from the last accepted symbol
  // to dec_done.
  task automatic send_and_decode(output int latency);
    int n;
    n = 0;
    while (n < N) begin
      @(negedge clk);
      ch_valid = 1'b1;
      for (int i = 0; i < 4; i++) ch_llr[i] = frame[n][i];
      @(posedge clk);
      if (ch_ready) n++;
    end
    @(negedge clk);
    ch_valid = 1'b0;
    latency = 1;
    checks++;
    if (ch_ready) begin
      failures++;
      $display("FAIL: ready still high after 32 symbols");
    end
    while (!dec_done) begin
      @(posedge clk);
      latency++;
      #1;
    end
  endtask

  task automatic run_frame(input string kind, input int n_err);
    logic [3:0] w [N];
    logic [3:0] got [N];
    int lat;
    bit garbage;
    garbage = (kind == "garbage");
    random_codeword(w);
    checks++;
    if (!is_codeword(w)) begin
      failures++;
      $display("FAIL: testbench codeword generation");
    end
    make_frame(w, n_err, garbage);
    send_and_decode(lat);
    for (int n = 0; n < N; n++) got[n] = codeword[n];
    // latency: every iteration is one VN phase + one CN phase
    if (lat0 < 0 && dec_iter == 0) lat0 = lat;
    if (lat0 >= 0) begin
      checks++;
      if (lat != lat0 + int'(dec_iter) * ITER_CYCLES) begin
        failures++;
        $display("FAIL: %s latency %0d for %0d iterations (first-check latency %0d)",
                 kind, lat, dec_iter, lat0);
      end
    end
    if (dec_success) begin
      if (dec_iter == 0) n_first_stop++; else n_late_stop++;
    end else if (dec_iter == 5'(MAX_ITER)) n_limit++;
    checks++;
    if (dec_success != is_codeword(got)) begin
      failures++;
      $display("FAIL: %s success flag %0d disagrees with syndrome", kind, dec_success);
    end
    if (kind == "clean") begin
      checks++;
      if (!dec_success || dec_iter != 0 || got != w) begin
        failures++;
        $display("FAIL: clean frame success=%0d iter=%0d", dec_success, dec_iter);
      end
    end else if (kind == "hard") begin
      // may or may not decode; a success is a codeword (checked above),
      // usually but not always the one sent
      if (dec_success && got == w) n_hard_ok++;
    end else if (kind == "noisy") begin
      checks++;
      if (!dec_success || got != w) begin
        failures++;
        $display("FAIL: noisy frame (%0d errors) success=%0d iter=%0d", n_err, dec_success, dec_iter);
      end
    end else begin
      checks++;
      if (dec_success || dec_iter != 5'(MAX_ITER)) begin
        // a random word is a codeword with probability 16^-16
        failures++;
        $display("FAIL: garbage frame success=%0d iter=%0d", dec_success, dec_iter);
      end
    end
    $display("%s frame: errors=%0d success=%0d iterations=%0d latency=%0d",
             kind, n_err, dec_success, dec_iter, lat);
  endtask

  initial begin
    for (int i = 0; i < 4; i++) ch_llr[i] = '0;
    build_h(default_h());
    $display("rank of H = %0d", rank);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run_frame("clean", 0);
    run_frame("clean", 0);
    for (int k = 0; k < 6; k++) run_frame("noisy", 2 + k % 4);
    for (int k = 0; k < 12; k++) run_frame("hard", 8 + k % 6);
    run_frame("garbage", 0);
    run_frame("noisy", 3);
    run_frame("clean", 0);
    checks++;
    if (n_first_stop == 0 || n_late_stop == 0 || n_limit == 0 || n_hard_ok == 0) begin
      failures++;
      $display("FAIL: mechanism not exercised");
    end
    $display("mechanisms: stop at first check=%0d, stop after iterating=%0d, iteration limit=%0d, hard frames corrected=%0d",
             n_first_stop, n_late_stop, n_limit, n_hard_ok);
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
