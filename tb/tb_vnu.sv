// tb_vnu: drives the variable node unit through its three-cycle sequence
// (Q to the first check, Q to the second check, hard decision) with random
// L, R1, R2 and compares with a model: Q1 = norm(L + R2), Q2 = norm(L + R1),
// hard decision = most likely symbol of L + R1 + R2 (saturating 5-bit sums,
// lowest index on a tie), and the same with the R input forced to zero.
module tb_vnu;
  import nbldpc_pkg::*;
  import tb_gf_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  vnu_mode_e mode = VNU_MSG;
  logic zero_r = 1'b0;
  llr_vec_t r_in = '0, l_in = '0, q_out;
  gf_t hd_sym;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  vnu dut (.clk(clk), .rst_n(rst_n), .mode(mode), .zero_r(zero_r),
           .r_in(r_in), .l_in(l_in), .q_out(q_out), .hd_sym(hd_sym));

  function automatic llr_vec_t vadd(input llr_vec_t a, input llr_vec_t b);
    llr_vec_t o;
    for (int k = 0; k < 16; k++) o[k] = (int'(a[k]) + int'(b[k]) > 31) ? 5'd31 : a[k] + b[k];
    return o;
  endfunction

  function automatic llr_vec_t norm(input llr_vec_t a);
    llr_vec_t o;
    int mn;
    mn = 31;
    for (int k = 0; k < 16; k++) if (a[k] < mn) mn = a[k];
    for (int k = 0; k < 16; k++) o[k] = a[k] - llr_t'(mn);
    return o;
  endfunction

  function automatic logic [3:0] argmin_poly(input llr_vec_t a);
    int bi;
    bi = 0;
    for (int k = 1; k < 16; k++) if (a[k] < a[bi]) bi = k;
    return i2p(bi);
  endfunction

  task automatic expect_q(input llr_vec_t e, input string what);
    checks++;
    if (q_out !== e) begin
      failures++;
      $display("FAIL %s: q=%h expected %h", what, q_out, e);
    end
  endtask

  initial begin
    llr_vec_t l, r1, r2;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 200; t++) begin
      bit z;
      z = (t % 5 == 0);
      l = rand_vec(31); r1 = rand_vec(31); r2 = rand_vec((t % 2) ? 6 : 31);
      if (z) begin r1 = '0; r2 = '0; end
      @(negedge clk);
      zero_r = z; l_in = l;
      mode = VNU_MSG_STORE; r_in = z ? rand_vec(31) : r2;
      #1 expect_q(norm(vadd(l, r2)), "Q to first check");
      @(negedge clk);
      mode = VNU_MSG; r_in = z ? rand_vec(31) : r1;
      #1 expect_q(norm(vadd(l, r1)), "Q to second check");
      @(negedge clk);
      mode = VNU_POST; r_in = z ? rand_vec(31) : r1; l_in = rand_vec(31);
      #1;
      checks++;
      if (hd_sym !== argmin_poly(vadd(vadd(l, r2), r1))) begin
        failures++;
        $display("FAIL: hard decision %h expected %h", hd_sym, argmin_poly(vadd(vadd(l, r2), r1)));
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
