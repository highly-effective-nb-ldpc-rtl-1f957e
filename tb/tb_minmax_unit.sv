// tb_minmax_unit: checks the elementary min-max unit against a brute-force
// model over all 256 symbol pairs, with fresh operands, with L1 kept from
// the previous step and with Lo fed back as the next L1 (as the check node
// schedule does), and checks that every step takes 16 cycles.
module tb_minmax_unit;
  import nbldpc_pkg::*;
  import tb_gf_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0, load_l1 = 1'b0, load_l2 = 1'b0;
  llr_vec_t in_l1 = '0, in_l2 = '0, lo;
  logic done;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  minmax_unit dut (.clk(clk), .rst_n(rst_n), .start(start), .load_l1(load_l1),
                   .load_l2(load_l2), .in_l1(in_l1), .in_l2(in_l2), .lo(lo), .done(done));

  // runs one step, returns the number of cycles until done
  task automatic step(input llr_vec_t a, input llr_vec_t b, input bit ld1, output int cyc);
    @(negedge clk);
    start = 1'b1; load_l1 = ld1; load_l2 = 1'b1; in_l1 = a; in_l2 = b;
    @(negedge clk);
    start = 1'b0; load_l1 = 1'b0; load_l2 = 1'b0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
  endtask

  task automatic check(input llr_vec_t exp_v, input int cyc, input string what);
    checks++;
    if (lo !== exp_v) begin
      failures++;
      $display("FAIL %s: lo=%h expected %h", what, lo, exp_v);
    end
    checks++;
    if (cyc != 16) begin
      failures++;
      $display("FAIL %s: step took %0d cycles", what, cyc);
    end
  endtask

  initial begin
    llr_vec_t a, b, b2, r;
    int cyc;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 40; t++) begin
      a = rand_vec((t % 2) ? 31 : 8);
      b = rand_vec(31);
      step(a, b, 1'b1, cyc);
      r = ref_minmax(a, b);
      check(r, cyc, "fresh");
      // keep L1, new L2
      b2 = rand_vec(31);
      step('0, b2, 1'b0, cyc);
      check(ref_minmax(a, b2), cyc, "keep L1");
      // feed Lo back as L1
      b = rand_vec(31);
      step(lo, b, 1'b1, cyc);
      check(ref_minmax(ref_minmax(a, b2), b), cyc, "feedback");
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
