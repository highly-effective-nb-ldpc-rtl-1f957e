// tb_min_tree: checks the minimum value and the index (lowest index on a
// tie) of random and tie-heavy vectors against a linear search.
module tb_min_tree;
  import nbldpc_pkg::*;
  import tb_gf_pkg::*;

  llr_vec_t v;
  llr_t     mn;
  gf_idx_t  mi;
  int checks = 0, failures = 0;

  min_tree dut (.v(v), .min_val(mn), .min_idx(mi));

  initial begin
    for (int t = 0; t < 500; t++) begin
      int bi;
      v = rand_vec((t % 3 == 0) ? 3 : 31);
      #1;
      bi = 0;
      for (int k = 1; k < 16; k++) if (v[k] < v[bi]) bi = k;
      checks++;
      if (mn !== v[bi] || mi !== gf_idx_t'(bi)) begin
        failures++;
        $display("FAIL: %h -> min %0d idx %0d, expected %0d idx %0d", v, mn, mi, v[bi], bi);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
