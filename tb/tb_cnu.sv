// tb_cnu: checks one check node unit driven by the check node sequencer.
//
// A behavioural 8-word message memory holds four random Q vectors; a random
// row of H gives the four edge coefficients.  After one check node phase the
// four R vectors written back must equal the brute-force min-max result:
//   R_k(a) = min over sums h_j x_j = h_k a (j != k) of max Q_j(x_j).
// The phase must take 98 cycles (start to done).
module tb_cnu;
  import nbldpc_pkg::*;
  import tb_gf_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0;
  logic busy, done, mem_we;
  cnu_ctrl_t ctrl;
  h_row_t    h_row;
  llr_vec_t  mem [8];
  llr_vec_t  r_out;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  cnu_sched u_sched (.clk(clk), .rst_n(rst_n), .start(start), .stop(1'b0),
                     .busy(busy), .done(done), .mem_we(mem_we), .ctrl(ctrl));
  cnu dut (.clk(clk), .rst_n(rst_n), .h_row(h_row), .ctrl(ctrl),
           .q_in(mem[{1'b0, ctrl.rd_slot}]), .r_out(r_out));

  always_ff @(posedge clk) if (mem_we) mem[{1'b1, ctrl.wr_slot}] <= r_out;

  initial begin
    llr_vec_t qp [4];
    llr_vec_t rp, r_exp;
    int cyc;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 12; t++) begin
      for (int k = 0; k < 4; k++) begin
        h_row[k].col = 5'(k);
        h_row[k].exp = 4'($urandom_range(0, 14));
        mem[k]     = rand_vec(31);
        mem[4 + k] = '0;
        mem[k][$urandom_range(0, 15)] = '0;   // normalised message
      end
      @(negedge clk); start = 1'b1;
      @(negedge clk); start = 1'b0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      @(negedge clk);
      checks++;
      if (cyc != 98) begin
        failures++;
        $display("FAIL: check node phase took %0d cycles", cyc);
      end
      for (int k = 0; k < 4; k++) qp[k] = ref_mul(mem[k], int'(h_row[k].exp));
      for (int k = 0; k < 4; k++) begin
        int o [3];
        int i;
        i = 0;
        for (int j = 0; j < 4; j++) if (j != k) begin o[i] = j; i++; end
        rp = ref_minmax(ref_minmax(qp[o[0]], qp[o[1]]), qp[o[2]]);
        r_exp = ref_div(rp, int'(h_row[k].exp));
        checks++;
        if (mem[4 + k] !== r_exp) begin
          failures++;
          $display("FAIL: R slot %0d = %h expected %h", k, mem[4 + k], r_exp);
        end
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
