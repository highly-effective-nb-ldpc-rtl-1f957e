// tb_control_unit: runs the sequencer with modelled surroundings and checks
// its outputs cycle by cycle against the decoding schedule worked out from
// the dense H matrix:
//   * 32 accepted symbols, then in_ready low;
//   * per variable node n, three cycles: Q written into the first row of
//     column n while R is read from the second, then the reverse, then the
//     hard decision; R forced to zero only in the first iteration;
//   * parity check started at the end of every VN phase, 98-cycle CN phase
//     with the CNU memories written four times;
//   * stop with success when the modelled parity check passes (here after
//     3 check node phases), and stop with failure after 18 when it never
//     passes.
module tb_control_unit;
  import nbldpc_pkg::*;
  import tb_gf_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  h_rom_t h;
  logic in_ready, in_accept = 1'b0, llr_valid = 1'b0, llr_we;
  logic [4:0] llr_waddr, llr_raddr;
  vnu_mode_e vnu_mode;
  logic zero_r;
  logic [3:0] rmux_sel;
  logic [2:0] msg_raddr, msg_waddr;
  logic [M-1:0] msg_we;
  logic msg_wsel_vnu;
  cnu_ctrl_t cnu_ctrl;
  logic hd_we, pc_start;
  logic [4:0] hd_addr;
  logic pc_done = 1'b0, pc_pass = 1'b0;
  logic dec_busy, dec_done, dec_success;
  logic [4:0] dec_iter;
  int checks = 0, failures = 0;
  int pass_after = 3;      // modelled parity check passes after this many CN phases

  always #5 clk = ~clk;

  control_unit dut (.*);

  task automatic fail(input string s);
    failures++;
    $display("FAIL: %s", s);
  endtask

  // row/slot pairs of column n in row order, from the dense H
  task automatic col_edges(input int n, output int r0, output int s0, output int r1, output int s1);
    int c;
    c = 0;
    r0 = 0; s0 = 0; r1 = 0; s1 = 0;
    for (int m = 0; m < M; m++)
      for (int s = 0; s < DC; s++)
        if (int'(h[m][s].col) == n) begin
          if (c == 0) begin r0 = m; s0 = s; end else begin r1 = m; s1 = s; end
          c++;
        end
  endtask

  task automatic decode_one(input int pass_at, output int iters, output bit ok);
    int cn_phases;
    // load
    for (int n = 0; n < N; n++) begin
      @(negedge clk);
      if (!in_ready) fail("not ready while loading");
      in_accept = 1'b1;
      llr_valid = (n > 0);
      @(posedge clk);
    end
    @(negedge clk);
    in_accept = 1'b0; llr_valid = 1'b1;
    #1;
    checks++;
    if (in_ready) fail("ready after 32 symbols");
    @(negedge clk);
    llr_valid = 1'b0;
    cn_phases = 0;
    forever begin
      // VN phase
      for (int n = 0; n < N; n++) begin
        int r0, s0, r1, s1;
        col_edges(n, r0, s0, r1, s1);
        for (int ph = 0; ph < 3; ph++) begin
          logic [M-1:0] we_exp;
          #1;
          we_exp = '0;
          if (ph == 0) we_exp[r0] = 1'b1;
          if (ph == 1) we_exp[r1] = 1'b1;
          checks++;
          if (llr_raddr != 5'(n) || zero_r != (cn_phases == 0) || !msg_wsel_vnu ||
              msg_we != we_exp ||
              rmux_sel != 4'((ph == 0) ? r1 : r0) ||
              msg_raddr != {1'b1, 2'((ph == 0) ? s1 : s0)} ||
              (ph == 0 && (msg_waddr != {1'b0, 2'(s0)} || vnu_mode != VNU_MSG_STORE)) ||
              (ph == 1 && (msg_waddr != {1'b0, 2'(s1)} || vnu_mode != VNU_MSG)) ||
              hd_we != (ph == 2) || (ph == 2 && (hd_addr != 5'(n) || vnu_mode != VNU_POST)) ||
              pc_start != (n == N - 1 && ph == 2))
            fail($sformatf("VN phase n=%0d ph=%0d", n, ph));
          @(negedge clk);
        end
      end
      // CN phase with the parity check model (done 16 cycles later)
      begin
        int writes, cyc;
        bit stop;
        writes = 0;
        stop = 0;
        for (cyc = 0; cyc < 98 && !stop; cyc++) begin
          pc_done = (cyc == 16);
          pc_pass = (cn_phases == pass_at);
          #1;
          if (msg_we == '1) writes++;
          else if (msg_we != '0) fail("partial memory write in CN phase");
          if (hd_we || msg_wsel_vnu) fail("VN signals in CN phase");
          @(negedge clk);
          pc_done = 1'b0;
          if (cyc == 16 && (cn_phases == pass_at || cn_phases == int'(MAX_ITER))) stop = 1;
        end
        #1;
        if (stop) begin
          checks++;
          if (cyc != 17) fail("stop not right after the parity check");
          break;
        end
        checks++;
        if (writes != 4) fail($sformatf("%0d CN write cycles", writes));
        cn_phases++;
      end
    end
    // dec_done was registered in the cycle after pc_done
    checks++;
    if (!dec_done) fail("no dec_done");
    iters = dec_iter;
    ok = dec_success;
    @(negedge clk);
    checks++;
    if (dec_busy || !in_ready) fail("not back to loading");
  endtask

  initial begin
    int it;
    bit ok;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    #1;
    decode_one(3, it, ok);
    checks++;
    if (!ok || it != 3) fail($sformatf("success run: ok=%0d iter=%0d", ok, it));
    decode_one(0, it, ok);
    checks++;
    if (!ok || it != 0) fail($sformatf("first-check run: ok=%0d iter=%0d", ok, it));
    decode_one(99, it, ok);
    checks++;
    if (ok || it != int'(MAX_ITER)) fail($sformatf("limit run: ok=%0d iter=%0d", ok, it));
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
