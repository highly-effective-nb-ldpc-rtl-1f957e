// tb_msg_mem: random writes and reads of the 8 x 80 memory compared with a
// model array; reads are asynchronous, and a read in the cycle of a write
// to the same word returns the old contents.
module tb_msg_mem;
  import nbldpc_pkg::*;
  import tb_gf_pkg::*;

  localparam int D = 8;
  logic clk = 1'b0;
  logic we = 1'b0;
  logic [$clog2(D)-1:0] waddr = '0, raddr = '0;
  llr_vec_t wdata = '0, rdata;
  llr_vec_t model [D];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  msg_mem dut (.clk(clk), .we(we), .waddr(waddr), .wdata(wdata), .raddr(raddr), .rdata(rdata));

  initial begin
    // fill every word first
    for (int a = 0; a < D; a++) begin
      @(negedge clk);
      we = 1'b1; waddr = a[$clog2(D)-1:0]; wdata = rand_vec(31); model[a] = wdata;
    end
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      we = $urandom_range(0, 1);
      waddr = $urandom_range(0, D - 1);
      raddr = $urandom_range(0, D - 1);
      wdata = rand_vec(31);
      #1;
      checks++;
      if (rdata !== model[raddr]) begin
        failures++;
        $display("FAIL: word %0d read %h expected %h", raddr, rdata, model[raddr]);
      end
      @(posedge clk);
      if (we) model[waddr] = wdata;
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
