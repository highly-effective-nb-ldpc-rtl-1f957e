// parity_check: syndrome check of the tentative codeword over GF(16).
//
// The hard-decision symbols arrive from the variable node unit one at a time
// (hd_we, hd_addr, hd_sym, polynomial form) and are kept in 32 registers.
// After start, the 16 rows of H are checked one per cycle: the four symbols
// of the row are multiplied by their H entries with four small table
// multipliers (combinational ROMs) and added with XOR; a non-zero sum marks
// the row as failed.  done pulses 17 cycles after start (the start cycle
// and one cycle per row) with pass = 1 if
// every row was satisfied.  Serial rows and four multipliers per row follow
// the design description; the handshake is this design's own.
// The stored symbols are the decoder's output word (codeword).
module parity_check
  import nbldpc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  h_rom_t      h,
  input  logic        hd_we,
  input  logic [4:0]  hd_addr,
  input  gf_t         hd_sym,
  input  logic        start,
  output logic        busy,
  output logic        done,
  output logic        pass,
  output gf_t [N-1:0] codeword
);

  gf_t        sym_q [N];
  logic [3:0] row_q;
  logic       ok_q;
  gf_t        syn;

  always_comb begin
    syn = '0;
    for (int unsigned s = 0; s < DC; s++)
      syn ^= gf_mul_exp(sym_q[h[row_q][s].col], h[row_q][s].exp);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned n = 0; n < N; n++) sym_q[n] <= '0;
      row_q <= '0;
      ok_q  <= 1'b0;
      busy  <= 1'b0;
      done  <= 1'b0;
      pass  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (hd_we) sym_q[hd_addr] <= hd_sym;
      if (start) begin
        busy  <= 1'b1;
        row_q <= '0;
        ok_q  <= 1'b1;
      end else if (busy) begin
        row_q <= row_q + 1'b1;
        if (row_q == 4'(M - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
          pass <= ok_q && (syn == '0);
        end else begin
          ok_q <= ok_q && (syn == '0);
        end
      end
    end
  end

  always_comb
    for (int unsigned n = 0; n < N; n++) codeword[n] = sym_q[n];

  a_no_write_while_checking: assert property (@(posedge clk) disable iff (!rst_n)
    busy |-> !hd_we);

endmodule
