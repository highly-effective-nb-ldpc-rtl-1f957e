// llr_mem: a-priori information memory, 32 words of 80 bits.
//
// Word n holds the 16 five-bit symbol LLRs L_n of variable node n, written
// once per codeword by the symbol LLR generator and read by the variable
// node unit in every iteration.  Distributed (LUT) RAM: synchronous write,
// asynchronous read; contents are not reset.  Size from the design
// description, timing this design's own choice.
module llr_mem
  import nbldpc_pkg::*;
#(
  parameter int unsigned DEPTH = N
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  llr_vec_t                 wdata,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output llr_vec_t                 rdata
);

  llr_vec_t mem [DEPTH];

  always_ff @(posedge clk)
    if (we) mem[waddr] <= wdata;

  assign rdata = mem[raddr];

endmodule
