// msg_mem: message memory of one check node unit, 8 words of 80 bits.
//
// Words 0..3 hold the variable-to-check vectors Q of the four edges of the
// row (by slot), words 4..7 the check-to-variable vectors R.  It is a
// dual-port memory with one write port and one read port, so that a unit can
// read one message and write another in the same cycle.  Written as a
// distributed (LUT) RAM: synchronous write, asynchronous read.  The size and
// the dual-port organisation follow the design description; the word map and
// the read timing are this design's own choice.  The contents are not reset.
module msg_mem
  import nbldpc_pkg::*;
#(
  parameter int unsigned DEPTH = 8
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
