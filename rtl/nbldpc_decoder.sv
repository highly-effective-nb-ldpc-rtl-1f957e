// nbldpc_decoder: min-max decoder for (2,4)-regular (128,64) NB-LDPC codes over
// GF(16), partially parallel with 16 check node units and one variable node
// unit.
//
// Datapath.  The symbol LLR generator turns the demodulator's bit LLRs into
// one 16 x 5-bit LLR vector per GF(16) symbol, stored in the 32 x 80 LLR
// memory.  Every row m of H has its own check node unit CNU(m) and an 8 x 80
// dual-port message memory holding the row's four Q and four R vectors.  The
// single VNU reads R vectors through a 16-to-1 multiplexer over the memory
// read ports and writes its Q vectors back into the memories (a 2-to-1
// multiplexer in front of each write port chooses between the VNU's Q and
// the CNU's R).  The VNU also produces the hard decisions, checked by the
// parity check module, whose symbol registers are the decoder's output.
// The block structure and the memory sizes follow the design description;
// see control_unit.sv for the schedule.
//
// Interface.  ch_valid/ch_ready accept one GF(16) symbol per cycle as four
// signed bit LLRs (bit i of the symbol in polynomial form, positive = 0).
// After the 32nd symbol the decoder runs on its own; dec_done pulses at the
// end with dec_success (all parity checks satisfied) and dec_iter (check
// node phases run, at most 18).  codeword holds the decoded symbols from then
// until the next codeword has been received.  The parity-check matrix is the
// parameter H; any (2,4) 16 x 32 matrix over GF(16) can be given.
module nbldpc_decoder
  import nbldpc_pkg::*;
#(
  parameter h_rom_t      H        = default_h(),
  parameter int unsigned ITER_MAX = MAX_ITER,
  parameter int unsigned CH_W     = 6
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   ch_valid,
  input  logic signed [CH_W-1:0] ch_llr [4],
  output logic                   ch_ready,
  output logic                   dec_busy,
  output logic                   dec_done,
  output logic                   dec_success,
  output logic [4:0]             dec_iter,
  output gf_t [N-1:0]            codeword
);

  h_rom_t     h;
  logic       gen_valid, llr_we, in_accept;
  llr_vec_t   gen_llr, l_n;
  logic [4:0] llr_waddr, llr_raddr;
  vnu_mode_e  vnu_mode;
  logic       zero_r;
  logic [3:0] rmux_sel;
  logic [2:0] msg_raddr, msg_waddr;
  logic [M-1:0] msg_we;
  logic       msg_wsel_vnu;
  cnu_ctrl_t  cnu_ctrl;
  logic       hd_we, pc_start, pc_done, pc_pass, pc_busy;
  logic [4:0] hd_addr;
  gf_t        hd_sym;
  llr_vec_t   q_vnu, r_sel;
  llr_vec_t   mem_rd [M];
  llr_vec_t   r_cnu  [M];

  assign in_accept = ch_valid && ch_ready;

  symbol_llr_gen #(.CH_W(CH_W)) u_gen (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (in_accept),
    .in_llr   (ch_llr),
    .out_valid(gen_valid),
    .out_llr  (gen_llr)
  );

  llr_mem u_llr_mem (
    .clk  (clk),
    .we   (llr_we),
    .waddr(llr_waddr),
    .wdata(gen_llr),
    .raddr(llr_raddr),
    .rdata(l_n)
  );

  control_unit #(.H(H), .ITER_MAX(ITER_MAX)) u_ctrl (
    .clk         (clk),
    .rst_n       (rst_n),
    .h           (h),
    .in_ready    (ch_ready),
    .in_accept   (in_accept),
    .llr_valid   (gen_valid),
    .llr_we      (llr_we),
    .llr_waddr   (llr_waddr),
    .llr_raddr   (llr_raddr),
    .vnu_mode    (vnu_mode),
    .zero_r      (zero_r),
    .rmux_sel    (rmux_sel),
    .msg_raddr   (msg_raddr),
    .msg_waddr   (msg_waddr),
    .msg_we      (msg_we),
    .msg_wsel_vnu(msg_wsel_vnu),
    .cnu_ctrl    (cnu_ctrl),
    .hd_we       (hd_we),
    .hd_addr     (hd_addr),
    .pc_start    (pc_start),
    .pc_done     (pc_done),
    .pc_pass     (pc_pass),
    .dec_busy    (dec_busy),
    .dec_done    (dec_done),
    .dec_success (dec_success),
    .dec_iter    (dec_iter)
  );

  // 16-to-1 multiplexer of R vectors towards the VNU
  assign r_sel = mem_rd[rmux_sel];

  vnu u_vnu (
    .clk   (clk),
    .rst_n (rst_n),
    .mode  (vnu_mode),
    .zero_r(zero_r),
    .r_in  (r_sel),
    .l_in  (l_n),
    .q_out (q_vnu),
    .hd_sym(hd_sym)
  );

  for (genvar m = 0; m < M; m++) begin : g_row
    msg_mem u_mem (
      .clk  (clk),
      .we   (msg_we[m]),
      .waddr(msg_waddr),
      .wdata(msg_wsel_vnu ? q_vnu : r_cnu[m]),
      .raddr(msg_raddr),
      .rdata(mem_rd[m])
    );

    cnu u_cnu (
      .clk  (clk),
      .rst_n(rst_n),
      .h_row(h[m]),
      .ctrl (cnu_ctrl),
      .q_in (mem_rd[m]),
      .r_out(r_cnu[m])
    );
  end

  parity_check u_pc (
    .clk     (clk),
    .rst_n   (rst_n),
    .h       (h),
    .hd_we   (hd_we),
    .hd_addr (hd_addr),
    .hd_sym  (hd_sym),
    .start   (pc_start),
    .busy    (pc_busy),
    .done    (pc_done),
    .pass    (pc_pass),
    .codeword(codeword)
  );

  a_pc_idle_at_start: assert property (@(posedge clk) disable iff (!rst_n)
    pc_start |-> !pc_busy);

endmodule
