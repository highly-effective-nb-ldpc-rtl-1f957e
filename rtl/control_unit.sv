// control_unit: sequencer of the NB-LDPC decoder and ROM of the H matrix.
//
// It holds the non-zero entries of the parity-check matrix (column and
// exponent of each entry, row by row, parameter H) and derives from them the
// column view used by the variable node unit.  Decoding of a codeword runs as
//   LOAD  32 symbol LLR vectors are written into the LLR memory;
//   VN    the variable node unit visits n = 0..31, three cycles each: the
//         message to the first check (write Q in that row's memory), the
//         message to the second check, and the hard decision; R is read
//         from the other row's memory through the 16-to-1 multiplexer.  In
//         the first iteration the R input is forced to zero;
//   CN    all 16 check node units run the 98-cycle check node schedule
//         together (cnu_sched); at the same time the parity check module
//         checks the hard decisions of the VN phase.
// Decoding stops with success as soon as the parity check passes (the
// running CN phase is abandoned), and with failure when it fails after
// MAX_ITER check node phases.  One iteration (VN + CN) takes 96 + 98 = 194
// cycles.  Flooding schedule with one VNU and 16 CNUs, early stop on a
// satisfied parity check and the 18-iteration limit follow the design
// description; the phase overlap and the exact cycle counts are this
// design's own.
//
// Interface.  in_ready is high in LOAD until 32 symbols have been accepted
// (in_accept); llr_valid (from the symbol LLR
// generator) writes the next LLR memory word.  dec_done pulses for one cycle
// at the end of decoding with dec_success and dec_iter (check node phases
// run); the decoded word stays in the parity check module until the next
// codeword has been loaded.
module control_unit
  import nbldpc_pkg::*;
#(
  parameter h_rom_t      H         = default_h(),
  parameter int unsigned ITER_MAX  = MAX_ITER
) (
  input  logic             clk,
  input  logic             rst_n,
  output h_rom_t           h,
  // input side
  output logic             in_ready,
  input  logic             in_accept,      // a symbol enters the LLR generator
  input  logic             llr_valid,
  output logic             llr_we,
  output logic [4:0]       llr_waddr,
  output logic [4:0]       llr_raddr,
  // variable node unit
  output vnu_mode_e        vnu_mode,
  output logic             zero_r,
  output logic [3:0]       rmux_sel,
  // message memories
  output logic [2:0]       msg_raddr,
  output logic [2:0]       msg_waddr,
  output logic [M-1:0]     msg_we,
  output logic             msg_wsel_vnu,   // 1: write Q from the VNU, 0: R from the CNU
  output cnu_ctrl_t        cnu_ctrl,
  // parity check
  output logic             hd_we,
  output logic [4:0]       hd_addr,
  output logic             pc_start,
  input  logic             pc_done,
  input  logic             pc_pass,
  // status
  output logic             dec_busy,
  output logic             dec_done,
  output logic             dec_success,
  output logic [4:0]       dec_iter
);

  localparam col_rom_t COLS = col_view(H);

  typedef enum logic [1:0] {ST_LOAD, ST_VN, ST_CN} state_e;
  state_e     st_q;
  logic [4:0] n_q;        // symbol counter (LOAD) / variable node (VN)
  logic [1:0] ph_q;       // VN sub-cycle 0..2
  logic [4:0] iter_q;     // check node phases done
  logic [5:0] acc_q;      // symbols accepted for the current codeword
  logic       cn_start, cn_stop, cn_busy, cn_done, cn_we;
  logic       vn_last;
  edge_ref_t  e0, e1;

  assign h  = H;
  assign e0 = COLS[n_q][0];
  assign e1 = COLS[n_q][1];
  assign vn_last = (st_q == ST_VN) && (n_q == 5'(N - 1)) && (ph_q == 2'd2);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q        <= ST_LOAD;
      n_q         <= '0;
      ph_q        <= '0;
      iter_q      <= '0;
      acc_q       <= '0;
      dec_done    <= 1'b0;
      dec_success <= 1'b0;
      dec_iter    <= '0;
    end else begin
      dec_done <= 1'b0;
      if (in_accept) acc_q <= acc_q + 1'b1;
      unique case (st_q)
        ST_LOAD: if (llr_valid) begin
          n_q <= n_q + 1'b1;
          if (n_q == 5'(N - 1)) begin
            st_q   <= ST_VN;
            ph_q   <= '0;
            iter_q <= '0;
          end
        end
        ST_VN: begin
          if (ph_q == 2'd2) begin
            ph_q <= '0;
            n_q  <= n_q + 1'b1;
          end else begin
            ph_q <= ph_q + 1'b1;
          end
          if (vn_last) st_q <= ST_CN;
        end
        ST_CN: begin
          if (pc_done && (pc_pass || iter_q == 5'(ITER_MAX))) begin
            st_q        <= ST_LOAD;
            n_q         <= '0;
            acc_q       <= '0;
            dec_done    <= 1'b1;
            dec_success <= pc_pass;
            dec_iter    <= iter_q;
          end else if (cn_done) begin
            st_q   <= ST_VN;
            n_q    <= '0;
            ph_q   <= '0;
            iter_q <= iter_q + 1'b1;
          end
        end
        default: st_q <= ST_LOAD;
      endcase
    end
  end

  assign cn_start = vn_last && (iter_q != 5'(ITER_MAX));
  assign cn_stop  = (st_q == ST_CN) && pc_done && pc_pass;

  cnu_sched u_sched (
    .clk   (clk),
    .rst_n (rst_n),
    .start (cn_start),
    .stop  (cn_stop),
    .busy  (cn_busy),
    .done  (cn_done),
    .mem_we(cn_we),
    .ctrl  (cnu_ctrl)
  );

  always_comb begin
    in_ready     = (st_q == ST_LOAD) && (acc_q < 6'(N));
    llr_we       = (st_q == ST_LOAD) && llr_valid;
    llr_waddr    = n_q;
    llr_raddr    = n_q;
    vnu_mode     = VNU_MSG;
    zero_r       = (iter_q == 0);
    rmux_sel     = e0.row;
    msg_raddr    = {ADDR_Q, cnu_ctrl.rd_slot};
    msg_waddr    = {ADDR_R, cnu_ctrl.wr_slot};
    msg_we       = cn_we ? '1 : '0;
    msg_wsel_vnu = 1'b0;
    hd_we        = 1'b0;
    hd_addr      = n_q;
    pc_start     = vn_last;
    dec_busy     = (st_q != ST_LOAD);
    if (st_q == ST_VN) begin
      msg_wsel_vnu = 1'b1;
      msg_we       = '0;
      unique case (ph_q)
        2'd0: begin              // Q(m1,n) from R(m2,n)
          vnu_mode        = VNU_MSG_STORE;
          rmux_sel        = e1.row;
          msg_raddr       = {ADDR_R, e1.slot};
          msg_waddr       = {ADDR_Q, e0.slot};
          msg_we[e0.row]  = 1'b1;
        end
        2'd1: begin              // Q(m2,n) from R(m1,n)
          vnu_mode        = VNU_MSG;
          rmux_sel        = e0.row;
          msg_raddr       = {ADDR_R, e0.slot};
          msg_waddr       = {ADDR_Q, e1.slot};
          msg_we[e1.row]  = 1'b1;
        end
        default: begin           // a-posteriori vector and hard decision
          vnu_mode        = VNU_POST;
          rmux_sel        = e0.row;
          msg_raddr       = {ADDR_R, e0.slot};
          hd_we           = 1'b1;
        end
      endcase
    end
  end

  // the check node sequencer only runs in the check node phase
  a_cn_in_phase: assert property (@(posedge clk) disable iff (!rst_n)
    cn_busy |-> st_q == ST_CN);
  // no more symbols are accepted than the LLR memory holds
  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n)
    llr_valid |-> st_q == ST_LOAD);

endmodule
