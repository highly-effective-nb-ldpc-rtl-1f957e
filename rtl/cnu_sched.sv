// cnu_sched: sequencer of the check node phase, shared by all 16 CNUs.
//
// After start it steps through the serial forward-backward schedule of the
// check node unit (see cnu.sv), 98 cycles in all, and drives the memory read
// slot, the operand selection and loads of the CNU, and the write-back of
// the R vectors:
//   cycle  0      read Q1 into register 1
//   cycle  1      FW1   L1 = Q2, L2 = register 1
//   cycle  2      read Q4 into register 4
//   cycle 17      FW2   L1 = Lo (F2), L2 = Q3
//   cycle 33      MERGE2 L1 kept (F2), L2 = register 4; write R4 = Lo
//   cycle 49      BW1   L1 = Q3, L2 = register 4;       write R3 = Lo
//   cycle 65      BW2   L1 = Lo (B3), L2 = Q2
//   cycle 81      MERGE1 L1 kept (B3), L2 = register 1; write R1 = Lo
//   cycle 97      write R2 = Lo, done
// The step order and operands follow the design description; the cycle
// numbers follow from a 16-cycle min-max step.  busy is high from start to
// the done cycle; stop ends the phase at once.
module cnu_sched
  import nbldpc_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      start,
  input  logic      stop,
  output logic      busy,
  output logic      done,
  output logic      mem_we,     // write ctrl.wr_slot of every message memory
  output cnu_ctrl_t ctrl
);

  localparam int unsigned LAST = 97;
  logic [6:0] c_q;
  logic       run_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c_q   <= '0;
      run_q <= 1'b0;
    end else if (start) begin
      c_q   <= '0;
      run_q <= 1'b1;
    end else if (run_q) begin
      if (stop || c_q == 7'(LAST)) run_q <= 1'b0;
      c_q <= c_q + 1'b1;
    end
  end

  always_comb begin
    ctrl   = '{sel1: SEL1_Q23, sel2: SEL2_Q23, default: '0};
    mem_we = 1'b0;
    if (run_q) begin
      unique case (c_q)
        7'd0:  begin ctrl.rd_slot = 2'd0; ctrl.load_sr1 = 1'b1; end
        7'd1:  begin
          ctrl.rd_slot = 2'd1; ctrl.mm_start = 1'b1;
          ctrl.load_l1 = 1'b1; ctrl.sel1 = SEL1_Q23;
          ctrl.load_l2 = 1'b1; ctrl.sel2 = SEL2_SR1;
        end
        7'd2:  begin ctrl.rd_slot = 2'd3; ctrl.load_sr4 = 1'b1; end
        7'd17: begin
          ctrl.rd_slot = 2'd2; ctrl.mm_start = 1'b1;
          ctrl.load_l1 = 1'b1; ctrl.sel1 = SEL1_LO;
          ctrl.load_l2 = 1'b1; ctrl.sel2 = SEL2_Q23;
        end
        7'd33: begin
          ctrl.mm_start = 1'b1;
          ctrl.load_l2 = 1'b1; ctrl.sel2 = SEL2_SR4;
          ctrl.wr_slot = 2'd3; mem_we = 1'b1;
        end
        7'd49: begin
          ctrl.rd_slot = 2'd2; ctrl.mm_start = 1'b1;
          ctrl.load_l1 = 1'b1; ctrl.sel1 = SEL1_Q23;
          ctrl.load_l2 = 1'b1; ctrl.sel2 = SEL2_SR4;
          ctrl.wr_slot = 2'd2; mem_we = 1'b1;
        end
        7'd65: begin
          ctrl.rd_slot = 2'd1; ctrl.mm_start = 1'b1;
          ctrl.load_l1 = 1'b1; ctrl.sel1 = SEL1_LO;
          ctrl.load_l2 = 1'b1; ctrl.sel2 = SEL2_Q23;
        end
        7'd81: begin
          ctrl.mm_start = 1'b1;
          ctrl.load_l2 = 1'b1; ctrl.sel2 = SEL2_SR1;
          ctrl.wr_slot = 2'd0; mem_we = 1'b1;
        end
        7'd97: begin ctrl.wr_slot = 2'd1; mem_we = 1'b1; end
        default: ;
      endcase
    end
  end

  assign busy = run_q;
  assign done = run_q && (c_q == 7'(LAST));

endmodule
