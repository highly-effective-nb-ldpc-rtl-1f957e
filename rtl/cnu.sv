// cnu: low-area check node unit for a degree-4 check node over GF(16).
//
// The unit computes the four check-to-variable messages R(m,n1..n4) of one
// row of H from the four variable-to-check messages Q(m,n1..n4) with the
// forward-backward min-max algorithm, using a single elementary min-max unit
// for all six elementary steps.  The steps run in the order FW1, FW2,
// MERGE2, BW1, BW2, MERGE1 with these operands (L1, L2) -> Lo:
//   FW1    Q2, Q1 -> F2          FW2    F2, Q3 -> R4
//   MERGE2 F2, Q4 -> R3          BW1    Q3, Q4 -> B3
//   BW2    B3, Q2 -> R1          MERGE1 B3, Q1 -> R2
// so no intermediate vector is stored outside the min-max unit: F2 and B3
// are fed back from Lo into L1 and kept there for the following step.  Q1
// and Q4 are read once from the message memory into two 16-entry registers;
// Q2 and Q3 are taken straight from the memory read port whenever needed.
// The operand order, the two registers and the multiplexer structure follow
// the design description.
//
// Multiplication by the non-zero H entry h = alpha^e of the edge is a
// rotation of the vector entries in power representation: it is applied to
// the memory read data (exponent of the slot being read) and the inverse
// rotation to Lo on its way back to memory (exponent of the slot being
// written).  Doing these rotations combinationally at the unit's memory port
// is this design's own choice.
//
// Interface and timing.  All control comes from the shared sequencer
// (cnu_sched) in the control unit: each step is a 16-cycle min-max step,
// so the six steps take 96 cycles plus one cycle to preload Q1 and one to
// hand out the last result.  r_out is combinational from the Lo register.
module cnu
  import nbldpc_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  h_row_t    h_row,      // non-zero entries of this row of H
  input  cnu_ctrl_t ctrl,
  input  llr_vec_t  q_in,       // message memory read data (a Q vector)
  output llr_vec_t  r_out       // R vector for slot ctrl.wr_slot
);

  llr_vec_t q_mul, sr1_q, sr4_q, in1, in2, lo;
  logic     mm_done;

  assign q_mul = vec_mul(q_in, h_row[ctrl.rd_slot].exp);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr1_q <= '0;
      sr4_q <= '0;
    end else begin
      if (ctrl.load_sr1) sr1_q <= q_mul;
      if (ctrl.load_sr4) sr4_q <= q_mul;
    end
  end

  // multiplexer 1 (to L1) and multiplexer 2 (to L2)
  always_comb begin
    in1 = (ctrl.sel1 == SEL1_LO) ? lo : q_mul;
    unique case (ctrl.sel2)
      SEL2_Q23: in2 = q_mul;
      SEL2_SR1: in2 = sr1_q;
      default:  in2 = sr4_q;
    endcase
  end

  minmax_unit u_mm (
    .clk    (clk),
    .rst_n  (rst_n),
    .start  (ctrl.mm_start),
    .load_l1(ctrl.load_l1),
    .load_l2(ctrl.load_l2),
    .in_l1  (in1),
    .in_l2  (in2),
    .lo     (lo),
    .done   (mm_done)
  );

  assign r_out = vec_div(lo, h_row[ctrl.wr_slot].exp);

  // a step may only start when the previous one has finished
  a_step_order: assert property (@(posedge clk) disable iff (!rst_n)
    ctrl.mm_start |-> mm_done);

endmodule
