// alu_slice: one bit of the adder-and-logic unit that feeds the accumulator.
//
// Seven AND terms, each gated by one operation select, are ORed into the new
// AC bit:
//   AND & DR(i) & AC(i)     ADD & sum(i)       DR & DR(i)
//   INPR & INPR(i)          COM & not AC(i)
//   SHR & AC(i+1)           SHL & AC(i-1)
// The neighbours for the shifts come in as ac_left (bit i+1) and ac_right
// (bit i-1); the 16-bit unit ties the ends to E. With no select high the
// output is zero. Purely combinational; the terms follow the one-bit
// drawing of the unit.
module alu_slice
  import mano_pkg::*;
(
  input  alu_op_t op,
  input  logic    ac_i,
  input  logic    dr_i,
  input  logic    sum_i,
  input  logic    inpr_i,
  input  logic    ac_left,   // AC(i+1), shifted in by SHR
  input  logic    ac_right,  // AC(i-1), shifted in by SHL
  output logic    ac_in
);

  assign ac_in = (op.op_and  & dr_i & ac_i)
               | (op.op_add  & sum_i)
               | (op.op_dr   & dr_i)
               | (op.op_inpr & inpr_i)
               | (op.op_com  & ~ac_i)
               | (op.op_shr  & ac_left)
               | (op.op_shl  & ac_right);

endmodule
