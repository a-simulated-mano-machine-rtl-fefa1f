// mano_alu: the 16-bit adder-and-logic unit in front of the accumulator.
//
// Sixteen alu_slice copies form the next AC value from AC, DR, INPR and E,
// with the 16-bit adder (four 4-bit adders) supplying the sum bits. The
// shift chain is closed through E: bit 15 takes E on SHR (circulate right)
// and bit 0 takes E on SHL (circulate left). INPR is 8 bits wide and only the
// low eight slices have an INPR term, so INP leaves zeros in AC(15:8). The
// carry out of the adder goes to the control unit, which loads E with it on
// ADD. Purely combinational: the control unit loads `ac_in` into AC when
// any select is high.
module mano_alu
  import mano_pkg::*;
(
  input  alu_op_t op,
  input  word_t   ac,
  input  word_t   dr,
  input  char_t   inpr,
  input  logic    e,
  output word_t   ac_in,
  output logic    cout,
  output logic    cout_n
);

  word_t sum;
  word_t inpr_w;
  logic [WORD_W+1:0] ring;  // E, AC(15:0), E: neighbours for the shifts

  assign inpr_w = word_t'(inpr);
  assign ring   = {e, ac, e};

  adder16 u_adder (
    .ac     (ac),
    .dr     (dr),
    .sum    (sum),
    .cout   (cout),
    .cout_n (cout_n)
  );

  for (genvar i = 0; i < int'(WORD_W); i++) begin : g_bit
    alu_slice u_slice (
      .op       (op),
      .ac_i     (ac[i]),
      .dr_i     (dr[i]),
      .sum_i    (sum[i]),
      .inpr_i   (inpr_w[i]),
      .ac_left  (ring[i+2]),
      .ac_right (ring[i]),
      .ac_in    (ac_in[i])
    );
  end

endmodule
