// control_unit: hardwired control of the Mano basic computer.
//
// The unit holds the sequence counter (timing signals T0..T15), the opcode
// decoder (D0..D7) and the one-bit state of the machine: I (indirect bit),
// R (interrupt cycle), IEN (interrupt enable), S (start/stop), E (carry /
// link bit of AC) and the device flags FGI and FGO. Each control line is an
// OR of AND terms of these signals, read off the register-transfer table of
// the machine, for example
//   ldAR = R'T0 + R'T2 + D7'IT3        ldDR = (D0 + D1 + D2 + D6)T4
// with r = D7 I' T3 (register reference) and p = D7 I T3 (input-output).
// Bus sources are produced one-hot and encoded to S2..S0.
//
// Timing: every control line is combinational from the state in this cycle
// and acts at the next rising clock edge. All timing signals are gated with
// S, so after HLT every control line is low and the machine holds until
// `start`. `start` is a synchronous reset: it clears SC, I, R, IEN, E, FGI,
// FGO and, through the clear lines, every data-path register, and sets S.
// The input device sets FGI with `in_strobe`; the output device sets FGO with
// `out_ack`; a device setting a flag wins over an instruction clearing it in
// the same cycle. These device handshakes, the synchronous `start`, the reset
// values of the flags and the tie-breaks are this design's choices; the
// terms themselves follow the machine's micro-operation table and the
// control-unit drawing.
module control_unit
  import mano_pkg::*;
(
  input  logic        clk,
  input  logic        start,
  input  word_t       ir,
  input  word_t       ac,
  input  word_t       dr,
  input  logic        cout,       // adder carry out, loaded into E by ADD
  input  logic        in_strobe,  // input device: new character in INPR
  input  logic        out_ack,    // output device: OUTR taken, ready again
  output ctrl_t       ctrl,
  output logic        e,
  output logic        i_flag,
  output logic        r_flag,
  output logic        ien,
  output logic        s_flag,
  output logic        fgi,
  output logic        fgo,
  output logic [3:0]  sc,
  output logic [15:0] t
);

  logic [15:0] t_raw;
  logic [7:0]  d;
  logic        clr_sc;
  logic        rr, pp;           // r and p of the table
  logic [11:0] b;                // B0..B11 = IR(11:0)
  logic        ac_zero, dr_zero;
  logic        int_req;
  logic [7:1]  x;                // one-hot bus source requests 1..7
  alu_op_t     op;

  seq_counter u_sc (
    .clk (clk),
    .clr (clr_sc),
    .inr (s_flag),
    .sc  (sc),
    .t   (t_raw)
  );

  instr_decoder u_dec (
    .opcode (ir[14:12]),
    .d      (d)
  );

  // Timing signals are live only while the machine runs.
  assign t = t_raw & {16{s_flag}};

  assign b       = ir[11:0];
  assign rr      = d[7] & ~i_flag & t[3];
  assign pp      = d[7] &  i_flag & t[3];
  assign ac_zero = (ac == '0);
  assign dr_zero = (dr == '0);
  assign int_req = ~t[0] & ~t[1] & ~t[2] & ien & (fgi | fgo) & s_flag;

  // ---------------------------------------------------------------- bus
  assign x[1] = (d[4] & t[4]) | (d[5] & t[5]);
  assign x[2] = (~r_flag & t[0]) | (r_flag & t[0]) | (d[5] & t[4]);
  assign x[3] = (d[2] & t[5]) | (d[6] & t[6]);
  assign x[4] = (d[3] & t[4]) | (pp & b[10]);
  assign x[5] = ~r_flag & t[2];
  assign x[6] = r_flag & t[1];
  assign x[7] = (~r_flag & t[1]) | (~d[7] & i_flag & t[3])
              | ((d[0] | d[1] | d[2] | d[6]) & t[4]);

  always_comb begin
    logic [2:0] s;
    s[0] = x[1] | x[3] | x[5] | x[7];
    s[1] = x[2] | x[3] | x[6] | x[7];
    s[2] = x[4] | x[5] | x[6] | x[7];
    ctrl.bus_sel = bus_sel_e'(s);
  end

  // ------------------------------------------------------------- memory
  assign ctrl.mem_read  = x[7];
  assign ctrl.mem_write = (r_flag & t[1]) | (d[3] & t[4]) | (d[5] & t[4])
                        | (d[6] & t[6]);

  // ---------------------------------------------------------- registers
  assign ctrl.ld_ar  = (~r_flag & t[0]) | (~r_flag & t[2]) | (~d[7] & i_flag & t[3]);
  assign ctrl.inr_ar = d[5] & t[4];
  assign ctrl.clr_ar = (r_flag & t[0]) | start;

  assign ctrl.ld_pc  = (d[4] & t[4]) | (d[5] & t[5]);
  assign ctrl.inr_pc = (~r_flag & t[1]) | (r_flag & t[2])
                     | (d[6] & t[6] & dr_zero)
                     | (rr & b[4] & ~ac[15]) | (rr & b[3] & ac[15])
                     | (rr & b[2] & ac_zero) | (rr & b[1] & ~e)
                     | (pp & b[9] & fgi) | (pp & b[8] & fgo);
  assign ctrl.clr_pc = (r_flag & t[1]) | start;

  assign ctrl.ld_dr  = (d[0] | d[1] | d[2] | d[6]) & t[4];
  assign ctrl.inr_dr = d[6] & t[5];
  assign ctrl.clr_dr = start;

  assign op.op_and  = d[0] & t[5];
  assign op.op_add  = d[1] & t[5];
  assign op.op_dr   = d[2] & t[5];
  assign op.op_inpr = pp & b[11];
  assign op.op_com  = rr & b[9];
  assign op.op_shr  = rr & b[7];
  assign op.op_shl  = rr & b[6];
  assign ctrl.alu_op = op;
  assign ctrl.ld_ac  = |op;
  assign ctrl.inr_ac = rr & b[5];
  assign ctrl.clr_ac = (rr & b[11]) | start;

  assign ctrl.ld_ir  = ~r_flag & t[1];
  assign ctrl.clr_ir = start;

  assign ctrl.ld_tr  = r_flag & t[0];
  assign ctrl.clr_tr = start;

  assign ctrl.ld_outr = pp & b[10];

  // ------------------------------------------------------ sequence counter
  assign clr_sc = (r_flag & t[2])
                | ((d[0] | d[1] | d[2] | d[5]) & t[5])
                | ((d[3] | d[4]) & t[4])
                | (d[6] & t[6])
                | rr | pp | start;

  // --------------------------------------------------------- flip-flops
  always_ff @(posedge clk) begin
    if (start) begin
      s_flag <= 1'b1;
      i_flag <= 1'b0;
      r_flag <= 1'b0;
      ien    <= 1'b0;
      e      <= 1'b0;
    end else begin
      // I <- IR(15) during decode
      if (~r_flag & t[2]) i_flag <= ir[15];

      // R: set between instructions' fetch steps on a pending interrupt,
      // cleared at the end of the interrupt cycle
      if (r_flag & t[2])  r_flag <= 1'b0;
      else if (int_req)   r_flag <= 1'b1;

      // IEN
      if ((r_flag & t[2]) | (pp & b[6])) ien <= 1'b0;
      else if (pp & b[7])                ien <= 1'b1;

      // E
      if (op.op_add)           e <= cout;
      else if (rr & b[10])     e <= 1'b0;
      else if (rr & b[8])      e <= ~e;
      else if (rr & b[7])      e <= ac[0];
      else if (rr & b[6])      e <= ac[15];

      // S: HLT stops the machine
      if (rr & b[0]) s_flag <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (start)                fgi <= 1'b0;
    else if (in_strobe)       fgi <= 1'b1;
    else if (pp & b[11])      fgi <= 1'b0;
  end

  always_ff @(posedge clk) begin
    if (start)                fgo <= 1'b0;
    else if (out_ack)         fgo <= 1'b1;
    else if (pp & b[10])      fgo <= 1'b0;
  end

  // At most one bus source is requested in any cycle.
  a_one_bus_source : assert property (@(posedge clk) disable iff (start)
    (x & (x - 7'd1)) == '0);

endmodule
