// tb_control_unit: runs the hardwired control unit on a stream of random
// instructions from the instruction set and compares every control line,
// the sequence counter and the flip-flops I, R, IEN, S, E, FGI and FGO with
// a reference model written instruction by instruction from the
// micro-operation table (fetch T0-T1, decode T2, then the instruction's own
// steps; interrupt cycle RT0-RT2).
//
// The testbench plays the data path: it hands the unit a new instruction
// whenever ldIR is raised, and drives AC, DR and the adder carry with random
// values (often zero, so that the skip conditions are met). Random device
// strobes set FGI and FGO, so that interrupts occur. After HLT it checks that
// the unit stays idle, then restarts it with `start`. It also counts the
// cycles each instruction took from T0 to the clear of SC and checks them
// against 4 (register, I/O), 5 (STA, BUN), 6 (AND, ADD, LDA, BSA) and 7 (ISZ).
module tb_control_unit;
  import mano_pkg::*;

  logic        clk = 1'b0;
  logic        start;
  word_t       ir, ac, dr;
  logic        cout, in_strobe, out_ack;
  ctrl_t       ctrl, ex;
  logic        e, i_flag, r_flag, ien, s_flag, fgi, fgo;
  logic [3:0]  sc;
  logic [15:0] t;

  // reference state
  logic [3:0] m_sc;
  logic m_i, m_r, m_ien, m_s, m_e, m_fgi, m_fgo;
  logic n_clr_sc;
  logic n_i, n_r, n_ien, n_s, n_e, n_fgi, n_fgo;
  int   instr_len;
  int   checks = 0, failures = 0;
  int   n_halts = 0, n_intr = 0, n_instr = 0;

  control_unit dut (
    .clk, .start, .ir, .ac, .dr, .cout, .in_strobe, .out_ack,
    .ctrl, .e, .i_flag, .r_flag, .ien, .s_flag, .fgi, .fgo, .sc, .t
  );

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Instruction codes of the instruction set.
  localparam logic [15:0] REGIO [18] = '{
    16'h7800, 16'h7400, 16'h7200, 16'h7100, 16'h7080, 16'h7040, 16'h7020,
    16'h7010, 16'h7008, 16'h7004, 16'h7002, 16'h7001,
    16'hF800, 16'hF400, 16'hF200, 16'hF100, 16'hF080, 16'hF040};

  function automatic word_t rand_instr();
    int k;
    k = $urandom_range(0, 24);
    if (k < 7)  return {1'($urandom), 3'(k), 12'($urandom)};
    k = $urandom_range(0, 17);
    // make HLT rare
    if (k == 11 && $urandom_range(0, 7) != 0) k = 10;
    return REGIO[k];
  endfunction

  // Expected control lines and next state from the reference state.
  task automatic model();
    logic [2:0] opc;
    logic [11:0] bb;
    logic skip;
    ex = '0;
    ex.bus_sel = BUS_NONE;
    opc = ir[14:12];
    bb  = ir[11:0];
    n_clr_sc = 1'b0;
    n_i = m_i; n_r = m_r; n_ien = m_ien; n_s = m_s; n_e = m_e;
    n_fgi = m_fgi; n_fgo = m_fgo;
    skip = 1'b0;
    if (m_s) begin
      if (m_r) begin
        case (m_sc)
          0: begin ex.bus_sel = BUS_PC; ex.ld_tr = 1; ex.clr_ar = 1; end
          1: begin ex.bus_sel = BUS_TR; ex.mem_write = 1; ex.clr_pc = 1; end
          2: begin ex.inr_pc = 1; n_ien = 0; n_r = 0; n_clr_sc = 1; end
          default: ;
        endcase
      end else begin
        case (m_sc)
          0: begin ex.bus_sel = BUS_PC; ex.ld_ar = 1; end
          1: begin ex.bus_sel = BUS_MEM; ex.mem_read = 1; ex.ld_ir = 1; ex.inr_pc = 1; end
          2: begin ex.bus_sel = BUS_IR; ex.ld_ar = 1; n_i = ir[15]; end
          default: ;
        endcase
      end
      if (m_sc >= 3) begin
        if (opc != 3'd7) begin
          if (m_sc == 3 && m_i) begin
            ex.bus_sel = BUS_MEM; ex.mem_read = 1; ex.ld_ar = 1;
          end
          case ({opc, m_sc})
            // AND, ADD, LDA: DR <- M[AR]; then the operation
            {3'd0, 4'd4}, {3'd1, 4'd4}, {3'd2, 4'd4}, {3'd6, 4'd4}: begin
              ex.bus_sel = BUS_MEM; ex.mem_read = 1; ex.ld_dr = 1;
            end
            {3'd0, 4'd5}: begin ex.alu_op.op_and = 1; ex.ld_ac = 1; n_clr_sc = 1; end
            {3'd1, 4'd5}: begin ex.alu_op.op_add = 1; ex.ld_ac = 1; n_e = cout; n_clr_sc = 1; end
            {3'd2, 4'd5}: begin ex.alu_op.op_dr = 1; ex.ld_ac = 1; ex.bus_sel = BUS_DR; n_clr_sc = 1; end
            {3'd3, 4'd4}: begin ex.bus_sel = BUS_AC; ex.mem_write = 1; n_clr_sc = 1; end
            {3'd4, 4'd4}: begin ex.bus_sel = BUS_AR; ex.ld_pc = 1; n_clr_sc = 1; end
            {3'd5, 4'd4}: begin ex.bus_sel = BUS_PC; ex.mem_write = 1; ex.inr_ar = 1; end
            {3'd5, 4'd5}: begin ex.bus_sel = BUS_AR; ex.ld_pc = 1; n_clr_sc = 1; end
            {3'd6, 4'd5}: begin ex.inr_dr = 1; end
            {3'd6, 4'd6}: begin
              ex.bus_sel = BUS_DR; ex.mem_write = 1; ex.inr_pc = (dr == 0); n_clr_sc = 1;
            end
            default: ;
          endcase
        end else if (m_sc == 3 && !m_i) begin
          n_clr_sc = 1;
          if (bb[11]) ex.clr_ac = 1;
          if (bb[10]) n_e = 0;
          if (bb[9])  begin ex.alu_op.op_com = 1; ex.ld_ac = 1; end
          if (bb[8])  n_e = ~m_e;
          if (bb[7])  begin ex.alu_op.op_shr = 1; ex.ld_ac = 1; n_e = ac[0]; end
          if (bb[6])  begin ex.alu_op.op_shl = 1; ex.ld_ac = 1; n_e = ac[15]; end
          if (bb[5])  ex.inr_ac = 1;
          if (bb[4] && !ac[15]) skip = 1;
          if (bb[3] &&  ac[15]) skip = 1;
          if (bb[2] && ac == 0) skip = 1;
          if (bb[1] && !m_e)    skip = 1;
          if (bb[0]) n_s = 0;
          ex.inr_pc = skip;
        end else if (m_sc == 3 && m_i) begin
          n_clr_sc = 1;
          if (bb[11]) begin ex.alu_op.op_inpr = 1; ex.ld_ac = 1; n_fgi = 0; end
          if (bb[10]) begin ex.bus_sel = BUS_AC; ex.ld_outr = 1; n_fgo = 0; end
          if (bb[9] && m_fgi) skip = 1;
          if (bb[8] && m_fgo) skip = 1;
          if (bb[7]) n_ien = 1;
          if (bb[6]) n_ien = 0;
          ex.inr_pc = skip;
        end
      end
      // interrupt request between instructions
      if (!(m_sc inside {0, 1, 2}) && m_ien && (m_fgi || m_fgo) && !(m_r && m_sc == 2))
        n_r = 1;
    end
    if (in_strobe) n_fgi = 1;
    if (out_ack)   n_fgo = 1;
  endtask

  function automatic void cmp(string what, logic [31:0] got, logic [31:0] expv);
    checks++;
    if (got !== expv) begin
      failures++;
      if (failures < 20)
        $display("%0t %s got %h exp %h (sc %0d ir %h r %b)", $time, what, got, expv, m_sc, ir, m_r);
    end
  endfunction

  initial begin
    start = 1; ir = 16'h4100; ac = '0; dr = '0; cout = 0; in_strobe = 0; out_ack = 0;
    @(posedge clk); #1;
    start = 0;
    m_sc = 0; m_i = 0; m_r = 0; m_ien = 0; m_s = 1; m_e = 0; m_fgi = 0; m_fgo = 0;
    instr_len = 0;
    for (int cyc = 0; cyc < 60000; cyc++) begin
      // random data-path values
      ac   = ($urandom_range(0, 3) == 0) ? 16'h0000 : 16'($urandom);
      dr   = ($urandom_range(0, 3) == 0) ? 16'h0000 : 16'($urandom);
      cout = 1'($urandom);
      in_strobe = ($urandom_range(0, 60) == 0);
      out_ack   = ($urandom_range(0, 60) == 0);
      #1;
      model();
      cmp("ctrl", 32'(ctrl), 32'(ex));
      cmp("sc", 32'(sc), 32'(m_sc));
      cmp("t", 32'(t), m_s ? 32'(16'h1 << m_sc) : 32'h0);
      cmp("flags", 32'({i_flag, r_flag, ien, s_flag, e, fgi, fgo}),
                   32'({m_i, m_r, m_ien, m_s, m_e, m_fgi, m_fgo}));
      @(posedge clk);
      // instruction length check at the end of every normal instruction
      if (m_s) begin
        instr_len++;
        if (n_clr_sc && !m_r) begin
          int want;
          n_instr++;
          case (ir[14:12])
            3'd0, 3'd1, 3'd2, 3'd5: want = 6;
            3'd3, 3'd4:             want = 5;
            3'd6:                   want = 7;
            default:                want = 4;
          endcase
          cmp("cycles", 32'(instr_len), 32'(want));
        end
        if (n_clr_sc) instr_len = 0;
        if (m_r && m_sc == 2) n_intr++;
      end
      // data path: the fetched word lands in IR
      if (ex.ld_ir) ir = rand_instr();
      m_sc = n_clr_sc ? 4'd0 : (m_s ? m_sc + 4'd1 : m_sc);
      m_i = n_i; m_r = n_r; m_ien = n_ien; m_s = n_s; m_e = n_e;
      m_fgi = n_fgi; m_fgo = n_fgo;
      #1;
      if (!m_s) begin
        // halted: control must stay idle
        n_halts++;
        repeat (3) begin
          #1;
          cmp("idle", 32'(ctrl), 32'(ctrl_t'('0)));
          @(posedge clk); #1;
        end
        start = 1; @(posedge clk); #1; start = 0;
        m_sc = 0; m_i = 0; m_r = 0; m_ien = 0; m_s = 1; m_e = 0; m_fgi = 0; m_fgo = 0;
        instr_len = 0;
      end
    end
    $display("instructions %0d interrupts %0d halts %0d", n_instr, n_intr, n_halts);
    cmp("saw interrupts", 32'(n_intr > 0), 1);
    cmp("saw halts", 32'(n_halts > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
