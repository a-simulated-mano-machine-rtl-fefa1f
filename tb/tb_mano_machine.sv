// tb_mano_machine: end-to-end test of the Mano basic computer at its full
// size (4096-word memory, no parameters changed).
//
// Program 1 adds ten numbers stored at 150H..159H with an indirect ADD
// through a pointer and two ISZ counters, then stores the sum at 10FH and
// halts. Expected: AC = SUM = 023FH (575), pointer 015AH, counter 0, and
// 285 clock cycles from start to halt (5 for BUN, 26 for the set-up, 9 loops
// of 25 and a last one of 20, then 9 for STA and HLT, using 4/5/6/7 cycles
// per instruction class).
//
// Program 2 executes every instruction of the set at least once: all
// register-reference operations (with skips both taken and not taken), the
// seven memory-reference instructions direct and indirect, a subroutine
// call with BSA and an indirect BUN return, ION, IOF, SKI, SKO, INP and OUT,
// and an interrupt raised by a character from the input device model. The
// results in memory are compared with values worked out by hand.
//
// The testbench counts how often each mechanism occurred (indirect address
// cycle, interrupt cycle, skip taken, ISZ skip, subroutine call, carry into
// E, circulate, input, output, halt) and fails any that never happened.
module tb_mano_machine;
  logic        clk = 1'b0;
  logic        start;
  logic        load_we;
  logic [11:0] load_addr;
  logic [15:0] load_data;
  logic        in_strobe;
  logic [7:0]  in_char;
  logic        out_ack;
  logic [7:0]  outr;
  logic        out_load, fgi, fgo, running, e, ien, r_flag;
  logic [15:0] ac, ir, dr, tr;
  logic [11:0] pc, ar;
  logic [3:0]  sc;

  int checks = 0, failures = 0;
  int cycles;
  int n_indirect = 0, n_interrupt = 0, n_skip = 0, n_isz_skip = 0, n_bsa = 0;
  int n_carry = 0, n_circ = 0, n_inp = 0, n_out = 0, n_halt = 0;

  mano_machine dut (
    .clk, .start, .load_we, .load_addr, .load_data, .in_strobe, .in_char,
    .out_ack, .outr, .out_load, .fgi, .fgo, .running, .ac, .e, .pc, .ar,
    .ir, .dr, .tr, .sc, .ien, .r_flag
  );

  always #5 clk = ~clk;

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ monitors
  logic [11:0] pc_at_t3;
  logic        was_skip_instr, was_isz_t6;
  always @(posedge clk) begin
    if (!start && running) begin
      cycles <= cycles + 1;
      if (!r_flag && sc == 4'd3 && ir[14:12] != 3'd7 && ir[15]) n_indirect++;
      if (r_flag && sc == 4'd0) n_interrupt++;
      if (!r_flag && sc == 4'd4 && ir[14:12] == 3'd5) n_bsa++;
      if (!r_flag && sc == 4'd3 && ir[14:12] == 3'd7 && !ir[15] && (ir[7] || ir[6])) n_circ++;
      if (!r_flag && sc == 4'd3 && ir == 16'hF800) n_inp++;
      if (!r_flag && sc == 4'd3 && ir == 16'h7001) n_halt++;
    end
    if (out_load) n_out++;
    was_skip_instr <= !start && running && !r_flag && sc == 4'd3 && ir[14:12] == 3'd7
                      && ((!ir[15] && (ir[11:0] & 12'h01E) != 0) || (ir[15] && (ir[9] || ir[8])));
    was_isz_t6 <= !start && running && !r_flag && sc == 4'd6 && ir[14:12] == 3'd6;
    pc_at_t3 <= pc;
  end
  always @(negedge clk) begin
    if (was_skip_instr && pc == pc_at_t3 + 12'd1) n_skip++;
    if (was_isz_t6 && pc == pc_at_t3 + 12'd1) n_isz_skip++;
  end
  logic [1:0] add_e;
  always @(posedge clk)
    if (!start && running && !r_flag && sc == 4'd5 && ir[14:12] == 3'd1 && !e) add_e <= 2'd1;
    else add_e <= 2'd0;
  always @(negedge clk) if (add_e == 2'd1 && e) n_carry++;

  // output device: takes OUTR, answers a few cycles later
  int out_delay = 0;
  logic [7:0] printed;
  always @(posedge clk) begin
    out_ack <= 1'b0;
    if (out_load) begin out_delay <= 6; end
    else if (out_delay > 1) out_delay <= out_delay - 1;
    else if (out_delay == 1) begin out_delay <= 0; out_ack <= 1'b1; printed <= outr; end
  end

  // --------------------------------------------------------------- tasks
  function automatic void cmp(string what, logic [31:0] got, logic [31:0] expv);
    checks++;
    if (got !== expv) begin
      failures++;
      $display("%s: got %h expected %h", what, got, expv);
    end
    else $display("%s = %h ok", what, got);
  endfunction

  task automatic poke(input logic [11:0] a, input logic [15:0] v);
    load_we = 1; load_addr = a; load_data = v;
    @(posedge clk); #1;
    load_we = 0;
  endtask

  task automatic clear_memory();
    for (int k = 0; k < 4096; k++) poke(12'(k), 16'h0000);
  endtask

  function automatic logic [15:0] peek(input logic [11:0] a);
    return dut.u_mem.mem[a];
  endfunction

  task automatic run_until_halt(input int limit);
    start = 0;
    @(posedge clk); #1;
    for (int k = 0; k < limit && running; k++) @(posedge clk);
    #1;
  endtask

  // ------------------------------------------------------------ programs
  initial begin
    start = 1; load_we = 0; load_addr = '0; load_data = '0;
    in_strobe = 0; in_char = '0;
    @(posedge clk); #1;
    clear_memory();

    // ===== Program 1: add ten numbers =====
    poke(12'h000, 16'h4100);
    poke(12'h100, 16'h210B); poke(12'h101, 16'h310C); poke(12'h102, 16'h210D);
    poke(12'h103, 16'h310E); poke(12'h104, 16'h7800); poke(12'h105, 16'h910C);
    poke(12'h106, 16'h610C); poke(12'h107, 16'h610E); poke(12'h108, 16'h4105);
    poke(12'h109, 16'h310F); poke(12'h10A, 16'h7001); poke(12'h10B, 16'h0150);
    poke(12'h10C, 16'h0000); poke(12'h10D, 16'hFFF6); poke(12'h10E, 16'h0000);
    poke(12'h10F, 16'h0000);
    for (int k = 0; k < 10; k++) begin
      logic [15:0] v;
      v = (k % 4 == 0) ? 16'd25 : (k % 4 == 1) ? 16'd50 : (k % 4 == 2) ? 16'd75 : 16'd100;
      poke(12'h150 + 12'(k), v);
    end
    @(posedge clk); #1;
    // start state: all registers cleared, T0
    cmp("reset PC", 32'(pc), 0);
    cmp("reset AC", 32'(ac), 0);
    cmp("reset SC", 32'(sc), 0);
    cycles = 0;
    start = 0;
    // T1 of the first instruction: memory 0000 is read and IR gets 4100H
    @(posedge clk); #1;
    cmp("T1 reached", 32'(sc), 1);
    cmp("bus carries 4100H", 32'(dut.bus), 32'h4100);
    cmp("T1 memory read active", 32'(dut.ctrl.mem_read), 1);
    cmp("T1 ldIR active", 32'(dut.ctrl.ld_ir), 1);
    @(posedge clk); #1;
    cmp("IR latched 4100H", 32'(ir), 32'h4100);
    cmp("T2 reached", 32'(sc), 2);
    cmp("T2 ldIR inactive", 32'(dut.ctrl.ld_ir), 0);
    run_until_halt(2000);
    cmp("P1 halted", 32'(running), 0);
    cmp("P1 AC sum", 32'(ac), 32'h023F);
    cmp("P1 SUM in memory", 32'(peek(12'h10F)), 32'h023F);
    cmp("P1 pointer", 32'(peek(12'h10C)), 32'h015A);
    cmp("P1 counter", 32'(peek(12'h10E)), 32'h0000);
    cmp("P1 cycles", 32'(cycles), 285);
    // final memory image of the program area and the operands
    begin
      logic [15:0] img [16];
      img = '{16'h210B, 16'h310C, 16'h210D, 16'h310E, 16'h7800, 16'h910C,
              16'h610C, 16'h610E, 16'h4105, 16'h310F, 16'h7001, 16'h0150,
              16'h015A, 16'hFFF6, 16'h0000, 16'h023F};
      for (int k = 0; k < 16; k++)
        cmp($sformatf("P1 word %h", 12'h100 + 12'(k)), 32'(peek(12'h100 + 12'(k))), 32'(img[k]));
      cmp("P1 operand 150", 32'(peek(12'h150)), 32'h0019);
      cmp("P1 operand 159", 32'(peek(12'h159)), 32'h0032);
      cmp("P1 word 15A untouched", 32'(peek(12'h15A)), 32'h0000);
    end

    // ===== Program 2: whole instruction set, I/O and interrupt =====
    start = 1;
    clear_memory();
    poke(12'h000, 16'h4100);  //      BUN 100
    poke(12'h001, 16'h4200);  //      BUN 200 (interrupt entry)
    poke(12'h100, 16'h7800);  //      CLA
    poke(12'h101, 16'h7400);  //      CLE
    poke(12'h102, 16'h7200);  //      CMA        AC=FFFF
    poke(12'h103, 16'h7020);  //      INC        AC=0000
    poke(12'h104, 16'h7004);  //      SZA        skips
    poke(12'h105, 16'h7001);  //      HLT
    poke(12'h106, 16'h7100);  //      CME        E=1
    poke(12'h107, 16'h7002);  //      SZE        no skip
    poke(12'h108, 16'h7040);  //      CIL        AC=0001 E=0
    poke(12'h109, 16'h7002);  //      SZE        skips
    poke(12'h10A, 16'h7001);  //      HLT
    poke(12'h10B, 16'h7080);  //      CIR        AC=0000 E=1
    poke(12'h10C, 16'h7080);  //      CIR        AC=8000 E=0
    poke(12'h10D, 16'h7008);  //      SNA        skips
    poke(12'h10E, 16'h7001);  //      HLT
    poke(12'h10F, 16'h7010);  //      SPA        no skip
    poke(12'h110, 16'h2150);  //      LDA 150    AC=8001
    poke(12'h111, 16'h1151);  //      ADD 151    AC=0003 E=1
    poke(12'h112, 16'h0152);  //      AND 152    AC=0003
    poke(12'h113, 16'h3153);  //      STA 153
    poke(12'h114, 16'h5160);  //      BSA 160
    poke(12'h115, 16'hA154);  //      LDA 154 I  AC=1234
    poke(12'h116, 16'h6156);  //      ISZ 156    FFFF->0, skips
    poke(12'h117, 16'h7001);  //      HLT
    poke(12'h118, 16'h3158);  //      STA 158
    poke(12'h119, 16'hF080);  //      ION
    poke(12'h11A, 16'h2171);  // WT,  LDA 171
    poke(12'h11B, 16'h7004);  //      SZA
    poke(12'h11C, 16'h411E);  //      BUN GOT
    poke(12'h11D, 16'h411A);  //      BUN WT
    poke(12'h11E, 16'hF400);  // GOT, OUT
    poke(12'h11F, 16'hF100);  // WO,  SKO
    poke(12'h120, 16'h411F);  //      BUN WO
    poke(12'h121, 16'h3157);  //      STA 157
    poke(12'h122, 16'h7001);  //      HLT
    poke(12'h150, 16'h8001);
    poke(12'h151, 16'h8002);
    poke(12'h152, 16'h0007);
    poke(12'h154, 16'h0155);
    poke(12'h155, 16'h1234);
    poke(12'h156, 16'hFFFF);
    poke(12'h161, 16'h7020);  //      INC        AC=0004
    poke(12'h162, 16'h3159);  //      STA 159
    poke(12'h163, 16'hC160);  //      BUN 160 I  return
    poke(12'h200, 16'h3170);  // ISR: STA 170
    poke(12'h201, 16'hF200);  //      SKI        skips
    poke(12'h202, 16'h4206);  //      BUN 206
    poke(12'h203, 16'hF800);  //      INP
    poke(12'h204, 16'h3171);  //      STA 171
    poke(12'h205, 16'hF040);  //      IOF
    poke(12'h206, 16'h2170);  //      LDA 170
    poke(12'h207, 16'hC000);  //      BUN 0 I
    @(posedge clk); #1;
    start = 0;
    // input device: a character arrives 40 cycles after ION
    fork
      begin
        wait (ien === 1'b1);
        repeat (40) @(posedge clk);
        #1 in_char = 8'h41; in_strobe = 1;
        @(posedge clk); #1 in_strobe = 0;
      end
    join_none
    run_until_halt(5000);
    cmp("P2 halted", 32'(running), 0);
    cmp("P2 halted at 122", 32'(pc), 32'h123);
    cmp("P2 AC", 32'(ac), 32'h0041);
    cmp("P2 E", 32'(e), 1);
    cmp("P2 STA 153 (ADD, AND)", 32'(peek(12'h153)), 32'h0003);
    cmp("P2 ISZ 156", 32'(peek(12'h156)), 32'h0000);
    cmp("P2 char 157", 32'(peek(12'h157)), 32'h0041);
    cmp("P2 indirect LDA 158", 32'(peek(12'h158)), 32'h1234);
    cmp("P2 subroutine 159", 32'(peek(12'h159)), 32'h0004);
    cmp("P2 BSA return address", 32'(peek(12'h160)), 32'h0115);
    cmp("P2 INP stored 171", 32'(peek(12'h171)), 32'h0041);
    cmp("P2 interrupt return addr", 32'(peek(12'h000)) inside {32'h11A, 32'h11B, 32'h11C, 32'h11D}, 1);
    cmp("P2 OUTR", 32'(outr), 32'h41);
    cmp("P2 printed", 32'(printed), 32'h41);
    cmp("P2 IEN off", 32'(ien), 0);
    cmp("P2 FGI cleared", 32'(fgi), 0);
    cmp("P2 FGO set", 32'(fgo), 1);

    $display("mechanisms: indirect %0d interrupt %0d skip %0d isz-skip %0d bsa %0d carry %0d circulate %0d inp %0d out %0d halt %0d",
             n_indirect, n_interrupt, n_skip, n_isz_skip, n_bsa, n_carry, n_circ, n_inp, n_out, n_halt);
    cmp("seen indirect",  32'(n_indirect  > 0), 1);
    cmp("seen interrupt", 32'(n_interrupt > 0), 1);
    cmp("seen skip",      32'(n_skip      > 0), 1);
    cmp("seen isz skip",  32'(n_isz_skip  > 0), 1);
    cmp("seen bsa",       32'(n_bsa       > 0), 1);
    cmp("seen carry",     32'(n_carry     > 0), 1);
    cmp("seen circulate", 32'(n_circ      > 0), 1);
    cmp("seen input",     32'(n_inp       > 0), 1);
    cmp("seen output",    32'(n_out       > 0), 1);
    cmp("seen halt",      32'(n_halt      > 1), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
