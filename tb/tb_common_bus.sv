// tb_common_bus: checks that each select code 0..7 puts the right source on
// the 16-bit bus (1 AR, 2 PC, 3 DR, 4 AC, 5 IR, 6 TR, 7 memory, 0 nothing),
// with AR and PC zero-extended, over random source values.
module tb_common_bus;
  import mano_pkg::*;
  bus_sel_e sel;
  addr_t ar, pc;
  word_t dr, ac, ir, tr, mem, bus, expv;
  int checks = 0, failures = 0;

  common_bus dut (.sel, .ar, .pc, .dr, .ac, .ir, .tr, .mem, .bus);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 400; n++) begin
      ar = 12'($urandom); pc = 12'($urandom);
      dr = 16'($urandom); ac = 16'($urandom); ir = 16'($urandom);
      tr = 16'($urandom); mem = 16'($urandom);
      for (int s = 0; s < 8; s++) begin
        sel = bus_sel_e'(s);
        case (s)
          1: expv = {4'h0, ar};
          2: expv = {4'h0, pc};
          3: expv = dr;
          4: expv = ac;
          5: expv = ir;
          6: expv = tr;
          7: expv = mem;
          default: expv = 16'h0000;
        endcase
        #1;
        checks++;
        if (bus !== expv) begin
          failures++;
          $display("sel %0d bus %h exp %h", s, bus, expv);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
