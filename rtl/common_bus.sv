// common_bus: the 16-bit common bus of the Mano basic computer.
//
// Seven sources share the bus; the 3-bit select S2..S0 picks one of them with
// the numbering of the data-path drawing: 1 = AR, 2 = PC, 3 = DR, 4 = AC,
// 5 = IR, 6 = TR, 7 = memory. The 12-bit AR and PC drive the low bits and the
// upper four bits read zero. Select 0 puts nothing on the bus and it reads
// zero (this design's choice; the drawing leaves input 0 unused). The bus is
// written as a multiplexer rather than tri-state buffers so that it is plain
// synthesizable logic; it is purely combinational.
module common_bus
  import mano_pkg::*;
(
  input  bus_sel_e sel,
  input  addr_t    ar,
  input  addr_t    pc,
  input  word_t    dr,
  input  word_t    ac,
  input  word_t    ir,
  input  word_t    tr,
  input  word_t    mem,
  output word_t    bus
);

  always_comb begin
    unique case (sel)
      BUS_AR:  bus = word_t'(ar);
      BUS_PC:  bus = word_t'(pc);
      BUS_DR:  bus = dr;
      BUS_AC:  bus = ac;
      BUS_IR:  bus = ir;
      BUS_TR:  bus = tr;
      BUS_MEM: bus = mem;
      default: bus = '0;
    endcase
  end

endmodule
