// mano_pkg: widths, bus-source codes and the control-signal bundle shared by
// the blocks of the Mano basic computer.
//
// Word and address widths follow the register map of the machine: a
// 4096-word by 16-bit memory, hence 12-bit AR/PC and 16-bit DR, AC, IR, TR,
// and 8-bit INPR/OUTR. The bus-source numbering 1..7 is the one printed on
// the common-bus drawing (AR=1 ... memory=7); code 0 (nothing on the bus,
// bus reads as zero) is this design's choice. The ctrl_t struct gathers every
// control line the control unit drives into the data path.
package mano_pkg;

  localparam int unsigned WORD_W = 16;
  localparam int unsigned ADDR_W = 12;
  localparam int unsigned CHAR_W = 8;
  localparam int unsigned MEM_WORDS = 4096;

  typedef logic [WORD_W-1:0] word_t;
  typedef logic [ADDR_W-1:0] addr_t;
  typedef logic [CHAR_W-1:0] char_t;

  // Common-bus select S2 S1 S0.
  typedef enum logic [2:0] {
    BUS_NONE = 3'd0,
    BUS_AR   = 3'd1,
    BUS_PC   = 3'd2,
    BUS_DR   = 3'd3,
    BUS_AC   = 3'd4,
    BUS_IR   = 3'd5,
    BUS_TR   = 3'd6,
    BUS_MEM  = 3'd7
  } bus_sel_e;

  // Adder-and-logic operation selects (one-hot in use; ORed into ldAC).
  typedef struct packed {
    logic op_and;   // AC <- AC and DR
    logic op_add;   // AC <- AC + DR, E <- Cout
    logic op_dr;    // AC <- DR
    logic op_inpr;  // AC(7:0) <- INPR
    logic op_com;   // AC <- not AC
    logic op_shr;   // AC <- shr AC, AC(15) <- E
    logic op_shl;   // AC <- shl AC, AC(0) <- E
  } alu_op_t;

  // Every control line from the control unit to the data path.
  typedef struct packed {
    bus_sel_e bus_sel;
    logic     mem_read;
    logic     mem_write;
    logic     ld_ar, inr_ar, clr_ar;
    logic     ld_pc, inr_pc, clr_pc;
    logic     ld_dr, inr_dr, clr_dr;
    logic     ld_ac, inr_ac, clr_ac;
    logic     ld_ir, clr_ir;
    logic     ld_tr, clr_tr;
    logic     ld_outr;
    alu_op_t  alu_op;
  } ctrl_t;

endpackage
