// mano_machine: the Mano basic computer, a 16-bit accumulator machine with a
// 4096 x 16 memory, a common bus and hardwired control.
//
// Registers AR and PC (12 bits), DR, AC, IR, TR (16 bits), INPR and OUTR
// (8 bits) hang on one 16-bit bus whose source is picked by the control
// unit. Memory is addressed by AR and reads onto / writes from the bus. AC is
// loaded from the adder-and-logic unit, which combines AC, DR, INPR and E.
// One instruction takes four to seven clock cycles (T0..T6): fetch in T0-T1,
// decode in T2, indirect address or register/IO execution in T3, memory-
// reference execution in T4-T6; an interrupt cycle takes three cycles.
//
// Interface: `start` (synchronous) clears every register and flag and starts
// the machine at address 0. A host may write memory through `load_*` at any
// time, normally while `start` is held. The input device presents a
// character with `in_strobe`/`in_char` (loads INPR, sets FGI); the output
// device reads `outr` when `out_load` pulses and raises `out_ack` when ready
// for the next character (sets FGO). `running` falls after HLT. The other
// outputs show the registers for observation. The wiring follows the
// machine's data-path drawing; the host load port, the device handshakes and
// the observation outputs are this design's additions.
module mano_machine
  import mano_pkg::*;
(
  input  logic        clk,
  input  logic        start,
  input  logic        load_we,
  input  logic [11:0] load_addr,
  input  logic [15:0] load_data,
  input  logic        in_strobe,
  input  logic [7:0]  in_char,
  input  logic        out_ack,
  output logic [7:0]  outr,
  output logic        out_load,
  output logic        fgi,
  output logic        fgo,
  output logic        running,
  output logic [15:0] ac,
  output logic        e,
  output logic [11:0] pc,
  output logic [11:0] ar,
  output logic [15:0] ir,
  output logic [15:0] dr,
  output logic [15:0] tr,
  output logic [3:0]  sc,
  output logic        ien,
  output logic        r_flag
);

  ctrl_t       ctrl;
  word_t       bus;
  word_t       mem_rdata;
  word_t       ac_in;
  char_t       inpr;
  logic        cout;

  control_unit u_ctrl (
    .clk       (clk),
    .start     (start),
    .ir        (ir),
    .ac        (ac),
    .dr        (dr),
    .cout      (cout),
    .in_strobe (in_strobe),
    .out_ack   (out_ack),
    .ctrl      (ctrl),
    .e         (e),
    .i_flag    (),
    .r_flag    (r_flag),
    .ien       (ien),
    .s_flag    (running),
    .fgi       (fgi),
    .fgo       (fgo),
    .sc        (sc),
    .t         ()
  );

  common_bus u_bus (
    .sel (ctrl.bus_sel),
    .ar  (ar),
    .pc  (pc),
    .dr  (dr),
    .ac  (ac),
    .ir  (ir),
    .tr  (tr),
    .mem (mem_rdata),
    .bus (bus)
  );

  mano_mem u_mem (
    .clk       (clk),
    .addr      (ar),
    .wdata     (bus),
    .read      (ctrl.mem_read),
    .write     (ctrl.mem_write),
    .rdata     (mem_rdata),
    .load_we   (load_we),
    .load_addr (load_addr),
    .load_data (load_data)
  );

  mano_reg #(.W(ADDR_W)) u_ar (
    .clk (clk), .ld (ctrl.ld_ar), .inr (ctrl.inr_ar), .clr (ctrl.clr_ar),
    .d (bus[ADDR_W-1:0]), .q (ar));

  mano_reg #(.W(ADDR_W)) u_pc (
    .clk (clk), .ld (ctrl.ld_pc), .inr (ctrl.inr_pc), .clr (ctrl.clr_pc),
    .d (bus[ADDR_W-1:0]), .q (pc));

  mano_reg #(.W(WORD_W)) u_dr (
    .clk (clk), .ld (ctrl.ld_dr), .inr (ctrl.inr_dr), .clr (ctrl.clr_dr),
    .d (bus), .q (dr));

  mano_reg #(.W(WORD_W)) u_ac (
    .clk (clk), .ld (ctrl.ld_ac), .inr (ctrl.inr_ac), .clr (ctrl.clr_ac),
    .d (ac_in), .q (ac));

  mano_reg #(.W(WORD_W)) u_ir (
    .clk (clk), .ld (ctrl.ld_ir), .inr (1'b0), .clr (ctrl.clr_ir),
    .d (bus), .q (ir));

  mano_reg #(.W(WORD_W)) u_tr (
    .clk (clk), .ld (ctrl.ld_tr), .inr (1'b0), .clr (ctrl.clr_tr),
    .d (bus), .q (tr));

  mano_reg #(.W(CHAR_W)) u_inpr (
    .clk (clk), .ld (in_strobe), .inr (1'b0), .clr (start),
    .d (in_char), .q (inpr));

  mano_reg #(.W(CHAR_W)) u_outr (
    .clk (clk), .ld (ctrl.ld_outr), .inr (1'b0), .clr (start),
    .d (bus[CHAR_W-1:0]), .q (outr));

  mano_alu u_alu (
    .op     (ctrl.alu_op),
    .ac     (ac),
    .dr     (dr),
    .inpr   (inpr),
    .e      (e),
    .ac_in  (ac_in),
    .cout   (cout),
    .cout_n ()
  );

  assign out_load = ctrl.ld_outr;

endmodule
