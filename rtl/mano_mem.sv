// mano_mem: the 4096 x 16 main memory of the Mano basic computer.
//
// The address comes from AR, the write data from the common bus. A read is
// combinational: with `read` high the word at `addr` appears on `rdata` in
// the same cycle, so a register can take M[AR] at the next rising edge, as the
// one-cycle micro-operations (IR <- M[AR], DR <- M[AR]) require. With `read`
// low, `rdata` is zero (the output-enable of the memory chip). A write stores
// `wdata` at the rising edge when `write` is high.
//
// A second write port, `load_*`, lets a host place a program in memory before
// the machine is started; it takes priority over `write`. This models
// loading the memory image from a text file and is this design's addition.
// All words start at zero.
module mano_mem
  import mano_pkg::*;
#(
  parameter int unsigned WORDS = MEM_WORDS
) (
  input  logic                     clk,
  input  logic [$clog2(WORDS)-1:0] addr,
  input  word_t                    wdata,
  input  logic                     read,
  input  logic                     write,
  output word_t                    rdata,
  input  logic                     load_we,
  input  logic [$clog2(WORDS)-1:0] load_addr,
  input  word_t                    load_data
);

  word_t mem [WORDS];

  initial begin
    for (int k = 0; k < int'(WORDS); k++) mem[k] = '0;
  end

  always_ff @(posedge clk) begin
    if (load_we)    mem[load_addr] <= load_data;
    else if (write) mem[addr]      <= wdata;
  end

  assign rdata = read ? mem[addr] : '0;

endmodule
