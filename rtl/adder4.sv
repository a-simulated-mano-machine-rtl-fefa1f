// adder4: 4-bit binary adder with carry in and carry out, the building block
// of the 16-bit adder (the logic simulator's built-in 4-bit adder part).
// Purely combinational: {co, s} = x + y + ci.
module adder4 (
  input  logic [3:0] x,
  input  logic [3:0] y,
  input  logic       ci,
  output logic [3:0] s,
  output logic       co
);

  assign {co, s} = 5'(x) + 5'(y) + 5'(ci);

endmodule
