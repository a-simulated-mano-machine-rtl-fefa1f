// instr_decoder: 3-to-8 decoder of the opcode field IR(14:12).
//
// Output d[k] is high when IR(14:12) = k: D0..D6 select the memory-reference
// instructions AND, ADD, LDA, STA, BUN, BSA, ISZ and D7 marks a register-
// reference or input-output instruction. Purely combinational, as in the
// control-unit drawing, where the decoder outputs stay valid for as long as
// IR holds the instruction.
module instr_decoder (
  input  logic [2:0] opcode,
  output logic [7:0] d
);

  always_comb begin
    d = '0;
    d[opcode] = 1'b1;
  end

endmodule
