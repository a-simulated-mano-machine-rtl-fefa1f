// tb_instr_decoder: all eight opcodes give exactly the matching D output.
module tb_instr_decoder;
  logic [2:0] opcode;
  logic [7:0] d;
  int checks = 0, failures = 0;

  instr_decoder dut (.opcode, .d);

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 8; k++) begin
      opcode = 3'(k); #1;
      for (int j = 0; j < 8; j++) begin
        checks++;
        if (d[j] !== (j == k)) begin
          failures++;
          $display("opcode %0d D%0d=%b", k, j, d[j]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
