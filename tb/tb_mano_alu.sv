// tb_mano_alu: checks the 16-bit adder-and-logic unit operation by
// operation on random AC, DR, INPR and E: AND, ADD with carry out, transfer
// of DR, INPR into the low byte with zeros above, complement, and the
// circulates through E (E enters AC(15) on SHR and AC(0) on SHL).
module tb_mano_alu;
  import mano_pkg::*;
  alu_op_t op;
  word_t ac, dr, ac_in, expv;
  char_t inpr;
  logic e, cout, cout_n;
  logic [16:0] s17;
  int checks = 0, failures = 0;

  mano_alu dut (.op, .ac, .dr, .inpr, .e, .ac_in, .cout, .cout_n);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 3000; n++) begin
      ac = 16'($urandom); dr = 16'($urandom); inpr = 8'($urandom); e = 1'($urandom);
      if (n == 0) begin ac = 16'h8001; dr = 16'h8002; end
      s17 = {1'b0, ac} + {1'b0, dr};
      for (int k = 0; k < 7; k++) begin
        op = alu_op_t'(7'b1 << (6 - k));
        case (k)
          0: expv = ac & dr;
          1: expv = s17[15:0];
          2: expv = dr;
          3: expv = {8'h00, inpr};
          4: expv = ~ac;
          5: expv = {e, ac[15:1]};
          default: expv = {ac[14:0], e};
        endcase
        #1;
        checks++;
        if (ac_in !== expv) begin
          failures++;
          $display("op %0d ac %h dr %h e %b got %h exp %h", k, ac, dr, e, ac_in, expv);
        end
      end
      checks++;
      if (cout !== s17[16] || cout_n !== ~s17[16]) begin
        failures++;
        $display("carry %h+%h got %b", ac, dr, cout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
