// tb_alu_slice: exhaustive test of one adder-and-logic bit. For every single
// operation select (and for none) and every combination of the six data
// inputs, the output is compared with the operation's meaning: AND, sum,
// DR, INPR, complement, right neighbour for SHR, left neighbour for SHL.
module tb_alu_slice;
  import mano_pkg::*;
  alu_op_t op;
  logic ac_i, dr_i, sum_i, inpr_i, ac_left, ac_right, ac_in, expv;
  int checks = 0, failures = 0;

  alu_slice dut (.op, .ac_i, .dr_i, .sum_i, .inpr_i, .ac_left, .ac_right, .ac_in);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k <= 7; k++) begin
      for (int v = 0; v < 64; v++) begin
        {ac_i, dr_i, sum_i, inpr_i, ac_left, ac_right} = 6'(v);
        op = (k == 7) ? alu_op_t'(7'b0) : alu_op_t'(7'b1 << (6 - k));
        case (k)
          0: expv = ac_i & dr_i;    // AND
          1: expv = sum_i;          // ADD
          2: expv = dr_i;           // DR
          3: expv = inpr_i;         // INPR
          4: expv = ~ac_i;          // COM
          5: expv = ac_left;        // SHR
          6: expv = ac_right;       // SHL
          default: expv = 1'b0;
        endcase
        #1;
        checks++;
        if (ac_in !== expv) begin
          failures++;
          $display("op %b in %b out %b exp %b", op, 6'(v), ac_in, expv);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
