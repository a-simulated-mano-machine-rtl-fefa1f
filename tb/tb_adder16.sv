// tb_adder16: compares the four-nibble ripple adder with 17-bit arithmetic
// done in the testbench, over corner cases (carries across every nibble
// boundary, overflow of the whole word) and random operands.
module tb_adder16;
  logic [15:0] ac, dr, sum;
  logic cout, cout_n;
  logic [16:0] expv;
  int checks = 0, failures = 0;

  adder16 dut (.ac, .dr, .sum, .cout, .cout_n);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(input logic [15:0] a, input logic [15:0] b);
    ac = a; dr = b; #1;
    expv = {1'b0, a} + {1'b0, b};
    checks++;
    if ({cout, sum} !== expv || cout_n !== ~expv[16]) begin
      failures++;
      $display("%h + %h = %b %h exp %h", a, b, cout, sum, expv);
    end
  endtask

  initial begin
    one(16'h0000, 16'h0000);
    one(16'hFFFF, 16'h0001);
    one(16'h000F, 16'h0001);
    one(16'h00FF, 16'h0001);
    one(16'h0FFF, 16'h0001);
    one(16'h8001, 16'h8002);
    one(16'hFFFF, 16'hFFFF);
    one(16'h0019, 16'h0032);
    for (int n = 0; n < 20000; n++) one(16'($urandom), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
