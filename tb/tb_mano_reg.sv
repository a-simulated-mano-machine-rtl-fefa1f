// tb_mano_reg: self-checking test of the LD/INR/CLR register.
// Drives random combinations of the three controls on a 16-bit and a
// 12-bit instance and compares each with a reference value kept in the
// testbench (CLR over LD over INR, increment wraps at the width).
module tb_mano_reg;
  logic        clk = 1'b0;
  logic        ld, inr, clr;
  logic [15:0] d;
  logic [15:0] q16;
  logic [11:0] q12;
  logic [15:0] m16;
  logic [11:0] m12;
  int checks = 0, failures = 0;

  mano_reg #(.W(16)) dut16 (.clk, .ld, .inr, .clr, .d(d), .q(q16));
  mano_reg #(.W(12)) dut12 (.clk, .ld, .inr, .clr, .d(d[11:0]), .q(q12));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ld = 0; inr = 0; clr = 1; d = '0;
    @(posedge clk); #1;
    m16 = '0; m12 = '0;
    for (int n = 0; n < 3000; n++) begin
      ld  = ($urandom_range(0, 3) == 0);
      inr = ($urandom_range(0, 1) == 0);
      clr = ($urandom_range(0, 15) == 0);
      d   = (n % 97 == 5) ? 16'hFFFF : 16'($urandom);
      @(posedge clk); #1;
      if (clr)      begin m16 = '0;        m12 = '0;       end
      else if (ld)  begin m16 = d;         m12 = d[11:0];  end
      else if (inr) begin m16 = m16 + 1'b1; m12 = m12 + 1'b1; end
      checks += 2;
      if (q16 !== m16) begin failures++; $display("q16 %h exp %h", q16, m16); end
      if (q12 !== m12) begin failures++; $display("q12 %h exp %h", q12, m12); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
