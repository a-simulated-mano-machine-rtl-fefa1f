// tb_seq_counter: counts with random clears and holds and checks the count
// and the one-hot timing outputs T0..T15 against a reference counter,
// including the wrap from 15 to 0.
module tb_seq_counter;
  logic clk = 1'b0;
  logic clr, inr;
  logic [3:0] sc, m;
  logic [15:0] t;
  int checks = 0, failures = 0;

  seq_counter dut (.clk, .clr, .inr, .sc, .t);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clr = 1; inr = 0;
    @(posedge clk); #1;
    m = 0;
    for (int n = 0; n < 2000; n++) begin
      clr = (n > 40) && ($urandom_range(0, 9) == 0);
      inr = (n < 40) || ($urandom_range(0, 4) != 0);
      @(posedge clk); #1;
      if (clr) m = 0; else if (inr) m = m + 1;
      checks += 2;
      if (sc !== m) begin failures++; $display("sc %0d exp %0d", sc, m); end
      if (t !== (16'h1 << m)) begin failures++; $display("t %h at %0d", t, m); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
