// seq_counter: the sequence counter SC and its 4-to-16 timing decoder.
//
// SC is a 4-bit counter. At each rising edge it clears to zero when `clr` is
// high, otherwise it counts up when `inr` is high (the machine is running)
// and holds when it is not. The decoder turns the count into the one-hot
// timing signals T0..T15; `t[i]` is high throughout the clock cycle in which
// SC = i. Every instruction ends by clearing SC, so an instruction's steps
// are T0, T1, T2, ... in consecutive cycles.
module seq_counter (
  input  logic        clk,
  input  logic        clr,
  input  logic        inr,
  output logic [3:0]  sc,
  output logic [15:0] t
);

  always_ff @(posedge clk) begin
    if (clr)      sc <= '0;
    else if (inr) sc <= sc + 4'd1;
  end

  always_comb begin
    t = '0;
    t[sc] = 1'b1;
  end

endmodule
