// adder16: the 16-bit adder of the adder-and-logic unit, AC + DR.
//
// Four 4-bit adders are chained ripple fashion: nibble k adds AC(4k+3:4k)
// and DR(4k+3:4k), taking the carry of nibble k-1. The first carry-in is tied
// low and the last carry-out is Cout, which the ADD instruction copies into
// E. Its complement /Cout is also provided, as in the adder drawing (the
// control logic uses it to clear E). Purely combinational; the structure
// follows the drawing of the four chained adders.
module adder16 (
  input  logic [15:0] ac,
  input  logic [15:0] dr,
  output logic [15:0] sum,
  output logic        cout,
  output logic        cout_n
);

  logic [4:0] carry;

  assign carry[0] = 1'b0;

  for (genvar k = 0; k < 4; k++) begin : g_nib
    adder4 u_add (
      .x  (ac[4*k +: 4]),
      .y  (dr[4*k +: 4]),
      .ci (carry[k]),
      .s  (sum[4*k +: 4]),
      .co (carry[k+1])
    );
  end

  assign cout   = carry[4];
  assign cout_n = ~carry[4];

endmodule
