// mano_reg: general register of the Mano basic computer with parallel load
// (LD), increment (INR), clear (CLR) and hold.
//
// The same register serves as AR and PC (12 bits), DR, AC, IR and TR
// (16 bits) and INPR/OUTR (8 bits); the width is the parameter W, default 16.
// All three controls act on the rising clock edge. When several are high at
// once, CLR wins over LD and LD over INR; the control unit never raises two
// at once, so this order is only this design's tie-break. The register map
// and the LD/INR/CLR controls follow the machine's data-path drawing; the
// priority order and the synchronous clear are this design's choices.
module mano_reg #(
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         ld,    // load d
  input  logic         inr,   // increment by one, wraps around
  input  logic         clr,   // clear to zero
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  always_ff @(posedge clk) begin
    if (clr)      q <= '0;
    else if (ld)  q <= d;
    else if (inr) q <= q + W'(1);
  end

endmodule
