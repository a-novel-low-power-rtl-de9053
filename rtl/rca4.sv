// rca4 -- W-bit ripple-carry adder (W = 4 in the multiplier) of GDI full
// adders: the carry out of bit i is the carry in of bit i+1.
//
// The source names a 4-bit ripple-carry adder; the carry input and output
// ports and the width parameter are this design's.
//
// Interface: x, y, cin in; s = low W bits of x + y + cin, cout = bit W.
// Combinational; delay grows by one full adder per bit.
module rca4 #(
  parameter int W = 4
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);

  logic [W:0] carry;

  assign carry[0] = cin;

  for (genvar i = 0; i < W; i++) begin : g_fa
    gdi_full_adder u_fa (.a(x[i]), .b(y[i]), .cin(carry[i]), .sum(s[i]), .cout(carry[i+1]));
  end

  assign cout = carry[W];

endmodule
