// csa4 -- W-bit carry-save adder (W = 4 in the multiplier).
//
// W independent GDI full adders reduce three W-bit vectors to two:
// s[i] = x[i] ^ y[i] ^ z[i] and c[i] = majority(x[i], y[i], z[i]), so that
// x + y + z = s + (c << 1). No carry travels between bit positions, which is
// what keeps the delay of one CSA at one full adder.
//
// The source names a 4-bit carry-save adder of full adders; making the
// width a parameter is this design's.
//
// Interface: x, y, z in; s, c out (c[i] has weight 2^(i+1)). Combinational.
module csa4 #(
  parameter int W = 4
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic [W-1:0] z,
  output logic [W-1:0] s,
  output logic [W-1:0] c
);

  for (genvar i = 0; i < W; i++) begin : g_fa
    gdi_full_adder u_fa (.a(x[i]), .b(y[i]), .cin(z[i]), .sum(s[i]), .cout(c[i]));
  end

endmodule
