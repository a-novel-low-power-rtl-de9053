// vedic_2x2 -- 2x2-bit unsigned multiplier by the Urdhva Tiryakbhyam
// ("vertically and crosswise") method, built from 4 GDI AND gates and 2 GDI
// half adders (20 transistors).
//
//   vertical   : p0 = a0 b0
//   crosswise  : a1 b0 + a0 b1 -> half adder -> p1, carry c
//   vertical   : a1 b1 + c     -> half adder -> p2 (sum), p3 (carry)
//
// The three steps and the AND/half-adder structure are the source's;
// treating the operands as unsigned is this design's reading.
//
// Interface: a[1:0], b[1:0] in; p[3:0] = a * b out. Combinational.
module vedic_2x2 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] p
);

  logic a0b0, a1b0, a0b1, a1b1, c;

  gdi_and u_and00 (.a(a[0]), .b(b[0]), .y(a0b0));
  gdi_and u_and10 (.a(a[1]), .b(b[0]), .y(a1b0));
  gdi_and u_and01 (.a(a[0]), .b(b[1]), .y(a0b1));
  gdi_and u_and11 (.a(a[1]), .b(b[1]), .y(a1b1));

  assign p[0] = a0b0;

  gdi_half_adder u_ha0 (.a(a1b0), .b(a0b1), .sum(p[1]), .cout(c));
  gdi_half_adder u_ha1 (.a(a1b1), .b(c),    .sum(p[2]), .cout(p[3]));

endmodule
