// gdi_half_adder -- six-transistor half adder from modified GDI cells.
//
// Three GDI cells, two transistors each:
//   nb   = ~b                  inverter (GDI cell with P = 1, N = 0)
//   sum  = a ? nb : b          GDI cell G = a, P = b, N = ~b  -> a ^ b
//   cout = a ? b  : 0          GDI cell G = a, P = 0, N = b   -> a & b
// The six-transistor count and the port names are the source's; the
// assignment of the three cells is this design's choice.
//
// Interface: a, b in; sum, cout out. Combinational.
module gdi_half_adder (
  input  logic a,
  input  logic b,
  output logic sum,
  output logic cout
);

  logic nb;

  gdi_inv  u_inv_b (.a(b), .y(nb));
  gdi_cell u_sum   (.g(a), .p(b),    .n(nb), .out(sum));
  gdi_cell u_carry (.g(a), .p(1'b0), .n(b),  .out(cout));

endmodule
