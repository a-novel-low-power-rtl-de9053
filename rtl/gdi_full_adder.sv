// gdi_full_adder -- ten-transistor full adder from modified GDI cells.
//
// Five GDI cells, two transistors each:
//   nb   = ~b
//   h    = a ? nb : b          a ^ b
//   nc   = ~cin
//   sum  = h ? nc : cin        a ^ b ^ cin
//   cout = h ? cin : a         majority(a, b, cin): when a and b differ the
//                              carry is cin, when they agree it is a (= b)
// The ten-transistor count is the source's; the cell-level wiring is this
// design's choice.
//
// Interface: a, b, cin in; sum, cout out. Combinational.
module gdi_full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);

  logic nb, nc, h;

  gdi_inv  u_inv_b (.a(b),   .y(nb));
  gdi_cell u_xor   (.g(a),   .p(b),   .n(nb),  .out(h));
  gdi_inv  u_inv_c (.a(cin), .y(nc));
  gdi_cell u_sum   (.g(h),   .p(cin), .n(nc),  .out(sum));
  gdi_cell u_carry (.g(h),   .p(a),   .n(cin), .out(cout));

endmodule
