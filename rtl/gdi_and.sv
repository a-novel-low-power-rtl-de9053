// gdi_and -- two-transistor AND gate from one modified GDI cell.
//
// A drives the common gate, P is tied to logic 0 and B drives N. With A low
// the PMOS passes 0; with A high the NMOS passes B; so y = a & b. This is the
// partial-product generator of all multipliers in this library.
//
// The connections (A on G, 0 on P, B on N) are the source's.
//
// Interface: a, b in; y out. Combinational.
module gdi_and (
  input  logic a,
  input  logic b,
  output logic y
);

  gdi_cell u_cell (.g(a), .p(1'b0), .n(b), .out(y));

endmodule
