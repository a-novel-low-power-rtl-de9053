// gdi_inv -- inverter as a GDI cell with P tied to VDD and N tied to GND,
// which is exactly a static CMOS inverter (two transistors). The half and
// full adders use it to make the complemented inputs that their XOR cells
// need. The source names no inverter; using one inside the adders is this
// design's choice. Combinational: y = ~a.
module gdi_inv (
  input  logic a,
  output logic y
);

  gdi_cell u_cell (.g(a), .p(1'b1), .n(1'b0), .out(y));

endmodule
