// gdi_cell -- modified Gate Diffusion Input (GDI) cell, the primitive every
// other block in this multiplier library is built from.
//
// A GDI cell is one PMOS and one NMOS transistor sharing a gate input G. The
// PMOS connects input P to OUT while G is low; the NMOS connects input N to
// OUT while G is high. Logically the cell is therefore a 2:1 multiplexer,
// out = g ? n : p. Tying P and N to constants or to other signals yields AND,
// OR, XOR, inverter and multiplexer functions with only two transistors.
//
// The "modified" cell ties the PMOS body to VDD and the NMOS body to GND so
// that it can be built in a standard 45 nm bulk process; that is an
// electrical property with no logic effect and is not modelled here. The
// model assumes full-swing outputs.
//
// The cell's connections and the body ties are the source's; reading the
// cell as an ideal multiplexer is this model's.
//
// Interface: g, p, n in; out. Purely combinational, no clock.
module gdi_cell (
  input  logic g,   // common gate input
  input  logic p,   // passed to out when g = 0 (PMOS side)
  input  logic n,   // passed to out when g = 1 (NMOS side)
  output logic out
);

  always_comb out = g ? n : p;

endmodule
