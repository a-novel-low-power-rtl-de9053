// vedic_gdi_top -- the two 4x4-bit GDI Vedic multipliers side by side.
//
// Design 1 (vedic4_design1) is a carry-save array over all sixteen partial
// products; Design 2 (vedic4_design2) composes four 2x2 Vedic multipliers
// with two carry-save adders and a ripple-carry adder. They compute the same
// function with different structures, so each has its own operand and
// product ports and they can be compared or used independently.
//
// Both designs are the source's; giving each its own ports is this
// design's choice.
//
// Interface: d1_a, d1_b -> d1_p = d1_a * d1_b; d2_a, d2_b -> d2_p = d2_a * d2_b
// (all unsigned). Purely combinational: no clock, no reset, result valid one
// propagation delay after the operands change.
module vedic_gdi_top (
  input  logic [3:0] d1_a,
  input  logic [3:0] d1_b,
  output logic [7:0] d1_p,
  input  logic [3:0] d2_a,
  input  logic [3:0] d2_b,
  output logic [7:0] d2_p
);

  vedic4_design1 u_design1 (.a(d1_a), .b(d1_b), .p(d1_p));
  vedic4_design2 u_design2 (.a(d2_a), .b(d2_b), .p(d2_p));

endmodule
