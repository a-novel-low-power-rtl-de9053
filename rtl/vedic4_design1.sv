// vedic4_design1 -- 4x4-bit unsigned multiplier, "Design 1": all sixteen
// partial products a_i b_j are formed at once by GDI AND gates, then a
// three-row carry-save array of 4 half adders and 8 full adders (136
// transistors in all) reduces each column to one product bit.
//
// Column k holds the partial products with i + j = k. Cell by cell:
//   row 1  HA1  (a1b0, a0b1)            -> p1, carry to col 2
//          FA1  (a2b0, a1b1, a0b2)      -> col 2 sum, carry to col 3
//          FA2  (a2b1, a1b2, a0b3)      -> col 3 sum, carry to col 4
//          FA3  (a3b1, a2b2, a1b3)      -> col 4 sum, carry to col 5
//          FA4  (a3b2, a2b3, FA3 carry) -> col 5 sum, carry to col 6
//   row 2  HA2  (a3b0, FA2 sum)         -> col 3,     carry to col 4
//          HA3  (FA3 sum, FA2 carry)    -> col 4,     carry to col 5
//   row 3  HA4  (FA1 sum, HA1 carry)                  -> p2
//          FA5  (HA2 sum, FA1 carry, HA4 carry)       -> p3
//          FA6  (HA3 sum, HA2 carry, FA5 carry)       -> p4
//          FA7  (FA4 sum, HA3 carry, FA6 carry)       -> p5
//          FA8  (a3b3, FA4 carry, FA7 carry)          -> p6, carry = p7
// The cell counts, the partial products on each first-row cell, the a3b0
// and a3b3 entry points and the row placement follow the source's block
// diagram; the carry and sum wiring between the rows is this design's,
// chosen so that every column adds up with exactly that set of cells. The
// bottom row is the final (ripple) vector-merging adder.
//
// Interface: a[3:0], b[3:0] in; p[7:0] = a * b out. Combinational.
module vedic4_design1 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [7:0] p
);

  // pp[i][j] = a[i] & b[j]
  logic [3:0][3:0] pp;

  for (genvar i = 0; i < 4; i++) begin : g_row
    for (genvar j = 0; j < 4; j++) begin : g_col
      gdi_and u_and (.a(a[i]), .b(b[j]), .y(pp[i][j]));
    end
  end

  logic ha1_c;
  logic fa1_s, fa1_c, fa2_s, fa2_c, fa3_s, fa3_c, fa4_s, fa4_c;
  logic ha2_s, ha2_c, ha3_s, ha3_c;
  logic ha4_c, fa5_c, fa6_c, fa7_c;

  assign p[0] = pp[0][0];

  // row 1
  gdi_half_adder u_ha1 (.a(pp[1][0]), .b(pp[0][1]), .sum(p[1]), .cout(ha1_c));
  gdi_full_adder u_fa1 (.a(pp[2][0]), .b(pp[1][1]), .cin(pp[0][2]), .sum(fa1_s), .cout(fa1_c));
  gdi_full_adder u_fa2 (.a(pp[2][1]), .b(pp[1][2]), .cin(pp[0][3]), .sum(fa2_s), .cout(fa2_c));
  gdi_full_adder u_fa3 (.a(pp[3][1]), .b(pp[2][2]), .cin(pp[1][3]), .sum(fa3_s), .cout(fa3_c));
  gdi_full_adder u_fa4 (.a(pp[3][2]), .b(pp[2][3]), .cin(fa3_c),    .sum(fa4_s), .cout(fa4_c));

  // row 2
  gdi_half_adder u_ha2 (.a(pp[3][0]), .b(fa2_s), .sum(ha2_s), .cout(ha2_c));
  gdi_half_adder u_ha3 (.a(fa3_s),    .b(fa2_c), .sum(ha3_s), .cout(ha3_c));

  // row 3: vector-merging adder
  gdi_half_adder u_ha4 (.a(fa1_s), .b(ha1_c), .sum(p[2]), .cout(ha4_c));
  gdi_full_adder u_fa5 (.a(ha2_s),    .b(fa1_c), .cin(ha4_c), .sum(p[3]), .cout(fa5_c));
  gdi_full_adder u_fa6 (.a(ha3_s),    .b(ha2_c), .cin(fa5_c), .sum(p[4]), .cout(fa6_c));
  gdi_full_adder u_fa7 (.a(fa4_s),    .b(ha3_c), .cin(fa6_c), .sum(p[5]), .cout(fa7_c));
  gdi_full_adder u_fa8 (.a(pp[3][3]), .b(fa4_c), .cin(fa7_c), .sum(p[6]), .cout(p[7]));

endmodule
