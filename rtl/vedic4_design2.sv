// vedic4_design2 -- 4x4-bit unsigned multiplier, "Design 2": the operands
// are split into 2-bit halves (a = aH:aL, b = bH:bL) and four 2x2 Vedic
// multipliers form
//   m0 = aL*bL,  m1 = aH*bL,  m2 = aL*bH,  m3 = aH*bH,
// so that a*b = m0 + (m1 + m2) << 2 + m3 << 4. Two 4-bit carry-save adders
// and one 4-bit ripple-carry adder add these up (200 transistors):
//
//   p[1:0] = m0[1:0]
//   CSA1   : m1 + m2 + {00, m0[3:2]}            (weight 2^2)
//            p2 = s1[0]
//   CSA2   : {0, s1[3:1]} + c1 + {m3[2:0], 0}   (weight 2^3)
//            p3 = s2[0]
//   RCA    : {m3[3], s2[3:1]} + c2, carry in 0  (weight 2^4)
//            p[7:4] = RCA sum
// The ripple adder's carry out is always 0 because a 4x4 product fits in 8
// bits; a deferred assertion checks that invariant instead of using it. The block structure, operand halves, the
// "00" padding and the bus widths follow the source's block diagram; the
// bit-level alignment of the slices into CSA2 and the RCA is this design's,
// chosen by weight.
//
// Interface: a[3:0], b[3:0] in; p[7:0] = a * b out. Combinational.
module vedic4_design2 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [7:0] p
);

  logic [3:0] m0, m1, m2, m3;
  logic [3:0] s1, c1, s2, c2;
  logic       rca_cout;

  vedic_2x2 u_m3 (.a(a[3:2]), .b(b[3:2]), .p(m3));
  vedic_2x2 u_m2 (.a(a[1:0]), .b(b[3:2]), .p(m2));
  vedic_2x2 u_m1 (.a(a[3:2]), .b(b[1:0]), .p(m1));
  vedic_2x2 u_m0 (.a(a[1:0]), .b(b[1:0]), .p(m0));

  assign p[1:0] = m0[1:0];

  csa4 #(.W(4)) u_csa1 (
    .x(m1), .y(m2), .z({2'b00, m0[3:2]}),
    .s(s1), .c(c1)
  );
  assign p[2] = s1[0];

  csa4 #(.W(4)) u_csa2 (
    .x({1'b0, s1[3:1]}), .y(c1), .z({m3[2:0], 1'b0}),
    .s(s2), .c(c2)
  );
  assign p[3] = s2[0];

  rca4 #(.W(4)) u_rca (
    .x({m3[3], s2[3:1]}), .y(c2), .cin(1'b0),
    .s(p[7:4]), .cout(rca_cout)
  );

  // a 4x4 product never exceeds 8 bits, so the final adder cannot overflow
  always_comb begin
    a_no_overflow: assert final (!rca_cout)
      else $error("vedic4_design2: final adder overflowed for %0d * %0d", a, b);
  end

endmodule
