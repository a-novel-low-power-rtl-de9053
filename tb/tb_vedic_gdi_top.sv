// tb_vedic_gdi_top -- end-to-end test of both 4x4 GDI Vedic multipliers at
// their only (full) size.
//
// Every one of the 256 operand pairs is applied to Design 1 while Design 2
// receives the same set in a different order (index * 37 + 11, mod 256), so
// a mix-up between the two designs' ports is caught. Each product is
// compared with integer multiplication.
//
// It also counts how often each carry mechanism of the two data paths fires,
// by probing inside the designs, and fails if one never does:
//   - the crosswise carry of a 2x2 Vedic multiplier (step 2 into step 3)
//   - the carry-out p3 of a 2x2 multiplier (its result above 7)
//   - a carry out of the first and of the second carry-save adder
//   - a carry rippling into the top bit of Design 2's final adder
//   - a carry crossing Design 1's array rows (row 2) and its merging adder
//   - the product's top bit p7
module tb_vedic_gdi_top;

  logic [3:0] d1_a, d1_b, d2_a, d2_b;
  logic [7:0] d1_p, d2_p;
  int checks = 0, failures = 0;

  int n_cross_carry = 0, n_2x2_msb = 0, n_csa1_carry = 0, n_csa2_carry = 0;
  int n_rca_ripple = 0, n_d1_row2_carry = 0, n_d1_merge_carry = 0, n_p7 = 0;

  vedic_gdi_top dut (
    .d1_a(d1_a), .d1_b(d1_b), .d1_p(d1_p),
    .d2_a(d2_a), .d2_b(d2_b), .d2_p(d2_p)
  );

  initial begin
    #100000;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_cover(string what, int count);
    checks++;
    $display("mechanism %-34s happened %0d times", what, count);
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism %s never happened", what);
    end
  endtask

  initial begin
    logic [7:0] k2;
    for (int k = 0; k < 256; k++) begin
      k2 = 8'((k * 37 + 11) % 256);
      {d1_a, d1_b} = 8'(k);
      {d2_a, d2_b} = k2;
      #1;
      checks += 2;
      if (d1_p !== 8'(int'(d1_a) * int'(d1_b))) begin
        failures++;
        $display("FAIL design 1: %0d * %0d = %0d", d1_a, d1_b, d1_p);
      end
      if (d2_p !== 8'(int'(d2_a) * int'(d2_b))) begin
        failures++;
        $display("FAIL design 2: %0d * %0d = %0d", d2_a, d2_b, d2_p);
      end

      if (dut.u_design2.u_m0.c || dut.u_design2.u_m1.c ||
          dut.u_design2.u_m2.c || dut.u_design2.u_m3.c) n_cross_carry++;
      if (dut.u_design2.m3[3] || dut.u_design2.m0[3]) n_2x2_msb++;
      if (dut.u_design2.c1 != 4'd0) n_csa1_carry++;
      if (dut.u_design2.c2 != 4'd0) n_csa2_carry++;
      if (dut.u_design2.u_rca.carry[3]) n_rca_ripple++;
      if (dut.u_design1.ha2_c || dut.u_design1.ha3_c) n_d1_row2_carry++;
      if (dut.u_design1.fa7_c) n_d1_merge_carry++;
      if (d1_p[7]) n_p7++;
    end

    expect_cover("2x2 crosswise carry", n_cross_carry);
    expect_cover("2x2 product bit 3", n_2x2_msb);
    expect_cover("CSA1 carry", n_csa1_carry);
    expect_cover("CSA2 carry", n_csa2_carry);
    expect_cover("RCA carry into bit 3", n_rca_ripple);
    expect_cover("design 1 row-2 carry", n_d1_row2_carry);
    expect_cover("design 1 merging-adder carry", n_d1_merge_carry);
    expect_cover("product bit 7", n_p7);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
