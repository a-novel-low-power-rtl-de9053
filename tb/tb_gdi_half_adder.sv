// tb_gdi_half_adder -- exhaustive check of the GDI half adder: {cout, sum}
// must equal the integer sum a + b for all four input pairs.
module tb_gdi_half_adder;

  logic a, b, sum, cout;
  int checks = 0, failures = 0;

  gdi_half_adder dut (.a(a), .b(b), .sum(sum), .cout(cout));

  initial begin
    #10000;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {a, b} = 2'(v);
      #1;
      checks += 2;
      if (sum !== 1'((int'(a) + int'(b)) % 2)) begin
        failures++;
        $display("FAIL sum a=%b b=%b sum=%b", a, b, sum);
      end
      if (cout !== 1'((int'(a) + int'(b)) / 2)) begin
        failures++;
        $display("FAIL cout a=%b b=%b cout=%b", a, b, cout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
