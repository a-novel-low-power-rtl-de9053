// tb_gdi_full_adder -- exhaustive check of the GDI full adder: {cout, sum}
// must equal the integer sum a + b + cin for all eight input triples.
module tb_gdi_full_adder;

  logic a, b, cin, sum, cout;
  int checks = 0, failures = 0;

  gdi_full_adder dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  initial begin
    #10000;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int total;
    for (int v = 0; v < 8; v++) begin
      {a, b, cin} = 3'(v);
      #1;
      total = int'(a) + int'(b) + int'(cin);
      checks += 2;
      if (sum !== 1'(total % 2)) begin
        failures++;
        $display("FAIL sum a=%b b=%b cin=%b sum=%b", a, b, cin, sum);
      end
      if (cout !== 1'(total / 2)) begin
        failures++;
        $display("FAIL cout a=%b b=%b cin=%b cout=%b", a, b, cin, cout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
