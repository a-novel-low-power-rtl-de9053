// tb_gdi_cell -- exhaustive check of the GDI cell: for all eight (g, p, n)
// combinations the output must be p while the gate is low and n while it is
// high, written here as the sum of products (g & n) | (~g & p).
module tb_gdi_cell;

  logic g, p, n, out;
  int checks = 0, failures = 0;

  gdi_cell dut (.g(g), .p(p), .n(n), .out(out));

  initial begin
    #10000;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {g, p, n} = 3'(v);
      #1;
      checks++;
      if (out !== ((g & n) | (~g & p))) begin
        failures++;
        $display("FAIL g=%b p=%b n=%b out=%b", g, p, n, out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
