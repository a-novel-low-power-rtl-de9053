// tb_gdi_and -- exhaustive check of the two-transistor GDI AND gate against
// its truth table (1 only for a = b = 1).
module tb_gdi_and;

  logic a, b, y;
  int checks = 0, failures = 0;
  // truth table indexed by {a, b}
  localparam logic [3:0] AndTable = 4'b1000;

  gdi_and dut (.a(a), .b(b), .y(y));

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
      checks++;
      if (y !== AndTable[v]) begin
        failures++;
        $display("FAIL a=%b b=%b y=%b", a, b, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
