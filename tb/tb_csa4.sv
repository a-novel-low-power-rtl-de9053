// tb_csa4 -- exhaustive check of the 4-bit carry-save adder: for all 4096
// operand triples, s must be the bitwise XOR, c the bitwise majority, and
// s + 2*c the integer sum x + y + z.
module tb_csa4;

  logic [3:0] x, y, z, s, c;
  int checks = 0, failures = 0;

  csa4 dut (.x(x), .y(y), .z(z), .s(s), .c(c));

  initial begin
    #100000;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4096; v++) begin
      {x, y, z} = 12'(v);
      #1;
      checks += 2;
      if (int'(s) + 2 * int'(c) != int'(x) + int'(y) + int'(z)) begin
        failures++;
        $display("FAIL sum %0d+%0d+%0d: s=%0d c=%0d", x, y, z, s, c);
      end
      if (s !== (x ^ y ^ z) || c !== ((x & y) | (x & z) | (y & z))) begin
        failures++;
        $display("FAIL bits %0d+%0d+%0d: s=%b c=%b", x, y, z, s, c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
