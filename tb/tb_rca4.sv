// tb_rca4 -- exhaustive check of the 4-bit ripple-carry adder: all 512
// combinations of x, y and cin, {cout, s} compared with integer addition.
module tb_rca4;

  logic [3:0] x, y, s;
  logic       cin, cout;
  int checks = 0, failures = 0;

  rca4 dut (.x(x), .y(y), .cin(cin), .s(s), .cout(cout));

  initial begin
    #100000;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 512; v++) begin
      {cin, x, y} = 9'(v);
      #1;
      checks++;
      if ({cout, s} !== 5'(int'(x) + int'(y) + int'(cin))) begin
        failures++;
        $display("FAIL %0d+%0d+%0d = %0d", x, y, cin, {cout, s});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
