// tb_vedic4_design2 -- exhaustive check of the 4x4 multiplier (Design 2):
// all 256 operand pairs, product compared with integer multiplication.
module tb_vedic4_design2;

  logic [3:0] a, b;
  logic [7:0] p;
  int checks = 0, failures = 0;

  vedic4_design2 dut (.a(a), .b(b), .p(p));

  initial begin
    #100000;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      for (int j = 0; j < 16; j++) begin
        a = 4'(i);
        b = 4'(j);
        #1;
        checks++;
        if (p !== 8'(i * j)) begin
          failures++;
          $display("FAIL %0d * %0d = %0d", i, j, p);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
