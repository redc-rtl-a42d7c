// tb_comparator_unit: exhaustive check of the PDN choice.
// PDN2 must be chosen exactly when its deflection count is strictly lower.
module tb_comparator_unit;
  import redc_pkg::*;

  logic [CNT_W-1:0] c1, c2;
  logic sel2;
  int checks = 0, failures = 0;

  comparator_unit dut (.count1(c1), .count2(c2), .sel2(sel2));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a <= 4; a++)
      for (int b = 0; b <= 4; b++) begin
        c1 = CNT_W'(a); c2 = CNT_W'(b);
        #1;
        checks++;
        if (sel2 !== (b < a)) begin
          failures++; $display("FAIL count1=%0d count2=%0d sel2=%0b", a, b, sel2);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
