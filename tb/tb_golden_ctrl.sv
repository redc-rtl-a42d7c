// tb_golden_ctrl: golden id rotation and epoch length.
// With a short epoch (5 cycles) the id must stay constant for exactly five
// cycles, then step by one, and wrap from 63 to 0.
module tb_golden_ctrl;
  import redc_pkg::*;
  localparam int unsigned EPOCH = 5;

  logic clk = 0, rst_n = 0;
  logic [ID_W-1:0] golden_id;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  golden_ctrl #(.GOLDEN_EPOCH(EPOCH)) dut (.clk(clk), .rst_n(rst_n), .golden_id(golden_id));

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [ID_W-1:0] exp, int cyc);
    checks++;
    if (golden_id !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL cycle %0d: golden_id=%0d exp %0d", cyc, golden_id, exp);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 check('0, -1);
    rst_n = 1;
    // cycle k after reset release: id = k / EPOCH (mod 64)
    for (int k = 0; k < EPOCH * 70; k++) begin
      @(posedge clk); #1;
      check(ID_W'((k + 1) / EPOCH), k);
    end
    rst_n = 0;
    @(posedge clk); #1;
    check('0, -2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
