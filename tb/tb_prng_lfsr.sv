// tb_prng_lfsr: random tie-break source.
// Compares the output with a model of x^16+x^14+x^13+x^11+1 (feedback taken
// as a parity of bits 15,13,12,10 shifted in at the bottom), checks the reset
// value and that the sequence does not repeat within 1000 cycles and gives
// both values on every bit.
module tb_prng_lfsr;
  localparam logic [15:0] SEED = 16'hBEEF;

  logic clk = 0, rst_n = 0;
  logic [3:0] rnd;
  int checks = 0, failures = 0;
  logic [15:0] model;
  int ones [4] = '{0, 0, 0, 0};

  always #5 clk = ~clk;

  prng_lfsr #(.NBITS(4), .SEED(SEED)) dut (.clk(clk), .rst_n(rst_n), .rnd(rnd));

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1;
    model = SEED;
    checks++;
    if (rnd !== SEED[3:0]) begin failures++; $display("FAIL reset value %h", rnd); end
    rst_n = 1;
    for (int k = 0; k < 1000; k++) begin
      @(posedge clk); #1;
      model = {model[14:0], model[15] ^ model[13] ^ model[12] ^ model[10]};
      checks++;
      if (rnd !== model[3:0]) begin
        failures++;
        if (failures < 10) $display("FAIL cycle %0d rnd=%h exp %h", k, rnd, model[3:0]);
      end
      checks++;
      if (model == SEED) begin failures++; $display("FAIL sequence repeated after %0d", k); end
      for (int b = 0; b < 4; b++) ones[b] += int'(rnd[b]);
    end
    for (int b = 0; b < 4; b++) begin
      checks++;
      if (ones[b] < 400 || ones[b] > 600) begin
        failures++; $display("FAIL bit %0d ones=%0d of 1000", b, ones[b]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
