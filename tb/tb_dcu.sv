// tb_dcu: deflection counting.
// A flit on port p is deflected when it is valid and its productive
// direction is not p (a flit for the local core always counts). Random port
// assignments are compared with that count.
module tb_dcu;
  import redc_pkg::*;

  chan_t port_in [NUM_PORTS];
  logic [CNT_W-1:0] count;
  int checks = 0, failures = 0;
  int seen [5] = '{0, 0, 0, 0, 0};

  dcu dut (.port_in(port_in), .count(count));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp;
    for (int t = 0; t < 3000; t++) begin
      exp = 0;
      for (int p = 0; p < NUM_PORTS; p++) begin
        port_in[p].flit  = '{valid: ($urandom_range(0, 4) != 0), hdr: hdr_t'($urandom),
                             data: {4{$urandom}}};
        port_in[p].dir    = ($urandom_range(0, 1) == 1) ? dir_e'(p) : dir_e'($urandom_range(0, 4));
        port_in[p].golden = $urandom_range(0, 1) == 1;
        if (port_in[p].flit.valid && int'(port_in[p].dir) != p) exp++;
      end
      #1;
      seen[exp]++;
      checks++;
      if (int'(count) != exp) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d count=%0d exp %0d", t, count, exp);
      end
    end
    for (int k = 0; k < 5; k++) begin
      checks++;
      if (seen[k] == 0) begin failures++; $display("FAIL count %0d never applied", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
