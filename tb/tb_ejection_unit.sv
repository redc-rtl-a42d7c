// tb_ejection_unit: one-flit ejection with golden-first, lowest-channel order.
// Random channel contents (many with several local flits) are applied; the
// expected ejected flit and remaining channels are worked out in the
// testbench. Also counts the cases where two or more flits were destined here.
module tb_ejection_unit;
  import redc_pkg::*;

  chan_t ch_in  [NUM_PORTS];
  chan_t ch_out [NUM_PORTS];
  flit_t ej_flit;
  int checks = 0, failures = 0, multi = 0, gold_pick = 0;

  ejection_unit dut (.ch_in(ch_in), .ch_out(ch_out), .ej_flit(ej_flit));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic chan_t rand_chan();
    chan_t c;
    c.flit.valid = ($urandom_range(0, 3) != 0);
    c.flit.hdr   = hdr_t'($urandom);
    c.flit.data  = {$urandom, $urandom, $urandom, $urandom};
    c.dir        = ($urandom_range(0, 1) == 0) ? DIR_L : dir_e'($urandom_range(0, 3));
    c.golden     = ($urandom_range(0, 4) == 0);
    return c;
  endfunction

  initial begin
    int pick, nloc;
    for (int t = 0; t < 5000; t++) begin
      for (int i = 0; i < NUM_PORTS; i++) ch_in[i] = rand_chan();
      #1;
      pick = -1; nloc = 0;
      for (int i = 0; i < NUM_PORTS; i++)
        if (ch_in[i].flit.valid && ch_in[i].dir == DIR_L) nloc++;
      for (int i = NUM_PORTS - 1; i >= 0; i--)
        if (ch_in[i].flit.valid && ch_in[i].dir == DIR_L && ch_in[i].golden) pick = i;
      if (pick >= 0) gold_pick++;
      else
        for (int i = NUM_PORTS - 1; i >= 0; i--)
          if (ch_in[i].flit.valid && ch_in[i].dir == DIR_L) pick = i;
      if (nloc > 1) multi++;
      checks++;
      if (pick < 0) begin
        if (ej_flit.valid) begin failures++; $display("FAIL t=%0d spurious ejection", t); end
      end else if (ej_flit != ch_in[pick].flit) begin
        failures++; $display("FAIL t=%0d wrong flit ejected (exp channel %0d)", t, pick);
      end
      for (int i = 0; i < NUM_PORTS; i++) begin
        checks++;
        if (i == pick ? ch_out[i].flit.valid : (ch_out[i] != ch_in[i])) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d channel %0d", t, i);
        end
      end
    end
    checks++;
    if (multi == 0 || gold_pick == 0) begin failures++; $display("FAIL cases not reached"); end
    $display("several local flits: %0d, golden picked first: %0d", multi, gold_pick);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
