// tb_injection_unit: injection into the lowest free channel.
// Random occupancy patterns, with and without an offered flit. inj_ready must
// be high exactly when a channel is free, and the flit must land in the lowest
// free channel with the others untouched.
module tb_injection_unit;
  import redc_pkg::*;

  chan_t ch_in  [NUM_PORTS];
  chan_t ch_out [NUM_PORTS];
  chan_t inj_ch;
  logic  inj_valid, inj_ready;
  int checks = 0, failures = 0, full = 0, injected = 0;

  injection_unit dut (.ch_in(ch_in), .inj_valid(inj_valid), .inj_ch(inj_ch),
                      .inj_ready(inj_ready), .ch_out(ch_out));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic chan_t rand_chan(logic v);
    chan_t c;
    c.flit.valid = v;
    c.flit.hdr   = hdr_t'($urandom);
    c.flit.data  = {$urandom, $urandom, $urandom, $urandom};
    c.dir        = dir_e'($urandom_range(0, 4));
    c.golden     = $urandom_range(0, 1) == 1;
    return c;
  endfunction

  initial begin
    int slot;
    for (int t = 0; t < 5000; t++) begin
      for (int i = 0; i < NUM_PORTS; i++) ch_in[i] = rand_chan($urandom_range(0, 2) != 0);
      inj_valid = $urandom_range(0, 3) != 0;
      inj_ch    = rand_chan(1'b1);
      #1;
      slot = -1;
      for (int i = NUM_PORTS - 1; i >= 0; i--) if (!ch_in[i].flit.valid) slot = i;
      if (slot < 0) full++;
      checks++;
      if (inj_ready != (slot >= 0)) begin
        failures++; $display("FAIL t=%0d inj_ready=%0b slot=%0d", t, inj_ready, slot);
      end
      if (inj_valid && slot >= 0) injected++;
      for (int i = 0; i < NUM_PORTS; i++) begin
        checks++;
        if (inj_valid && i == slot) begin
          if (ch_out[i] != inj_ch) begin failures++; $display("FAIL t=%0d flit not in slot %0d", t, i); end
        end else if (ch_out[i] != ch_in[i]) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d channel %0d changed", t, i);
        end
      end
    end
    checks++;
    if (full == 0 || injected == 0) begin failures++; $display("FAIL cases not reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
