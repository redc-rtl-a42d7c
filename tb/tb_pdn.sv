// tb_pdn: Permutation Deflection Network.
// Random sets of four channels are compared with a reference model of the
// two-stage network. Independently of the model the testbench checks that
// no flit is lost or duplicated, that a lone flit is never deflected and that
// a lone golden flit is never deflected however busy the network is.
module tb_pdn;
  import redc_pkg::*;

  chan_t ch_in [NUM_PORTS];
  chan_t po    [NUM_PORTS];
  logic [3:0] rnd;
  int checks = 0, failures = 0, lone = 0, gold = 0;

  pdn dut (.ch_in(ch_in), .rnd(rnd), .port_out(po));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference model of one 2x2 arbiter block and of the PDN, written from
  // the rules: rank 2 = golden with a wish, 1 = a wish, 0 = none; higher rank
  // takes the output it wants; equal ranks: two golden -> a, else random bit.
  function automatic int rank(chan_t c);
    if (!c.flit.valid || c.dir == DIR_L) return 0;
    return c.golden ? 2 : 1;
  endfunction

  function automatic void ref_arb(input chan_t a, input chan_t b, input bit wa,
                                  input bit wb, input bit r,
                                  output chan_t o0, output chan_t o1);
    int ra = rank(a), rb = rank(b);
    bit a_first = (ra > rb) || (ra == rb && (ra == 2 || r));
    if (a_first) begin
      if (wa) begin o0 = a; o1 = b; end else begin o0 = b; o1 = a; end
    end else begin
      if (wb) begin o0 = b; o1 = a; end else begin o0 = a; o1 = b; end
    end
  endfunction

  function automatic void ref_pdn(input chan_t i0, input chan_t i1, input chan_t i2,
                                  input chan_t i3, input logic [3:0] r,
                                  output chan_t on, output chan_t oe,
                                  output chan_t os, output chan_t ow);
    chan_t a0, a1, b0, b1;
    ref_arb(i0, i1, i0.dir inside {DIR_N, DIR_S}, i1.dir inside {DIR_N, DIR_S}, r[0], a0, a1);
    ref_arb(i2, i3, i2.dir inside {DIR_N, DIR_S}, i3.dir inside {DIR_N, DIR_S}, r[1], b0, b1);
    ref_arb(a0, b0, a0.dir == DIR_N, b0.dir == DIR_N, r[2], on, os);
    ref_arb(a1, b1, a1.dir == DIR_E, b1.dir == DIR_E, r[3], oe, ow);
  endfunction

  function automatic chan_t rand_chan();
    chan_t c;
    c.flit.valid = ($urandom_range(0, 4) != 0);
    c.flit.hdr   = hdr_t'($urandom);
    c.flit.data  = {$urandom, $urandom, $urandom, $urandom};
    c.dir        = ($urandom_range(0, 9) == 0) ? DIR_L : dir_e'($urandom_range(0, 3));
    c.golden     = ($urandom_range(0, 5) == 0);
    return c;
  endfunction

  function automatic int n_defl(chan_t on, chan_t oe, chan_t os, chan_t ow);
    return int'(on.flit.valid && on.dir != DIR_N) + int'(oe.flit.valid && oe.dir != DIR_E)
         + int'(os.flit.valid && os.dir != DIR_S) + int'(ow.flit.valid && ow.dir != DIR_W);
  endfunction

  initial begin
    chan_t en, ee, es, ew;
    int ngold, gi, nvalid;
    for (int t = 0; t < 20000; t++) begin
      for (int i = 0; i < NUM_PORTS; i++) begin
        ch_in[i] = rand_chan();
        ch_in[i].flit.data[7:0] = 8'(i);   // tag to tell flits apart
      end
      if (t % 4 == 0)  // a quarter of the sets hold a single flit
        for (int i = 0; i < NUM_PORTS; i++) if (i != t % 16 / 4) ch_in[i].flit.valid = 1'b0;
      rnd = 4'($urandom);
      #1;
      ref_pdn(ch_in[0], ch_in[1], ch_in[2], ch_in[3], rnd, en, ee, es, ew);
      checks++;
      if (po[PN] != en || po[PE] != ee || po[PS] != es || po[PW] != ew) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d output differs from model", t);
      end
      // conservation: every valid input appears exactly once
      for (int i = 0; i < NUM_PORTS; i++) if (ch_in[i].flit.valid) begin
        int n;
        n = 0;
        for (int p = 0; p < NUM_PORTS; p++) if (po[p] == ch_in[i]) n++;
        checks++;
        if (n != 1) begin failures++; $display("FAIL t=%0d input %0d appears %0d times", t, i, n); end
      end
      ngold = 0; gi = -1; nvalid = 0;
      for (int i = 0; i < NUM_PORTS; i++) begin
        if (rank(ch_in[i]) == 2) begin ngold++; gi = i; end
        if (ch_in[i].flit.valid) nvalid++;
      end
      if (nvalid == 1 && rank(ch_in[t % 16 / 4]) > 0) begin
        lone++;
        checks++;
        if (po[int'(ch_in[t % 16 / 4].dir)] != ch_in[t % 16 / 4]) begin
          failures++; $display("FAIL t=%0d lone flit deflected", t);
        end
      end
      if (ngold == 1) begin
        gold++;
        checks++;
        if (po[int'(ch_in[gi].dir)] != ch_in[gi]) begin
          failures++; $display("FAIL t=%0d golden flit deflected", t);
        end
      end
    end
    checks++;
    if (lone == 0 || gold == 0) failures++;
    $display("lone flits %0d, single golden %0d", lone, gold);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
