// tb_permuter_unit: the two differently ordered PDNs.
// Directed cases show the two input orders at work: with N and E both
// heading along X, PDN1 (N,E paired) must deflect one and PDN2 none; with N
// and W both heading along X, the reverse. Random sets are then compared
// with a reference model fed in the two orders.
module tb_permuter_unit;
  import redc_pkg::*;

  chan_t ch_in [NUM_PORTS];
  chan_t p1 [NUM_PORTS];
  chan_t p2 [NUM_PORTS];
  logic [3:0] rnd;
  int checks = 0, failures = 0, differ = 0;

  permuter_unit dut (.ch_in(ch_in), .rnd(rnd), .pdn1_out(p1), .pdn2_out(p2));

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

  function automatic chan_t mk(bit v, dir_e d, int tag);
    chan_t c = CHAN_NONE;
    c.flit.valid = v; c.dir = d; c.flit.data = 128'(tag);
    return c;
  endfunction

  task automatic expect_defl(int e1, int e2, string what);
    int d1 = n_defl(p1[PN], p1[PE], p1[PS], p1[PW]);
    int d2 = n_defl(p2[PN], p2[PE], p2[PS], p2[PW]);
    checks++;
    if (d1 != e1 || d2 != e2) begin
      failures++; $display("FAIL %s: deflections %0d/%0d exp %0d/%0d", what, d1, d2, e1, e2);
    end
  endtask

  initial begin
    chan_t en, ee, es, ew;
    // N wants E, E wants W: paired in PDN1, apart in PDN2
    ch_in[PN] = mk(1, DIR_E, 1); ch_in[PE] = mk(1, DIR_W, 2);
    ch_in[PS] = mk(0, DIR_L, 3); ch_in[PW] = mk(0, DIR_L, 4);
    rnd = 4'b0000; #1; expect_defl(1, 0, "N,E both along X");
    rnd = 4'b1111; #1; expect_defl(1, 0, "N,E both along X, other tie-break");
    // N wants E, W wants W: apart in PDN1, paired in PDN2
    ch_in[PE] = mk(0, DIR_L, 2); ch_in[PW] = mk(1, DIR_W, 4);
    rnd = 4'b0000; #1; expect_defl(0, 1, "N,W both along X");
    // E wants N, S wants S: apart in PDN1, paired in PDN2
    ch_in[PN] = mk(0, DIR_L, 1); ch_in[PW] = mk(0, DIR_L, 4);
    ch_in[PE] = mk(1, DIR_N, 2); ch_in[PS] = mk(1, DIR_S, 3);
    rnd = 4'b0101; #1; expect_defl(0, 1, "E,S both along Y");

    for (int t = 0; t < 20000; t++) begin
      for (int i = 0; i < NUM_PORTS; i++) begin
        ch_in[i] = rand_chan();
        ch_in[i].flit.data[7:0] = 8'(i);
      end
      rnd = 4'($urandom);
      #1;
      ref_pdn(ch_in[PN], ch_in[PE], ch_in[PS], ch_in[PW], rnd, en, ee, es, ew);
      checks++;
      if (p1[PN] != en || p1[PE] != ee || p1[PS] != es || p1[PW] != ew) begin
        failures++; if (failures < 10) $display("FAIL t=%0d PDN1 differs", t);
      end
      ref_pdn(ch_in[PN], ch_in[PW], ch_in[PE], ch_in[PS], rnd, en, ee, es, ew);
      checks++;
      if (p2[PN] != en || p2[PE] != ee || p2[PS] != es || p2[PW] != ew) begin
        failures++; if (failures < 10) $display("FAIL t=%0d PDN2 differs", t);
      end
      if (n_defl(p1[PN], p1[PE], p1[PS], p1[PW]) != n_defl(p2[PN], p2[PE], p2[PS], p2[PW])) differ++;
    end
    checks++;
    if (differ == 0) failures++;
    $display("sets where the two PDNs differ in deflections: %0d of 20000", differ);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
