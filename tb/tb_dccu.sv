// tb_dccu: deflection counting, comparison and selection.
// Random pairs of port assignments; the testbench counts deflections of
// each, expects the one with fewer (PDN1 on a tie) on the output, and checks
// the reported count. Both outcomes must occur.
module tb_dccu;
  import redc_pkg::*;

  chan_t a1 [NUM_PORTS];
  chan_t a2 [NUM_PORTS];
  chan_t po [NUM_PORTS];
  logic sel2;
  logic [CNT_W-1:0] cnt;
  int checks = 0, failures = 0, n_sel2 = 0, n_tie = 0;

  dccu dut (.pdn1_in(a1), .pdn2_in(a2), .port_out(po), .sel2(sel2), .defl_count(cnt));

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
    int d1, d2;
    bit exp2;
    for (int t = 0; t < 20000; t++) begin
      for (int p = 0; p < NUM_PORTS; p++) begin
        a1[p] = rand_chan(); a2[p] = rand_chan();
        if ($urandom_range(0, 1) == 1) a1[p].dir = dir_e'(p);
        if ($urandom_range(0, 1) == 1) a2[p].dir = dir_e'(p);
      end
      #1;
      d1 = n_defl(a1[PN], a1[PE], a1[PS], a1[PW]);
      d2 = n_defl(a2[PN], a2[PE], a2[PS], a2[PW]);
      exp2 = d2 < d1;
      if (exp2) n_sel2++;
      if (d1 == d2) n_tie++;
      checks++;
      if (sel2 != exp2 || int'(cnt) != (exp2 ? d2 : d1)) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d d1=%0d d2=%0d sel2=%0b cnt=%0d", t, d1, d2, sel2, cnt);
      end
      for (int p = 0; p < NUM_PORTS; p++) begin
        checks++;
        if (po[p] != (exp2 ? a2[p] : a1[p])) begin
          failures++; if (failures < 10) $display("FAIL t=%0d port %0d", t, p);
        end
      end
    end
    checks++;
    if (n_sel2 == 0 || n_tie == 0 || n_sel2 == 20000) failures++;
    $display("PDN2 chosen %0d, ties %0d of 20000", n_sel2, n_tie);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
