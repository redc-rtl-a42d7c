// tb_pdn_arbiter: one 2x2 arbiter block.
// Random flit pairs, wishes and tie-break bits are compared with a reference
// model; the testbench also checks directly that the top-ranked flit always
// gets its wish and that both flits always come out.
module tb_pdn_arbiter;
  import redc_pkg::*;

  chan_t a, b, o0, o1, e0, e1;
  logic  wa, wb, r;
  int checks = 0, failures = 0, contended = 0;

  pdn_arbiter dut (.in_a(a), .in_b(b), .want0_a(wa), .want0_b(wb), .rnd(r),
                   .out0(o0), .out1(o1));

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
    for (int t = 0; t < 20000; t++) begin
      a = rand_chan(); b = rand_chan();
      wa = $urandom_range(0, 1) == 1; wb = $urandom_range(0, 1) == 1; r = $urandom_range(0, 1) == 1;
      #1;
      ref_arb(a, b, wa, wb, r, e0, e1);
      checks++;
      if (o0 != e0 || o1 != e1) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d ranks %0d/%0d want %0b%0b r=%0b", t, rank(a), rank(b), wa, wb, r);
      end
      // both flits leave, one on each output
      checks++;
      if (!((o0 == a && o1 == b) || (o0 == b && o1 == a))) begin
        failures++; $display("FAIL t=%0d flit lost or duplicated", t);
      end
      // a golden flit with a wish always gets it when the other is not golden
      if (rank(a) == 2 && rank(b) < 2) begin
        checks++;
        if ((wa ? o0 : o1) != a) begin failures++; $display("FAIL t=%0d golden a deflected", t); end
      end
      if (rank(b) == 2 && rank(a) < 2) begin
        checks++;
        if ((wb ? o0 : o1) != b) begin failures++; $display("FAIL t=%0d golden b deflected", t); end
      end
      if (rank(a) > 0 && rank(b) > 0 && wa == wb) contended++;
    end
    checks++;
    if (contended == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
