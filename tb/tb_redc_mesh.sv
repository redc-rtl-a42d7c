// tb_redc_mesh: end-to-end test of the 8x8 ReDC mesh at its default size.
//
// Each node has a source queue in front of its injection port (the router
// itself never buffers). The test runs:
//   1. zero load: single flits one at a time between random nodes; each must
//      arrive at the right node in exactly 3*hops+1 cycles after injection;
//   2. the seven synthetic traffic patterns (uniform random, transpose,
//      bit-complement, tornado, bit-reverse, shuffle, neighbor) at a medium
//      injection rate, printing average latency (queueing included) and
//      deflections per injected flit for each;
//   3. a uniform random phase above saturation, to force refused injections;
//   4. a drain: every generated flit must be delivered exactly once, to its
//      destination, with its payload intact (no loss, no livelock).
// Mechanism counters (deflections, PDN2 chosen, two local flits at one
// router, injection refused, flits looped back at the mesh edge, golden
// flits) must each be non-zero.
module tb_redc_mesh;
  import redc_pkg::*;

  localparam int MX = 8, MY = 8, NN = MX * MY;
  localparam int MAXF = 1 << 17;
  localparam int QD = 4096;

  logic clk = 0, rst_n = 0;
  logic             inj_valid  [NN];
  flit_t            inj_flit   [NN];
  logic             inj_ready  [NN];
  flit_t            ej_flit    [NN];
  logic [CNT_W-1:0] defl_count [NN];
  logic             pdn2_sel   [NN];

  redc_mesh dut (
    .clk(clk), .rst_n(rst_n), .inj_valid(inj_valid), .inj_flit(inj_flit),
    .inj_ready(inj_ready), .ej_flit(ej_flit), .defl_count(defl_count), .pdn2_sel(pdn2_sel)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- scoreboard ----------------
  int  f_dst  [MAXF];
  int  f_src  [MAXF];
  int  f_born [MAXF];
  int  f_inj  [MAXF];
  bit  f_live [MAXF];
  int  next_id = 0;
  int  delivered = 0;

  // per-node source queues of flit ids
  int  q     [NN][QD];
  int  q_hd  [NN];
  int  q_tl  [NN];

  // statistics of the current phase
  longint st_lat = 0, st_defl = 0;
  int     st_inj = 0, st_del = 0;
  int     n_defl = 0, n_pdn2 = 0, n_ej_conf = 0, n_inj_block = 0, n_edge = 0, n_golden = 0;
  bit     zero_load = 0;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL cycle %0d: %s", cyc, what);
    end
  endtask

  function automatic int hops(int a, int b);
    int dx = (a % MX) - (b % MX), dy = (a / MX) - (b / MX);
    return (dx < 0 ? -dx : dx) + (dy < 0 ? -dy : dy);
  endfunction

  function automatic flit_t make_flit(int id);
    flit_t f;
    f.valid     = 1'b1;
    f.hdr.dst_x = 3'(f_dst[id] % MX);
    f.hdr.dst_y = 3'(f_dst[id] / MX);
    f.hdr.src_x = 3'(f_src[id] % MX);
    f.hdr.src_y = 3'(f_src[id] / MX);
    f.data      = {32'(id) ^ 32'hA5A5_0000, 32'(f_src[id]), 32'(f_dst[id]), 32'(id)};
    return f;
  endfunction

  task automatic enqueue(int src, int dst);
    f_src[next_id] = src; f_dst[next_id] = dst; f_born[next_id] = cyc;
    f_live[next_id] = 1;
    q[src][q_tl[src] % QD] = next_id;
    q_tl[src]++;
    next_id++;
  endtask

  // destination of a synthetic pattern; -1 means no flit for this source
  function automatic int pattern_dst(int pat, int s);
    int x = s % MX, y = s / MX, d;
    case (pat)
      0: begin d = int'($urandom_range(0, NN - 2)); if (d >= s) d++; end      // uniform random
      1: d = x * MX + y;                                                        // transpose
      2: d = (MY - 1 - y) * MX + (MX - 1 - x);                                  // bit-complement
      3: d = y * MX + (x + MX / 2 - 1) % MX;                                    // tornado
      4: d = {s[0], s[1], s[2], s[3], s[4], s[5]};                              // bit-reverse
      5: d = ((s << 1) | (s >> 5)) & (NN - 1);                                  // shuffle
      default: d = y * MX + (x + 1) % MX;                                       // neighbor
    endcase
    return (d == s) ? -1 : d;
  endfunction

  // ---------------- per-cycle driver and monitor ----------------
  // Drive after the rising edge, sample results of the previous edge first.
  task automatic cycle_step();
    // ejections
    for (int n = 0; n < NN; n++) if (ej_flit[n].valid) begin
      automatic int id = int'(ej_flit[n].data[31:0]);
      chk(id < next_id && f_live[id], "ejected flit unknown or delivered twice");
      if (id < next_id && f_live[id]) begin
        chk(f_dst[id] == n, "flit ejected at the wrong node");
        chk(ej_flit[n] == make_flit(id), "flit payload or header corrupted");
        chk(cyc - f_inj[id] >= 3 * hops(f_src[id], n) + 1, "flit faster than the pipeline allows");
        if (zero_load)
          chk(cyc - f_inj[id] == 3 * hops(f_src[id], n) + 1, "zero-load latency is not 3*hops+1");
        f_live[id] = 0;
        delivered++;
        st_del++;
        st_lat += longint'(cyc - f_born[id]);
      end
    end
    // router statistics
    for (int n = 0; n < NN; n++) begin
      n_defl  += int'(defl_count[n]);
      st_defl += longint'(defl_count[n]);
      if (pdn2_sel[n]) n_pdn2++;
    end
    // edge loopback: an edge output port carries a flit
    for (int n = 0; n < NN; n++) begin
      if (n % MX == MX - 1 && dut.r_out[n][PE].valid) n_edge++;
      if (n % MX == 0      && dut.r_out[n][PW].valid) n_edge++;
      if (n / MX == 0      && dut.r_out[n][PN].valid) n_edge++;
      if (n / MX == MY - 1 && dut.r_out[n][PS].valid) n_edge++;
    end
    // injection handshakes of the previous cycle
    for (int n = 0; n < NN; n++) if (inj_valid[n]) begin
      if (inj_ready_q[n]) begin
        f_inj[q[n][q_hd[n] % QD]] = cyc - 1;
        q_hd[n]++;
        st_inj++;
      end else n_inj_block++;
    end
  endtask

  logic inj_ready_q [NN];

  task automatic drive();
    for (int n = 0; n < NN; n++) begin
      inj_valid[n] = (q_hd[n] != q_tl[n]);
      inj_flit[n]  = inj_valid[n] ? make_flit(q[n][q_hd[n] % QD]) : FLIT_NONE;
    end
  endtask

  task automatic step();
    drive();
    #2;
    for (int n = 0; n < NN; n++) inj_ready_q[n] = inj_ready[n];
    @(posedge clk); #1;
    cycle_step();
  endtask

  // monitors inside the routers
  for (genvar gy = 0; gy < MY; gy++) begin : g_mon_y
    for (genvar gx = 0; gx < MX; gx++) begin : g_mon_x
      always @(posedge clk) if (rst_n) begin
        automatic int nl = 0, ng = 0;
        for (int i = 0; i < NUM_PORTS; i++) begin
          if (dut.g_y[gy].g_x[gx].u_router.a_ch[i].flit.valid &&
              dut.g_y[gy].g_x[gx].u_router.a_ch[i].dir == DIR_L) nl++;
          if (dut.g_y[gy].g_x[gx].u_router.reg_b[i].flit.valid &&
              dut.g_y[gy].g_x[gx].u_router.reg_b[i].golden) ng++;
        end
        if (nl > 1) n_ej_conf++;
        n_golden += ng;
      end
    end
  end

  task automatic clear_stats();
    st_lat = 0; st_defl = 0; st_inj = 0; st_del = 0;
  endtask

  task automatic run_pattern(int pat, string name, int rate_pct, int cycles);
    clear_stats();
    for (int t = 0; t < cycles; t++) begin
      for (int s = 0; s < NN; s++)
        if ($urandom_range(0, 999) < rate_pct * 10) begin
          automatic int d = pattern_dst(pat, s);
          if (d >= 0 && q_tl[s] - q_hd[s] < QD - 1) enqueue(s, d);
        end
      step();
    end
    $display("%-15s rate %0.2f flit/node/cycle: %0d injected, avg latency %0.1f cycles, deflections/flit %0.2f",
             name, real'(rate_pct) / 100.0, st_inj,
             st_del ? real'(st_lat) / real'(st_del) : 0.0,
             st_inj ? real'(st_defl) / real'(st_inj) : 0.0);
  endtask

  initial begin
    for (int n = 0; n < NN; n++) begin
      q_hd[n] = 0; q_tl[n] = 0; inj_valid[n] = 0; inj_flit[n] = FLIT_NONE; inj_ready_q[n] = 0;
    end
    for (int i = 0; i < MAXF; i++) f_live[i] = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;

    // 1. zero load
    zero_load = 1;
    for (int k = 0; k < 40; k++) begin
      automatic int s = $urandom_range(0, NN - 1);
      automatic int d = $urandom_range(0, NN - 2);
      if (d >= s) d++;
      enqueue(s, d);
      repeat (3 * 14 + 4) step();
    end
    chk(delivered == 40, "zero-load flits not all delivered");
    zero_load = 0;

    // 2. synthetic patterns
    run_pattern(0, "uniform",        15, 1500);
    run_pattern(1, "transpose",      10, 1500);
    run_pattern(2, "bit-complement", 10, 1500);
    run_pattern(3, "tornado",        10, 1500);
    run_pattern(4, "bit-reverse",    10, 1500);
    run_pattern(5, "shuffle",        10, 1500);
    run_pattern(6, "neighbor",       20, 1500);

    // 3. above saturation
    run_pattern(0, "uniform (high)", 60, 800);

    // 4. drain
    begin
      automatic int t = 0;
      while (delivered != next_id && t < 100000) begin step(); t++; end
      $display("drained in %0d cycles", t);
    end
    chk(delivered == next_id, $sformatf("%0d of %0d flits never delivered", next_id - delivered, next_id));

    $display("flits %0d; deflections %0d, PDN2 chosen %0d, ejection conflicts %0d, injection refused %0d, edge loopbacks %0d, golden flit-cycles %0d",
             next_id, n_defl, n_pdn2, n_ej_conf, n_inj_block, n_edge, n_golden);
    chk(n_defl > 0,      "no deflection happened");
    chk(n_pdn2 > 0,      "PDN2 was never chosen");
    chk(n_ej_conf > 0,   "no ejection conflict happened");
    chk(n_inj_block > 0, "no injection was refused");
    chk(n_edge > 0,      "no flit was looped back at the edge");
    chk(n_golden > 0,    "no golden flit was seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
