// tb_redc_router: one ReDC router at (3,3) of an 8x8 mesh.
//
// Directed cases check the pipeline timing (input link to output link in
// three clock edges, input to ejection port in two, injection to output in
// two), the choice of PDN2 when its input order avoids a deflection, PDN1 on
// a tie, one ejection per cycle with the second local flit deflected, and
// injection being refused while all four channels are busy.
// A random phase then drives all four links and the core port every cycle.
// Each flit carries a unique tag; the scoreboard expects every flit to leave
// exactly once, at its due cycle, on the ejection port if it is for this
// router and not beaten by another local flit, and checks the reported
// deflection count against the flits' XY directions.
module tb_redc_router;
  import redc_pkg::*;

  localparam int unsigned RX = 3, RY = 3;

  logic clk = 0, rst_n = 0;
  flit_t in_flit  [NUM_PORTS];
  flit_t out_flit [NUM_PORTS];
  logic  inj_valid, inj_ready;
  flit_t inj_flit, ej_flit;
  logic [CNT_W-1:0] defl_count;
  logic pdn2_sel;

  int checks = 0, failures = 0;
  int cyc = 0;
  int n_defl = 0, n_pdn2 = 0, n_ej = 0, n_ej_conflict = 0, n_inj = 0, n_inj_block = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  redc_router #(.X(RX), .Y(RY), .GOLDEN_EPOCH(16), .SEED(16'h1234)) dut (
    .clk(clk), .rst_n(rst_n), .in_flit(in_flit), .out_flit(out_flit),
    .inj_valid(inj_valid), .inj_flit(inj_flit), .inj_ready(inj_ready),
    .ej_flit(ej_flit), .defl_count(defl_count), .pdn2_sel(pdn2_sel)
  );

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- helpers ----------------
  function automatic flit_t mkf(int dx, int dy, int tag);
    flit_t f;
    f.valid = 1'b1;
    f.hdr   = '{dst_x: 3'(dx), dst_y: 3'(dy), src_x: 3'(tag % 7), src_y: 3'((tag / 7) % 8 | 1)};
    f.data  = 128'(tag);
    return f;
  endfunction

  function automatic int xy_dir(flit_t f);
    if (int'(f.hdr.dst_x) > RX) return int'(DIR_E);
    if (int'(f.hdr.dst_x) < RX) return int'(DIR_W);
    if (int'(f.hdr.dst_y) > RY) return int'(DIR_S);
    if (int'(f.hdr.dst_y) < RY) return int'(DIR_N);
    return int'(DIR_L);
  endfunction

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL cycle %0d: %s", cyc, what);
    end
  endtask

  task automatic idle_inputs();
    for (int i = 0; i < NUM_PORTS; i++) in_flit[i] = FLIT_NONE;
    inj_valid = 1'b0;
    inj_flit  = FLIT_NONE;
  endtask

  // step to just after the next rising edge
  task automatic step();
    @(posedge clk); #1;
  endtask

  // ---------------- scoreboard for the random phase ----------------
  localparam int MAXT = 65536;
  int  due  [MAXT];      // cycle at which the flit must appear
  bit  live [MAXT];
  bit  is_local [MAXT];

  initial begin
    int tag;
    idle_inputs();
    for (int i = 0; i < MAXT; i++) begin live[i] = 0; due[i] = 0; is_local[i] = 0; end
    repeat (3) step();
    rst_n = 1;
    step();

    // 1. one flit from W heading East: in A, B, then on output E.
    in_flit[PW] = mkf(6, 3, 101);
    step(); idle_inputs();                       // captured into A
    chk(!out_flit[PE].valid, "E output early");
    step();                                      // B
    chk(!out_flit[PE].valid, "E output early (B)");
    step();                                      // C
    chk(out_flit[PE] == mkf(6, 3, 101), "single flit not on E after 3 edges");
    chk(defl_count == 0, "single flit counted as deflected");
    step();
    chk(!out_flit[PE].valid, "flit lingers on E");

    // 2. ejection: flit from N for this router reaches the core 2 edges later
    in_flit[PN] = mkf(RX, RY, 102);
    step(); idle_inputs();
    chk(!ej_flit.valid, "ejection too early");
    step();
    chk(ej_flit == mkf(RX, RY, 102), "flit not ejected after 2 edges");
    n_ej++;
    step();
    chk(!ej_flit.valid, "ejection lingers");

    // 3. two local flits at once: N ejected, S deflected onto a link
    in_flit[PN] = mkf(RX, RY, 103);
    in_flit[PS] = mkf(RX, RY, 104);
    step(); idle_inputs();
    step();
    chk(ej_flit == mkf(RX, RY, 103), "lowest-channel local flit not ejected");
    step();
    begin
      automatic int seen = 0;
      for (int p = 0; p < NUM_PORTS; p++) if (out_flit[p] == mkf(RX, RY, 104)) seen++;
      chk(seen == 1, "second local flit not deflected onto a link");
      chk(defl_count == 1, "deflected local flit not counted");
    end
    n_ej_conflict++;

    // 4. injection towards North: ready, then out on N 2 edges later
    inj_valid = 1'b1; inj_flit = mkf(RX, 0, 105);
    chk(inj_ready, "injection refused in an empty router");
    step(); idle_inputs();
    step();
    chk(out_flit[PN] == mkf(RX, 0, 105), "injected flit not on N after 2 edges");
    n_inj++;

    // 5. PDN2 wins: N wants E, E wants W (paired in PDN1, apart in PDN2)
    in_flit[PN] = mkf(6, 3, 106);
    in_flit[PE] = mkf(0, 3, 107);
    step(); idle_inputs(); step(); step();
    chk(pdn2_sel, "PDN2 not chosen when it avoids a deflection");
    chk(defl_count == 0, "deflection left although PDN2 has none");
    chk(out_flit[PE] == mkf(6, 3, 106) && out_flit[PW] == mkf(0, 3, 107), "wrong ports via PDN2");
    n_pdn2++;

    // 6. PDN1 kept: N wants E, W wants W (apart in PDN1, paired in PDN2)
    in_flit[PN] = mkf(6, 3, 108);
    in_flit[PW] = mkf(0, 3, 109);
    step(); idle_inputs(); step(); step();
    chk(!pdn2_sel, "PDN2 chosen although PDN1 is better");
    chk(out_flit[PE] == mkf(6, 3, 108) && out_flit[PW] == mkf(0, 3, 109), "wrong ports via PDN1");

    // 7. all four channels busy: injection refused for that cycle
    in_flit[PN] = mkf(5, 5, 110); in_flit[PE] = mkf(1, 1, 111);
    in_flit[PS] = mkf(3, 0, 112); in_flit[PW] = mkf(7, 2, 113);
    step(); idle_inputs();
    inj_valid = 1'b1; inj_flit = mkf(0, 0, 114);
    #1 chk(!inj_ready, "injection accepted with all channels busy");
    n_inj_block++;
    step();                        // channels now free again
    chk(inj_ready, "injection refused once channels free");
    idle_inputs();
    repeat (4) step();

    // 8. random traffic with the scoreboard
    tag = 1000;
    for (int t = 0; t < 20000; t++) begin
      // outputs of this cycle
      if (ej_flit.valid) begin
        automatic int id = int'(ej_flit.data[15:0]);
        chk(live[id] && is_local[id] && due[id] - 1 == cyc, "unexpected ejection");
        live[id] = 0; n_ej++;
      end
      begin
        automatic int nd = 0;
        for (int p = 0; p < NUM_PORTS; p++) if (out_flit[p].valid) begin
          automatic int id = int'(out_flit[p].data[15:0]);
          chk(live[id] && due[id] == cyc, "unexpected flit on a link");
          live[id] = 0;
          if (xy_dir(out_flit[p]) != p) nd++;
        end
        chk(int'(defl_count) == nd, "defl_count differs from flits off their XY port");
        n_defl += nd;
        if (pdn2_sel) n_pdn2++;
      end
      // count local flits now in register A (they eject next edge, one of them)
      begin
        automatic int nl = 0;
        for (int i = 0; i < NUM_PORTS; i++)
          if (dut.reg_a[i].valid && xy_dir(dut.reg_a[i]) == int'(DIR_L)) nl++;
        if (nl > 1) n_ej_conflict++;
      end
      // new inputs
      idle_inputs();
      for (int i = 0; i < NUM_PORTS; i++) if ($urandom_range(0, 9) < 6) begin
        automatic int dx = $urandom_range(0, 7), dy = $urandom_range(0, 7);
        if ($urandom_range(0, 5) == 0) begin dx = RX; dy = RY; end
        in_flit[i] = mkf(dx, dy, tag);
        in_flit[i].hdr.src_x = 3'($urandom); in_flit[i].hdr.src_y = 3'($urandom);
        live[tag] = 1; due[tag] = cyc + 3; is_local[tag] = (dx == RX && dy == RY);
        tag = (tag + 1) % MAXT;
      end
      if ($urandom_range(0, 1) == 1) begin
        automatic int dx, dy;
        do begin dx = $urandom_range(0, 7); dy = $urandom_range(0, 7); end
        while (dx == RX && dy == RY);
        inj_valid = 1'b1; inj_flit = mkf(dx, dy, tag);
        #1;
        if (inj_ready) begin
          live[tag] = 1; due[tag] = cyc + 2; is_local[tag] = 0;
          tag = (tag + 1) % MAXT; n_inj++;
        end else n_inj_block++;
      end
      step();
      // a local flit that lost the ejection leaves on a link at cycle due
      for (int i = 0; i < NUM_PORTS; i++)
        if (dut.reg_b[i].flit.valid && dut.reg_b[i].dir == DIR_L)
          is_local[int'(dut.reg_b[i].flit.data[15:0])] = 0;
    end
    idle_inputs();
    repeat (4) begin
      for (int p = 0; p < NUM_PORTS; p++) if (out_flit[p].valid) live[int'(out_flit[p].data[15:0])] = 0;
      if (ej_flit.valid) live[int'(ej_flit.data[15:0])] = 0;
      step();
    end
    begin
      automatic int left = 0;
      for (int i = 0; i < MAXT; i++) if (live[i]) left++;
      chk(left == 0, $sformatf("%0d flits never left the router", left));
    end
    $display("deflections %0d, PDN2 chosen %0d, ejections %0d, ejection conflicts %0d, injections %0d, injection refused %0d",
             n_defl, n_pdn2, n_ej, n_ej_conflict, n_inj, n_inj_block);
    chk(n_defl > 0 && n_pdn2 > 1 && n_ej_conflict > 1 && n_inj_block > 1 && n_inj > 1, "a mechanism never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
