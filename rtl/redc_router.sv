// redc_router: ReDC bufferless deflection router (two pipeline stages).
//
// A bufferless router never stores a flit: every flit that enters leaves in
// a fixed number of cycles, on its productive port if it wins arbitration or
// on another port (a deflection) if not. ReDC lowers the number of
// deflections by running two Permutation Deflection Networks in parallel,
// fed with the same flits in different orders, and keeping the result with
// fewer deflections.
//
// Pipeline (three registers, two router stages):
//   register A  samples the four input links (N, E, S, W);
//   stage 1     route computation (XY), golden check, ejection of at most one
//               flit for the local core, injection of one core flit into a
//               free channel -> register B (and the ejection port register);
//   stage 2     permuter unit (PDN1 and PDN2) and DCCU -> register C, which
//               drives the four output links.
// A flit presented on in_flit before clock edge k is in A after edge k, in B
// after k+1 and on out_flit after k+2, so with the link register a hop costs
// three cycles. A flit injected in the cycle inj_valid && inj_ready holds is
// in B after that edge and on out_flit one edge later. ej_flit is valid for
// one cycle, one edge after the flit reached A; the core must accept it.
// The pipeline split and the units follow the reference design; the exact
// register placement of the link and ejection port, the reset, and the
// statistics outputs (defl_count, pdn2_sel, describing the flits now in C)
// are this design's choices. Reset is synchronous, active low.
module redc_router
  import redc_pkg::*;
#(
  parameter int unsigned X            = 0,
  parameter int unsigned Y            = 0,
  parameter int unsigned GOLDEN_EPOCH = 128,
  parameter logic [15:0] SEED         = 16'h0001
) (
  input  logic             clk,
  input  logic             rst_n,
  input  flit_t            in_flit  [NUM_PORTS],
  output flit_t            out_flit [NUM_PORTS],
  input  logic             inj_valid,
  input  flit_t            inj_flit,
  output logic             inj_ready,
  output flit_t            ej_flit,
  output logic [CNT_W-1:0] defl_count,
  output logic             pdn2_sel
);

  localparam logic [COORD_W-1:0] CX = COORD_W'(X);
  localparam logic [COORD_W-1:0] CY = COORD_W'(Y);

  // ---------------- shared state ----------------
  logic [ID_W-1:0] golden_id;
  logic [3:0]      rnd;

  golden_ctrl #(.GOLDEN_EPOCH(GOLDEN_EPOCH)) u_golden (
    .clk(clk), .rst_n(rst_n), .golden_id(golden_id)
  );

  prng_lfsr #(.NBITS(4), .SEED(SEED)) u_prng (
    .clk(clk), .rst_n(rst_n), .rnd(rnd)
  );

  // ---------------- register A ----------------
  flit_t reg_a [NUM_PORTS];

  always_ff @(posedge clk) begin
    for (int i = 0; i < NUM_PORTS; i++)
      reg_a[i] <= rst_n ? in_flit[i] : FLIT_NONE;
  end

  // ---------------- stage 1 ----------------
  chan_t a_ch  [NUM_PORTS];
  chan_t ej_ch [NUM_PORTS];
  chan_t b_nxt [NUM_PORTS];
  chan_t inj_ch;
  dir_e  a_dir [NUM_PORTS];
  dir_e  inj_dir;
  flit_t ej_nxt;

  for (genvar i = 0; i < NUM_PORTS; i++) begin : g_rc
    xy_route u_rc (.cur_x(CX), .cur_y(CY), .hdr(reg_a[i].hdr), .dir(a_dir[i]));
    always_comb begin
      a_ch[i].flit   = reg_a[i];
      a_ch[i].dir    = a_dir[i];
      a_ch[i].golden = reg_a[i].valid &&
                       ({reg_a[i].hdr.src_x, reg_a[i].hdr.src_y} == golden_id);
    end
  end

  xy_route u_rc_inj (.cur_x(CX), .cur_y(CY), .hdr(inj_flit.hdr), .dir(inj_dir));

  always_comb begin
    inj_ch.flit   = inj_flit;
    inj_ch.dir    = inj_dir;
    inj_ch.golden = ({inj_flit.hdr.src_x, inj_flit.hdr.src_y} == golden_id);
  end

  ejection_unit u_eject (.ch_in(a_ch), .ch_out(ej_ch), .ej_flit(ej_nxt));

  injection_unit u_inject (
    .ch_in(ej_ch), .inj_valid(inj_valid), .inj_ch(inj_ch),
    .inj_ready(inj_ready), .ch_out(b_nxt)
  );

  // ---------------- register B ----------------
  chan_t reg_b [NUM_PORTS];

  always_ff @(posedge clk) begin
    for (int i = 0; i < NUM_PORTS; i++)
      reg_b[i] <= rst_n ? b_nxt[i] : CHAN_NONE;
    ej_flit <= rst_n ? ej_nxt : FLIT_NONE;
  end

  // ---------------- stage 2 ----------------
  chan_t            pdn1_out [NUM_PORTS];
  chan_t            pdn2_out [NUM_PORTS];
  chan_t            sel_out  [NUM_PORTS];
  logic             sel2;
  logic [CNT_W-1:0] sel_cnt;

  permuter_unit u_pu (
    .ch_in(reg_b), .rnd(rnd), .pdn1_out(pdn1_out), .pdn2_out(pdn2_out)
  );

  dccu u_dccu (
    .pdn1_in(pdn1_out), .pdn2_in(pdn2_out),
    .port_out(sel_out), .sel2(sel2), .defl_count(sel_cnt)
  );

  // ---------------- register C ----------------
  always_ff @(posedge clk) begin
    for (int p = 0; p < NUM_PORTS; p++)
      out_flit[p] <= rst_n ? sel_out[p].flit : FLIT_NONE;
    defl_count <= rst_n ? sel_cnt : '0;
    pdn2_sel   <= rst_n ? sel2    : 1'b0;
  end

  // ---------------- checks ----------------
  // The permuter neither drops nor duplicates flits.
  function automatic int unsigned n_valid_ch(chan_t c [NUM_PORTS]);
    int unsigned n = 0;
    for (int i = 0; i < NUM_PORTS; i++) n += int'(c[i].flit.valid);
    return n;
  endfunction

  always_ff @(posedge clk) begin
    if (rst_n) begin
      assert (n_valid_ch(sel_out) == n_valid_ch(reg_b))
        else $error("redc_router(%0d,%0d): permuter changed the flit count", X, Y);
      assert (n_valid_ch(b_nxt) == n_valid_ch(a_ch) - int'(ej_nxt.valid)
                                   + int'(inj_valid && inj_ready))
        else $error("redc_router(%0d,%0d): stage 1 lost a flit", X, Y);
    end
  end

endmodule
