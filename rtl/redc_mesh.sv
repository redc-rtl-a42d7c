// redc_mesh: MESH_X x MESH_Y mesh of ReDC routers (8x8 by default).
//
// Each node has one router and one core port: inj_* to offer a flit,
// ej_flit to receive one. Neighbouring routers are linked port to port
// (East output of (x,y) to West input of (x+1,y), South output of (x,y) to
// North input of (x,y+1), and the reverse). Node index is y*MESH_X + x and
// row 0 is the northern edge. A deflection router must always have somewhere
// to send every flit, so an output on the mesh edge, which has no neighbour,
// is looped back into the same router's input on that side: a flit deflected
// off the edge returns one hop later. XY routing never chooses such a port
// on purpose. The edge loopback is this design's choice.
// Timing: see redc_router; each hop costs three cycles.
module redc_mesh
  import redc_pkg::*;
#(
  parameter int unsigned MESH_X       = 8,
  parameter int unsigned MESH_Y       = 8,
  parameter int unsigned GOLDEN_EPOCH = 128
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             inj_valid  [MESH_X*MESH_Y],
  input  flit_t            inj_flit   [MESH_X*MESH_Y],
  output logic             inj_ready  [MESH_X*MESH_Y],
  output flit_t            ej_flit    [MESH_X*MESH_Y],
  output logic [CNT_W-1:0] defl_count [MESH_X*MESH_Y],
  output logic             pdn2_sel   [MESH_X*MESH_Y]
);

  localparam int unsigned NN = MESH_X * MESH_Y;

  flit_t r_in  [NN][NUM_PORTS];
  flit_t r_out [NN][NUM_PORTS];

  for (genvar y = 0; y < MESH_Y; y++) begin : g_y
    for (genvar x = 0; x < MESH_X; x++) begin : g_x
      localparam int unsigned N = y * MESH_X + x;

      // input links (loop back on the edge)
      if (y > 0) begin : g_n_link
        assign r_in[N][PN] = r_out[N - MESH_X][PS];
      end else begin : g_n_loop
        assign r_in[N][PN] = r_out[N][PN];
      end
      if (y < MESH_Y - 1) begin : g_s_link
        assign r_in[N][PS] = r_out[N + MESH_X][PN];
      end else begin : g_s_loop
        assign r_in[N][PS] = r_out[N][PS];
      end
      if (x < MESH_X - 1) begin : g_e_link
        assign r_in[N][PE] = r_out[N + 1][PW];
      end else begin : g_e_loop
        assign r_in[N][PE] = r_out[N][PE];
      end
      if (x > 0) begin : g_w_link
        assign r_in[N][PW] = r_out[N - 1][PE];
      end else begin : g_w_loop
        assign r_in[N][PW] = r_out[N][PW];
      end

      redc_router #(
        .X(x), .Y(y), .GOLDEN_EPOCH(GOLDEN_EPOCH),
        .SEED(16'(16'hACE1 ^ (N * 16'h9E37)))
      ) u_router (
        .clk(clk), .rst_n(rst_n),
        .in_flit(r_in[N]), .out_flit(r_out[N]),
        .inj_valid(inj_valid[N]), .inj_flit(inj_flit[N]), .inj_ready(inj_ready[N]),
        .ej_flit(ej_flit[N]), .defl_count(defl_count[N]), .pdn2_sel(pdn2_sel[N])
      );
    end
  end

endmodule
