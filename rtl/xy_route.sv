// xy_route: route computation of the ReDC router.
//
// Dimension-ordered (XY) routing, the deterministic minimal algorithm the
// router uses: a flit first travels along X until its column matches, then
// along Y, and is ejected when both match. Purely combinational.
// Interface: the router's own coordinates and a flit header in, the productive
// direction out. Columns grow towards East and rows towards South; that
// orientation is this design's choice.
module xy_route
  import redc_pkg::*;
(
  input  logic [COORD_W-1:0] cur_x,
  input  logic [COORD_W-1:0] cur_y,
  input  hdr_t               hdr,
  output dir_e               dir
);

  always_comb begin
    if (hdr.dst_x > cur_x)      dir = DIR_E;
    else if (hdr.dst_x < cur_x) dir = DIR_W;
    else if (hdr.dst_y > cur_y) dir = DIR_S;
    else if (hdr.dst_y < cur_y) dir = DIR_N;
    else                        dir = DIR_L;
  end

endmodule
