// redc_pkg: types and constants shared by the ReDC router and its mesh.
//
// A flit is 140 bits: a 128-bit payload and a 12-bit header, as in the
// reference router. The header layout (four 3-bit coordinates: destination
// x/y and source x/y, enough for an 8x8 mesh) is this design's choice, as is
// the separate valid bit that travels beside every flit. Inside the router a
// flit is carried on an "internal channel" together with its productive
// direction (worked out once, in stage 1) and its golden bit.
package redc_pkg;

  parameter int unsigned DATA_W    = 128;              // payload bits
  parameter int unsigned COORD_W   = 3;                // bits per mesh coordinate
  parameter int unsigned HDR_W     = 4 * COORD_W;      // 12 header bits
  parameter int unsigned FLIT_W    = HDR_W + DATA_W;   // 140 bits on a link
  parameter int unsigned ID_W      = 2 * COORD_W;      // node identifier {x,y}
  parameter int unsigned NUM_PORTS = 4;                // N, E, S, W
  parameter int unsigned CNT_W     = 3;                // deflection count 0..4

  // Output/input port numbering; LOCAL is the ejection port.
  typedef enum logic [2:0] {
    DIR_N = 3'd0,
    DIR_E = 3'd1,
    DIR_S = 3'd2,
    DIR_W = 3'd3,
    DIR_L = 3'd4
  } dir_e;

  // The same numbering as plain integers, for indexing port arrays.
  localparam int unsigned PN = 0;
  localparam int unsigned PE = 1;
  localparam int unsigned PS = 2;
  localparam int unsigned PW = 3;

  typedef struct packed {
    logic [COORD_W-1:0] dst_x;
    logic [COORD_W-1:0] dst_y;
    logic [COORD_W-1:0] src_x;
    logic [COORD_W-1:0] src_y;
  } hdr_t;

  typedef struct packed {
    logic              valid;
    hdr_t              hdr;
    logic [DATA_W-1:0] data;
  } flit_t;

  // One internal flit channel of the router pipeline.
  typedef struct packed {
    flit_t flit;
    dir_e  dir;      // productive output port (DIR_L: destined here)
    logic  golden;   // flit belongs to the current golden source
  } chan_t;

  typedef flit_t flit_arr_t [NUM_PORTS];
  typedef chan_t chan_arr_t [NUM_PORTS];

  localparam flit_t FLIT_NONE = '0;
  localparam chan_t CHAN_NONE = '{flit: '0, dir: DIR_L, golden: 1'b0};

  // A channel holds a flit that wants a real output port.
  function automatic logic has_pref(chan_t c);
    return c.flit.valid && (c.dir != DIR_L);
  endfunction

endpackage
