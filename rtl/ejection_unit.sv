// ejection_unit: stage-1 ejection of the ReDC router.
//
// Looks at the four internal channels coming out of pipeline register A and
// removes at most one flit whose productive direction is LOCAL, handing it to
// the single ejection port. When several flits are destined here in the same
// cycle, a golden one goes first, otherwise the lowest channel (N, E, S, W
// order); that order is this design's choice. The others stay in their
// channels, are deflected by the permuter and try again when they come back.
// Combinational. Interface: ch_in/ch_out are the channels before/after
// ejection; ej_flit.valid marks an ejected flit.
module ejection_unit
  import redc_pkg::*;
(
  input  chan_t ch_in   [NUM_PORTS],
  output chan_t ch_out  [NUM_PORTS],
  output flit_t ej_flit
);

  logic [NUM_PORTS-1:0] is_local, is_gold_local;
  logic [NUM_PORTS-1:0] pick;

  always_comb begin
    for (int i = 0; i < NUM_PORTS; i++) begin
      is_local[i]      = ch_in[i].flit.valid && (ch_in[i].dir == DIR_L);
      is_gold_local[i] = is_local[i] && ch_in[i].golden;
    end
    // one-hot pick of the lowest set bit, golden candidates first
    pick = '0;
    if (is_gold_local != '0) pick = is_gold_local & (~is_gold_local + 1'b1);
    else                     pick = is_local & (~is_local + 1'b1);

    ej_flit = FLIT_NONE;
    for (int i = 0; i < NUM_PORTS; i++) begin
      ch_out[i] = ch_in[i];
      if (pick[i]) begin
        ej_flit   = ch_in[i].flit;
        ch_out[i] = CHAN_NONE;
      end
    end
  end

endmodule
