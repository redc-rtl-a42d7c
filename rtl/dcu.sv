// dcu: Deflection Counter Unit.
//
// Counts how many flits a PDN has placed on an output port other than their
// productive one. A flit destined to this router that could not be ejected
// counts as deflected (it leaves on some link whatever happens); this is this
// design's choice and adds the same amount for both PDNs. Combinational.
// Interface: port_in is a PDN result indexed by output port; count is 0..4.
module dcu
  import redc_pkg::*;
(
  input  chan_t             port_in [NUM_PORTS],
  output logic [CNT_W-1:0]  count
);

  always_comb begin
    count = '0;
    for (int p = 0; p < NUM_PORTS; p++)
      if (port_in[p].flit.valid && (port_in[p].dir != dir_e'(p)))
        count = count + 1'b1;
  end

endmodule
