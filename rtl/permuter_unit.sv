// permuter_unit: the ReDC Permuter Unit, two PDNs side by side.
//
// The same four channels from pipeline register B enter two Permutation
// Deflection Networks, paired differently in their first stage:
//   PDN1: (N, E) into the first block, (S, W) into the second;
//   PDN2: (N, W) into the first block, (E, S) into the second.
// Different pairings resolve contention differently, so one of the two often
// leaves fewer flits deflected; the DCCU picks that one. Channel i carries the
// flit that arrived on input port i (or an injected flit in a free slot).
// Both networks see the same tie-break bits; that is this design's choice.
// Combinational.
module permuter_unit
  import redc_pkg::*;
(
  input  chan_t      ch_in    [NUM_PORTS],
  input  logic [3:0] rnd,
  output chan_t      pdn1_out [NUM_PORTS],
  output chan_t      pdn2_out [NUM_PORTS]
);

  chan_t in1 [NUM_PORTS];
  chan_t in2 [NUM_PORTS];

  always_comb begin
    in1[0] = ch_in[PN]; in1[1] = ch_in[PE];
    in1[2] = ch_in[PS]; in1[3] = ch_in[PW];
    in2[0] = ch_in[PN]; in2[1] = ch_in[PW];
    in2[2] = ch_in[PE]; in2[3] = ch_in[PS];
  end

  pdn u_pdn1 (.ch_in(in1), .rnd(rnd), .port_out(pdn1_out));
  pdn u_pdn2 (.ch_in(in2), .rnd(rnd), .port_out(pdn2_out));

endmodule
