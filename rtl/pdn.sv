// pdn: Permutation Deflection Network.
//
// Four flits enter, four leave, one on each output port; no flit is ever
// dropped or held. Two stages of two 2x2 arbiter blocks:
//   stage 1: block 0 takes inputs 0,1; block 1 takes inputs 2,3. Each sends a
//            flit to its output 0 if the flit wants the Y dimension (N or S)
//            and to output 1 if it wants X (E or W).
//   stage 2: block 0 receives output 0 of both first-stage blocks and drives
//            ports N (its output 0) and S; block 1 receives the outputs 1 and
//            drives E and W.
// A flit that loses in stage 1 ends up in the wrong dimension and is
// deflected; one that loses in stage 2 gets the opposite port of its
// dimension. Two stages of 2x2 blocks follow the reference network; the
// grouping of outputs (N,S / E,W) is this design's choice. Combinational.
// Interface: port_out is indexed by output port (DIR_N..DIR_W); rnd[k] is
// the tie-break bit of block k (0,1 first stage; 2,3 second stage).
module pdn
  import redc_pkg::*;
(
  input  chan_t            ch_in    [NUM_PORTS],
  input  logic [3:0]       rnd,
  output chan_t            port_out [NUM_PORTS]
);

  function automatic logic wants_y(chan_t c);
    return (c.dir == DIR_N) || (c.dir == DIR_S);
  endfunction

  chan_t s1_o0 [2];
  chan_t s1_o1 [2];

  pdn_arbiter u_s1_0 (
    .in_a(ch_in[0]), .in_b(ch_in[1]),
    .want0_a(wants_y(ch_in[0])), .want0_b(wants_y(ch_in[1])),
    .rnd(rnd[0]), .out0(s1_o0[0]), .out1(s1_o1[0])
  );

  pdn_arbiter u_s1_1 (
    .in_a(ch_in[2]), .in_b(ch_in[3]),
    .want0_a(wants_y(ch_in[2])), .want0_b(wants_y(ch_in[3])),
    .rnd(rnd[1]), .out0(s1_o0[1]), .out1(s1_o1[1])
  );

  // Y block: N on output 0, S on output 1
  pdn_arbiter u_s2_y (
    .in_a(s1_o0[0]), .in_b(s1_o0[1]),
    .want0_a(s1_o0[0].dir == DIR_N), .want0_b(s1_o0[1].dir == DIR_N),
    .rnd(rnd[2]), .out0(port_out[PN]), .out1(port_out[PS])
  );

  // X block: E on output 0, W on output 1
  pdn_arbiter u_s2_x (
    .in_a(s1_o1[0]), .in_b(s1_o1[1]),
    .want0_a(s1_o1[0].dir == DIR_E), .want0_b(s1_o1[1].dir == DIR_E),
    .rnd(rnd[3]), .out0(port_out[PE]), .out1(port_out[PW])
  );

endmodule
