// injection_unit: stage-1 injection of the ReDC router.
//
// A bufferless router can take a flit from its core only if one of the four
// internal channels is empty after ejection: then some output link will be
// free for it. inj_ready says so; when the core also holds inj_valid the flit
// is placed in the lowest-numbered empty channel. Otherwise the flit waits at
// the core. The valid/ready handshake and the slot choice are this design's
// choice. Combinational; inj_ready does not depend on inj_valid.
// Interface: inj_ch carries the offered flit with its route and golden bit
// already computed.
module injection_unit
  import redc_pkg::*;
(
  input  chan_t ch_in   [NUM_PORTS],
  input  logic  inj_valid,
  input  chan_t inj_ch,
  output logic  inj_ready,
  output chan_t ch_out  [NUM_PORTS]
);

  logic [NUM_PORTS-1:0] free, slot;

  always_comb begin
    for (int i = 0; i < NUM_PORTS; i++) free[i] = !ch_in[i].flit.valid;
    slot      = free & (~free + 1'b1);
    inj_ready = (free != '0);
    for (int i = 0; i < NUM_PORTS; i++) begin
      ch_out[i] = ch_in[i];
      if (inj_valid && slot[i]) begin
        ch_out[i]            = inj_ch;
        ch_out[i].flit.valid = 1'b1;
      end
    end
  end

endmodule
