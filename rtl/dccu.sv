// dccu: Deflection Counter and Comparator Unit.
//
// Two Deflection Counter Units count the deflections in the results of PDN1
// and PDN2; the Comparator Unit picks the result with fewer deflections and a
// multiplexer passes it on towards pipeline register C. This structure
// follows the reference design. Combinational.
// Interface: port_out is the chosen port assignment, sel2 tells which PDN was
// chosen and defl_count how many of its flits are deflected.
module dccu
  import redc_pkg::*;
(
  input  chan_t            pdn1_in  [NUM_PORTS],
  input  chan_t            pdn2_in  [NUM_PORTS],
  output chan_t            port_out [NUM_PORTS],
  output logic             sel2,
  output logic [CNT_W-1:0] defl_count
);

  logic [CNT_W-1:0] cnt1, cnt2;

  dcu u_dcu1 (.port_in(pdn1_in), .count(cnt1));
  dcu u_dcu2 (.port_in(pdn2_in), .count(cnt2));

  comparator_unit u_cu (.count1(cnt1), .count2(cnt2), .sel2(sel2));

  always_comb begin
    for (int p = 0; p < NUM_PORTS; p++)
      port_out[p] = sel2 ? pdn2_in[p] : pdn1_in[p];
    defl_count = sel2 ? cnt2 : cnt1;
  end

endmodule
