// pdn_arbiter: one 2x2 arbiter block of the Permutation Deflection Network.
//
// Two flits come in, each with a wish for output 0 or output 1. The block
// decides which flit has priority; that flit is steered to the output it
// wants and the other flit takes the remaining output (it is deflected if it
// wanted the same one). Priority order: a golden flit with a real wish, then
// any flit with a real wish, then a random bit. A flit with no wish (not
// valid, or destined to this router but not ejected) always yields. Two
// golden flits: input a wins. The exact ranking below "golden first" is this
// design's choice. Combinational.
module pdn_arbiter
  import redc_pkg::*;
(
  input  chan_t in_a,
  input  chan_t in_b,
  input  logic  want0_a,   // flit a prefers output 0
  input  logic  want0_b,   // flit b prefers output 0
  input  logic  rnd,       // tie-break: 1 lets a win
  output chan_t out0,
  output chan_t out1
);

  logic pref_a, pref_b, gold_a, gold_b, a_wins, swap;

  always_comb begin
    pref_a = has_pref(in_a);
    pref_b = has_pref(in_b);
    gold_a = pref_a && in_a.golden;
    gold_b = pref_b && in_b.golden;

    if (gold_a)                 a_wins = 1'b1;
    else if (gold_b)            a_wins = 1'b0;
    else if (pref_a != pref_b)  a_wins = pref_a;
    else                        a_wins = rnd;

    // swap=1: a goes to output 1, b to output 0
    swap = a_wins ? !want0_a : want0_b;
    out0 = swap ? in_b : in_a;
    out1 = swap ? in_a : in_b;
  end

endmodule
