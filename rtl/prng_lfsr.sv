// prng_lfsr: random tie-break bits for the PDN arbiters.
//
// When two non-golden flits meet in a 2x2 arbiter block, the winner is picked
// at random. This block supplies those bits from a 16-bit Fibonacci LFSR
// (x^16 + x^14 + x^13 + x^11 + 1, maximal length) that advances once per
// cycle. The generator itself is this design's choice. NBITS bits per cycle
// are taken from the low end of the register.
// Interface: rnd is registered; after reset the register holds SEED (which
// must be non-zero; zero is replaced by 1).
module prng_lfsr #(
  parameter int unsigned NBITS = 4,
  parameter logic [15:0] SEED  = 16'h0001
) (
  input  logic             clk,
  input  logic             rst_n,
  output logic [NBITS-1:0] rnd
);

  localparam logic [15:0] SEED_NZ = (SEED == 16'h0000) ? 16'h0001 : SEED;

  logic [15:0] state;
  logic        fb;

  assign fb  = state[15] ^ state[13] ^ state[12] ^ state[10];
  assign rnd = state[NBITS-1:0];

  always_ff @(posedge clk) begin
    if (!rst_n) state <= SEED_NZ;
    else        state <= {state[14:0], fb};
  end

endmodule
