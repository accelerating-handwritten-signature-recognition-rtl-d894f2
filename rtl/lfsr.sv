// lfsr - 32-bit Galois linear feedback shift register.
//
// The random number source of the DEA trainer (random genes of the initial
// population, random partner chromosomes r1 and r2, the crossover draw and
// the forced crossover gene). Feedback polynomial
// x^32 + x^22 + x^2 + x + 1 (maximal length, period 2^32 - 1); it advances
// one step per clock while en is high. The generator type and polynomial are
// this design's choice. STEPS register shifts are taken per clock, so that
// successive outputs are not merely shifted copies of each other.
//
// Interface: en in; q[31:0] the current state, never zero. Reset (active-low
// rst_n) loads SEED, which must not be zero.
module lfsr #(
  parameter logic [31:0] SEED  = 32'h1ACE_B00C,
  parameter int unsigned STEPS = 1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  output logic [31:0] q
);

  localparam logic [31:0] TAPS = 32'h8020_0003;

  logic [31:0] nxt;
  always_comb begin
    nxt = q;
    for (int s = 0; s < int'(STEPS); s++) nxt = nxt[0] ? ((nxt >> 1) ^ TAPS) : (nxt >> 1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  q <= SEED;
    else if (en) q <= nxt;
  end

endmodule
