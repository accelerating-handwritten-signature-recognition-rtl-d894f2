// dea_crossover - binomial crossover unit of the DEA.
//
// For gene j of the trial vector it takes the mutant gene v when a uniform
// random draw in [0, 1) is at most CR, or when j is the randomly chosen gene
// j_rand (so that at least one gene comes from the mutant); otherwise it
// keeps the target chromosome's gene x. The draw is a 16-bit random number
// compared with CR_Q16 = round(CR * 65536); CR = 0.6 in the design's setting.
//
// Interface: in_valid, v, x, rnd[15:0], j, jrand in; out_valid, u and
// from_mutant (which source was taken) one cycle later. Valid is reset by the
// active-low rst_n. The fixed-point comparison is this design's choice.
module dea_crossover
  import csfnn_pkg::*;
#(
  parameter int unsigned D      = 240,
  parameter int unsigned CR_Q16 = 39322
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  fp16_t                v,
  input  fp16_t                x,
  input  logic [15:0]          rnd,
  input  logic [$clog2(D)-1:0] j,
  input  logic [$clog2(D)-1:0] jrand,
  output logic                 out_valid,
  output fp16_t                u,
  output logic                 from_mutant
);

  logic take;
  always_comb take = (32'(rnd) < 32'(CR_Q16)) || (j == jrand);

  always_ff @(posedge clk) begin
    u           <= take ? v : x;
    from_mutant <= take;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end

endmodule
