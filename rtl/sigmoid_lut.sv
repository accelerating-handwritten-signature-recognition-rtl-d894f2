// sigmoid_lut - bipolar sigmoid f(u) = 2/(1+exp(-2u)) - 1 by look-up table.
//
// The activation function of every neuron. As the design prescribes, the
// table holds only the right-hand half of the (odd) function, 5019 binary16
// samples; for negative arguments the sign bit is put back on the result.
// Sample i is f(i / 2^FRAC): with FRAC = 10 the table spans u = 0 .. 4.90,
// beyond which f(u) > 0.9998 and the last sample is used. The address is |u|
// rounded to FRAC fraction bits. The uniform grid and its step are this
// design's choice; the sample count is the design's own.
//
// The table is computed at elaboration from the formula above (rounded to
// binary16) and held in a ROM with a registered output.
//
// Interface: clk; u (binary16) in; a (binary16) out one clock cycle later.
module sigmoid_lut
  import csfnn_pkg::*;
#(
  parameter int unsigned DEPTH = 5019,
  parameter int unsigned FRAC  = 10
) (
  input  logic  clk,
  input  fp16_t u,
  output fp16_t a
);

  fp16_t rom [DEPTH];

  initial begin
    for (int i = 0; i < int'(DEPTH); i++)
      rom[i] = real_to_fp16(2.0 / (1.0 + $exp(-2.0 * real'(i) / real'(1 << FRAC))) - 1.0);
  end

  logic [31:0] idx;
  always_comb idx = fp16_to_fix(u, FRAC, 32'(DEPTH - 1));

  always_ff @(posedge clk) a <= {u[15], rom[idx][14:0]};

endmodule
