// fp16_adder_tree - pipelined binary16 summation of N values.
//
// The "adder block" of the neuron datapath: it adds N binary16 inputs in a
// balanced binary tree of fp16_add cores. The input vector is padded with
// zeros to the next power of two; each tree level ends in a register, so the
// sum appears LAT = ceil(log2 N) clock cycles after the inputs (0 cycles for
// N = 1) and a new vector can be accepted every cycle.
//
// Interface: clk; in[N] (binary16); sum (binary16). No valid signal: the
// enclosing pipeline tracks validity. Registers are not reset (pure data
// path). The tree shape and the register per level are this design's choice.
module fp16_adder_tree
  import csfnn_pkg::*;
#(
  parameter int unsigned N = 10
) (
  input  logic  clk,
  input  fp16_t in [N],
  output fp16_t sum
);

  localparam int unsigned LAT = (N <= 1) ? 0 : $clog2(N);
  localparam int unsigned W   = 1 << LAT;

  // level l holds W >> l values
  fp16_t lvl [LAT+1][W];

  always_comb begin
    for (int i = 0; i < int'(W); i++) lvl[0][i] = (i < int'(N)) ? in[i] : FP16_ZERO;
  end

  for (genvar l = 0; l < int'(LAT); l++) begin : g_lvl
    for (genvar i = 0; i < int'(W >> (l + 1)); i++) begin : g_add
      fp16_t s;
      fp16_add u_add (.a(lvl[l][2*i]), .b(lvl[l][2*i+1]), .sub(1'b0), .y(s));
      always_ff @(posedge clk) lvl[l+1][i] <= s;
    end
    for (genvar i = int'(W >> (l + 1)); i < int'(W); i++) begin : g_pad
      always_comb lvl[l+1][i] = FP16_ZERO;
    end
  end

  assign sum = lvl[LAT][0];

endmodule
