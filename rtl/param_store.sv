// param_store - storage of the CSFNN parameters (one chromosome).
//
// Holds the D binary16 genes of the network: the input-to-hidden weights
// w_ij, the hidden-to-output weights w_jk, the centres c_ij and the cosines of
// the opening angles, laid out as
//   gene  j*N_IN + i                        w_ij  (hidden j, input i)
//   gene  N_HID*N_IN + k*N_HID + j          w_jk  (output k, hidden j)
//   gene  N_HID*(N_IN+N_OUT) + j*N_IN + i   c_ij
//   gene  N_HID*(2*N_IN+N_OUT) + j          cos(omega_j)
// (D = 240 for the 10-10-3 network). It is written one gene per clock by the
// DEA trainer and read in parallel by all neurons, like the distributed
// memory the design keeps its trained parameters in. The gene layout and the
// choice to store cos(omega) rather than omega are this design's own.
//
// Interface: we/waddr/wdata write on the rising clock edge; genes[D] shows
// the whole register file. Reset (active-low rst_n) clears it to zero.
module param_store
  import csfnn_pkg::*;
#(
  parameter int unsigned D = 240
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 we,
  input  logic [$clog2(D)-1:0] waddr,
  input  fp16_t                wdata,
  output fp16_t                genes [D]
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int g = 0; g < int'(D); g++) genes[g] <= FP16_ZERO;
    end else if (we && int'(waddr) < int'(D)) begin
      genes[waddr] <= wdata;
    end
  end

endmodule
