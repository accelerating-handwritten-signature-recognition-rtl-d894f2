// dataset_mem - signature data set memory.
//
// Holds the feature vectors of the signature samples - N_IN binary16
// features each, 160 bits for the design's 10 features - together with each
// sample's class code (K bits). The design keeps 256 signatures: 200
// training samples followed by 56 test samples. It is filled through its
// write port (by the serial loader) and read one sample per clock by the
// trainer and the recogniser; the read data are registered, as in a block
// RAM. The design shows a data set ROM; making it writable, so the host can
// supply the data, is this design's choice.
//
// Interface: we/waddr/wx/wlabel write port; raddr in, rx/rlabel one cycle
// later. No reset (memory contents).
module dataset_mem
  import csfnn_pkg::*;
#(
  parameter int unsigned N_IN  = 10,
  parameter int unsigned K     = 3,
  parameter int unsigned DEPTH = 256
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  fp16_t                    wx     [N_IN],
  input  logic [K-1:0]             wlabel,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output fp16_t                    rx     [N_IN],
  output logic [K-1:0]             rlabel
);

  logic [N_IN*16+K-1:0] mem [DEPTH];
  logic [N_IN*16+K-1:0] wword, rword;

  always_comb begin
    wword[K-1:0] = wlabel;
    for (int i = 0; i < int'(N_IN); i++) wword[K + 16*i +: 16] = wx[i];
  end

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wword;
    rword <= mem[raddr];
  end

  always_comb begin
    rlabel = rword[K-1:0];
    for (int i = 0; i < int'(N_IN); i++) rx[i] = rword[K + 16*i +: 16];
  end

endmodule
