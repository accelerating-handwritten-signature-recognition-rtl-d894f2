// output_control - output control unit of the CSFNN.
//
// Interprets the K network outputs: an output below 0.5 is read as the
// target level 0.1 (bit 0), an output of 0.5 or more as 0.9 (bit 1), which is
// the classification boundary the design uses. The K bits form the class
// code of the sample (3 bits name one of 8 signature owners). Output k drives
// bit k of cls.
//
// Interface: in_valid and y[K] (binary16) in; one clock cycle later
// out_valid, cls[K-1:0] and level[K] (binary16 0.1 or 0.9; the bits that
// 0x2E66 and 0x3B33 share are constant). Valid is reset by
// the active-low rst_n. The register stage is this design's choice.
module output_control
  import csfnn_pkg::*;
#(
  parameter int unsigned K = 3
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  fp16_t        y     [K],
  output logic         out_valid,
  output logic [K-1:0] cls,
  output fp16_t        level [K]
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end

  always_ff @(posedge clk) begin
    for (int k = 0; k < int'(K); k++) begin
      cls[k]   <= fp16_ge(y[k], FP16_HALF);
      level[k] <= fp16_ge(y[k], FP16_HALF) ? FP16_0P9 : FP16_0P1;
    end
  end

endmodule
