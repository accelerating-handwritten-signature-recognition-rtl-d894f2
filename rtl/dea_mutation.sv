// dea_mutation - mutation unit of the DEA ("DE/best/1").
//
// For one gene per clock it forms the mutant value
//     v = x_best + F (x_r1 - x_r2)
// from the gene of the best chromosome and of two randomly chosen ones, in
// binary16, in three registered stages: subtract, scale by F, add. F is the
// mutation scale factor (0.6 in the design's setting; binary16 0x38CD is
// 0.60010). Latency 3 cycles, one gene per cycle.
//
// Interface: in_valid, best, xr1, xr2 in; out_valid and v 3 cycles later.
// Valid is reset by the active-low rst_n. Gene-serial operation is this
// design's choice.
module dea_mutation
  import csfnn_pkg::*;
#(
  parameter fp16_t F = 16'h38CD
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  fp16_t best,
  input  fp16_t xr1,
  input  fp16_t xr2,
  output logic  out_valid,
  output fp16_t v
);

  fp16_t diff_n, diff_q, sc_n, sc_q, v_n, best_q1, best_q2;
  logic [2:0] vld;

  fp16_add u_diff (.a(xr1), .b(xr2), .sub(1'b1), .y(diff_n));
  fp16_mul u_scale(.a(diff_q), .b(F), .y(sc_n));
  fp16_add u_sum  (.a(best_q2), .b(sc_q), .sub(1'b0), .y(v_n));

  always_ff @(posedge clk) begin
    diff_q  <= diff_n;
    best_q1 <= best;
    sc_q    <= sc_n;
    best_q2 <= best_q1;
    v       <= v_n;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vld <= '0;
    else        vld <= {vld[1:0], in_valid};
  end
  assign out_valid = vld[2];

endmodule
