// dea_init - initialization module of the DEA: one random gene per clock.
//
// Produces x = x_l + r (x_u - x_l) with r uniform in [0, 1), the initial
// population rule of differential evolution, in binary16:
//   stage 1  r = 1.m - 1, where 1.m has a random 10-bit fraction (exact),
//            span = x_u - x_l
//   stage 2  t = r * span
//   stage 3  x = x_l + t
// Latency 3 cycles, one gene accepted per cycle. Forming r from random
// fraction bits is this design's choice.
//
// Interface: in_valid, rnd[9:0], lo, hi in; out_valid and gene out 3 cycles
// later. Valid is reset by the active-low rst_n.
module dea_init
  import csfnn_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  logic [9:0] rnd,
  input  fp16_t      lo,
  input  fp16_t      hi,
  output logic       out_valid,
  output fp16_t      gene
);

  fp16_t r_n, span_n, r_q, span_q, lo_q1, lo_q2, t_n, t_q, g_n;
  logic [2:0] vld;

  fp16_add u_r    (.a({1'b0, 5'd15, rnd}), .b(FP16_ONE), .sub(1'b1), .y(r_n));
  fp16_add u_span (.a(hi), .b(lo), .sub(1'b1), .y(span_n));
  fp16_mul u_t    (.a(r_q), .b(span_q), .y(t_n));
  fp16_add u_x    (.a(lo_q2), .b(t_q), .sub(1'b0), .y(g_n));

  always_ff @(posedge clk) begin
    r_q    <= r_n;
    span_q <= span_n;
    lo_q1  <= lo;
    t_q    <= t_n;
    lo_q2  <= lo_q1;
    gene   <= g_n;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vld <= '0;
    else        vld <= {vld[1:0], in_valid};
  end
  assign out_valid = vld[2];

endmodule
