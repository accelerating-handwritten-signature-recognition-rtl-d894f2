// cost_unit - cost function of the DEA: average squared error.
//
// Evaluates eps_av = 1/(2 N) sum_p sum_k (d_k - Y_k)^2 over the N training
// samples, where Y_k are the K network outputs for sample p and d_k the
// target levels: 0.9 where bit k of the sample's class code is 1, 0.1 where
// it is 0. All arithmetic is binary16:
//   stage 1  e_k = d_k - Y_k
//   stage 2  e_k^2
//   stage 3  s = sum_k e_k^2
//   stage 4  acc = acc + s          (one sample per cycle)
// after the N-th sample has been accumulated, cost = acc * 1/(2N) is
// registered and cost_valid pulses for one cycle.
//
// Interface: clear (restart; must precede each evaluation), in_valid, y[K],
// label[K-1:0] in; cost, cost_valid out. Reset by the active-low rst_n.
// Accumulating in binary16 follows the design's 16-bit arithmetic; the
// pipeline is this design's choice.
module cost_unit
  import csfnn_pkg::*;
#(
  parameter int unsigned K         = 3,
  parameter int unsigned N_SAMPLES = 200
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         in_valid,
  input  fp16_t        y     [K],
  input  logic [K-1:0] label,
  output fp16_t        cost,
  output logic         cost_valid
);

  localparam fp16_t SCALE = real_to_fp16(1.0 / (2.0 * real'(N_SAMPLES)));

  fp16_t e_n [K], e_q [K], sq_n [K], sq_q [K];
  fp16_t part [K+1];
  fp16_t s_q, acc, acc_n, cost_n;
  logic  v1, v2, v3;
  logic [$clog2(N_SAMPLES+1)-1:0] cnt;
  logic  fin;

  for (genvar k = 0; k < int'(K); k++) begin : g_k
    fp16_add u_e  (.a(label[k] ? FP16_0P9 : FP16_0P1), .b(y[k]), .sub(1'b1), .y(e_n[k]));
    fp16_mul u_sq (.a(e_q[k]), .b(e_q[k]), .y(sq_n[k]));
    fp16_add u_s  (.a(part[k]), .b(sq_q[k]), .sub(1'b0), .y(part[k+1]));
  end
  assign part[0] = FP16_ZERO;

  fp16_add u_acc   (.a(acc), .b(s_q), .sub(1'b0), .y(acc_n));
  fp16_mul u_scale (.a(acc), .b(SCALE), .y(cost_n));

  always_ff @(posedge clk) begin
    e_q  <= e_n;
    sq_q <= sq_n;
    s_q  <= part[K];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {v1, v2, v3} <= '0;
      acc          <= FP16_ZERO;
      cnt          <= '0;
      fin          <= 1'b0;
      cost         <= FP16_ZERO;
      cost_valid   <= 1'b0;
    end else begin
      cost_valid <= 1'b0;
      if (clear) begin
        {v1, v2, v3} <= '0;
        acc          <= FP16_ZERO;
        cnt          <= '0;
        fin          <= 1'b0;
      end else begin
        v1 <= in_valid;
        v2 <= v1;
        v3 <= v2;
        if (v3) begin
          acc <= acc_n;
          cnt <= cnt + 1'b1;
        end
        if (!fin && int'(cnt) == int'(N_SAMPLES)) begin
          fin        <= 1'b1;
          cost       <= cost_n;
          cost_valid <= 1'b1;
        end
      end
    end
  end

endmodule
