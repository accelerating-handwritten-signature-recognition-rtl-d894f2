// primary_neuron - conic section function (CSF) neuron, fully pipelined.
//
// Computes, for an input vector x and the neuron's centre c, weights w and
// cosine of its opening angle,
//     u = sum_i (x_i - c_i) w_i  -  sqrt( sum_i (x_i - c_i)^2 ) * cos_w
//     a = f(u) = 2 / (1 + exp(-2u)) - 1          (bipolar sigmoid)
// The same module serves as hidden neuron and, with c and cos_w tied to zero,
// as output (inner-product) neuron, as the design prescribes.
//
// Datapath, one block after another as in the design's neuron diagram, each
// block ending in a register:
//   1  subtraction block   d_i = x_i - c_i            (N fp16_add)
//   2  multiplier block    p_i = d_i * w_i            (N fp16_mul)
//      squaring block      q_i = d_i * d_i            (N fp16_mul)
//   3  two adder blocks    P = sum p_i, Q = sum q_i   (fp16_adder_tree, LT cycles)
//   4  square-root LUT     R = sqrt(Q)                (sqrt_lut)
//   5  multiplier block    M = R * cos_w
//   6  subtraction block   u = P - M
//   7  sigmoid LUT         a = f(u)                   (sigmoid_lut)
// P is delayed two cycles to meet M. Latency LAT = 6 + ceil(log2 N) cycles
// (10 for N = 10); a new input vector is accepted every cycle.
//
// Interface: in_valid/x are sampled at each clock; c, w and cos_w come from
// the parameter storage and must be stable while a vector is in flight.
// out_valid rises LAT cycles after in_valid together with a and u. Only the
// valid pipeline is reset (active-low rst_n). The per-block registers and the
// pipeline balancing are this design's choices.
module primary_neuron
  import csfnn_pkg::*;
#(
  parameter int unsigned N = 10
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  fp16_t x     [N],
  input  fp16_t c     [N],
  input  fp16_t w     [N],
  input  fp16_t cos_w,
  output logic  out_valid,
  output fp16_t u,
  output fp16_t a
);

  localparam int unsigned LT  = (N <= 1) ? 0 : $clog2(N);
  localparam int unsigned LAT = 6 + LT;

  // 1: subtraction block
  fp16_t d_n [N], d_q [N];
  // 2: multiplier and squaring blocks
  fp16_t p_n [N], p_q [N], q_n [N], q_q [N];

  for (genvar i = 0; i < int'(N); i++) begin : g_lane
    fp16_add u_sub (.a(x[i]),   .b(c[i]),   .sub(1'b1), .y(d_n[i]));
    fp16_mul u_mul (.a(d_q[i]), .b(w[i]),   .y(p_n[i]));
    fp16_mul u_sq  (.a(d_q[i]), .b(d_q[i]), .y(q_n[i]));
  end

  always_ff @(posedge clk) begin
    d_q <= d_n;
    p_q <= p_n;
    q_q <= q_n;
  end

  // 3: adder blocks
  fp16_t sum_p, sum_q;
  fp16_adder_tree #(.N(N)) u_tree_p (.clk(clk), .in(p_q), .sum(sum_p));
  fp16_adder_tree #(.N(N)) u_tree_q (.clk(clk), .in(q_q), .sum(sum_q));

  // 4: square-root LUT (registered inside); P delayed alongside
  fp16_t root, sum_p_d1, sum_p_d2;
  sqrt_lut u_sqrt (.clk(clk), .s(sum_q), .r(root));

  // 5: multiplier block
  fp16_t m_n, m_q;
  fp16_mul u_mcos (.a(root), .b(cos_w), .y(m_n));

  // 6: subtraction block
  fp16_t u_n, u_q, u_d;
  fp16_add u_usub (.a(sum_p_d2), .b(m_q), .sub(1'b1), .y(u_n));

  always_ff @(posedge clk) begin
    sum_p_d1 <= sum_p;
    sum_p_d2 <= sum_p_d1;
    m_q      <= m_n;
    u_q      <= u_n;
    u_d      <= u_q;
  end

  // 7: sigmoid LUT (registered inside)
  sigmoid_lut u_sig (.clk(clk), .u(u_q), .a(a));
  assign u = u_d;

  // valid pipeline
  logic [LAT-1:0] vld;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vld <= '0;
    else        vld <= {vld[LAT-2:0], in_valid};
  end
  assign out_valid = vld[LAT-1];

endmodule
