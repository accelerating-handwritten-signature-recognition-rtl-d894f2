// dea_comparison - comparison module of the DEA: tracks the best chromosome.
//
// Keeps the lowest cost seen since the last clear and the index of the
// chromosome that had it. While the initial population is evaluated it is
// updated with every chromosome; during the generations it is updated with
// every trial that replaced its target, so that the best index always names
// a member of the population. Ties go to the newer chromosome.
//
// Interface: clear (sets the best cost to +infinity), upd with cost and idx
// (registered on the clock edge); best_cost and best_idx out. Reset by the
// active-low rst_n.
module dea_comparison
  import csfnn_pkg::*;
#(
  parameter int unsigned NP = 20
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  clear,
  input  logic                  upd,
  input  fp16_t                 cost,
  input  logic [$clog2(NP)-1:0] idx,
  output fp16_t                 best_cost,
  output logic [$clog2(NP)-1:0] best_idx
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      best_cost <= FP16_INF;
      best_idx  <= '0;
    end else if (clear) begin
      best_cost <= FP16_INF;
      best_idx  <= '0;
    end else if (upd && fp16_ge(best_cost, cost)) begin
      best_cost <= cost;
      best_idx  <= idx;
    end
  end

endmodule
