// dea_selection - greedy selection of the DEA.
//
// Decides whether the trial chromosome u replaces the target chromosome x in
// the next generation: replace when f(u) <= f(x), where f is the average
// squared error of the network over the training set. Costs are binary16 and
// non-negative. It also reports whether the trial is at least as good as the
// best chromosome so far, which makes it the new best.
//
// Interface: purely combinational; eval in, replace and new_best out (both
// low while eval is low).
module dea_selection
  import csfnn_pkg::*;
(
  input  logic  eval,
  input  fp16_t cost_trial,
  input  fp16_t cost_target,
  input  fp16_t cost_best,
  output logic  replace,
  output logic  new_best
);

  always_comb begin
    replace  = eval && fp16_ge(cost_target, cost_trial);
    new_best = replace && fp16_ge(cost_best, cost_trial);
  end

endmodule
