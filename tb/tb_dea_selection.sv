// tb_dea_selection - random non-negative binary16 costs; replace must equal
// (trial <= target) and new_best must equal replace && (trial <= best),
// compared as real numbers; nothing may be asserted while eval is low.
// Costs are normal numbers (the arithmetic flushes subnormals to zero).
module tb_dea_selection;
  import csfnn_pkg::*;
  logic eval, replace, new_best;
  fp16_t cost_trial, cost_target, cost_best;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  dea_selection dut (.*);

  initial begin
    for (int k = 0; k < 5000; k++) begin
      real t, g, b;
      cost_trial  = {1'b0, 15'($urandom_range(16'h0400, 16'h7BFF))};
      cost_target = (k % 5 == 0) ? cost_trial : {1'b0, 15'($urandom_range(16'h0400, 16'h7BFF))};
      cost_best   = (k % 7 == 0) ? cost_trial : {1'b0, 15'($urandom_range(16'h0400, 16'h7BFF))};
      eval = (k % 10 != 0);
      #1;
      t = fp16_to_real(cost_trial); g = fp16_to_real(cost_target); b = fp16_to_real(cost_best);
      checks += 2;
      if (replace != (eval && t <= g)) begin failures++; if (failures < 10) $display("FAIL replace %f %f", t, g); end
      if (new_best != (eval && t <= g && t <= b)) begin failures++; if (failures < 10) $display("FAIL best"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
