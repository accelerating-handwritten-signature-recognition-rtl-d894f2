// tb_dea_comparison - presents random costs with indices and checks that the
// unit reports the running minimum (ties to the newest) and its index, that
// clear restarts the search, and that nothing changes without upd.
module tb_dea_comparison;
  import csfnn_pkg::*;
  logic clk = 0, rst_n = 0, clear = 0, upd = 0;
  always #5 clk = ~clk;
  fp16_t cost, best_cost;
  logic [4:0] idx, best_idx;
  int checks = 0, failures = 0;

  dea_comparison #(.NP(20)) dut (.*);

  initial begin
    real m;
    int  mi;
    cost = 0; idx = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int round = 0; round < 50; round++) begin
      clear = 1;
      @(negedge clk) clear = 0;
      m = 1.0e9; mi = 0;
      for (int k = 0; k < 20; k++) begin
        cost = {1'b0, 15'($urandom_range(16'h3000, 16'h5000))};
        if (k == 7) cost = best_cost;     // tie with current best
        idx  = 5'(k);
        upd  = ($urandom_range(0, 3) != 0);
        if (upd && fp16_to_real(cost) <= m) begin m = fp16_to_real(cost); mi = k; end
        @(negedge clk);
        upd = 0;
        checks += 2;
        if (fp16_to_real(best_cost) != m && !(m > 1.0e8 && best_cost == FP16_INF)) begin
          failures++; if (failures < 10) $display("FAIL min %f expected %f", fp16_to_real(best_cost), m);
        end
        if (m < 1.0e8 && int'(best_idx) != mi) begin failures++; if (failures < 10) $display("FAIL idx"); end
      end
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
