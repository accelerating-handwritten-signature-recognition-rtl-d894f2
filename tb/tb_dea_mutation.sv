// tb_dea_mutation - streams random gene triples through the mutation unit
// and checks v = x_best + 0.6 (x_r1 - x_r2) against real arithmetic (F taken
// as its binary16 value 0.60010), with binary16 rounding tolerance, plus the
// 3-cycle latency.
module tb_dea_mutation;
  import csfnn_pkg::*;
  localparam int NV = 3000;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  always #5 clk = ~clk;
  fp16_t best, xr1, xr2, v;
  real   ex [NV];
  int    checks = 0, failures = 0, n_out = 0, cyc = 0, first = -1;

  dea_mutation dut (.*);

  always @(posedge clk) begin
    cyc++;
    if (out_valid && rst_n) begin
      real g, tol;
      if (first < 0) first = cyc;
      g = fp16_to_real(v);
      tol = 2e-3 * ((ex[n_out] < 0 ? -ex[n_out] : ex[n_out]) + 1.0);
      checks++;
      if (g - ex[n_out] > tol || ex[n_out] - g > tol) begin
        failures++; if (failures < 10) $display("FAIL v %f expected %f", g, ex[n_out]);
      end
      n_out++;
    end
  end

  function automatic real rr();
    return (real'($urandom_range(0, 200000)) - 100000.0) / 50000.0;
  endfunction

  initial begin
    int start;
    best = 0; xr1 = 0; xr2 = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int k = 0; k < NV; k++) begin
      @(negedge clk);
      best = real_to_fp16(rr()); xr1 = real_to_fp16(rr()); xr2 = real_to_fp16(rr());
      ex[k] = fp16_to_real(best) + fp16_to_real(16'h38CD) * (fp16_to_real(xr1) - fp16_to_real(xr2));
      if (k == 0) start = cyc;
      in_valid = 1;
    end
    @(negedge clk) in_valid = 0;
    repeat (6) @(posedge clk);
    checks++; if (n_out != NV) begin failures++; $display("FAIL count"); end
    checks++; if (first - start - 1 != 3) begin failures++; $display("FAIL latency %0d", first - start - 1); end
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
