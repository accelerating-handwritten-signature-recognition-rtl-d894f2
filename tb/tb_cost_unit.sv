// tb_cost_unit - streams N_SAMPLES random output vectors with random class
// codes (with gaps in the stream) and checks the reported cost against
// 1/(2N) sum (d - Y)^2 evaluated in real arithmetic (d = 0.9 or 0.1), within
// binary16 accumulation tolerance. Runs thirty evaluations to check that
// clear restarts it, and checks that cost_valid pulses once, 5 cycles after
// the last sample.
module tb_cost_unit;
  import csfnn_pkg::*;
  localparam int K = 3, N = 40;
  logic clk = 0, rst_n = 0, clear = 0, in_valid = 0, cost_valid;
  always #5 clk = ~clk;
  fp16_t y [K], cost;
  logic [K-1:0] label;
  int checks = 0, failures = 0, n_valid = 0, cyc = 0, valid_cyc = 0;

  cost_unit #(.K(K), .N_SAMPLES(N)) dut (.*);

  always @(posedge clk) begin
    cyc++;
    if (cost_valid && rst_n) begin n_valid++; valid_cyc = cyc; end
  end

  initial begin
    for (int k = 0; k < K; k++) y[k] = 0;
    label = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int run = 0; run < 30; run++) begin
      real ex;
      int  last;
      ex = 0;
      @(negedge clk) clear = 1;
      @(negedge clk) clear = 0;
      n_valid = 0;
      for (int p = 0; p < N; p++) begin
        if ($urandom_range(0, 3) == 0) begin in_valid = 0; @(negedge clk); end
        label = 3'($urandom);
        for (int k = 0; k < K; k++) begin
          real d;
          y[k] = real_to_fp16((real'($urandom_range(0, 2000)) - 1000.0) / 1000.0);
          d = (label[k] ? 0.9 : 0.1) - fp16_to_real(y[k]);
          ex += d * d;
        end
        in_valid = 1;
        @(negedge clk);
        last = cyc;
      end
      in_valid = 0;
      ex = ex / (2.0 * N);
      repeat (10) @(negedge clk);
      checks += 3;
      if (fp16_to_real(cost) - ex > 0.01 * ex || ex - fp16_to_real(cost) > 0.01 * ex) begin
        failures++; $display("FAIL cost %f expected %f", fp16_to_real(cost), ex);
      end
      if (n_valid != 1) begin failures++; $display("FAIL %0d cost_valid pulses", n_valid); end
      if (valid_cyc - last != 5) begin failures++; $display("FAIL latency %0d", valid_cyc - last); end
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
