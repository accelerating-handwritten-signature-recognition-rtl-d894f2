// tb_primary_neuron - drives the conic-section neuron with a new random
// input vector every cycle (random centres, weights and cos(omega) held per
// batch) and compares u and a with the CSF formula evaluated in real
// arithmetic:  u = sum (x-c) w - sqrt(sum (x-c)^2) cos_w,  a = tanh(u).
// Tolerances cover binary16 rounding and the table grids. Also checks the
// latency of 10 cycles (6 + ceil(log2 10)) and the output-neuron use with
// c = 0 and cos_w = 0, where u must be the plain inner product.
module tb_primary_neuron;
  import csfnn_pkg::*;
  localparam int N   = 10;
  localparam int LAT = 10;
  localparam int NV  = 300;
  logic  clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic  in_valid = 0, out_valid;
  fp16_t x [N], c [N], w [N], cos_w, u, a;
  real   ref_u [NV];
  int    checks = 0, failures = 0, n_out = 0, cyc = 0, first_out = -1;

  primary_neuron #(.N(N)) dut (.*);

  always @(posedge clk) begin
    cyc++;
    if (out_valid && rst_n) begin
      real gu, ga, eu, ea;
      gu = fp16_to_real(u);
      ga = fp16_to_real(a);
      eu = ref_u[n_out];
      ea = 2.0 / (1.0 + $exp(-2.0 * eu)) - 1.0;
      if (first_out < 0) first_out = cyc;
      checks += 2;
      if (gu - eu > 0.03 + 0.004 * (eu < 0 ? -eu : eu) || eu - gu > 0.03 + 0.004 * (eu < 0 ? -eu : eu)) begin
        failures++;
        if (failures < 10) $display("FAIL u[%0d]=%f expected %f", n_out, gu, eu);
      end
      if (ga - ea > 0.03 || ea - ga > 0.03) begin
        failures++;
        if (failures < 10) $display("FAIL a[%0d]=%f expected %f", n_out, ga, ea);
      end
      n_out++;
    end
  end

  function automatic real rr(real lo, real hi);
    return lo + (hi - lo) * real'($urandom_range(0, 100000)) / 100000.0;
  endfunction

  initial begin
    int start_cyc;
    for (int i = 0; i < N; i++) begin x[i] = 0; c[i] = 0; w[i] = 0; end
    cos_w = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int v = 0; v < NV; v++) begin
      @(negedge clk);
      if (v % 50 == 0) begin   // new neuron parameters for each batch
        for (int i = 0; i < N; i++) begin
          c[i] = (v >= 250) ? FP16_ZERO : real_to_fp16(rr(-1.0, 1.0));
          w[i] = real_to_fp16(rr(-0.8, 0.8));
        end
        cos_w = (v >= 250) ? FP16_ZERO : real_to_fp16(rr(0.0, 1.0));
      end
      ref_u[v] = 0.0;
      begin
        real dsq;
        dsq = 0.0;
        for (int i = 0; i < N; i++) begin
          real d;
          x[i] = real_to_fp16(rr(-1.0, 1.0));
          d = fp16_to_real(x[i]) - fp16_to_real(c[i]);
          ref_u[v] += d * fp16_to_real(w[i]);
          dsq += d * d;
        end
        ref_u[v] -= $sqrt(dsq > 5.0 ? 5.0 : dsq) * fp16_to_real(cos_w);
      end
      if (v == 0) start_cyc = cyc;
      in_valid = 1;
      // hold parameters stable while a batch is in flight
      if (v % 50 == 49) begin
        @(negedge clk) in_valid = 0;
        repeat (LAT + 1) @(negedge clk);
      end
    end
    @(negedge clk) in_valid = 0;
    repeat (LAT + 3) @(posedge clk);
    checks++;
    if (n_out != NV) begin failures++; $display("FAIL %0d outputs, expected %0d", n_out, NV); end
    checks++;
    if (first_out - start_cyc != LAT + 1) begin
      failures++; $display("FAIL latency %0d, expected %0d", first_out - start_cyc - 1, LAT);
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
