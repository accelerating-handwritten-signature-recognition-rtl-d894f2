// tb_fp16_adder_tree - feeds a new random vector of N binary16 values every
// cycle into the pipelined adder tree and checks each sum, LAT cycles later,
// against the real-valued sum (tolerance from binary16 rounding at each of
// the tree's levels). Also checks the latency ceil(log2 N) exactly.
module tb_fp16_adder_tree;
  import csfnn_pkg::*;
  localparam int N   = 10;
  localparam int LAT = 4;
  localparam int NV  = 500;
  logic  clk = 0;
  always #5 clk = ~clk;
  fp16_t in [N];
  fp16_t sum;
  real   ref_sum [NV];
  real   ref_abs [NV];
  int    checks = 0, failures = 0;

  fp16_adder_tree #(.N(N)) dut (.clk(clk), .in(in), .sum(sum));

  initial begin
    for (int v = 0; v < NV + LAT; v++) begin
      @(negedge clk);
      if (v >= LAT) begin
        real got, tol;
        got = fp16_to_real(sum);
        tol = ref_abs[v-LAT] * 4.0 / 2048.0 + 1e-6;
        checks++;
        if (got - ref_sum[v-LAT] > tol || ref_sum[v-LAT] - got > tol) begin
          failures++;
          if (failures < 10) $display("FAIL vec %0d sum=%f expected %f", v - LAT, got, ref_sum[v-LAT]);
        end
      end
      if (v < NV) begin
        ref_sum[v] = 0.0;
        ref_abs[v] = 0.0;
        for (int i = 0; i < N; i++) begin
          in[i] = real_to_fp16((real'($urandom_range(0, 20000)) - 10000.0) / 1000.0);
          ref_sum[v] += fp16_to_real(in[i]);
          ref_abs[v] += (fp16_to_real(in[i]) < 0) ? -fp16_to_real(in[i]) : fp16_to_real(in[i]);
        end
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
