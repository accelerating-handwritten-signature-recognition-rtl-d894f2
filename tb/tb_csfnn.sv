// tb_csfnn - end-to-end check of the 10-10-3 feed-forward network.
// Random parameters (weights in [-0.5, 0.5] as in the design's initial
// setting, centres in [-1, 1], cos(omega) in [0, 1]) are loaded, random
// samples stream in one per cycle, and each output is compared with a
// double-precision evaluation of the CSFNN equations. Checks: outputs within
// 0.05, class bits agree wherever the exact output is not within 0.05 of the
// 0.5 boundary, output level 0.1/0.9 matches the class bit, and the latency
// is 22 cycles (input control 1 + hidden 10 + output 10 + output control 1).
module tb_csfnn;
  import csfnn_pkg::*;
  localparam int NI = 10, NH = 10, NO = 3, D = 240, LAT = 22, NV = 200;
  logic  clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic  in_valid = 0, out_valid;
  fp16_t x [NI], genes [D], y [NO], level [NO];
  logic [NO-1:0] cls;
  real   ref_y [NV][NO];
  int    checks = 0, failures = 0, n_out = 0, cyc = 0, first_out = -1, start_cyc = 0;

  csfnn dut (.*);

  function automatic real rr(real lo, real hi);
    return lo + (hi - lo) * real'($urandom_range(0, 100000)) / 100000.0;
  endfunction
  function automatic real f(real u);
    return 2.0 / (1.0 + $exp(-2.0 * u)) - 1.0;
  endfunction
  function automatic real g(int idx);
    return fp16_to_real(genes[idx]);
  endfunction

  always @(posedge clk) begin
    cyc++;
    if (out_valid && rst_n) begin
      if (first_out < 0) first_out = cyc;
      for (int k = 0; k < NO; k++) begin
        real got, ex;
        got = fp16_to_real(y[k]);
        ex  = ref_y[n_out][k];
        checks++;
        if (got - ex > 0.05 || ex - got > 0.05) begin
          failures++;
          if (failures < 10) $display("FAIL sample %0d out %0d: %f expected %f", n_out, k, got, ex);
        end
        if (ex > 0.55 || ex < 0.45) begin
          checks++;
          if (cls[k] != (ex >= 0.5)) begin failures++; $display("FAIL class bit %0d of sample %0d", k, n_out); end
        end
        checks++;
        if (level[k] != (cls[k] ? FP16_0P9 : FP16_0P1)) begin failures++; $display("FAIL level"); end
      end
      n_out++;
    end
  end

  initial begin
    for (int i = 0; i < 100; i++)  genes[i] = real_to_fp16(rr(-0.5, 0.5));
    for (int i = 100; i < 130; i++) genes[i] = real_to_fp16(rr(-1.5, 1.5));
    for (int i = 130; i < 230; i++) genes[i] = real_to_fp16(rr(-1.0, 1.0));
    for (int i = 230; i < 240; i++) genes[i] = real_to_fp16(rr(0.0, 1.0));
    for (int i = 0; i < NI; i++) x[i] = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int v = 0; v < NV; v++) begin
      real ah [NH];
      @(negedge clk);
      for (int i = 0; i < NI; i++) x[i] = real_to_fp16(rr(-1.0, 1.0));
      for (int j = 0; j < NH; j++) begin
        real s, q;
        s = 0; q = 0;
        for (int i = 0; i < NI; i++) begin
          real d;
          d = fp16_to_real(x[i]) - g(130 + j*NI + i);
          s += d * g(j*NI + i);
          q += d * d;
        end
        ah[j] = f(s - $sqrt(q > 5.0 ? 5.0 : q) * g(230 + j));
      end
      for (int k = 0; k < NO; k++) begin
        real s;
        s = 0;
        for (int j = 0; j < NH; j++) s += ah[j] * g(100 + k*NH + j);
        ref_y[v][k] = f(s);
      end
      if (v == 0) start_cyc = cyc;
      in_valid = 1;
    end
    @(negedge clk) in_valid = 0;
    repeat (LAT + 3) @(posedge clk);
    checks++;
    if (n_out != NV) begin failures++; $display("FAIL %0d outputs", n_out); end
    checks++;
    if (first_out - start_cyc - 1 != LAT) begin failures++; $display("FAIL latency %0d", first_out - start_cyc - 1); end
    $display("forward latency %0d cycles: %0d connections per pass -> %f GCPS at 200 MHz",
             first_out - start_cyc - 1, NH*(NI+NO), real'(NH*(NI+NO)) * 0.2 / real'(first_out - start_cyc - 1));
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
