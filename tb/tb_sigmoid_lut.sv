// tb_sigmoid_lut - checks the bipolar sigmoid table against tanh(u) computed
// in real arithmetic (2/(1+exp(-2u)) - 1 = tanh(u)). Random arguments over
// [-8, 8] plus 0 and the table edge; the result must be within 1.5e-3 of the
// exact value, be odd-symmetric, and appear one clock cycle after the input.
module tb_sigmoid_lut;
  import csfnn_pkg::*;
  logic  clk = 0;
  always #5 clk = ~clk;
  fp16_t u, a;
  int    checks = 0, failures = 0;

  sigmoid_lut dut (.clk(clk), .u(u), .a(a));

  task automatic check(real x);
    real ex, got;
    fp16_t ux;
    ux = real_to_fp16(x);
    @(negedge clk) u = ux;
    @(posedge clk);
    #1;
    ex  = 2.0 / (1.0 + $exp(-2.0 * fp16_to_real(ux))) - 1.0;
    got = fp16_to_real(a);
    checks++;
    if (got - ex > 1.5e-3 || ex - got > 1.5e-3 || (ux[15] != a[15] && a[14:0] != 0)) begin
      failures++;
      if (failures < 10) $display("FAIL u=%f a=%f expected %f", fp16_to_real(ux), got, ex);
    end
  endtask

  initial begin
    u = 0;
    check(0.0); check(4.9); check(-4.9); check(20.0); check(-0.001);
    for (int i = 0; i < 3000; i++) check((real'($urandom_range(0, 16000)) - 8000.0) / 1000.0);
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
