// tb_sqrt_lut - checks the segmented square-root table against sqrt() in
// real arithmetic, over all three segments and the saturation above 5.
// Tolerance: 3e-3 absolute plus 1e-3 relative (grid step and binary16
// rounding). The result appears one clock cycle after the argument.
module tb_sqrt_lut;
  import csfnn_pkg::*;
  logic  clk = 0;
  always #5 clk = ~clk;
  fp16_t s, r;
  int    checks = 0, failures = 0;

  sqrt_lut dut (.clk(clk), .s(s), .r(r));

  task automatic check(real x);
    real ex, got, tol;
    fp16_t sx;
    sx = real_to_fp16(x);
    @(negedge clk) s = sx;
    @(posedge clk);
    #1;
    ex  = $sqrt(fp16_to_real(sx) > 5.0 ? 5.0 : fp16_to_real(sx));
    got = fp16_to_real(r);
    tol = 3e-3 + 1e-3 * ex;
    checks++;
    if (got - ex > tol || ex - got > tol) begin
      failures++;
      if (failures < 10) $display("FAIL s=%f r=%f expected %f", fp16_to_real(sx), got, ex);
    end
  endtask

  initial begin
    s = 0;
    check(0.0); check(0.0625); check(1.0); check(5.0); check(9.0); check(0.06249); check(0.9999);
    for (int i = 0; i < 1000; i++) check(real'($urandom_range(0, 100000)) / 1.6e6);  // seg 0/1
    for (int i = 0; i < 1000; i++) check(real'($urandom_range(0, 100000)) / 1.0e5);  // seg 1/2
    for (int i = 0; i < 1000; i++) check(real'($urandom_range(0, 100000)) / 1.5e4);  // seg 2, sat
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
