// tb_fp16_add - self-checking test of the binary16 adder/subtractor.
// Random normal operands (and a set of corner cases: cancellation, large
// exponent differences, carries, overflow, underflow) are added and
// subtracted; each result is compared with the exact real-valued sum rounded
// to binary16 by an independent software model (csfnn_pkg::real_to_fp16).
// +0 and -0 are accepted as equal.
module tb_fp16_add;
  import csfnn_pkg::*;
  fp16_t a, b, y;
  logic  sub;
  int    checks = 0, failures = 0;
  logic  clk = 0;
  always #5 clk = ~clk;

  fp16_add dut (.a(a), .b(b), .sub(sub), .y(y));

  function automatic fp16_t rnd_fp16();
    fp16_t h;
    h = 16'($urandom);
    if (h[14:10] == 5'd31) h[14:10] = 5'd30;
    if (h[14:10] == 5'd0)  h[14:10] = 5'd1;
    return h;
  endfunction

  task automatic check(fp16_t ta, fp16_t tb, logic ts);
    fp16_t exp_y;
    real   r;
    a = ta; b = tb; sub = ts;
    #1;
    r = ts ? fp16_to_real(ta) - fp16_to_real(tb) : fp16_to_real(ta) + fp16_to_real(tb);
    exp_y = real_to_fp16(r);
    checks++;
    if (!(y == exp_y || (y[14:0] == 0 && exp_y[14:0] == 0))) begin
      failures++;
      if (failures < 10) $display("FAIL %h %s %h = %h expected %h", ta, ts ? "-" : "+", tb, y, exp_y);
    end
  endtask

  initial begin
    check(16'h3C00, 16'h3C00, 0);   // 1+1
    check(16'h3C00, 16'h3C00, 1);   // 1-1
    check(16'h3C01, 16'h3C00, 1);   // smallest difference
    check(16'h7BFF, 16'h7BFF, 0);   // overflow
    check(16'h0400, 16'h0401, 1);   // underflow
    check(16'h5000, 16'h0C00, 0);   // far apart
    check(16'h3C00, 16'h1001, 1);   // far apart, subtract
    check(16'h3BFF, 16'h1400, 0);   // rounding carry
    for (int i = 0; i < 20000; i++) begin
      fp16_t x1, x2;
      x1 = rnd_fp16();
      x2 = rnd_fp16();
      if (i % 3 == 0) x2[14:10] = x1[14:10] - 5'($urandom_range(0, 2)); // close exponents
      if (x2[14:10] == 0) x2[14:10] = 1;
      check(x1, x2, 1'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
