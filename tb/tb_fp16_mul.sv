// tb_fp16_mul - self-checking test of the binary16 multiplier.
// Random normal operands plus corner cases (rounding carry, overflow,
// underflow, squaring) are multiplied and compared with the exact real
// product rounded to binary16 by csfnn_pkg::real_to_fp16. +0 and -0 are
// accepted as equal.
module tb_fp16_mul;
  import csfnn_pkg::*;
  fp16_t a, b, y;
  int    checks = 0, failures = 0;
  logic  clk = 0;
  always #5 clk = ~clk;

  fp16_mul dut (.a(a), .b(b), .y(y));

  function automatic fp16_t rnd_fp16();
    fp16_t h;
    h = 16'($urandom);
    if (h[14:10] == 5'd31) h[14:10] = 5'd30;
    if (h[14:10] == 5'd0)  h[14:10] = 5'd1;
    return h;
  endfunction

  task automatic check(fp16_t ta, fp16_t tb);
    fp16_t exp_y;
    a = ta; b = tb;
    #1;
    exp_y = real_to_fp16(fp16_to_real(ta) * fp16_to_real(tb));
    checks++;
    if (!(y == exp_y || (y[14:0] == 0 && exp_y[14:0] == 0))) begin
      failures++;
      if (failures < 10) $display("FAIL %h * %h = %h expected %h", ta, tb, y, exp_y);
    end
  endtask

  initial begin
    check(16'h3C00, 16'h3C00);
    check(16'h3E00, 16'h3E00);   // 1.5^2
    check(16'h3BFF, 16'h3C01);
    check(16'h7800, 16'h7800);   // overflow
    check(16'h0400, 16'h0400);   // underflow
    check(16'hB800, 16'h4000);
    for (int i = 0; i < 20000; i++) begin
      fp16_t x1, x2;
      x1 = rnd_fp16();
      x2 = (i % 4 == 0) ? x1 : rnd_fp16();
      if (i % 2 == 1) begin   // keep results in range most of the time
        x1[14:10] = 5'($urandom_range(8, 22));
        x2[14:10] = 5'($urandom_range(8, 22));
      end
      check(x1, x2);
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
