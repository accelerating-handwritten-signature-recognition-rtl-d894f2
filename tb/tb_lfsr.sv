// tb_lfsr - checks the Galois LFSR against a software model of the same
// polynomial (x^32 + x^22 + x^2 + x + 1) stepped bit by bit, for 1 and for 32
// steps per clock, checks that it holds while en is low and never reaches
// zero, and that the low 16 bits are roughly uniform (mean near 32768).
module tb_lfsr;
  logic clk = 0, rst_n = 0, en = 0;
  always #5 clk = ~clk;
  logic [31:0] q1, q32, m1, m32;
  int checks = 0, failures = 0;
  real mean = 0;

  lfsr #(.SEED(32'h1234_5678), .STEPS(1))  d1  (.clk(clk), .rst_n(rst_n), .en(en), .q(q1));
  lfsr #(.SEED(32'h1234_5678), .STEPS(32)) d32 (.clk(clk), .rst_n(rst_n), .en(en), .q(q32));

  function automatic logic [31:0] step(logic [31:0] s);
    logic fb;
    fb = s[0];
    s  = s >> 1;
    if (fb) s = s ^ 32'h8020_0003;
    return s;
  endfunction

  initial begin
    m1 = 32'h1234_5678; m32 = m1;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    @(negedge clk);
    checks++; if (q1 != m1) failures++;
    en = 1;
    for (int c = 0; c < 5000; c++) begin
      @(negedge clk);
      m1 = step(m1);
      for (int s = 0; s < 32; s++) m32 = step(m32);
      checks += 3;
      if (q1 != m1)   begin failures++; if (failures < 5) $display("FAIL step1 %h vs %h", q1, m1); end
      if (q32 != m32) begin failures++; if (failures < 5) $display("FAIL step32 %h vs %h", q32, m32); end
      if (q1 == 0 || q32 == 0) failures++;
      mean += real'(q32[15:0]) / 5000.0;
    end
    en = 0;
    @(negedge clk);
    checks++; if (q1 != m1) begin failures++; $display("FAIL hold"); end
    checks++; if (mean < 30000 || mean > 35500) begin failures++; $display("FAIL mean %f", mean); end
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
