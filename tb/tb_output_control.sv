// tb_output_control - random outputs in [-1, 1] (and exactly 0.5, just
// below it, and -0.5) must give bit 1 and level 0.9 when >= 0.5, bit 0 and
// level 0.1 otherwise, one cycle after in_valid.
module tb_output_control;
  import csfnn_pkg::*;
  localparam int K = 3;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  always #5 clk = ~clk;
  fp16_t y [K], level [K];
  logic [K-1:0] cls;
  int checks = 0, failures = 0;

  output_control #(.K(K)) dut (.*);

  initial begin
    for (int k = 0; k < K; k++) y[k] = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      logic [K-1:0] ec;
      for (int k = 0; k < K; k++) begin
        y[k] = real_to_fp16((real'($urandom_range(0, 2000)) - 1000.0) / 1000.0);
        if (n == 0) y[k] = 16'h3800;   // 0.5
        if (n == 1) y[k] = 16'h37FF;   // just below 0.5
        if (n == 2) y[k] = 16'hB800;   // -0.5
        ec[k] = fp16_to_real(y[k]) >= 0.5;
      end
      in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      checks += 2 + K;
      if (!out_valid) failures++;
      if (cls != ec) begin failures++; if (failures < 10) $display("FAIL cls %b expected %b", cls, ec); end
      for (int k = 0; k < K; k++) if (level[k] != (ec[k] ? FP16_0P9 : FP16_0P1)) failures++;
      @(negedge clk);
      if (out_valid) failures++;
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
