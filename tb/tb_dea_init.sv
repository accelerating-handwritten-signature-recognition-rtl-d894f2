// tb_dea_init - feeds one random draw per cycle with assorted limits and
// checks each gene, 3 cycles later, against x_l + r (x_u - x_l) computed in
// real arithmetic with r = rnd / 1024 (tolerance of binary16 rounding), and
// that it lies within [x_l, x_u].
module tb_dea_init;
  import csfnn_pkg::*;
  localparam int NV = 2000;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  always #5 clk = ~clk;
  logic [9:0] rnd;
  fp16_t lo, hi, gene;
  real   ex [NV], elo [NV], ehi [NV];
  int    checks = 0, failures = 0, n_out = 0, cyc = 0, first = -1;

  dea_init dut (.*);

  always @(posedge clk) begin
    cyc++;
    if (out_valid && rst_n) begin
      real g;
      if (first < 0) first = cyc;
      g = fp16_to_real(gene);
      checks += 2;
      if (g - ex[n_out] > 2e-3 || ex[n_out] - g > 2e-3) begin
        failures++; if (failures < 10) $display("FAIL gene %f expected %f", g, ex[n_out]);
      end
      if (g < elo[n_out] - 1e-9 || g > ehi[n_out] + 1e-9) begin failures++; $display("FAIL range"); end
      n_out++;
    end
  end

  initial begin
    int start;
    rnd = 0; lo = 0; hi = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int v = 0; v < NV; v++) begin
      @(negedge clk);
      case (v % 3)
        0: begin lo = 16'hB800; hi = 16'h3800; end
        1: begin lo = 16'hBC00; hi = 16'h3C00; end
        default: begin lo = 16'h0000; hi = 16'h39A8; end
      endcase
      rnd = 10'($urandom);
      if (v == 0) rnd = 0;
      if (v == 1) rnd = 10'h3FF;
      elo[v] = fp16_to_real(lo); ehi[v] = fp16_to_real(hi);
      ex[v]  = elo[v] + real'(rnd) / 1024.0 * (ehi[v] - elo[v]);
      if (v == 0) start = cyc;
      in_valid = 1;
    end
    @(negedge clk) in_valid = 0;
    repeat (6) @(posedge clk);
    checks++; if (n_out != NV) begin failures++; $display("FAIL count %0d", n_out); end
    checks++; if (first - start - 1 != 3) begin failures++; $display("FAIL latency %0d", first - start - 1); end
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
