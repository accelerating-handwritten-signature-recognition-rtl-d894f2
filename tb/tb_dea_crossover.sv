// tb_dea_crossover - checks the crossover choice gene by gene: the mutant
// gene is taken exactly when rnd < CR * 65536 or j = j_rand, the target gene
// otherwise; the output follows one cycle later. Over many random draws the
// fraction of mutant genes must be close to CR = 0.6.
module tb_dea_crossover;
  import csfnn_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid, from_mutant;
  always #5 clk = ~clk;
  fp16_t v, x, u;
  logic [15:0] rnd;
  logic [7:0]  j, jrand;
  int checks = 0, failures = 0, n_mut = 0;
  localparam int NV = 5000;

  dea_crossover #(.D(240), .CR_Q16(39322)) dut (.*);

  initial begin
    v = 0; x = 0; rnd = 0; j = 0; jrand = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int k = 0; k < NV; k++) begin
      logic take;
      fp16_t ev;
      @(negedge clk);
      v = 16'($urandom); x = 16'($urandom);
      rnd = 16'($urandom);
      j = 8'(k % 240); jrand = 8'(37);
      take = (int'(rnd) < 39322) || (j == 37);
      ev = take ? v : x;
      in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      checks += 3;
      if (!out_valid)  begin failures++; $display("FAIL valid"); end
      if (u != ev)     begin failures++; if (failures < 10) $display("FAIL u %h expected %h", u, ev); end
      if (from_mutant != take) failures++;
      if (take) n_mut++;
    end
    checks++;
    if (real'(n_mut) / NV < 0.57 || real'(n_mut) / NV > 0.63) begin
      failures++; $display("FAIL mutant fraction %f", real'(n_mut) / NV);
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
