// tb_param_store - checks reset to zero, random single-gene writes (each
// must change exactly that gene), and that an idle cycle changes nothing.
module tb_param_store;
  import csfnn_pkg::*;
  localparam int D = 240;
  logic clk = 0, rst_n = 0, we = 0;
  always #5 clk = ~clk;
  logic [7:0] waddr;
  fp16_t wdata, genes [D], ref_g [D];
  int checks = 0, failures = 0;

  param_store #(.D(D)) dut (.*);

  task automatic compare();
    for (int g = 0; g < D; g++) begin
      checks++;
      if (genes[g] != ref_g[g]) begin failures++; if (failures < 10) $display("FAIL gene %0d", g); end
    end
  endtask

  initial begin
    waddr = 0; wdata = 0;
    for (int g = 0; g < D; g++) ref_g[g] = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    compare();
    for (int n = 0; n < 600; n++) begin
      int a;
      a = $urandom_range(0, D - 1);
      waddr = 8'(a); wdata = 16'($urandom); we = ($urandom_range(0, 4) != 0);
      if (we) ref_g[a] = wdata;
      @(negedge clk);
      we = 0;
      if (n % 20 == 0) compare();
    end
    compare();
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
