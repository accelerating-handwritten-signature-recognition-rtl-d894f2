// tb_dataset_mem - writes random feature vectors and labels to all 256
// locations, reads them back in random order and checks each word and the
// one-cycle read latency against a copy kept in the testbench.
module tb_dataset_mem;
  import csfnn_pkg::*;
  localparam int NI = 10, K = 3, DEPTH = 256;
  logic clk = 0, we = 0;
  always #5 clk = ~clk;
  logic [7:0] waddr, raddr;
  fp16_t wx [NI], rx [NI];
  logic [K-1:0] wlabel, rlabel;
  fp16_t ref_x [DEPTH][NI];
  logic [K-1:0] ref_l [DEPTH];
  int checks = 0, failures = 0;

  dataset_mem #(.N_IN(NI), .K(K), .DEPTH(DEPTH)) dut (.*);

  initial begin
    raddr = 0; waddr = 0; wlabel = 0;
    for (int i = 0; i < NI; i++) wx[i] = 0;
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      waddr = 8'(a);
      for (int i = 0; i < NI; i++) begin wx[i] = 16'($urandom); ref_x[a][i] = wx[i]; end
      wlabel = 3'($urandom); ref_l[a] = wlabel;
      we = 1;
    end
    @(negedge clk) we = 0;
    for (int n = 0; n < 1000; n++) begin
      int a;
      a = $urandom_range(0, DEPTH - 1);
      raddr = 8'(a);
      @(negedge clk);
      checks++;
      if (rlabel != ref_l[a]) failures++;
      for (int i = 0; i < NI; i++) begin
        checks++;
        if (rx[i] != ref_x[a][i]) begin failures++; if (failures < 10) $display("FAIL addr %0d word %0d", a, i); end
      end
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
