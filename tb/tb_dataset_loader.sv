// tb_dataset_loader - sends 20 samples (21 bytes each, features low byte
// first, then the class byte) with random gaps between bytes and checks each
// memory write (address, all features, label), then that load_done rises
// after the 20th sample and later bytes are ignored.
module tb_dataset_loader;
  import csfnn_pkg::*;
  localparam int NI = 10, K = 3, NTOT = 20;
  logic clk = 0, rst_n = 0, byte_valid = 0, we, load_done;
  always #5 clk = ~clk;
  logic [7:0] byte_data = 0;
  logic [5:0] waddr;
  fp16_t wx [NI];
  logic [K-1:0] wlabel;
  logic [15:0] n_loaded;
  fp16_t ref_x [NTOT][NI];
  logic [K-1:0] ref_l [NTOT];
  int checks = 0, failures = 0, n_we = 0;

  dataset_loader #(.N_IN(NI), .K(K), .DEPTH(64), .N_TOTAL(NTOT)) dut (.*);

  always @(posedge clk) if (we && rst_n) begin
    checks += 2 + NI;
    if (int'(waddr) != n_we) begin failures++; $display("FAIL address %0d", waddr); end
    if (wlabel != ref_l[n_we]) failures++;
    for (int i = 0; i < NI; i++) if (wx[i] != ref_x[n_we][i]) begin failures++; if (failures < 10) $display("FAIL sample %0d word %0d", n_we, i); end
    n_we++;
  end

  task automatic send(logic [7:0] b);
    repeat ($urandom_range(0, 3)) @(negedge clk);
    byte_valid = 1; byte_data = b;
    @(negedge clk);
    byte_valid = 0;
    @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int p = 0; p < NTOT; p++) begin
      for (int i = 0; i < NI; i++) ref_x[p][i] = 16'($urandom);
      ref_l[p] = 3'($urandom);
      for (int i = 0; i < NI; i++) begin send(ref_x[p][i][7:0]); send(ref_x[p][i][15:8]); end
      send({5'b10101, ref_l[p]});
    end
    repeat (3) @(negedge clk);
    checks += 2;
    if (!load_done || n_loaded != NTOT) begin failures++; $display("FAIL load_done %b count %0d", load_done, n_loaded); end
    for (int k = 0; k < 30; k++) send(8'hFF);
    if (n_we != NTOT) begin failures++; $display("FAIL %0d writes", n_we); end
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
