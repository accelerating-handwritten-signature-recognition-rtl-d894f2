// tb_uart_rx - serial receiver at 16 clocks per bit: random bytes with
// random idle gaps and slightly early/late bit edges must arrive intact; a
// frame with a low stop bit must give frame_err and no byte; a short glitch
// on the idle line must give nothing.
module tb_uart_rx;
  localparam int CPB = 16;
  logic clk = 0, rst_n = 0, rxd = 1, valid, frame_err;
  always #5 clk = ~clk;
  logic [7:0] data;
  int checks = 0, failures = 0, n_valid = 0, n_ferr = 0;
  logic [7:0] last;

  uart_rx #(.CLKS_PER_BIT(CPB)) dut (.*);

  always @(posedge clk) begin
    if (valid && rst_n) begin n_valid++; last = data; end
    if (frame_err && rst_n) n_ferr++;
  end

  task automatic send(logic [7:0] b, logic stop, int skew);
    rxd = 0;
    repeat (CPB + skew) @(negedge clk);
    for (int i = 0; i < 8; i++) begin
      rxd = b[i];
      repeat (CPB) @(negedge clk);
    end
    rxd = stop;
    repeat (CPB) @(negedge clk);
    rxd = 1;
    repeat (2) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);
    for (int n = 0; n < 300; n++) begin
      logic [7:0] b;
      int v0, f0;
      b = 8'($urandom);
      v0 = n_valid; f0 = n_ferr;
      send(b, 1'b1, $urandom_range(0, 2) - 1);
      repeat ($urandom_range(0, 20)) @(negedge clk);
      checks += 2;
      if (n_valid != v0 + 1 || last != b) begin failures++; if (failures < 10) $display("FAIL byte %h got %h", b, last); end
      if (n_ferr != f0) failures++;
    end
    begin
      int v0;
      v0 = n_valid;
      send(8'h3C, 1'b0, 0);
      repeat (2 * CPB) @(negedge clk);
      checks += 2;
      if (n_ferr != 1) begin failures++; $display("FAIL framing error not flagged"); end
      if (n_valid != v0) begin failures++; $display("FAIL bad frame delivered"); end
      rxd = 0; repeat (3) @(negedge clk); rxd = 1;
      repeat (12 * CPB) @(negedge clk);
      checks++;
      if (n_valid != v0 || n_ferr != 1) begin failures++; $display("FAIL glitch produced a byte"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
