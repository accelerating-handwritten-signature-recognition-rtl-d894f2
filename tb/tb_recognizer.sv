// tb_recognizer - the recogniser with data set memory, parameter storage
// (random network parameters) and the 10-10-3 CSFNN, on 20 training and 12
// test samples. Every result must carry the right sample index and label,
// a class code that agrees with a double-precision evaluation of the network
// (where the output is not within 0.05 of 0.5) and a correct res_ok; the
// training and test counters must match the results; all samples must
// come out, in order, within N + 25 cycles; a second start must repeat the
// same results.
module tb_recognizer;
  import csfnn_pkg::*;
  localparam int NI = 10, NH = 10, NO = 3, D = 240, NT = 20, NS = 12, NALL = 32;
  logic clk = 0, rst_n = 0, start = 0;
  always #5 clk = ~clk;
  logic busy, done, nn_valid, nn_out_valid, res_valid, res_ok, we = 0, ps_we = 0;
  logic [5:0] ds_raddr, res_idx, waddr;
  fp16_t ds_x [NI], nn_x [NI], nn_y [NO], nn_level [NO], genes [D], wx [NI], ps_wdata;
  logic [NO-1:0] ds_label, nn_cls, res_cls, res_label, wlabel;
  logic [7:0] ps_waddr;
  logic [15:0] train_correct, test_correct;
  fp16_t data_x [NALL][NI];
  logic [NO-1:0] data_l [NALL];
  int checks = 0, failures = 0, n_res = 0, ok_tr = 0, ok_te = 0, cyc = 0;

  dataset_mem #(.N_IN(NI), .K(NO), .DEPTH(64)) u_ds (
    .clk(clk), .we(we), .waddr(waddr), .wx(wx), .wlabel(wlabel),
    .raddr(ds_raddr), .rx(ds_x), .rlabel(ds_label));
  param_store #(.D(D)) u_ps (.clk(clk), .rst_n(rst_n), .we(ps_we), .waddr(ps_waddr),
    .wdata(ps_wdata), .genes(genes));
  csfnn u_nn (.clk(clk), .rst_n(rst_n), .in_valid(nn_valid), .x(nn_x), .genes(genes),
    .out_valid(nn_out_valid), .y(nn_y), .cls(nn_cls), .level(nn_level));
  recognizer #(.N_IN(NI), .K(NO), .N_TRAIN(NT), .N_TEST(NS), .DS_DEPTH(64)) dut (.*);

  function automatic real f(real u);
    return 2.0 / (1.0 + $exp(-2.0 * u)) - 1.0;
  endfunction
  function automatic real gv(int idx);
    return fp16_to_real(genes[idx]);
  endfunction

  always @(posedge clk) begin
    cyc++;
    if (res_valid && rst_n) begin
      real ah [NH];
      int p;
      p = int'(res_idx);
      checks += 3;
      if (p != n_res % NALL) begin failures++; $display("FAIL order: %0d", p); end
      if (res_label != data_l[p]) failures++;
      if (res_ok != (res_cls == data_l[p])) failures++;
      for (int j = 0; j < NH; j++) begin
        real s, q;
        s = 0; q = 0;
        for (int i = 0; i < NI; i++) begin
          real d;
          d = fp16_to_real(data_x[p][i]) - gv(130 + j*NI + i);
          s += d * gv(j*NI + i);
          q += d * d;
        end
        ah[j] = f(s - $sqrt(q > 5.0 ? 5.0 : q) * gv(230 + j));
      end
      for (int k = 0; k < NO; k++) begin
        real s, y;
        s = 0;
        for (int j = 0; j < NH; j++) s += ah[j] * gv(100 + k*NH + j);
        y = f(s);
        if (y > 0.55 || y < 0.45) begin
          checks++;
          if (res_cls[k] != (y >= 0.5)) begin failures++; if (failures < 10) $display("FAIL sample %0d bit %0d", p, k); end
        end
      end
      if (res_ok && n_res < NALL) begin if (p < NT) ok_tr++; else ok_te++; end
      n_res++;
    end
  end

  initial begin
    int t0;
    for (int i = 0; i < NI; i++) wx[i] = 0;
    waddr = 0; wlabel = 0; ps_waddr = 0; ps_wdata = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int g = 0; g < D; g++) begin
      ps_we = 1; ps_waddr = 8'(g);
      ps_wdata = real_to_fp16((real'($urandom_range(0, 2000)) - 1000.0) / (g >= 230 ? 1500.0 : 800.0));
      if (g >= 230 && ps_wdata[15]) ps_wdata[15] = 0;
      @(negedge clk);
    end
    ps_we = 0;
    for (int p = 0; p < NALL; p++) begin
      for (int i = 0; i < NI; i++) data_x[p][i] = real_to_fp16((real'($urandom_range(0, 2000)) - 1000.0) / 1000.0);
      data_l[p] = 3'($urandom);
      we = 1; waddr = 6'(p); wx = data_x[p]; wlabel = data_l[p];
      @(negedge clk);
    end
    we = 0;
    for (int run = 0; run < 2; run++) begin
      start = 1; t0 = cyc;
      @(negedge clk) start = 0;
      wait (done);
      repeat (2) @(negedge clk);   // let the last result be counted
      checks += 3;
      if (cyc - t0 > NALL + 27) begin failures++; $display("FAIL took %0d cycles", cyc - t0); end
      if (n_res != NALL * (run + 1)) begin failures++; $display("FAIL %0d results", n_res); end
      if (int'(train_correct) != ok_tr || int'(test_correct) != ok_te) begin failures++; $display("FAIL counts"); end
      @(negedge clk);
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
