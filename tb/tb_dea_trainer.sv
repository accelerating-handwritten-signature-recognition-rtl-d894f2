// tb_dea_trainer - the DEA trainer with the real data set memory, parameter
// storage and 10-10-3 CSFNN, on a reduced run (population 6, 6 generations,
// 40 training samples of a synthetic 8-class data set: class centres in
// 10-D plus noise). Checks:
//  * after initialisation every gene lies within its limits;
//  * every trial vector: each gene is either the target gene or, within
//    binary16 tolerance, x_best + 0.6 (x_r1 - x_r2) computed in real
//    arithmetic, gene j_rand is the mutant, and r1, r2, i differ;
//  * the best cost never increases, every population cost is >= it;
//  * evaluation, replacement and rejection counts add up;
//  * at the end the parameter storage holds the best chromosome, and its
//    cost recomputed independently in real arithmetic matches best_cost;
//  * the run takes the expected number of cycles.
module tb_dea_trainer;
  import csfnn_pkg::*;
  localparam int NI = 10, NH = 10, NO = 3, NP = 6, G = 6, NT = 40, DSD = 64, D = 240;
  logic clk = 0, rst_n = 0, start = 0;
  always #5 clk = ~clk;

  logic busy, done, nn_valid, nn_out_valid, ps_we;
  logic [5:0] ds_raddr, waddr;
  fp16_t ds_x [NI], nn_x [NI], nn_y [NO], nn_level [NO], genes [D], wx [NI], ps_wdata, best_cost;
  logic [NO-1:0] ds_label, nn_cls, wlabel;
  logic [7:0] ps_waddr;
  logic we = 0;
  logic [15:0] generation;
  logic [31:0] n_evals, n_replace, n_reject, n_retry, n_best_upd;
  int checks = 0, failures = 0, cyc = 0;
  fp16_t data_x [NT][NI];
  logic [NO-1:0] data_l [NT];

  dataset_mem #(.N_IN(NI), .K(NO), .DEPTH(DSD)) u_ds (
    .clk(clk), .we(we), .waddr(waddr), .wx(wx), .wlabel(wlabel),
    .raddr(ds_raddr), .rx(ds_x), .rlabel(ds_label));
  param_store #(.D(D)) u_ps (.clk(clk), .rst_n(rst_n), .we(ps_we), .waddr(ps_waddr),
    .wdata(ps_wdata), .genes(genes));
  csfnn u_nn (.clk(clk), .rst_n(rst_n), .in_valid(nn_valid), .x(nn_x), .genes(genes),
    .out_valid(nn_out_valid), .y(nn_y), .cls(nn_cls), .level(nn_level));
  dea_trainer #(.NP(NP), .G_MAX(G), .N_TRAIN(NT), .DS_DEPTH(DSD)) dut (.*);

  function automatic real f(real u);
    return 2.0 / (1.0 + $exp(-2.0 * u)) - 1.0;
  endfunction
  function automatic real gv(int idx);
    return fp16_to_real(genes[idx]);
  endfunction

  // ---- monitors ------------------------------------------------------------
  real last_best = 1.0e9;
  logic prev_init = 0;
  logic [2:0] prev_state;
  always @(posedge clk) begin
    cyc++;
    if (rst_n) begin
      if (best_cost != FP16_INF) begin
        checks++;
        if (fp16_to_real(best_cost) > last_best) begin
          failures++; $display("FAIL best cost rose %f -> %f", last_best, fp16_to_real(best_cost));
        end
        last_best = fp16_to_real(best_cost);
      end
      // end of initialisation: all genes within limits
      if (prev_init && !dut.init_phase) begin
        for (int p = 0; p < NP; p++)
          for (int g = 0; g < D; g++) begin
            real v, lo, hi;
            v = fp16_to_real(dut.pop[p][g]);
            if (g < 130) begin lo = -0.5; hi = 0.5; end
            else if (g < 230) begin lo = -1.0; hi = 1.0; end
            else begin lo = 0.0; hi = 0.7071; end
            checks++;
            if (v < lo || v > hi) begin failures++; if (failures < 10) $display("FAIL init gene %0d = %f", g, v); end
          end
      end
      // a trial vector is complete
      if (prev_state == 3'(4) && dut.state == 3'(2)) begin   // S_MUT -> S_EVAL
        int n_mut;
        n_mut = 0;
        checks++;
        if (dut.r1 == dut.r2 || dut.r1 == dut.i_idx || dut.r2 == dut.i_idx) begin failures++; $display("FAIL r1/r2"); end
        for (int g = 0; g < D; g++) begin
          real mv, tv, tol;
          mv = fp16_to_real(dut.pop[dut.best_idx][g]) +
               fp16_to_real(16'h38CD) * (fp16_to_real(dut.pop[dut.r1][g]) - fp16_to_real(dut.pop[dut.r2][g]));
          tv = fp16_to_real(dut.trial[g]);
          tol = 3e-3 * ((mv < 0 ? -mv : mv) + 1.0);
          checks++;
          if (dut.trial[g] == dut.pop[dut.i_idx][g] && g != int'(dut.jrand)) ;
          else if (tv - mv <= tol && mv - tv <= tol) n_mut++;
          else begin failures++; if (failures < 10) $display("FAIL trial gene %0d = %f, mutant %f", g, tv, mv); end
        end
        checks++;
        if (n_mut < 1) begin failures++; $display("FAIL no mutant gene"); end
        // the parameter storage holds the trial
        for (int g = 0; g < D; g += 7) begin
          checks++;
          if (genes[g] != dut.trial[g]) begin failures++; if (failures < 10) $display("FAIL storage gene %0d", g); end
        end
      end
      prev_init  <= dut.init_phase;
      prev_state <= 3'(dut.state);
    end
  end

  initial begin
    fp16_t cen [8][NI];
    int start_cyc, nc;
    real ex;
    for (int c = 0; c < 8; c++)
      for (int i = 0; i < NI; i++) cen[c][i] = real_to_fp16((real'($urandom_range(0, 1200)) - 600.0) / 1000.0);
    for (int p = 0; p < NT; p++) begin
      data_l[p] = 3'(p % 8);
      for (int i = 0; i < NI; i++)
        data_x[p][i] = real_to_fp16(fp16_to_real(cen[p % 8][i]) + (real'($urandom_range(0, 300)) - 150.0) / 1000.0);
    end
    waddr = 0; wlabel = 0;
    for (int i = 0; i < NI; i++) wx[i] = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int p = 0; p < NT; p++) begin
      @(negedge clk);
      we = 1; waddr = 6'(p); wx = data_x[p]; wlabel = data_l[p];
    end
    @(negedge clk) we = 0;
    start = 1;
    start_cyc = cyc;
    @(negedge clk) start = 0;
    wait (done);
    nc = cyc - start_cyc;
    @(negedge clk);
    $display("training: %0d cycles, %0d evaluations, %0d replaced, %0d rejected, %0d redraws, %0d best updates, best cost %f",
             nc, n_evals, n_replace, n_reject, n_retry, n_best_upd, fp16_to_real(best_cost));
    checks += 5;
    if (n_evals != NP * (G + 1)) begin failures++; $display("FAIL evals"); end
    if (n_replace + n_reject != NP * G) begin failures++; $display("FAIL selections"); end
    if (n_replace == 0 || n_reject == 0) begin failures++; $display("FAIL selection never went both ways"); end
    if (generation != 16'(G)) begin failures++; $display("FAIL generation %0d", generation); end
    if (nc < (G + 1) * NP * (D + NT) || nc > (G + 1) * NP * (D + NT + 40) + n_retry + D + 10) begin
      failures++; $display("FAIL cycle count %0d", nc);
    end
    for (int p = 0; p < NP; p++) begin
      checks++;
      if (!fp16_ge(dut.pcost[p], best_cost)) begin failures++; $display("FAIL pcost below best"); end
    end
    for (int g = 0; g < D; g++) begin
      checks++;
      if (genes[g] != dut.pop[dut.best_idx][g]) begin failures++; if (failures < 10) $display("FAIL final gene %0d", g); end
    end
    // independent cost of the stored parameters
    ex = 0;
    for (int p = 0; p < NT; p++) begin
      real ah [NH];
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
        real s, e;
        s = 0;
        for (int j = 0; j < NH; j++) s += ah[j] * gv(100 + k*NH + j);
        e = (data_l[p][k] ? 0.9 : 0.1) - f(s);
        ex += e * e;
      end
    end
    ex = ex / (2.0 * NT);
    checks++;
    if (fp16_to_real(best_cost) - ex > 0.03 * ex + 0.003 || ex - fp16_to_real(best_cost) > 0.03 * ex + 0.003) begin
      failures++; $display("FAIL best cost %f, recomputed %f", fp16_to_real(best_cost), ex);
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
