// tb_sig_recog_top - complete run of the signature recognition system at its
// default size: 10-10-3 network, population 20, 150 generations, 200
// training and 56 test samples, 115200-baud serial port at 200 MHz.
//
// The testbench makes up a signature-like data set: 8 owners, each with a
// random centre in the 10-D feature space, 32 samples per owner spread
// around it (25 for training, 7 for testing), labelled with the owner's
// 3-bit code. The first sample is sent over the serial line, preceded by
// one deliberately malformed frame (stop bit low) that must be rejected;
// the other samples go through the parallel host byte port. Then the system
// trains and recognises on its own. Checks:
//  * the load count, and the phase sequence load -> train -> recognise ->
//    done, and the training time against (G+1) NP (D + N_TRAIN + overhead);
//  * the stored data set equals what was sent;
//  * the best cost never rises, and ends below the best initial cost;
//  * every recognition result: the class code agrees with a double-precision
//    evaluation of the network with the trained parameters (wherever that
//    output is not within 0.05 of the 0.5 boundary), res_ok is right, and
//    the correct-counts match the results;
//  * recognition beats chance clearly (more than 1/4 right; chance is 1/8);
//  * each mechanism happened at least once: serial byte, framing error,
//    host byte, selection replace and reject, r1/r2 redraw, best update,
//    both crossover sources, phase switches.
module tb_sig_recog_top;
  import csfnn_pkg::*;
  localparam int NI = 10, NH = 10, NO = 3, NP = 20, G = 150, NT = 200, NS = 56, D = 240;
  localparam int CPB = 1736;
  localparam int NALL = NT + NS;

  logic clk = 0, rst_n = 0, uart_rxd = 1, host_byte_valid = 0;
  always #2.5 clk = ~clk;   // 200 MHz
  logic [7:0] host_byte = 0;
  logic [1:0] phase;
  logic [15:0] n_loaded, generation, train_correct, test_correct;
  logic uart_frame_err, res_valid, res_ok, recog_done;
  fp16_t best_cost;
  logic [7:0] res_idx;
  logic [NO-1:0] res_cls, res_label;

  sig_recog_top dut (.*);

  int checks = 0, failures = 0;
  int cyc = 0;
  fp16_t data_x [NALL][NI];
  logic [NO-1:0] data_l [NALL];

  // mechanism counters
  int m_uart = 0, m_ferr = 0, m_host = 0, m_replace = 0, m_reject = 0, m_retry = 0;
  int m_best = 0, m_cx_mut = 0, m_cx_tgt = 0, m_phase = 0, n_res = 0, n_ok = 0;
  int n_ok_train = 0, n_ok_test = 0;
  real last_best = 1.0e9, first_best = -1.0;
  logic [1:0] prev_phase = 0;

  function automatic real f(real u);
    return 2.0 / (1.0 + $exp(-2.0 * u)) - 1.0;
  endfunction
  function automatic real gv(int idx);
    return fp16_to_real(dut.genes[idx]);
  endfunction

  always @(posedge clk) begin
    cyc++;
    if (dut.rx_valid && rst_n) m_uart++;
    if (uart_frame_err && rst_n) m_ferr++;
    if (host_byte_valid) m_host++;
    if (phase != prev_phase && rst_n) m_phase++;
    prev_phase <= phase;
    if (dut.u_trainer.u_cx.out_valid && rst_n) begin
      if (dut.u_trainer.u_cx.from_mutant) m_cx_mut++; else m_cx_tgt++;
    end
    if (best_cost != FP16_INF && rst_n) begin
      if (first_best < 0 && generation == 1) first_best = last_best;
      checks++;
      if (fp16_to_real(best_cost) > last_best) begin failures++; $display("FAIL best cost rose"); end
      last_best = fp16_to_real(best_cost);
    end
    if (res_valid && rst_n) begin
      real ah [NH];
      int p;
      p = int'(res_idx);
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
          if (res_cls[k] != (y >= 0.5)) begin
            failures++; if (failures < 10) $display("FAIL sample %0d output %0d: bit %b, model %f", p, k, res_cls[k], y);
          end
        end
      end
      checks += 2;
      if (res_label != data_l[p]) begin failures++; $display("FAIL label of sample %0d", p); end
      if (res_ok != (res_cls == data_l[p])) begin failures++; $display("FAIL res_ok"); end
      n_res++;
      if (res_ok) begin
        n_ok++;
        if (p < NT) n_ok_train++; else n_ok_test++;
      end
    end
  end

  task automatic uart_byte(logic [7:0] b, logic stop);
    uart_rxd = 0;
    repeat (CPB) @(negedge clk);
    for (int i = 0; i < 8; i++) begin
      uart_rxd = b[i];
      repeat (CPB) @(negedge clk);
    end
    uart_rxd = stop;
    repeat (CPB) @(negedge clk);
    uart_rxd = 1;
    repeat (CPB) @(negedge clk);
  endtask

  task automatic host_send(logic [7:0] b);
    @(negedge clk);
    host_byte_valid = 1; host_byte = b;
    @(negedge clk);
    host_byte_valid = 0;
  endtask

  function automatic logic [7:0] sample_byte(int p, int k);
    if (k == 2 * NI) return 8'(data_l[p]);
    return (k % 2 == 0) ? data_x[p][k/2][7:0] : data_x[p][k/2][15:8];
  endfunction

  initial begin
    fp16_t cen [8][NI];
    int t_train0, t_train1, t_rec1;
    for (int c = 0; c < 8; c++)
      for (int i = 0; i < NI; i++) cen[c][i] = real_to_fp16((real'($urandom_range(0, 1400)) - 700.0) / 1000.0);
    for (int p = 0; p < NALL; p++) begin
      int c;
      c = (p < NT) ? p % 8 : (p - NT) % 8;
      data_l[p] = 3'(c);
      for (int i = 0; i < NI; i++)
        data_x[p][i] = real_to_fp16(fp16_to_real(cen[c][i]) + (real'($urandom_range(0, 300)) - 150.0) / 1000.0);
    end
    repeat (5) @(negedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);
    uart_byte(8'hA5, 1'b0);                       // malformed frame, must be dropped
    for (int k = 0; k <= 2 * NI; k++) uart_byte(sample_byte(0, k), 1'b1);
    checks++;
    if (n_loaded != 1) begin failures++; $display("FAIL serial sample not loaded (%0d)", n_loaded); end
    for (int p = 1; p < NALL; p++)
      for (int k = 0; k <= 2 * NI; k++) host_send(sample_byte(p, k));
    repeat (3) @(negedge clk);
    checks++;
    if (n_loaded != 16'(NALL)) begin failures++; $display("FAIL loaded %0d", n_loaded); end
    for (int p = 0; p < NALL; p++) begin
      logic [NI*16+NO-1:0] w;
      w = dut.u_ds.mem[p];
      checks++;
      if (w[NO-1:0] != data_l[p]) failures++;
      for (int i = 0; i < NI; i++) begin
        checks++;
        if (w[NO + 16*i +: 16] != data_x[p][i]) begin failures++; if (failures < 10) $display("FAIL stored sample %0d", p); end
      end
    end
    wait (phase == 2'd1);
    t_train0 = cyc;
    wait (phase == 2'd2);
    t_train1 = cyc;
    wait (recog_done);
    t_rec1 = cyc;
    repeat (5) @(negedge clk);
    m_replace = int'(dut.u_trainer.n_replace);
    m_reject  = int'(dut.u_trainer.n_reject);
    m_retry   = int'(dut.u_trainer.n_retry);
    m_best    = int'(dut.u_trainer.n_best_upd);
    $display("training: %0d cycles (%0.2f ms at 200 MHz), %0d replaced, %0d rejected, %0d redraws, %0d best updates",
             t_train1 - t_train0, real'(t_train1 - t_train0) / 200.0e3, m_replace, m_reject, m_retry, m_best);
    $display("cost: best initial %f, final %f", first_best, fp16_to_real(best_cost));
    $display("recognition: %0d cycles; train %0d/%0d (%0.1f%%), test %0d/%0d (%0.1f%%)",
             t_rec1 - t_train1, train_correct, NT, 100.0 * train_correct / NT, test_correct, NS, 100.0 * test_correct / NS);
    $display("mechanisms: uart bytes %0d, framing errors %0d, host bytes %0d, mutant genes %0d, target genes %0d, phase changes %0d",
             m_uart, m_ferr, m_host, m_cx_mut, m_cx_tgt, m_phase);
    checks += 6;
    if (n_res != NALL) begin failures++; $display("FAIL %0d results", n_res); end
    if (int'(train_correct) != n_ok_train || int'(test_correct) != n_ok_test) begin failures++; $display("FAIL counters"); end
    if (t_train1 - t_train0 < (G + 1) * NP * (D + NT) || t_train1 - t_train0 > (G + 1) * NP * (D + NT + 40) + m_retry + D + 10) begin
      failures++; $display("FAIL training time");
    end
    if (!(fp16_to_real(best_cost) < first_best)) begin failures++; $display("FAIL no improvement"); end
    if (n_ok * 4 <= NALL) begin failures++; $display("FAIL accuracy at chance level"); end
    if (generation != 16'(G)) begin failures++; $display("FAIL generations %0d", generation); end
    // every mechanism at least once
    checks += 10;
    if (m_uart < 1)    begin failures++; $display("FAIL no serial byte"); end
    if (m_ferr < 1)    begin failures++; $display("FAIL no framing error"); end
    if (m_host < 1)    begin failures++; $display("FAIL no host byte"); end
    if (m_replace < 1) begin failures++; $display("FAIL no replacement"); end
    if (m_reject < 1)  begin failures++; $display("FAIL no rejection"); end
    if (m_retry < 1)   begin failures++; $display("FAIL no redraw"); end
    if (m_best < 1)    begin failures++; $display("FAIL no best update"); end
    if (m_cx_mut < 1)  begin failures++; $display("FAIL no mutant gene"); end
    if (m_cx_tgt < 1)  begin failures++; $display("FAIL no target gene"); end
    if (m_phase != 3)  begin failures++; $display("FAIL phase changes %0d", m_phase); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
