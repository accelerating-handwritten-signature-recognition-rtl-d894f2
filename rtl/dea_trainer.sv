// dea_trainer - on-chip training of the CSFNN by differential evolution.
//
// Finds the network parameters (weights, centres and cosines of the opening
// angles: one chromosome of D = 240 binary16 genes) that minimise the average
// squared error over the training set, with the DE/best/1/bin scheme:
//
//   initialisation  every chromosome i of the population gets random genes
//                   x = x_l + rand (x_u - x_l) (dea_init) and is evaluated;
//                   the comparison module keeps the best one.
//   each generation, for every target chromosome i:
//     pick          random r1 != r2, both != i, and a random gene j_rand
//                   (drawn again on a collision)
//     mutation      v_j = x_best,j + F (x_r1,j - x_r2,j)     (dea_mutation)
//     crossover     u_j = v_j if rand <= CR or j = j_rand, else x_i,j
//                                                           (dea_crossover)
//                   one gene per clock; each trial gene is also written into
//                   the network's parameter storage
//     evaluation    the training samples stream through the CSFNN, one per
//                   clock, and the cost unit forms eps_av of the trial
//     selection     if f(u) <= f(x_i) the trial replaces x_i (dea_selection);
//                   if it is also no worse than the best, it becomes the best
//   after G_MAX generations the best chromosome is copied into the parameter
//   storage, where the recogniser uses it.
//
// The population (NP x D genes) and its costs are held in registers. Timing:
// a chromosome takes about D + N_TRAIN + 30 cycles (gene pass, sample
// stream, network and cost pipeline), so training takes roughly
// (G_MAX + 1) NP (D + N_TRAIN + 30) cycles, 1.4 million for the default
// sizes. The DEA settings NP = 20, F = 0.6, CR = 0.6 and 150 generations and
// the initial weight range [-0.5, 0.5] follow the published design; the gene-serial
// organisation, the centre range [-1, 1] and the cos(omega) range
// [0, cos(pi/4)] (between the MLP-like and RBF-like initial angles) are this
// design's choices.
//
// Interface: start (pulse) begins training; busy while it runs, done after.
// Data set read port ds_* (one-cycle read latency), network port nn_*
// (samples out, outputs back in order), parameter storage write port ps_*.
// Status: generation, best_cost, and event counters for observation.
// The sample words nn_x are the data memory's registered outputs passed
// straight on; the trainer only controls the read address and nn_valid.
module dea_trainer
  import csfnn_pkg::*;
#(
  parameter int unsigned N_IN     = 10,
  parameter int unsigned N_HID    = 10,
  parameter int unsigned N_OUT    = 3,
  parameter int unsigned NP       = 20,
  parameter int unsigned G_MAX    = 150,
  parameter int unsigned N_TRAIN  = 200,
  parameter int unsigned DS_DEPTH = 256,
  parameter fp16_t       F        = 16'h38CD,   // 0.6
  parameter int unsigned CR_Q16   = 39322,      // 0.6 * 65536
  parameter logic [31:0] SEED     = 32'h1ACE_B00C,
  parameter fp16_t       W_LO     = 16'hB800,   // -0.5
  parameter fp16_t       W_HI     = 16'h3800,   //  0.5
  parameter fp16_t       C_LO     = 16'hBC00,   // -1.0
  parameter fp16_t       C_HI     = 16'h3C00,   //  1.0
  parameter fp16_t       COS_LO   = 16'h0000,   //  0.0
  parameter fp16_t       COS_HI   = 16'h39A8,   //  0.707
  localparam int unsigned D       = N_HID * (2 * N_IN + N_OUT) + N_HID,
  localparam int unsigned DW      = $clog2(D),
  localparam int unsigned PW      = $clog2(NP),
  localparam int unsigned AW      = $clog2(DS_DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  output logic             busy,
  output logic             done,
  // data set memory read port
  output logic [AW-1:0]    ds_raddr,
  input  fp16_t            ds_x     [N_IN],
  input  logic [N_OUT-1:0] ds_label,
  // CSFNN
  output logic             nn_valid,
  output fp16_t            nn_x     [N_IN],
  input  logic             nn_out_valid,
  input  fp16_t            nn_y     [N_OUT],
  // parameter storage write port
  output logic             ps_we,
  output logic [DW-1:0]    ps_waddr,
  output fp16_t            ps_wdata,
  // status
  output logic [15:0]      generation,
  output fp16_t            best_cost,
  output logic [31:0]      n_evals,
  output logic [31:0]      n_replace,
  output logic [31:0]      n_reject,
  output logic [31:0]      n_retry,
  output logic [31:0]      n_best_upd
);

  localparam int unsigned G_C   = N_HID * (N_IN + N_OUT);
  localparam int unsigned G_COS = N_HID * (2 * N_IN + N_OUT);

  typedef enum logic [2:0] {
    S_IDLE, S_INIT_GEN, S_EVAL, S_PICK, S_MUT, S_SEL, S_FINAL, S_DONE
  } state_t;

  state_t state;
  logic   init_phase;

  // population, costs, trial vector
  fp16_t pop   [NP][D];
  fp16_t pcost [NP];
  fp16_t trial [D];

  logic [PW-1:0] i_idx, r1, r2, best_idx;
  logic [DW-1:0] jc, jrand;
  logic          issue;           // a gene is issued this cycle
  logic [DW-1:0] jd [4];          // gene index delay line
  fp16_t         xd [3];          // target gene delay line
  logic [15:0]   rd [3];          // crossover draw delay line

  // ---- random numbers ------------------------------------------------------
  logic [31:0] rnd;
  lfsr #(.SEED(SEED), .STEPS(32)) u_lfsr (.clk(clk), .rst_n(rst_n), .en(1'b1), .q(rnd));

  logic [PW-1:0] r1_c, r2_c;
  logic [DW-1:0] jr_c;
  always_comb begin
    r1_c = PW'(32'(rnd[7:0])  % NP);
    r2_c = PW'(32'(rnd[15:8]) % NP);
    jr_c = DW'(32'(rnd[31:16]) % D);
  end

  // ---- initialization module -------------------------------------------------
  fp16_t init_lo, init_hi, init_gene;
  logic  init_ov;
  always_comb begin
    if (int'(jc) < int'(G_C))        begin init_lo = W_LO;   init_hi = W_HI;   end
    else if (int'(jc) < int'(G_COS)) begin init_lo = C_LO;   init_hi = C_HI;   end
    else                             begin init_lo = COS_LO; init_hi = COS_HI; end
  end
  dea_init u_init (
    .clk(clk), .rst_n(rst_n), .in_valid(issue && state == S_INIT_GEN),
    .rnd(rnd[9:0]), .lo(init_lo), .hi(init_hi), .out_valid(init_ov), .gene(init_gene));

  // ---- mutation and crossover --------------------------------------------------
  fp16_t mut_v, trial_gene;
  logic  mut_ov, cx_ov, cx_from_mut;
  dea_mutation #(.F(F)) u_mut (
    .clk(clk), .rst_n(rst_n), .in_valid(issue && state == S_MUT),
    .best(pop[best_idx][jc]), .xr1(pop[r1][jc]), .xr2(pop[r2][jc]),
    .out_valid(mut_ov), .v(mut_v));
  dea_crossover #(.D(D), .CR_Q16(CR_Q16)) u_cx (
    .clk(clk), .rst_n(rst_n), .in_valid(mut_ov), .v(mut_v), .x(xd[2]), .rnd(rd[2]),
    .j(jd[2]), .jrand(jrand), .out_valid(cx_ov), .u(trial_gene), .from_mutant(cx_from_mut));

  always_ff @(posedge clk) begin
    jd[0] <= jc;
    for (int k = 1; k < 4; k++) jd[k] <= jd[k-1];
    xd[0] <= pop[i_idx][jc];
    rd[0] <= rnd[31:16];
    for (int k = 1; k < 3; k++) begin
      xd[k] <= xd[k-1];
      rd[k] <= rd[k-1];
    end
  end

  // ---- fitness evaluation: sample stream, label FIFO, cost unit ----------------
  logic [AW-1:0]    sc;
  logic             s_issue, s_issue_d;
  logic [N_OUT-1:0] lbl_out;
  logic             lbl_empty, lbl_full;
  logic             cost_clear, cost_valid;
  fp16_t            cost;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) s_issue_d <= 1'b0;
    else        s_issue_d <= s_issue;
  end
  assign ds_raddr = sc;
  assign nn_valid = s_issue_d;
  assign nn_x     = ds_x;

  sync_fifo #(.W(N_OUT), .DEPTH(32)) u_lbl (
    .clk(clk), .rst_n(rst_n), .push(s_issue_d), .din(ds_label), .pop(nn_out_valid),
    .dout(lbl_out), .empty(lbl_empty), .full(lbl_full));

  cost_unit #(.K(N_OUT), .N_SAMPLES(N_TRAIN)) u_cost (
    .clk(clk), .rst_n(rst_n), .clear(cost_clear), .in_valid(nn_out_valid), .y(nn_y),
    .label(lbl_out), .cost(cost), .cost_valid(cost_valid));

  // ---- comparison and selection -------------------------------------------------
  logic  sel_eval, replace, new_best, cmp_upd, cmp_clear;
  fp16_t cost_r;
  dea_selection u_sel (
    .eval(sel_eval), .cost_trial(cost_r), .cost_target(pcost[i_idx]),
    .cost_best(best_cost), .replace(replace), .new_best(new_best));
  dea_comparison #(.NP(NP)) u_cmp (
    .clk(clk), .rst_n(rst_n), .clear(cmp_clear), .upd(cmp_upd), .cost(cost_r),
    .idx(i_idx), .best_cost(best_cost), .best_idx(best_idx));

  always_comb begin
    sel_eval  = (state == S_SEL) && !init_phase;
    cmp_upd   = (state == S_SEL) && (init_phase || replace);
    cmp_clear = (state == S_IDLE || state == S_DONE) && start;
    issue     = (state == S_INIT_GEN || state == S_MUT) && !(jc == DW'(D - 1) && jd[0] == DW'(D - 1));
    s_issue   = (state == S_EVAL) && (int'(sc) < int'(N_TRAIN));
  end

  // ---- parameter storage writes ---------------------------------------------------
  always_comb begin
    ps_we    = 1'b0;
    ps_waddr = jd[2];
    ps_wdata = init_gene;
    if (init_ov) begin
      ps_we = 1'b1;
    end else if (cx_ov) begin
      ps_we    = 1'b1;
      ps_waddr = jd[3];
      ps_wdata = trial_gene;
    end else if (state == S_FINAL) begin
      ps_we    = 1'b1;
      ps_waddr = jc;
      ps_wdata = pop[best_idx][jc];
    end
  end

  // ---- control ---------------------------------------------------------------------
  logic gene_pass_end;
  assign gene_pass_end = (init_ov && jd[2] == DW'(D - 1)) || (cx_ov && jd[3] == DW'(D - 1));

  always_ff @(posedge clk) begin
    if (init_ov)               pop[i_idx][jd[2]] <= init_gene;
    if (cx_ov)                 trial[jd[3]]      <= trial_gene;
    if (cmp_upd && init_phase) pcost[i_idx]      <= cost_r;
    if (replace) begin
      pop[i_idx]   <= trial;
      pcost[i_idx] <= cost_r;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      init_phase <= 1'b0;
      i_idx      <= '0;
      r1         <= '0;
      r2         <= '0;
      jrand      <= '0;
      jc         <= '0;
      sc         <= '0;
      cost_clear <= 1'b0;
      cost_r     <= FP16_ZERO;
      generation <= '0;
      n_evals    <= '0;
      n_replace  <= '0;
      n_reject   <= '0;
      n_retry    <= '0;
      n_best_upd <= '0;
    end else begin
      cost_clear <= 1'b0;
      unique case (state)
        S_IDLE, S_DONE: if (start) begin
          state      <= S_INIT_GEN;
          init_phase <= 1'b1;
          i_idx      <= '0;
          jc         <= '0;
          generation <= '0;
        end
        S_INIT_GEN, S_MUT: begin
          if (issue && jc != DW'(D - 1)) jc <= jc + 1'b1;
          if (gene_pass_end) begin
            state      <= S_EVAL;
            sc         <= '0;
            cost_clear <= 1'b1;
          end
        end
        S_EVAL: begin
          if (s_issue) sc <= sc + 1'b1;
          if (cost_valid) begin
            cost_r  <= cost;
            state   <= S_SEL;
            n_evals <= n_evals + 1;
          end
        end
        S_SEL: begin
          jc <= '0;
          if (!init_phase) begin
            if (replace) n_replace <= n_replace + 1;
            else         n_reject  <= n_reject + 1;
            if (new_best) n_best_upd <= n_best_upd + 1;
          end
          if (int'(i_idx) == int'(NP) - 1) begin
            i_idx <= '0;
            if (init_phase) begin
              init_phase <= 1'b0;
              state      <= (G_MAX == 0) ? S_FINAL : S_PICK;
            end else begin
              generation <= generation + 1'b1;
              state      <= (int'(generation) + 1 >= int'(G_MAX)) ? S_FINAL : S_PICK;
            end
          end else begin
            i_idx <= i_idx + 1'b1;
            state <= init_phase ? S_INIT_GEN : S_PICK;
          end
        end
        S_PICK: begin
          if (r1_c == r2_c || r1_c == i_idx || r2_c == i_idx) begin
            n_retry <= n_retry + 1;
          end else begin
            r1    <= r1_c;
            r2    <= r2_c;
            jrand <= jr_c;
            jc    <= '0;
            state <= S_MUT;
          end
        end
        S_FINAL: begin
          if (jc == DW'(D - 1)) state <= S_DONE;
          else                  jc <= jc + 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE) && (state != S_DONE);
  assign done = (state == S_DONE);

  // rules of the internal handshakes
  a_lbl_fifo: assert property (@(posedge clk) disable iff (!rst_n) !(s_issue_d && lbl_full));
  a_one_src:  assert property (@(posedge clk) disable iff (!rst_n) !(init_ov && cx_ov));

endmodule
