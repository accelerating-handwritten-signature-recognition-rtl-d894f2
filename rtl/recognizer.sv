// recognizer - recognition phase: signature sequence and performance count.
//
// After training, streams the stored samples (the N_TRAIN training samples,
// then the N_TEST test samples) through the trained CSFNN, one per clock,
// and compares each class code the output control unit produces with the
// sample's label. Every sample yields one result on the res_* port, the
// recognition results; the numbers of correctly recognised training and
// test samples are counted (180 of 200 and 46 of 56 in the design's
// hardware run). Running the training samples through as well is this
// design's choice, made so that both accuracies are measured on chip.
//
// Interface: start (pulse); busy/done. Data set read port ds_* (one-cycle
// latency), network port nn_* (class bits back in order). Results: res_valid
// with res_idx, res_cls, res_label, res_ok; counters train_correct and
// test_correct are cleared on start. Reset is active-low rst_n.
// The sample words nn_x are the data memory's registered outputs passed
// straight on; the recogniser only controls the read address and nn_valid.
module recognizer
  import csfnn_pkg::*;
#(
  parameter int unsigned N_IN     = 10,
  parameter int unsigned K        = 3,
  parameter int unsigned N_TRAIN  = 200,
  parameter int unsigned N_TEST   = 56,
  parameter int unsigned DS_DEPTH = 256,
  localparam int unsigned AW      = $clog2(DS_DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  output logic          busy,
  output logic          done,
  output logic [AW-1:0] ds_raddr,
  input  fp16_t         ds_x     [N_IN],
  input  logic [K-1:0]  ds_label,
  output logic          nn_valid,
  output fp16_t         nn_x     [N_IN],
  input  logic          nn_out_valid,
  input  logic [K-1:0]  nn_cls,
  output logic          res_valid,
  output logic [AW-1:0] res_idx,
  output logic [K-1:0]  res_cls,
  output logic [K-1:0]  res_label,
  output logic          res_ok,
  output logic [15:0]   train_correct,
  output logic [15:0]   test_correct
);

  localparam int unsigned N_ALL = N_TRAIN + N_TEST;

  logic          running, issue, issue_d;
  logic [15:0]   sc, n_res;
  logic [AW-1:0] f_idx;
  logic [K-1:0]  f_lbl;
  logic          f_empty, f_full;
  logic [AW-1:0] ds_raddr_d;

  assign issue    = running && (int'(sc) < int'(N_ALL));
  assign ds_raddr = AW'(sc);
  assign nn_valid = issue_d;
  assign nn_x     = ds_x;

  sync_fifo #(.W(AW + K), .DEPTH(32)) u_fifo (
    .clk(clk), .rst_n(rst_n), .push(issue_d), .din({ds_raddr_d, ds_label}),
    .pop(nn_out_valid && running), .dout({f_idx, f_lbl}), .empty(f_empty), .full(f_full));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running       <= 1'b0;
      done          <= 1'b0;
      issue_d       <= 1'b0;
      ds_raddr_d    <= '0;
      sc            <= '0;
      n_res         <= '0;
      res_valid     <= 1'b0;
      res_idx       <= '0;
      res_cls       <= '0;
      res_label     <= '0;
      res_ok        <= 1'b0;
      train_correct <= '0;
      test_correct  <= '0;
    end else begin
      issue_d    <= issue;
      ds_raddr_d <= ds_raddr;
      res_valid  <= 1'b0;
      if (start) begin
        running       <= 1'b1;
        done          <= 1'b0;
        sc            <= '0;
        n_res         <= '0;
        train_correct <= '0;
        test_correct  <= '0;
      end else if (running) begin
        if (issue) sc <= sc + 1'b1;
        if (nn_out_valid) begin
          res_valid <= 1'b1;
          res_idx   <= f_idx;
          res_cls   <= nn_cls;
          res_label <= f_lbl;
          res_ok    <= (nn_cls == f_lbl);
          if (nn_cls == f_lbl) begin
            if (int'(f_idx) < int'(N_TRAIN)) train_correct <= train_correct + 1'b1;
            else                             test_correct  <= test_correct + 1'b1;
          end
          n_res <= n_res + 1'b1;
          if (int'(n_res) + 1 == int'(N_ALL)) begin
            running <= 1'b0;
            done    <= 1'b1;
          end
        end
      end
    end
  end

  assign busy = running;

  a_fifo_ok: assert property (@(posedge clk) disable iff (!rst_n) !(issue_d && f_full));

endmodule
