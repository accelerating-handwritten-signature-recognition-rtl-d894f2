// sig_recog_top - FPGA signature recognition system with on-chip training.
//
// Recognises the owner of a handwritten signature from a 10-element feature
// vector with a conic section function neural network (CSFNN, 10-10-3),
// trained on chip by differential evolution (DEA). The system runs in three
// phases, one after the other:
//   load      the data set (200 training + 56 test samples, features in
//             binary16, 3-bit class code) arrives as a byte stream over the
//             serial port (uart_rx) or the parallel host byte port and is
//             written into dataset_mem by dataset_loader;
//   train     dea_trainer evolves a population of 20 parameter sets for 150
//             generations; every candidate is written into param_store and
//             scored by streaming the training samples through csfnn;
//             finally the best set is left in param_store;
//   recognise recognizer streams all samples through the trained csfnn,
//             reports each class decision on res_* and counts the correct
//             ones for the training and the test part.
// Training starts by itself when the last sample has been loaded, and
// recognition when training ends. The csfnn, the data set memory and the
// parameter storage are shared by the trainer and the recogniser; the phase
// register selects which of them drives the network. The 200 MHz clock comes
// from the board. The phase sequencing and the host byte port are this
// design's choices.
//
// Interface: clk, rst_n (active low); uart_rxd; host_byte_valid/host_byte
// (bytes in the same format as the serial stream). Status: phase, n_loaded,
// generation, best_cost (training cost eps_av of the best chromosome),
// uart_frame_err. Results: res_valid, res_idx, res_cls, res_label, res_ok,
// train_correct, test_correct, recog_done.
module sig_recog_top
  import csfnn_pkg::*;
#(
  parameter int unsigned N_IN         = 10,
  parameter int unsigned N_HID        = 10,
  parameter int unsigned N_OUT        = 3,
  parameter int unsigned NP           = 20,
  parameter int unsigned G_MAX        = 150,
  parameter int unsigned N_TRAIN      = 200,
  parameter int unsigned N_TEST       = 56,
  parameter int unsigned CLKS_PER_BIT = 1736,
  parameter logic [31:0] SEED         = 32'h1ACE_B00C,
  localparam int unsigned DS_DEPTH    = 1 << $clog2(N_TRAIN + N_TEST),
  localparam int unsigned AW          = $clog2(DS_DEPTH),
  localparam int unsigned D           = N_HID * (2 * N_IN + N_OUT) + N_HID
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             uart_rxd,
  input  logic             host_byte_valid,
  input  logic [7:0]       host_byte,
  output logic [1:0]       phase,
  output logic [15:0]      n_loaded,
  output logic             uart_frame_err,
  output logic [15:0]      generation,
  output fp16_t            best_cost,
  output logic             res_valid,
  output logic [AW-1:0]    res_idx,
  output logic [N_OUT-1:0] res_cls,
  output logic [N_OUT-1:0] res_label,
  output logic             res_ok,
  output logic [15:0]      train_correct,
  output logic [15:0]      test_correct,
  output logic             recog_done
);

  typedef enum logic [1:0] {P_LOAD, P_TRAIN, P_RECOG, P_DONE} phase_t;
  phase_t ph;
  assign phase = ph;

  // ---- serial port and loader ----------------------------------------------
  logic       rx_valid;
  logic [7:0] rx_data;
  uart_rx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_uart (
    .clk(clk), .rst_n(rst_n), .rxd(uart_rxd), .valid(rx_valid), .data(rx_data),
    .frame_err(uart_frame_err));

  logic             ld_we, load_done;
  logic [AW-1:0]    ld_waddr;
  fp16_t            ld_wx [N_IN];
  logic [N_OUT-1:0] ld_wlabel;
  dataset_loader #(.N_IN(N_IN), .K(N_OUT), .DEPTH(DS_DEPTH), .N_TOTAL(N_TRAIN + N_TEST)) u_loader (
    .clk(clk), .rst_n(rst_n), .byte_valid(rx_valid || host_byte_valid),
    .byte_data(rx_valid ? rx_data : host_byte), .we(ld_we), .waddr(ld_waddr), .wx(ld_wx),
    .wlabel(ld_wlabel), .n_loaded(n_loaded), .load_done(load_done));

  // ---- data set memory --------------------------------------------------------
  logic [AW-1:0]    ds_raddr, tr_raddr, rc_raddr;
  fp16_t            ds_x [N_IN];
  logic [N_OUT-1:0] ds_label;
  dataset_mem #(.N_IN(N_IN), .K(N_OUT), .DEPTH(DS_DEPTH)) u_ds (
    .clk(clk), .we(ld_we), .waddr(ld_waddr), .wx(ld_wx), .wlabel(ld_wlabel),
    .raddr(ds_raddr), .rx(ds_x), .rlabel(ds_label));
  assign ds_raddr = (ph == P_TRAIN) ? tr_raddr : rc_raddr;

  // ---- parameter storage and network ------------------------------------------
  logic                 ps_we;
  logic [$clog2(D)-1:0] ps_waddr;
  fp16_t                ps_wdata;
  fp16_t                genes [D];
  param_store #(.D(D)) u_ps (
    .clk(clk), .rst_n(rst_n), .we(ps_we), .waddr(ps_waddr), .wdata(ps_wdata), .genes(genes));

  logic             nn_valid, tr_nn_valid, rc_nn_valid, nn_out_valid;
  fp16_t            nn_x [N_IN], tr_nn_x [N_IN], rc_nn_x [N_IN];
  fp16_t            nn_y [N_OUT], nn_level [N_OUT];
  logic [N_OUT-1:0] nn_cls;
  assign nn_valid = (ph == P_TRAIN) ? tr_nn_valid : rc_nn_valid;
  assign nn_x     = (ph == P_TRAIN) ? tr_nn_x : rc_nn_x;

  csfnn #(.N_IN(N_IN), .N_HID(N_HID), .N_OUT(N_OUT)) u_nn (
    .clk(clk), .rst_n(rst_n), .in_valid(nn_valid), .x(nn_x), .genes(genes),
    .out_valid(nn_out_valid), .y(nn_y), .cls(nn_cls), .level(nn_level));

  // ---- DEA trainer ----------------------------------------------------------------
  logic        tr_start, tr_busy, tr_done;
  logic [31:0] n_evals, n_replace, n_reject, n_retry, n_best_upd;
  dea_trainer #(.N_IN(N_IN), .N_HID(N_HID), .N_OUT(N_OUT), .NP(NP), .G_MAX(G_MAX),
                .N_TRAIN(N_TRAIN), .DS_DEPTH(DS_DEPTH), .SEED(SEED)) u_trainer (
    .clk(clk), .rst_n(rst_n), .start(tr_start), .busy(tr_busy), .done(tr_done),
    .ds_raddr(tr_raddr), .ds_x(ds_x), .ds_label(ds_label),
    .nn_valid(tr_nn_valid), .nn_x(tr_nn_x), .nn_out_valid(nn_out_valid && ph == P_TRAIN),
    .nn_y(nn_y), .ps_we(ps_we), .ps_waddr(ps_waddr), .ps_wdata(ps_wdata),
    .generation(generation), .best_cost(best_cost), .n_evals(n_evals),
    .n_replace(n_replace), .n_reject(n_reject), .n_retry(n_retry), .n_best_upd(n_best_upd));

  // ---- recogniser -------------------------------------------------------------------
  logic rc_start, rc_busy, rc_done;
  recognizer #(.N_IN(N_IN), .K(N_OUT), .N_TRAIN(N_TRAIN), .N_TEST(N_TEST),
               .DS_DEPTH(DS_DEPTH)) u_recog (
    .clk(clk), .rst_n(rst_n), .start(rc_start), .busy(rc_busy), .done(rc_done),
    .ds_raddr(rc_raddr), .ds_x(ds_x), .ds_label(ds_label),
    .nn_valid(rc_nn_valid), .nn_x(rc_nn_x), .nn_out_valid(nn_out_valid && ph == P_RECOG),
    .nn_cls(nn_cls), .res_valid(res_valid), .res_idx(res_idx), .res_cls(res_cls),
    .res_label(res_label), .res_ok(res_ok), .train_correct(train_correct),
    .test_correct(test_correct));

  // ---- phase sequencing -----------------------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ph       <= P_LOAD;
      tr_start <= 1'b0;
      rc_start <= 1'b0;
    end else begin
      tr_start <= 1'b0;
      rc_start <= 1'b0;
      unique case (ph)
        P_LOAD:  if (load_done) begin ph <= P_TRAIN; tr_start <= 1'b1; end
        P_TRAIN: if (tr_done && !tr_start) begin ph <= P_RECOG; rc_start <= 1'b1; end
        P_RECOG: if (rc_done && !rc_start) ph <= P_DONE;
        default: ;
      endcase
    end
  end
  assign recog_done = (ph == P_DONE);

endmodule
