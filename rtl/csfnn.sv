// csfnn - feed-forward conic section function neural network.
//
// A layered, fully connected network of N_IN inputs, N_HID hidden CSF
// neurons and N_OUT output neurons (10-10-3 in the main configuration). All
// neurons are the same primary_neuron: hidden neurons get their centres and
// cos(omega) from the parameter storage, output neurons get zero for both and
// so compute f(sum_j w_jk a_j). The stages are
//   input control unit  - registers the sample and hands it to every hidden
//                         neuron at once (1 cycle)
//   hidden layer        - N_HID primary neurons in parallel (6+ceil(log2 N_IN))
//   output layer        - N_OUT primary neurons in parallel (6+ceil(log2 N_HID))
//   output control unit - thresholds the outputs at 0.5 (1 cycle)
// giving LAT = 22 cycles for 10-10-3. Every stage is pipelined, so a new
// sample may enter each cycle.
//
// Interface: in_valid/x[N_IN] in; genes[D] (see param_store for the layout)
// must be stable while samples are in flight. out_valid rises LAT cycles
// after in_valid with y[N_OUT] (network outputs a_k, binary16), cls (class
// bits, 1 where a_k >= 0.5) and level[N_OUT] (0.1/0.9).
module csfnn
  import csfnn_pkg::*;
#(
  parameter int unsigned N_IN  = 10,
  parameter int unsigned N_HID = 10,
  parameter int unsigned N_OUT = 3,
  localparam int unsigned D    = N_HID * (2 * N_IN + N_OUT) + N_HID
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  fp16_t            x     [N_IN],
  input  fp16_t            genes [D],
  output logic             out_valid,
  output fp16_t            y     [N_OUT],
  output logic [N_OUT-1:0] cls,
  output fp16_t            level [N_OUT]
);

  localparam int unsigned G_WHO = N_HID * N_IN;
  localparam int unsigned G_C   = N_HID * (N_IN + N_OUT);
  localparam int unsigned G_COS = N_HID * (2 * N_IN + N_OUT);

  // ---- input control unit ------------------------------------------------
  logic  xv;
  fp16_t xr [N_IN];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) xv <= 1'b0;
    else        xv <= in_valid;
  end
  always_ff @(posedge clk) xr <= x;

  // ---- hidden layer --------------------------------------------------------
  fp16_t a_hid [N_HID];
  logic  hv    [N_HID];
  for (genvar j = 0; j < int'(N_HID); j++) begin : g_hid
    fp16_t cj [N_IN], wj [N_IN];
    for (genvar i = 0; i < int'(N_IN); i++) begin : g_in
      assign wj[i] = genes[j*N_IN + i];
      assign cj[i] = genes[G_C + j*N_IN + i];
    end
    primary_neuron #(.N(N_IN)) u_neuron (
      .clk(clk), .rst_n(rst_n), .in_valid(xv), .x(xr), .c(cj), .w(wj),
      .cos_w(genes[G_COS + j]), .out_valid(hv[j]), .u(), .a(a_hid[j]));
  end

  // ---- output layer (primary neurons with c = 0, cos(omega) = 0) ------------
  fp16_t a_out [N_OUT];
  logic  ov    [N_OUT];
  fp16_t zeros [N_HID];
  always_comb for (int j = 0; j < int'(N_HID); j++) zeros[j] = FP16_ZERO;
  for (genvar k = 0; k < int'(N_OUT); k++) begin : g_out
    fp16_t wk [N_HID];
    for (genvar j = 0; j < int'(N_HID); j++) begin : g_h
      assign wk[j] = genes[G_WHO + k*N_HID + j];
    end
    primary_neuron #(.N(N_HID)) u_neuron (
      .clk(clk), .rst_n(rst_n), .in_valid(hv[0]), .x(a_hid), .c(zeros), .w(wk),
      .cos_w(FP16_ZERO), .out_valid(ov[k]), .u(), .a(a_out[k]));
  end

  // ---- output control unit -------------------------------------------------
  output_control #(.K(N_OUT)) u_octl (
    .clk(clk), .rst_n(rst_n), .in_valid(ov[0]), .y(a_out),
    .out_valid(out_valid), .cls(cls), .level(level));

  always_ff @(posedge clk) y <= a_out;

endmodule
