// dataset_loader - turns the received byte stream into data set samples.
//
// Each sample arrives as 2 N_IN + 1 bytes: the N_IN binary16 features, each
// low byte first, then one byte whose low K bits are the class code. When a
// sample is complete it is written into the data set memory at the next
// address; after N_TOTAL samples (200 training then 56 test samples in the
// design's data set) load_done rises and further bytes are ignored. The
// byte format is this design's choice.
//
// Interface: byte_valid/byte_data in (from the serial receiver or a host
// port); we, waddr, wx, wlabel out to dataset_mem; n_loaded and load_done
// status. Reset (active-low rst_n) starts a new load at address 0.
module dataset_loader
  import csfnn_pkg::*;
#(
  parameter int unsigned N_IN    = 10,
  parameter int unsigned K       = 3,
  parameter int unsigned DEPTH   = 256,
  parameter int unsigned N_TOTAL = 256
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     byte_valid,
  input  logic [7:0]               byte_data,
  output logic                     we,
  output logic [$clog2(DEPTH)-1:0] waddr,
  output fp16_t                    wx     [N_IN],
  output logic [K-1:0]             wlabel,
  output logic [15:0]              n_loaded,
  output logic                     load_done
);

  localparam int unsigned NB = 2 * N_IN + 1;

  localparam int unsigned FW = (N_IN <= 1) ? 1 : $clog2(N_IN);

  logic [$clog2(NB)-1:0] bc;
  logic [FW-1:0]         fi;
  assign fi = FW'(bc >> 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bc        <= '0;
      we        <= 1'b0;
      waddr     <= '0;
      wlabel    <= '0;
      n_loaded  <= '0;
      load_done <= 1'b0;
      for (int i = 0; i < int'(N_IN); i++) wx[i] <= FP16_ZERO;
    end else begin
      if (we) begin
        we       <= 1'b0;
        waddr    <= waddr + 1'b1;
        n_loaded <= n_loaded + 1'b1;
        if (int'(n_loaded) + 1 == int'(N_TOTAL)) load_done <= 1'b1;
      end
      if (byte_valid && !load_done && !we) begin
        if (int'(bc) == int'(NB) - 1) begin
          wlabel <= byte_data[K-1:0];
          we     <= 1'b1;
          bc     <= '0;
        end else begin
          if (bc[0]) wx[fi][15:8] <= byte_data;
          else       wx[fi][7:0]  <= byte_data;
          bc <= bc + 1'b1;
        end
      end
    end
  end

endmodule
