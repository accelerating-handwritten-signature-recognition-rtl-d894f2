// uart_rx - serial port receiver (8 data bits, no parity, 1 stop bit).
//
// The signature data set reaches the FPGA over a serial port. This receiver
// synchronises the line with two flip-flops, waits for a falling edge (start
// bit), checks the start bit in its middle, then samples the 8 data bits
// (least significant first) and the stop bit each CLKS_PER_BIT clocks later,
// in the middle of each bit. CLKS_PER_BIT = 1736 gives 115200 baud from the
// 200 MHz board clock. Frame format and baud rate are this design's choice.
//
// Interface: rxd (idle high) in; valid pulses for one clock with data when a
// byte with a good stop bit has arrived; frame_err pulses instead when the
// stop bit is low. Reset (active-low rst_n) returns to idle.
module uart_rx #(
  parameter int unsigned CLKS_PER_BIT = 1736
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rxd,
  output logic       valid,
  output logic [7:0] data,
  output logic       frame_err
);

  typedef enum logic [1:0] {R_IDLE, R_START, R_DATA, R_STOP} rstate_t;

  rstate_t state;
  logic [1:0]  sync;
  logic [31:0] cnt;
  logic [2:0]  bitn;
  logic [7:0]  shreg;
  logic        rx;

  assign rx = sync[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync      <= 2'b11;
      state     <= R_IDLE;
      cnt       <= '0;
      bitn      <= '0;
      shreg     <= '0;
      data      <= '0;
      valid     <= 1'b0;
      frame_err <= 1'b0;
    end else begin
      sync      <= {sync[0], rxd};
      valid     <= 1'b0;
      frame_err <= 1'b0;
      unique case (state)
        R_IDLE: if (!rx) begin
          state <= R_START;
          cnt   <= '0;
        end
        R_START: begin
          if (cnt == 32'(CLKS_PER_BIT / 2 - 1)) begin
            cnt   <= '0;
            bitn  <= '0;
            state <= rx ? R_IDLE : R_DATA;   // glitch: back to idle
          end else cnt <= cnt + 1;
        end
        R_DATA: begin
          if (cnt == 32'(CLKS_PER_BIT - 1)) begin
            cnt   <= '0;
            shreg <= {rx, shreg[7:1]};
            if (bitn == 3'd7) state <= R_STOP;
            bitn  <= bitn + 1'b1;
          end else cnt <= cnt + 1;
        end
        R_STOP: begin
          if (cnt == 32'(CLKS_PER_BIT - 1)) begin
            cnt   <= '0;
            state <= R_IDLE;
            if (rx) begin
              valid <= 1'b1;
              data  <= shreg;
            end else frame_err <= 1'b1;
          end else cnt <= cnt + 1;
        end
        default: state <= R_IDLE;
      endcase
    end
  end

endmodule
