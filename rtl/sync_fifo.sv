// sync_fifo - small synchronous first-in first-out buffer.
//
// Carries the class label of each sample alongside the network pipeline, so
// that it meets the network's outputs when they emerge. Writing to a full
// FIFO or reading an empty one is a usage error (flagged by assertions).
//
// Interface: push/din, pop; dout shows the oldest entry (valid while !empty).
// Reset (active-low rst_n) empties it.
module sync_fifo #(
  parameter int unsigned W     = 3,
  parameter int unsigned DEPTH = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         push,
  input  logic [W-1:0] din,
  input  logic         pop,
  output logic [W-1:0] dout,
  output logic         empty,
  output logic         full
);

  localparam int unsigned AW = $clog2(DEPTH);
  logic [W-1:0] mem [DEPTH];
  logic [AW:0]  wp, rp;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0;
      rp <= '0;
    end else begin
      if (push) wp <= wp + 1'b1;
      if (pop)  rp <= rp + 1'b1;
    end
  end

  always_ff @(posedge clk) if (push) mem[wp[AW-1:0]] <= din;

  assign dout  = mem[rp[AW-1:0]];
  assign empty = (wp == rp);
  assign full  = (wp[AW-1:0] == rp[AW-1:0]) && (wp[AW] != rp[AW]);

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) !(push && full && !pop));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(pop && empty));

endmodule
