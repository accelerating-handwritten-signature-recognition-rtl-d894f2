// fp16_mul - binary16 multiplier (combinational).
//
// Computes y = a * b in IEEE 754 binary16, round to nearest, ties to even.
// It is the multiplier block of the neuron datapath and, with both operands
// tied together, its squaring block; the DEA uses it for the mutation scale
// factor and the cost unit for squared errors.
//
// How it works: the 11-bit significands (hidden one included) give a 22-bit
// product; a carry into bit 21 shifts it one place and bumps the exponent;
// the top 11 bits are rounded from the guard and sticky bits below them.
//
// Interface: a, b in; y out in the same cycle.
// Design choices: subnormal inputs count as zero, subnormal results are
// flushed to signed zero, overflow gives infinity, no NaN handling.
module fp16_mul
  import csfnn_pkg::*;
(
  input  fp16_t a,
  input  fp16_t b,
  output fp16_t y
);

  logic        s;
  logic [10:0] ma, mb;
  logic [21:0] pr;
  logic [11:0] mr;
  logic        g, st;
  int          er;

  always_comb begin
    s  = a[15] ^ b[15];
    ma = {1'b1, a[9:0]};
    mb = {1'b1, b[9:0]};
    pr = 22'(ma) * 22'(mb);
    er = int'(a[14:10]) + int'(b[14:10]) - 15;
    if (pr[21]) begin
      mr = {1'b0, pr[21:11]};
      g  = pr[10];
      st = |pr[9:0];
      er = er + 1;
    end else begin
      mr = {1'b0, pr[20:10]};
      g  = pr[9];
      st = |pr[8:0];
    end
    if (g && (st || mr[0])) mr = mr + 12'd1;
    if (mr[11]) begin
      mr = mr >> 1;
      er = er + 1;
    end
    if (a[14:10] == 5'd0 || b[14:10] == 5'd0 || er <= 0) y = {s, 15'd0};
    else if (er >= 31)                                   y = {s, 15'h7C00};
    else                                                 y = {s, er[4:0], mr[9:0]};
  end

endmodule
