// fp16_add - binary16 adder/subtractor (combinational).
//
// Computes y = a + b, or y = a - b when sub = 1, in IEEE 754 binary16 with
// round to nearest, ties to even. It is the core of the subtraction and adder
// blocks of the neuron datapath and of the DEA mutation and cost units.
//
// How it works: the operand of larger magnitude is chosen, the smaller
// significand is aligned to it in a frame with 13 extra low bits (bits shifted
// out beyond that are kept as a sticky bit), the two are added or subtracted,
// a priority encoder finds the leading one, and the result is normalised and
// rounded from the guard and sticky bits.
//
// Interface: a, b, sub in; y out, all in the same cycle (no registers).
// Design choices, not fixed by the design description: subnormal inputs
// count as zero and subnormal results are flushed to zero, overflow gives
// infinity, exact cancellation gives +0, and NaN/infinity inputs get no
// special treatment.
module fp16_add
  import csfnn_pkg::*;
(
  input  fp16_t a,
  input  fp16_t b,
  input  logic  sub,
  output fp16_t y
);

  logic        sa, sb, s_big, s_sml, eff_sub;
  logic [4:0]  ea, eb, e_big, e_sml;
  logic [10:0] ma, mb, m_big, m_sml;
  logic [4:0]  d;
  logic [23:0] f_big, f_sml;
  logic [24:0] r;
  int          p;
  logic [24:0] nrm;
  logic [11:0] mr;
  logic        g, st;
  int          er;

  always_comb begin
    sa = a[15];
    sb = b[15] ^ sub;
    ea = a[14:10];
    eb = b[14:10];
    ma = (ea == 5'd0) ? 11'd0 : {1'b1, a[9:0]};
    mb = (eb == 5'd0) ? 11'd0 : {1'b1, b[9:0]};
    if ({ea, ma} >= {eb, mb}) begin
      s_big = sa; e_big = ea; m_big = ma;
      s_sml = sb; e_sml = eb; m_sml = mb;
    end else begin
      s_big = sb; e_big = eb; m_big = mb;
      s_sml = sa; e_sml = ea; m_sml = ma;
    end
    eff_sub = s_big ^ s_sml;
    d       = e_big - e_sml;
    f_big   = {m_big, 13'd0};
    if (m_sml == 11'd0)
      f_sml = 24'd0;
    else if (d > 5'd13)
      f_sml = 24'd1;                       // only a sticky contribution
    else
      f_sml = {m_sml, 13'd0} >> d;         // exact: 13 guard bits suffice
    r = eff_sub ? ({1'b0, f_big} - {1'b0, f_sml}) : ({1'b0, f_big} + {1'b0, f_sml});

    // leading one position
    p = -1;
    for (int i = 0; i < 25; i++) if (r[i]) p = i;

    y   = 16'd0;
    nrm = '0;
    mr  = '0;
    g   = 1'b0;
    st  = 1'b0;
    er  = 0;
    if (p >= 0) begin
      nrm = r << (24 - p);
      mr  = {1'b0, nrm[24:14]};
      g   = nrm[13];
      st  = |nrm[12:0];
      if (g && (st || mr[0])) mr = mr + 12'd1;
      er  = int'(e_big) + p - 23;
      if (mr[11]) begin
        mr = mr >> 1;
        er = er + 1;
      end
      if (er <= 0)       y = {s_big, 15'd0};
      else if (er >= 31) y = {s_big, 15'h7C00};
      else               y = {s_big, er[4:0], mr[9:0]};
    end
  end

endmodule
