// csfnn_pkg - types, constants and helper functions shared by the CSFNN
// signature recogniser and its DEA trainer.
//
// All arithmetic in the design uses IEEE 754-2008 binary16 (half precision):
// 1 sign bit, 5 exponent bits (bias 15) and 10 fraction bits, as the design
// calls for. This package holds:
//   * fp16_t and the constants used by several modules (0.1, 0.5, 0.9, 1.0);
//   * fp16_to_fix(), which turns a non-negative fp16 value into a rounded
//     fixed-point index (used to address the look-up tables);
//   * fp16_ge(), an ordered comparison of two fp16 values;
//   * real_to_fp16() / fp16_to_real(), used only at elaboration (to fill the
//     sigmoid and square-root tables and to form constants) and by the
//     testbenches as an independent reference.
// Rounding is to nearest, ties to even. Subnormal numbers are flushed to zero
// and overflow gives infinity; these are this design's choices.
package csfnn_pkg;

  typedef logic [15:0] fp16_t;

  localparam fp16_t FP16_ZERO = 16'h0000;
  localparam fp16_t FP16_ONE  = 16'h3C00;
  localparam fp16_t FP16_HALF = 16'h3800;
  localparam fp16_t FP16_0P1  = 16'h2E66;  // 0.1 (target level for "0")
  localparam fp16_t FP16_0P9  = 16'h3B33;  // 0.9 (target level for "1")
  localparam fp16_t FP16_INF  = 16'h7C00;

  // Network size of the main configuration: 10 inputs, 10 hidden neurons and
  // 3 output neurons; 130 weights + 100 centres + 10 angles = 240 genes.
  localparam int unsigned N_IN_DEF  = 10;
  localparam int unsigned N_HID_DEF = 10;
  localparam int unsigned N_OUT_DEF = 3;

  // Number of genes in a chromosome for a given network size.
  function automatic int unsigned n_genes(int unsigned n_in, int unsigned n_hid,
                                          int unsigned n_out);
    return n_hid * (n_in + n_out) + n_hid * n_in + n_hid;
  endfunction

  // Round |h| * 2^frac to the nearest integer (ties away from zero) and
  // saturate at max_idx. The sign of h is ignored; subnormals count as 0.
  function automatic logic [31:0] fp16_to_fix(fp16_t h, int unsigned frac,
                                              logic [31:0] max_idx);
    logic [4:0]  e;
    logic [10:0] m;
    int          sh;
    logic [63:0] v;
    e = h[14:10];
    m = {1'b1, h[9:0]};
    if (e == 5'd0) return 32'd0;
    // value * 2^frac = m * 2^(e - 25 + frac)
    sh = int'(e) - 25 + int'(frac);
    if (sh >= 0) begin
      if (sh > 21) return max_idx;
      v = 64'(m) << sh;
    end else if (sh < -12) begin
      v = 64'd0;
    end else begin
      v = (64'(m) + (64'd1 << (-sh - 1))) >> (-sh);
    end
    if (v > 64'(max_idx)) return max_idx;
    return v[31:0];
  endfunction

  // a >= b for finite fp16 values (+0 and -0 compare equal).
  function automatic logic fp16_ge(fp16_t a, fp16_t b);
    logic a_zero, b_zero;
    a_zero = (a[14:0] == 15'd0);
    b_zero = (b[14:0] == 15'd0);
    if (a_zero && b_zero) return 1'b1;
    if (a[15] != b[15]) return b[15];
    if (!a[15]) return a[14:0] >= b[14:0];
    return a[14:0] <= b[14:0];
  endfunction

  // ---- elaboration-time and testbench helpers (real arithmetic) ----------

  function automatic real fp16_to_real(fp16_t h);
    real r;
    int  e;
    e = int'(h[14:10]);
    if (e == 0) return 0.0;
    r = (1.0 + real'(h[9:0]) / 1024.0);
    if (e >= 15) for (int i = 15; i < e; i++) r = r * 2.0;
    else         for (int i = e; i < 15; i++) r = r / 2.0;
    return h[15] ? -r : r;
  endfunction

  // Round a real to binary16: nearest even, subnormal results flushed to
  // zero, overflow to infinity.
  function automatic fp16_t real_to_fp16(real r);
    logic s;
    real  a, frac;
    int   e;
    longint q;
    s = (r < 0.0);
    a = s ? -r : r;
    if (a == 0.0) return {s, 15'd0};
    e = 0;
    while (a >= 2.0) begin a = a / 2.0; e++; if (e > 40) return {s, 15'h7C00}; end
    while (a < 1.0)  begin a = a * 2.0; e--; if (e < -40) return {s, 15'd0}; end
    a    = a * 1024.0;
    q    = longint'($floor(a));
    frac = a - real'(q);
    if (frac > 0.5 || (frac == 0.5 && q[0])) q++;
    if (q == 2048) begin q = 1024; e++; end
    if (e < -14) return {s, 15'd0};
    if (e > 15)  return {s, 15'h7C00};
    return {s, 5'(e + 15), q[9:0]};
  endfunction

endpackage
