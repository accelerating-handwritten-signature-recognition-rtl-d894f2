// sqrt_lut - square root by a segmented look-up table over [0, 5].
//
// Gives the Euclidean distance term sqrt(sum (x_i - c_i)^2) of the conic
// section neuron. The design calls for a table over [0, 5] split into
// segments of different resolution; the segmentation here is this design's
// own. The square root is steepest near zero, so the grid is finest there:
//   segment 0: s in [0, 1/16)   step 2^-16   entries     0 .. 4095
//   segment 1: s in [1/16, 1)   step 2^-12   entries  4096 .. 7935
//   segment 2: s in [1, 5]      step 2^-10   entries  7936 .. 12032
// Entry k of a segment with step 2^-F starting at index base and value s0
// holds sqrt(s0 + (k - base) 2^-F), rounded to binary16. Arguments above 5
// give sqrt(5). The sign of s is ignored (s is a sum of squares). The
// design's table has 11882 samples; this grid needs 12033.
//
// Interface: clk; s (binary16) in; r (binary16) out one clock cycle later.
module sqrt_lut
  import csfnn_pkg::*;
#(
  parameter int unsigned DEPTH = 12033
) (
  input  logic  clk,
  input  fp16_t s,
  output fp16_t r
);

  fp16_t rom [DEPTH];

  initial begin
    for (int i = 0; i < int'(DEPTH); i++) begin
      real v;
      if (i < 4096)      v = real'(i) / 65536.0;
      else if (i < 7936) v = 0.0625 + real'(i - 4096) / 4096.0;
      else               v = 1.0 + real'(i - 7936) / 1024.0;
      rom[i] = real_to_fp16($sqrt(v));
    end
  end

  logic [31:0] idx;
  always_comb begin
    logic [31:0] f;
    if (s[14:10] < 5'd11) begin                 // s < 1/16
      f   = fp16_to_fix(s, 16, 32'd4096);
      idx = f;
    end else if (s[14:10] < 5'd15) begin        // 1/16 <= s < 1
      f   = fp16_to_fix(s, 12, 32'd4096);
      idx = f + 32'd3840;
    end else begin                              // s >= 1
      f   = fp16_to_fix(s, 10, 32'(DEPTH - 1 - 6912));
      idx = f + 32'd6912;
    end
  end

  always_ff @(posedge clk) r <= rom[idx];

endmodule
