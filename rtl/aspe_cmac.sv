// aspe_cmac: two-way SIMD complex multiply-and-accumulate unit (CMAC0 and
// CMAC1 of ASPE B).
//
// Each lane computes p = a' * b' where a' is a or conj(a) and b' is b or
// conj(b), then acc = (ctrl.acc ? acc : 0) + (ctrl.neg ? -p : p). The
// accumulator keeps full precision (ACC_W bits per component); the output
// register holds acc rounded to nearest (half up) by FRAC bits and
// saturated to W bits. This one unit thus covers the CMUL, CMAC and the
// negated products (-r3*b, -R2^H Z) of the inversion algorithms.
//
// Timing: operands are taken from the data network in the cycle the
// control word has en = 1; stage 1 registers them, stage 2 multiplies,
// accumulates and registers the result, which is visible CMAC_LAT = 2
// cycles after issue and holds until the next result. Back-to-back
// accumulating operations are allowed every cycle. ce = 0 freezes the unit
// (core stall).
//
// From the document: complex MAC, 16-bit complex data, two SIMD lanes.
// This design's own choices: the conjugate/negate options, the rounding,
// the saturation and the two-stage pipeline (the document's stage count
// is not available).
module aspe_cmac
  import aspe_pkg::*;
#(
  parameter int ACC_W = 2*W + 4
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       ce,
  input  cmac_ctrl_t ctrl,
  input  simd_t      a,
  input  simd_t      b,
  output simd_t      y
);

  // stage 1: registered operands and options
  logic        v1;
  cmac_ctrl_t  c1;
  simd_t       a1, b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0;
      c1 <= '0;
      a1 <= '0;
      b1 <= '0;
    end else if (ce) begin
      v1 <= ctrl.en;
      if (ctrl.en) begin
        c1 <= ctrl;
        a1 <= a;
        b1 <= b;
      end
    end
  end

  // stage 2: product, accumulation, rounding
  logic signed [ACC_W-1:0] acc_re [LANES], acc_im [LANES];
  logic signed [ACC_W-1:0] nxt_re [LANES], nxt_im [LANES];
  simd_t                   y_nxt;

  function automatic logic signed [W-1:0] round_sat(input logic signed [ACC_W-1:0] v);
    logic signed [ACC_W-1:0] r;
    r = (v + (ACC_W'(1) <<< (FRAC-1))) >>> FRAC;
    if (r > ACC_W'((1 <<< (W-1)) - 1))       return W'((1 <<< (W-1)) - 1);
    else if (r < -ACC_W'(1 <<< (W-1)))       return W'(-(1 <<< (W-1)));
    else                                     return r[W-1:0];
  endfunction

  always_comb begin
    for (int l = 0; l < LANES; l++) begin
      // operands widened to ACC_W before any arithmetic
      logic signed [ACC_W-1:0]  ar, ai, br, bi;
      logic signed [ACC_W-1:0]  pr, pi;
      ar = ACC_W'(a1[l].re);
      ai = ACC_W'(a1[l].im);
      br = ACC_W'(b1[l].re);
      bi = ACC_W'(b1[l].im);
      if (c1.conj_a) ai = -ai;
      if (c1.conj_b) bi = -bi;
      pr = ar * br - ai * bi;
      pi = ar * bi + ai * br;
      if (c1.neg) begin
        pr = -pr;
        pi = -pi;
      end
      nxt_re[l] = (c1.acc ? acc_re[l] : '0) + pr;
      nxt_im[l] = (c1.acc ? acc_im[l] : '0) + pi;
      y_nxt[l].re = round_sat(nxt_re[l]);
      y_nxt[l].im = round_sat(nxt_im[l]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int l = 0; l < LANES; l++) begin
        acc_re[l] <= '0;
        acc_im[l] <= '0;
      end
      y <= '0;
    end else if (ce && v1) begin
      for (int l = 0; l < LANES; l++) begin
        acc_re[l] <= nxt_re[l];
        acc_im[l] <= nxt_im[l];
      end
      y <= y_nxt;
    end
  end

endmodule
