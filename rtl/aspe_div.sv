// aspe_div: two-way SIMD real-valued divider unit (DIV of ASPE B). It
// computes the real reciprocal 1/x used by the inversion algorithms
// (1/det of a 2x2 block, 1/s of a scalar Schur complement).
//
// Each lane takes the real part x of its data-network word, read as a
// fixed-point number with FRAC fractional bits, and returns
// q = floor(2^(2*FRAC) / x), i.e. 1/x in the same format, with the
// imaginary part zero. The operand of an HPD inversion is positive; x <= 0
// and quotients above the largest W-bit value saturate to that value.
//
// Timing: fully pipelined, one new operation per cycle. The result is
// visible LAT cycles after the issuing instruction and holds until the
// next result. ce = 0 freezes the pipeline (core stall).
//
// From the document: a real-valued divider with two SIMD lanes computing
// 1/x. This design's own choices: the quotient is formed by a plain
// divider followed by LAT-1 delay stages that synthesis can retime (the
// document's stage count is not available), and the saturation rule.
module aspe_div
  import aspe_pkg::*;
#(
  parameter int LAT = DIV_LAT
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      ce,
  input  div_ctrl_t ctrl,
  input  simd_t     x,
  output simd_t     y
);

  localparam int NUM_W = 2*FRAC + 2;
  localparam logic [NUM_W-1:0] ONE2 = NUM_W'(1) << (2*FRAC);
  localparam logic [NUM_W-1:0] QMAX = NUM_W'((1 << (W-1)) - 1);

  // stage 0: registered operands
  logic                         v0;
  logic signed [W-1:0]          x0 [LANES];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v0 <= 1'b0;
      for (int l = 0; l < LANES; l++) x0[l] <= '0;
    end else if (ce) begin
      v0 <= ctrl.en;
      if (ctrl.en)
        for (int l = 0; l < LANES; l++) x0[l] <= x[l].re;
    end
  end

  // reciprocal of the registered operands
  simd_t q;
  always_comb begin
    for (int l = 0; l < LANES; l++) begin
      logic [NUM_W-1:0] quo;
      if (x0[l] <= 0) quo = QMAX;
      else            quo = ONE2 / NUM_W'(unsigned'(x0[l]));
      if (quo > QMAX) quo = QMAX;
      q[l].re = quo[W-1:0];
      q[l].im = '0;
    end
  end

  // LAT-1 result stages; the last one is the output register
  logic  vp [LAT-1];
  simd_t dp [LAT-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < LAT-1; s++) begin
        vp[s] <= 1'b0;
        dp[s] <= '0;
      end
    end else if (ce) begin
      vp[0] <= v0;
      if (v0) dp[0] <= q;
      for (int s = 1; s < LAT-1; s++) begin
        vp[s] <= vp[s-1];
        // stages only load valid results, so the output holds between them
        if (vp[s-1]) dp[s] <= dp[s-1];
      end
    end
  end

  assign y = dp[LAT-2];

  initial assert (LAT >= 2) else $error("aspe_div: LAT must be at least 2");

endmodule
