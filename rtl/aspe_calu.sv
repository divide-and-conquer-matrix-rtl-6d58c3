// aspe_calu: two-way SIMD complex arithmetic logic unit (CALU of ASPE B).
//
// Per lane it computes a + b, a - b, -a, conj(a), -conj(a) or passes a,
// selected by ctrl.op, with each component saturated to W bits. The
// complex subtractions of the divide-and-conquer inversion (S = C - R3,
// X = R1 - R4) run here.
//
// Timing: operands are taken in the issuing cycle; the registered result
// is visible CALU_LAT = 1 cycle later and holds until the next result.
// ce = 0 freezes the unit (core stall).
//
// From the document: a complex ALU with two SIMD lanes used for CSUB.
// This design's own choices: the operation list beyond add/subtract, the
// saturation and the single pipeline stage.
module aspe_calu
  import aspe_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       ce,
  input  calu_ctrl_t ctrl,
  input  simd_t      a,
  input  simd_t      b,
  output simd_t      y
);

  function automatic logic signed [W-1:0] sat(input logic signed [W+1:0] v);
    if (v > (W+2)'((1 <<< (W-1)) - 1))  return W'((1 <<< (W-1)) - 1);
    else if (v < -(W+2)'(1 <<< (W-1)))  return W'(-(1 <<< (W-1)));
    else                                return v[W-1:0];
  endfunction

  simd_t r;
  always_comb begin
    for (int l = 0; l < LANES; l++) begin
      logic signed [W+1:0] ar, ai, br, bi, rr, ri;
      ar = (W+2)'(a[l].re);
      ai = (W+2)'(a[l].im);
      br = (W+2)'(b[l].re);
      bi = (W+2)'(b[l].im);
      unique case (ctrl.op)
        CALU_ADD:     begin rr = ar + br; ri = ai + bi; end
        CALU_SUB:     begin rr = ar - br; ri = ai - bi; end
        CALU_NEG:     begin rr = -ar;     ri = -ai;     end
        CALU_CONJ:    begin rr = ar;      ri = -ai;     end
        CALU_NEGCONJ: begin rr = -ar;     ri = ai;      end
        default:      begin rr = ar;      ri = ai;      end
      endcase
      r[l].re = sat(rr);
      r[l].im = sat(ri);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)              y <= '0;
    else if (ce && ctrl.en)  y <= r;
  end

endmodule
