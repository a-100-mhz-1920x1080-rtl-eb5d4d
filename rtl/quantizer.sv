// quantizer: scalar quantiser for four coefficients in parallel, combinational.
//
// Each coefficient is divided by the step of its band (DC, low-pass or
// high-pass, as in the paper's quantisation figure) with rounding to nearest,
// sign and magnitude handled separately:  q = sign(x) * ((|x| + Q/2) / Q).
// The paper calls the quantiser "scalar Q" and evaluates Q = 5 and Q = 70; it
// gives no rounding rule, the one above is this design's choice. The step is
// used directly as the divisor; a step of 0 is treated as 1.
//
// Interface: x[4] coefficients with band[4] tags, qp_dc/qp_lp/qp_hp steps,
// q[4] out. No clock.
//
// Lint note: the quotient is computed one bit wider than a coefficient so the
// rounding sum cannot overflow; its top bit is always 0 and is dropped.
module quantizer
  import jxr_pkg::*;
(
  input  coef_t      x    [4],
  input  band_e      band [4],
  input  logic [7:0] qp_dc,
  input  logic [7:0] qp_lp,
  input  logic [7:0] qp_hp,
  output coef_t      q    [4]
);
  always_comb begin
    for (int i = 0; i < 4; i++) begin
      logic [7:0] s;
      logic [COEF_W:0] m, d;
      unique case (band[i])
        BAND_DC: s = qp_dc;
        BAND_LP: s = qp_lp;
        default: s = qp_hp;
      endcase
      if (s == 8'd0) s = 8'd1;
      m = {1'b0, absval(x[i])} + (COEF_W+1)'(s >> 1);
      d = m / (COEF_W+1)'(s);
      q[i] = (x[i] < 0) ? -coef_t'(d) : coef_t'(d);
    end
  end
endmodule
