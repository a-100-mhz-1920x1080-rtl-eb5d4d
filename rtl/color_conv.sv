// color_conv: reversible RGB -> YUV colour conversion, one pixel per clock.
//
// The encoder's first operation (the paper's "colour conversion"). The
// conversion is a three-step integer lifting, so it loses nothing:
//   V  = B - R
//   t  = R - G + ((V + 1) >>> 1)      U = -t
//   Y  = G + (t >>> 1) - 128          (level shift to a signed range)
// The paper names the colour conversion but prints no equations; the lifting
// above is the reversible YUV transform used by JPEG XR, and the -128 level
// shift is this design's choice.
//
// Interface: in_valid/r/g/b in, out_valid/y/u/v out, one register stage
// (latency 1 cycle, throughput 1 pixel per cycle). Synchronous active-low reset
// clears out_valid.
module color_conv
  import jxr_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  logic [7:0] r,
  input  logic [7:0] g,
  input  logic [7:0] b,
  output logic       out_valid,
  output coef_t      y,
  output coef_t      u,
  output coef_t      v
);
  coef_t rs, gs, bs, vv, tt, yy;

  always_comb begin
    rs = coef_t'({1'b0, r});
    gs = coef_t'({1'b0, g});
    bs = coef_t'({1'b0, b});
    vv = bs - rs;
    tt = rs - gs + ((vv + coef_t'(1)) >>> 1);
    yy = gs + (tt >>> 1) - coef_t'(128);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      y <= '0; u <= '0; v <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        y <= yy;
        u <= -tt;
        v <= vv;
      end
    end
  end
endmodule
