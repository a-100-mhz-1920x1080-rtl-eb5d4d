// prefilter4x4: one-level overlap pre-filter for one 4x4 block, combinational.
//
// The pre-filter runs on 4x4 blocks that straddle the edges of the PCT block
// grid (offset by two samples), spreading energy across the edge before the
// transform so the decoder's post-filter can remove blocking. The paper selects
// the one-level overlap mode as the main configuration but gives no filter
// coefficients. This design uses a separable, exactly invertible lifting
// filter of the usual butterfly-scale-butterfly shape, applied to the four rows
// and then the four columns. For a 1-D quartet (a,b,c,d) whose block edge lies
// between b and c:
//   butterfly : d -= a; a += d>>>1; c -= b; b += c>>>1
//   scale     : d += (3c+4)>>>3; c -= (3d+8)>>>4
//   butterfly : b -= c>>>1; c += b; a -= d>>>1; d += a
// The coefficients are this design's own; a flat block passes unchanged.
//
// Interface: x[16] in, y[16] out, index = 4*row + column. No clock.
module prefilter4x4
  import jxr_pkg::*;
(
  input  coef_t x [16],
  output coef_t y [16]
);
  function automatic quad_t pf1d(input quad_t q);
    coef_t a, b, c, d;
    {a, b, c, d} = q;
    d = d - a;
    a = a + (d >>> 1);
    c = c - b;
    b = b + (c >>> 1);
    d = d + ((coef_t'(3) * c + coef_t'(4)) >>> 3);
    c = c - ((coef_t'(3) * d + coef_t'(8)) >>> 4);
    b = b - (c >>> 1);
    c = c + b;
    a = a - (d >>> 1);
    d = d + a;
    return {a, b, c, d};
  endfunction

  always_comb begin
    coef_t a [16];
    for (int i = 0; i < 16; i++) a[i] = x[i];
    for (int r = 0; r < 4; r++)
      {a[4*r], a[4*r+1], a[4*r+2], a[4*r+3]} =
          pf1d({a[4*r], a[4*r+1], a[4*r+2], a[4*r+3]});
    for (int c = 0; c < 4; c++)
      {a[c], a[4+c], a[8+c], a[12+c]} = pf1d({a[c], a[4+c], a[8+c], a[12+c]});
    for (int i = 0; i < 16; i++) y[i] = a[i];
  end
endmodule
