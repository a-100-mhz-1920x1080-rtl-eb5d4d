// pct4x4: 4x4 Photo Core Transform (PCT), purely combinational.
//
// The PCT is built, as the architecture figure shows, from a first layer of
// four 2x2 Hadamard transforms (T_h) on the quartets {0,3,12,15}, {5,6,9,10},
// {1,2,13,14}, {4,7,8,11}, followed by a second layer: T_h on the low-pass
// quartet {0,1,4,5}, T_odd on the low-high {2,3,6,7} and high-low
// {8,12,9,13} quartets and T_odd_odd on the high-high quartet {10,11,14,15}.
// Every operator is a chain of integer lifting steps, so the transform is
// exactly invertible. Output index 0 is the block's DC coefficient; the
// coefficients stay in the slots the lifting leaves them in (no final
// permutation). The grouping and operator names follow the paper; the
// lifting constants (3/8, 3/4 with rounding offsets) are those of the JPEG XR
// transform and are not printed in the paper.
//
// Interface: x[16] in, y[16] out, index = 4*row + column. No clock.
module pct4x4
  import jxr_pkg::*;
(
  input  coef_t x [16],
  output coef_t y [16]
);
  // 2x2 Hadamard by lifting.
  function automatic quad_t t_h(input quad_t q, input logic rnd);
    coef_t a, b, c, d, t1, t2;
    {a, b, c, d} = q;
    a = a + d;
    b = b - c;
    t1 = (a - b + coef_t'(rnd)) >>> 1;
    t2 = c;
    c = t1 - d;
    d = t1 - t2;
    a = a - d;
    b = b + c;
    return {a, b, c, d};
  endfunction

  // Rotation of the low-high / high-low quartets.
  function automatic quad_t t_odd(input quad_t q);
    coef_t a, b, c, d;
    {a, b, c, d} = q;
    b = b - c;
    a = a + d;
    c = c + ((b + coef_t'(1)) >>> 1);
    d = ((a + coef_t'(1)) >>> 1) - d;
    b = b - ((coef_t'(3) * a + coef_t'(4)) >>> 3);
    a = a + ((coef_t'(3) * b + coef_t'(4)) >>> 3);
    d = d - ((coef_t'(3) * c + coef_t'(4)) >>> 3);
    c = c + ((coef_t'(3) * d + coef_t'(4)) >>> 3);
    d = d + (b >>> 1);
    c = c - ((a + coef_t'(1)) >>> 1);
    b = b - d;
    a = a + c;
    return {a, b, c, d};
  endfunction

  // Rotation of the high-high quartet.
  function automatic quad_t t_odd_odd(input quad_t q);
    coef_t a, b, c, d, t1, t2;
    {a, b, c, d} = q;
    d = d + a;
    c = c - b;
    t1 = d >>> 1;
    t2 = c >>> 1;
    a = a - t1;
    b = b + t2;
    a = a + ((coef_t'(3) * b + coef_t'(4)) >>> 3);
    b = b - ((coef_t'(3) * a + coef_t'(3)) >>> 2);
    a = a + ((coef_t'(3) * b + coef_t'(3)) >>> 3);
    b = b - t2;
    a = a + t1;
    c = c + b;
    d = d - a;
    return {a, b, c, d};
  endfunction

  always_comb begin
    coef_t a [16];
    for (int i = 0; i < 16; i++) a[i] = x[i];
    // First layer: 2x2 Hadamard on the four spread quartets.
    {a[0], a[3], a[12], a[15]} = t_h({a[0], a[3], a[12], a[15]}, 1'b0);
    {a[5], a[6], a[9], a[10]} = t_h({a[5], a[6], a[9], a[10]}, 1'b0);
    {a[1], a[2], a[13], a[14]} = t_h({a[1], a[2], a[13], a[14]}, 1'b0);
    {a[4], a[7], a[8], a[11]} = t_h({a[4], a[7], a[8], a[11]}, 1'b0);
    // Second layer.
    {a[0], a[1], a[4], a[5]} = t_h({a[0], a[1], a[4], a[5]}, 1'b1);
    {a[2], a[3], a[6], a[7]} = t_odd({a[2], a[3], a[6], a[7]});
    {a[8], a[12], a[9], a[13]} = t_odd({a[8], a[12], a[9], a[13]});
    {a[10], a[11], a[14], a[15]} = t_odd_odd({a[10], a[11], a[14], a[15]});
    for (int i = 0; i < 16; i++) y[i] = a[i];
  end
endmodule
