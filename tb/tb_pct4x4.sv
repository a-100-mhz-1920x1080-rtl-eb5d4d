// tb_pct4x4: checks the 4x4 PCT. A flat block of value v must give DC = 4v and
// 15 zero coefficients; a single impulse must not collapse to zero; random
// blocks are compared with a reference model of the lifting network written
// here on plain integers with floor division.
module tb_pct4x4;
  import jxr_pkg::*;
  coef_t x [16], y [16];
  int checks = 0, failures = 0;

  pct4x4 dut (.x, .y);

  function automatic int fl(int a, int s);   // floor(a / 2^s)
    int d;
    d = 1 << s;
    return (a >= 0) ? a / d : -((-a + d - 1) / d);
  endfunction

  function automatic void th(ref int a, ref int b, ref int c, ref int d, input int r);
    int t1, t2;
    a += d; b -= c; t1 = fl(a - b + r, 1); t2 = c; c = t1 - d; d = t1 - t2; a -= d; b += c;
  endfunction
  function automatic void todd(ref int a, ref int b, ref int c, ref int d);
    b -= c; a += d; c += fl(b + 1, 1); d = fl(a + 1, 1) - d;
    b -= fl(3 * a + 4, 3); a += fl(3 * b + 4, 3);
    d -= fl(3 * c + 4, 3); c += fl(3 * d + 4, 3);
    d += fl(b, 1); c -= fl(a + 1, 1); b -= d; a += c;
  endfunction
  function automatic void toddodd(ref int a, ref int b, ref int c, ref int d);
    int t1, t2;
    d += a; c -= b; t1 = fl(d, 1); t2 = fl(c, 1); a -= t1; b += t2;
    a += fl(3 * b + 4, 3); b -= fl(3 * a + 3, 2); a += fl(3 * b + 3, 3);
    b -= t2; a += t1; c += b; d -= a;
  endfunction

  task automatic ref_pct(input int in [16], output int o [16]);
    int a [16];
    a = in;
    th(a[0], a[3], a[12], a[15], 0); th(a[5], a[6], a[9], a[10], 0);
    th(a[1], a[2], a[13], a[14], 0); th(a[4], a[7], a[8], a[11], 0);
    th(a[0], a[1], a[4], a[5], 1);
    todd(a[2], a[3], a[6], a[7]); todd(a[8], a[12], a[9], a[13]);
    toddodd(a[10], a[11], a[14], a[15]);
    o = a;
  endtask

  initial begin
    // flat blocks
    foreach (x[i]) x[i] = 37;
    #1;
    checks++;
    if (y[0] != 148) begin failures++; $display("flat DC %0d", y[0]); end
    for (int i = 1; i < 16; i++) begin
      checks++;
      if (y[i] != 0) begin failures++; $display("flat AC %0d = %0d", i, y[i]); end
    end
    foreach (x[i]) x[i] = -128;
    #1;
    checks++;
    if (y[0] != -512) failures++;
    // random blocks against the reference
    for (int n = 0; n < 2000; n++) begin
      int in [16], o [16];
      foreach (in[i]) begin
        in[i] = int'($urandom_range(0, 510)) - 255;
        x[i] = coef_t'(in[i]);
      end
      #1;
      ref_pct(in, o);
      for (int i = 0; i < 16; i++) begin
        checks++;
        if (int'(y[i]) != o[i]) begin
          failures++;
          if (failures < 10) $display("rand %0d coef %0d got %0d exp %0d", n, i, y[i], o[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
