// tb_prefilter4x4: a flat block must pass unchanged, an edge must be changed,
// and random blocks are compared with an integer reference of the separable
// lifting filter written here.
module tb_prefilter4x4;
  import jxr_pkg::*;
  coef_t x [16], y [16];
  int checks = 0, failures = 0;

  prefilter4x4 dut (.x, .y);

  function automatic int fl(int a, int s);
    int d;
    d = 1 << s;
    return (a >= 0) ? a / d : -((-a + d - 1) / d);
  endfunction

  function automatic void f1(ref int a, ref int b, ref int c, ref int d);
    d -= a; a += fl(d, 1); c -= b; b += fl(c, 1);
    d += fl(3 * c + 4, 3); c -= fl(3 * d + 8, 4);
    b -= fl(c, 1); c += b; a -= fl(d, 1); d += a;
  endfunction

  initial begin
    foreach (x[i]) x[i] = -77;
    #1;
    for (int i = 0; i < 16; i++) begin
      checks++;
      if (y[i] != -77) begin failures++; $display("flat %0d -> %0d", i, y[i]); end
    end
    // vertical edge between columns 1 and 2
    foreach (x[i]) x[i] = ((i % 4) < 2) ? 0 : 64;
    #1;
    checks++;
    if (y[1] == 0 && y[2] == 64) begin failures++; $display("edge not filtered"); end
    for (int n = 0; n < 2000; n++) begin
      int a [16];
      foreach (a[i]) begin
        a[i] = int'($urandom_range(0, 1000)) - 500;
        x[i] = coef_t'(a[i]);
      end
      #1;
      for (int r = 0; r < 4; r++) f1(a[4*r], a[4*r+1], a[4*r+2], a[4*r+3]);
      for (int c = 0; c < 4; c++) f1(a[c], a[4+c], a[8+c], a[12+c]);
      for (int i = 0; i < 16; i++) begin
        checks++;
        if (int'(y[i]) != a[i]) begin
          failures++;
          if (failures < 10) $display("rand %0d pos %0d got %0d exp %0d", n, i, y[i], a[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
