// tb_quantizer: random coefficients and steps in all three bands against
// round-to-nearest integer division computed here.
module tb_quantizer;
  import jxr_pkg::*;
  coef_t x [4], q [4];
  band_e band [4];
  logic [7:0] qp_dc, qp_lp, qp_hp;
  int checks = 0, failures = 0;

  quantizer dut (.*);

  initial begin
    for (int n = 0; n < 3000; n++) begin
      int s [3];
      qp_dc = 8'($urandom_range(1, 255));
      qp_lp = 8'($urandom_range(1, 255));
      qp_hp = (n % 50 == 0) ? 8'd0 : 8'($urandom_range(1, 255));
      s[0] = qp_dc; s[1] = qp_lp; s[2] = (qp_hp == 0) ? 1 : qp_hp;
      for (int i = 0; i < 4; i++) begin
        x[i] = coef_t'(int'($urandom_range(0, 40000)) - 20000);
        band[i] = band_e'($urandom_range(0, 2));
      end
      #1;
      for (int i = 0; i < 4; i++) begin
        int m, e, st;
        st = s[band[i]];
        m = (x[i] < 0) ? -int'(x[i]) : int'(x[i]);
        e = (m + st / 2) / st;
        if (x[i] < 0) e = -e;
        checks++;
        if (int'(q[i]) != e) begin
          failures++;
          if (failures < 10) $display("x=%0d step=%0d got %0d exp %0d", x[i], st, q[i], e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
