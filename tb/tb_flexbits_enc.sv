// tb_flexbits_enc: checks the two-bit FlexBits table (-3->15, -2->11, -1->7,
// 0->0, 1->5, 2->9), the split of 17 at four ModelBits into high part 1, and
// random coefficients against the split formula.
module tb_flexbits_enc;
  import jxr_pkg::*;
  coef_t x;
  logic [2:0] mb;
  logic [COEF_W-1:0] high;
  logic neg;
  logic [7:0] code;
  logic [3:0] len;
  int checks = 0, failures = 0;

  flexbits_enc dut (.*);

  initial begin
    int tv [6] = '{-3, -2, -1, 0, 1, 2};
    int tc [6] = '{15, 11, 7, 0, 5, 9};
    mb = 3'd2;
    for (int i = 0; i < 6; i++) begin
      x = coef_t'(tv[i]);
      #1;
      checks++;
      if (int'(code) != tc[i] || len != 4'd4 || high != '0) begin
        failures++;
        $display("table %0d -> %0d (len %0d)", tv[i], code, len);
      end
    end
    x = 17; mb = 3'd4;
    #1;
    checks++;
    if (high != 1 || code != 8'b000100) begin failures++; $display("17 split"); end
    mb = 3'd0; x = -9;
    #1;
    checks++;
    if (len != 0 || high != 9 || !neg) failures++;
    for (int n = 0; n < 3000; n++) begin
      int v, m, k, lo, hi, ec;
      v = int'($urandom_range(0, 2000)) - 1000;
      k = int'($urandom_range(0, 6));
      x = coef_t'(v); mb = 3'(k);
      #1;
      m = (v < 0) ? -v : v;
      hi = m / (1 << k);
      lo = m % (1 << k);
      ec = (hi == 0) ? lo * 4 + ((v < 0 && lo != 0) ? 2 : 0) + (lo != 0 ? 1 : 0) : lo * 4;
      checks++;
      if (int'(high) != hi || (k > 0 && (int'(code) != ec || int'(len) != k + 2))) begin
        failures++;
        if (failures < 10) $display("v=%0d mb=%0d high=%0d code=%0d exp %0d %0d", v, k, high, code, hi, ec);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
