// tb_color_conv: checks the RGB -> YUV lifting against a reference written with
// floor division, checks that the inverse lifting recovers R, G, B exactly,
// and checks the one-cycle latency.
module tb_color_conv;
  import jxr_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [7:0] r, g, b;
  logic out_valid;
  coef_t y, u, v;
  int checks = 0, failures = 0;

  color_conv dut (.*);
  always #5 clk = ~clk;

  function automatic int fdiv2(int a);
    return (a < 0 && (a % 2) != 0) ? a / 2 - 1 : a / 2;
  endfunction

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      int er, eg, eb, ev, et, ey, rr, rg, rb;
      er = (n < 4) ? (n[0] ? 255 : 0) : int'($urandom_range(0, 255));
      eg = (n < 4) ? (n[1] ? 255 : 0) : int'($urandom_range(0, 255));
      eb = int'($urandom_range(0, 255));
      @(negedge clk);
      r = 8'(er); g = 8'(eg); b = 8'(eb); in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      ev = eb - er;
      et = er - eg + fdiv2(ev + 1);
      ey = eg + fdiv2(et) - 128;
      checks++;
      if (!out_valid || int'(y) != ey || int'(u) != -et || int'(v) != ev) begin
        failures++;
        $display("mismatch rgb=%0d,%0d,%0d got %0d %0d %0d exp %0d %0d %0d",
                 er, eg, eb, y, u, v, ey, -et, ev);
      end
      // inverse lifting
      rg = int'(y) + 128 - fdiv2(-int'(u));
      rr = -int'(u) - fdiv2(int'(v) + 1) + rg;
      rb = int'(v) + rr;
      checks++;
      if (rr != er || rg != eg || rb != eb) begin
        failures++;
        $display("not reversible: %0d %0d %0d -> %0d %0d %0d", er, eg, eb, rr, rg, rb);
      end
      @(negedge clk);
      checks++;
      if (out_valid) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
