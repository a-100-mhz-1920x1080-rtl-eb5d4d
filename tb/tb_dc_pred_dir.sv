// tb_dc_pred_dir: checks the DC prediction model on hand-picked and random
// neighbourhoods, including the frame-edge cases.
module tb_dc_pred_dir;
  import jxr_pkg::*;
  coef_t dc_left, dc_top, dc_topleft, pred;
  logic has_left, has_top;
  pred_dir_e dir;
  int checks = 0, failures = 0;

  dc_pred_dir dut (.*);

  task automatic check(int l, int t, int tl, bit hl, bit ht);
    int hw, vw, ep;
    pred_dir_e ed;
    dc_left = coef_t'(l); dc_top = coef_t'(t); dc_topleft = coef_t'(tl);
    has_left = hl; has_top = ht;
    #1;
    hw = (tl - t < 0) ? t - tl : tl - t;
    vw = (tl - l < 0) ? l - tl : tl - l;
    if (!hl && !ht) begin ed = PRED_NONE; ep = 0; end
    else if (!ht) begin ed = PRED_LEFT; ep = l; end
    else if (!hl) begin ed = PRED_TOP; ep = t; end
    else if (hw > 4 * vw) begin ed = PRED_LEFT; ep = l; end
    else if (vw > 4 * hw) begin ed = PRED_TOP; ep = t; end
    else begin
      ed = PRED_BOTH;
      ep = ((l + t) >= 0) ? (l + t) / 2 : -((-(l + t) + 1) / 2);
    end
    checks++;
    if (dir != ed || int'(pred) != ep) begin
      failures++;
      $display("l=%0d t=%0d tl=%0d: got %s %0d exp %s %0d", l, t, tl, dir.name(), pred,
               ed.name(), ep);
    end
  endtask

  initial begin
    check(100, 10, 100, 1, 1);    // H=90, V=0   -> LEFT
    check(10, 100, 100, 1, 1);    // H=0,  V=90  -> TOP
    check(40, 50, 45, 1, 1);      // similar     -> BOTH
    check(-7, -8, -3, 1, 1);      // BOTH, negative mean rounds down
    check(5, 6, 7, 0, 0);
    check(5, 6, 7, 1, 0);
    check(5, 6, 7, 0, 1);
    for (int n = 0; n < 3000; n++)
      check(int'($urandom_range(0, 4000)) - 2000, int'($urandom_range(0, 4000)) - 2000,
            int'($urandom_range(0, 4000)) - 2000, 1'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
