// dc_pred_dir: DC prediction model - chooses where a macroblock's DC is
// predicted from and forms the prediction. Combinational.
//
// Follows the paper's DC prediction model:
//   H_weight = |DC[top-left] - DC[top]|,  V_weight = |DC[top-left] - DC[left]|
//   H_weight > 4*V_weight  -> predict from LEFT
//   V_weight > 4*H_weight  -> predict from TOP
//   otherwise              -> predict from LEFT and TOP (mean, floor)
// Own choices for the frame edges: the first macroblock is not predicted
// (prediction 0), the rest of the first row uses LEFT, the rest of the first
// column uses TOP.
//
// Interface: dc_left, dc_top, dc_topleft, has_left, has_top in; dir and
// pred out.
module dc_pred_dir
  import jxr_pkg::*;
(
  input  coef_t     dc_left,
  input  coef_t     dc_top,
  input  coef_t     dc_topleft,
  input  logic      has_left,
  input  logic      has_top,
  output pred_dir_e dir,
  output coef_t     pred
);
  logic [COEF_W+2:0] hw, vw;
  logic signed [COEF_W:0] sum;

  always_comb begin
    sum = (COEF_W+1)'(dc_left) + (COEF_W+1)'(dc_top);
    hw = (COEF_W+3)'(absval(dc_topleft - dc_top));
    vw = (COEF_W+3)'(absval(dc_topleft - dc_left));
    if (!has_left && !has_top) dir = PRED_NONE;
    else if (!has_top)         dir = PRED_LEFT;
    else if (!has_left)        dir = PRED_TOP;
    else if (hw > (vw << 2))   dir = PRED_LEFT;
    else if (vw > (hw << 2))   dir = PRED_TOP;
    else                       dir = PRED_BOTH;
    unique case (dir)
      PRED_LEFT: pred = dc_left;
      PRED_TOP:  pred = dc_top;
      PRED_BOTH: pred = coef_t'(sum >>> 1);
      default:   pred = '0;
    endcase
  end
endmodule
