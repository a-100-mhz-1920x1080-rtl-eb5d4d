// jxr_pkg: types and constants shared by the JPEG XR encoder pipeline.
//
// Coefficients travel as signed COEF_W-bit integers. A 4x4 block is an
// unpacked array of 16 coefficients, index = 4*row + column. The paper's
// frame size (1920x1080, 4:4:4, three colour components) gives 120x68
// macroblocks; the macroblock coefficient buffers hold 3*16*16 = 768
// coefficients, organised as 192 rows of four.
package jxr_pkg;
  localparam int COEF_W   = 20;          // own choice: fits 8-bit input after two PCT stages
  localparam int NCOMP    = 3;           // 4:4:4 Y, U, V
  localparam int MB_ROWS4 = 192;         // 768 coefficients / 4 per row
  localparam int MODEL_BITS_MAX = 6;     // own choice: bounds FlexBits codeword width

  typedef logic signed [COEF_W-1:0] coef_t;
  typedef coef_t blk16_t [16];
  typedef coef_t row4_t  [4];
  typedef struct packed {coef_t a, b, c, d;} quad_t;   // one lifting quartet

  typedef enum logic [1:0] {BAND_DC = 2'd0, BAND_LP = 2'd1, BAND_HP = 2'd2} band_e;

  // Prediction direction (Fig. 4 DC prediction model).
  typedef enum logic [1:0] {
    PRED_NONE = 2'd0, PRED_LEFT = 2'd1, PRED_TOP = 2'd2, PRED_BOTH = 2'd3
  } pred_dir_e;

  function automatic logic [COEF_W-1:0] absval(input coef_t v);
    return (v < 0) ? COEF_W'(-v) : COEF_W'(v);
  endfunction
endpackage
