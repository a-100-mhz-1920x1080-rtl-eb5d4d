// huff_enc: adaptive Huffman (variable-length) encoder for run-level symbols
// and DC values, with one adaptation context per band (low-pass, high-pass).
//
// A run-level symbol (run, level, sign, last) is coded as
//   index code | sign | level code (if level > 1) | run code (if run > 0)
// MSB first. The index encoder maps class = {last, level>1, run>0} through one
// of two prefix tables: table 0 is skewed towards class 0 (lengths
// 1,3,3,4,5,5,5,5), table 1 is flat (3 bits). The level encoder sends
// level-2 as an Exp-Golomb code of order 0 or 1; the run encoder sends run-1
// as Exp-Golomb order 0. Adaptation, per band: a saturating discriminant
// accumulates len(choice A) - len(choice B) for every coded symbol, and the
// shorter choice is used while the discriminant points to it. DC values are
// sent as Exp-Golomb order 0 of |dc| plus a sign bit when non-zero.
// The paper names the adaptive Huffman encode with its index, level and run
// encoders but gives no tables; all tables and the adaptation rule are this
// design's own.
//
// Interface: combinational code/len from the symbol inputs; the adaptation
// state updates at the clock edge when valid is high. tbl_switch pulses (one
// cycle after) when a context changes its index table or level order.
module huff_enc
  import jxr_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              valid,
  input  logic              is_dc,
  input  logic              ctx,        // 0: low-pass band, 1: high-pass band
  input  logic [3:0]        run,
  input  logic [COEF_W-1:0] level,      // magnitude (>= 1 for a symbol)
  input  logic              neg,
  input  logic              last,
  output logic [63:0]       code,
  output logic [6:0]        len,
  output logic              tbl_switch
);
  // Exp-Golomb of order k: value n -> prefix zeros then (n + 2^k).
  function automatic void expg(input logic [COEF_W:0] n, input int k,
                               output logic [63:0] c, output logic [6:0] l);
    logic [COEF_W+1:0] m;
    int nb;
    m  = (COEF_W+2)'(n) + ((COEF_W+2)'(1) << k);
    nb = 0;
    for (int i = 0; i < COEF_W + 2; i++) if (m[i]) nb = i + 1;
    c = 64'(m);
    l = 7'(2 * nb - 1 - k);
  endfunction

  function automatic void idx_t0(input logic [2:0] cls, output logic [7:0] c,
                                 output logic [3:0] l);
    unique case (cls)
      3'd0: begin c = 8'b1;     l = 4'd1; end
      3'd1: begin c = 8'b010;   l = 4'd3; end
      3'd2: begin c = 8'b011;   l = 4'd3; end
      3'd3: begin c = 8'b0010;  l = 4'd4; end
      3'd4: begin c = 8'b00110; l = 4'd5; end
      3'd5: begin c = 8'b00111; l = 4'd5; end
      3'd6: begin c = 8'b00010; l = 4'd5; end
      default: begin c = 8'b00011; l = 4'd5; end
    endcase
  endfunction

  logic signed [5:0] disc_idx [2];   // > 0: table 1 has been shorter
  logic signed [5:0] disc_lvl [2];   // > 0: order 1 has been shorter
  logic              sel_idx, sel_lvl;
  logic [2:0]        cls;
  logic [7:0]        ic0;
  logic [3:0]        il0, il_used;
  logic [63:0]       lc0, lc1, lvc, rc, dcc;
  logic [6:0]        ll0, ll1, lvl_len, rl, dcl;
  logic              had_lvl;

  always_comb begin
    cls     = {last, level > COEF_W'(1), run != 4'd0};
    sel_idx = disc_idx[ctx] > 0;
    sel_lvl = disc_lvl[ctx] > 0;
    had_lvl = level > COEF_W'(1);
    idx_t0(cls, ic0, il0);
    expg((COEF_W+1)'(level) - (COEF_W+1)'(2), 0, lc0, ll0);
    expg((COEF_W+1)'(level) - (COEF_W+1)'(2), 1, lc1, ll1);
    expg((COEF_W+1)'(run) - (COEF_W+1)'(1), 0, rc, rl);
    expg((COEF_W+1)'(level), 0, dcc, dcl);
    if (!had_lvl) begin lvc = '0; lvl_len = '0; end
    else if (sel_lvl) begin lvc = lc1; lvl_len = ll1; end
    else begin lvc = lc0; lvl_len = ll0; end
    if (run == 4'd0) begin rc = '0; rl = '0; end
    il_used = sel_idx ? 4'd3 : il0;
    if (is_dc) begin
      if (level == '0) begin code = 64'd1; len = 7'd1; end
      else begin code = (dcc << 1) | 64'(neg); len = dcl + 7'd1; end
    end else begin
      code = sel_idx ? 64'(cls) : 64'(ic0);
      code = (code << 1) | 64'(neg);
      code = (code << lvl_len) | lvc;
      code = (code << rl) | rc;
      len  = 7'(il_used) + 7'd1 + lvl_len + rl;
    end
  end

  function automatic logic signed [5:0] sat_add(input logic signed [5:0] a,
                                                input logic signed [7:0] d);
    logic signed [7:0] s;
    s = 8'(a) + d;
    if (s > 8'sd31)       return 6'sd31;
    else if (s < -8'sd32) return -6'sd32;
    else                  return 6'(s);
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      disc_idx   <= '{default: '0};
      disc_lvl   <= '{default: '0};
      tbl_switch <= 1'b0;
    end else begin
      tbl_switch <= 1'b0;
      if (valid && !is_dc) begin
        logic signed [5:0] ni, nl;
        ni = sat_add(disc_idx[ctx], 8'(il0) - 8'sd3);
        nl = had_lvl ? sat_add(disc_lvl[ctx], 8'(ll0) - 8'(ll1)) : disc_lvl[ctx];
        disc_idx[ctx] <= ni;
        disc_lvl[ctx] <= nl;
        if ((ni > 0) != sel_idx || (nl > 0) != sel_lvl) tbl_switch <= 1'b1;
      end
    end
  end
endmodule
