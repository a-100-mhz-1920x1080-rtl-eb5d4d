// flexbits_enc: splits one coefficient at the ModelBits boundary and forms its
// FlexBits codeword. Combinational.
//
// With mb = ModelBits, magnitude |x| = high * 2^mb + low. The high part goes
// to the run-level coder; the low part is sent as a fixed-length FlexBits
// codeword of mb+2 bits: {low, sign, nz}. For a coefficient that fits in mb
// bits (high == 0) sign and nz = (low != 0) are included, which reproduces
// the paper's FlexBits table for two bits (-3->15, -2->11, -1->7, 0->0, 1->5,
// 2->9). For a coefficient with high != 0 the sign travels with the level, so
// the two flag bits are 0 (own choice). With mb = 0 nothing is sent (len 0).
//
// Interface: x, mb in; high, neg, code, len out.
module flexbits_enc
  import jxr_pkg::*;
(
  input  coef_t             x,
  input  logic [2:0]        mb,
  output logic [COEF_W-1:0] high,
  output logic              neg,
  output logic [7:0]        code,
  output logic [3:0]        len
);
  logic [COEF_W-1:0] mag, low;
  always_comb begin
    mag  = absval(x);
    neg  = (x < 0);
    high = mag >> mb;
    low  = mag & ((COEF_W'(1) << mb) - COEF_W'(1));
    if (mb == 3'd0) begin
      code = '0;
      len  = '0;
    end else begin
      len  = 4'(mb) + 4'd2;
      if (high == '0) code = 8'({low, neg && low != '0, low != '0});
      else            code = 8'({low, 2'b00});
    end
  end
endmodule
