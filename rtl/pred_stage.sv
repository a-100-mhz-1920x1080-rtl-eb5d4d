// pred_stage: pipeline stage 2 - DC, AD (low-pass) and AC (high-pass)
// prediction of one quantised macroblock, by subtraction.
//
// Reads a macroblock from the input coef_buffer and writes residuals to the
// output coef_buffer at the same row addresses. Steps:
//   GATHER  48 reads: coefficient 0 of every 4x4 block = the macroblock DC
//           (block 0) and the 15 AD coefficients (blocks 1..15), per component
//   TOPRD   12 reads of the top-neighbour SRAM (DC and AD 1,2,3 of the
//           macroblock above, per component)
//   CALC    direction from the luma DCs (dc_pred_dir); AD prediction:
//             LEFT -> AD 4, 8, 12 minus those of the left macroblock
//             TOP  -> AD 1, 2, 3  minus those of the top macroblock
//             BOTH/NONE -> AD not predicted
//           AC direction from the luma AD: Hs = |AD1|+|AD2|+|AD3|,
//           Vs = |AD4|+|AD8|+|AD12|; Vs > 4Hs -> LEFT, Hs > 4Vs -> TOP, else none
//   TOPWR   12 writes of this macroblock's unpredicted DC/AD 1..3 to the SRAM
//   STREAM  192 rows read, predicted, written: AC coefficients 4, 8, 12 of a
//           block minus those of the block to its left (LEFT), or 1, 2, 3 minus
//           those of the block above (TOP), within the macroblock; coefficient 0
//           replaced by the DC or AD residual
// About 270 cycles per macroblock. Left-neighbour values are kept in
// registers, top ones in the SRAM (the paper's 1440 x 4-byte "Top AD block"
// store); the top-left DC is the SRAM word read for the previous macroblock.
//
// Follows the paper: subtraction-based prediction fed from an SRAM, a
// top-neighbour SRAM, DC direction per its prediction model, AD and AC
// prediction following the DC / weight comparison. Own choices: which
// coefficients are predicted, the AC weight rule, direction from luma only,
// edge handling (see dc_pred_dir).
//
// Status outputs dc_dir / ac_dir are valid with dir_valid (one pulse per
// macroblock) for monitoring.
//
// Lint notes: the prediction value from dc_pred_dir is left unused because
// the residual is formed here from the stored neighbours; the upper 12 bits
// of the 32-bit top-neighbour SRAM word are spare (coefficients are 20 bits).
module pred_stage
  import jxr_pkg::*;
#(
  parameter int MB_COLS = 120
) (
  input  logic        clk,
  input  logic        rst_n,
  // input coef_buffer read side
  input  logic        ib_ready,
  output logic        ib_rd_en,
  output logic [7:0]  ib_rd_addr,
  input  coef_t       ib_rd_data [4],
  input  logic [15:0] ib_tag,
  output logic        ib_release,
  // output coef_buffer write side
  input  logic        ob_ready,
  output logic        ob_we,
  output logic [7:0]  ob_addr,
  output coef_t       ob_data [4],
  output logic        ob_commit,
  output logic [15:0] ob_tag,
  // monitoring
  output logic        dir_valid,
  output pred_dir_e   dc_dir,
  output pred_dir_e   ac_dir
);
  localparam int TDEPTH = MB_COLS * NCOMP * 4;
  localparam int TAW    = $clog2(TDEPTH);

  typedef enum logic [2:0] {S_IDLE, S_GATHER, S_TOPRD, S_CALC, S_TOPWR, S_STREAM,
                            S_COMMIT} state_e;
  state_e     st;
  logic [7:0] cnt;

  coef_t lp      [NCOMP][16];   // gathered DC (0) and AD (1..15), unpredicted
  coef_t top     [NCOMP][4];    // DC, AD1..3 of the macroblock above
  coef_t tl      [NCOMP];       // DC of the top-left macroblock
  coef_t l_dc    [NCOMP];       // left macroblock DC
  coef_t l_ad    [NCOMP][3];    // left macroblock AD 4, 8, 12
  coef_t lp_res  [NCOMP][16];   // DC/AD residuals
  coef_t lcol    [4];           // col 0 of rows 1..3 of the block to the left
  coef_t trow    [4][4];        // row 0 cols 1..3 of the block above, per column

  logic [7:0] mbx, mby;
  assign mbx = ib_tag[7:0];
  assign mby = ib_tag[15:8];

  // ---- top SRAM ----
  logic            t_en, t_we;
  logic [TAW-1:0]  t_addr;
  logic [31:0]     t_wdata, t_rdata;
  logic [3:0]      tn;        // 0..11 index of the SRAM access
  logic [1:0]      tn_c;
  logic [1:0]      tn_k;

  always_comb begin
    tn_c = 2'(tn / 4);
    tn_k = tn[1:0];
  end

  sram_sp #(.DEPTH(TDEPTH), .WIDTH(32)) u_top (
    .clk, .en(t_en), .we(t_we), .addr(t_addr), .wdata(t_wdata), .rdata(t_rdata)
  );

  assign t_en    = (st == S_TOPRD && cnt < 8'd12) || st == S_TOPWR;
  assign t_we    = (st == S_TOPWR);
  assign t_addr  = TAW'((int'(mbx) * NCOMP + int'(tn_c)) * 4 + int'(tn_k));
  assign t_wdata = 32'(lp[tn_c][(tn_k == 2'd0) ? 4'd0 : {2'b00, tn_k}]);

  // ---- direction and DC/AD residuals ----
  pred_dir_e dir_c;
  coef_t     dc_pred_y;
  logic      has_left, has_top;
  assign has_left = (mbx != 8'd0);
  assign has_top  = (mby != 8'd0);

  dc_pred_dir u_dir (
    .dc_left(l_dc[0]), .dc_top(top[0][0]), .dc_topleft(tl[0]),
    .has_left, .has_top, .dir(dir_c), .pred(dc_pred_y)
  );

  pred_dir_e ac_c;
  logic [COEF_W+2:0] hs, vs;
  always_comb begin
    hs = (COEF_W+3)'(absval(lp[0][1])) + (COEF_W+3)'(absval(lp[0][2])) +
         (COEF_W+3)'(absval(lp[0][3]));
    vs = (COEF_W+3)'(absval(lp[0][4])) + (COEF_W+3)'(absval(lp[0][8])) +
         (COEF_W+3)'(absval(lp[0][12]));
    if (vs > (hs << 2))      ac_c = PRED_LEFT;
    else if (hs > (vs << 2)) ac_c = PRED_TOP;
    else                     ac_c = PRED_NONE;
  end

  always_comb begin
    for (int c = 0; c < NCOMP; c++) begin
      coef_t pred;
      logic signed [COEF_W:0] sum;
      sum = (COEF_W+1)'(l_dc[c]) + (COEF_W+1)'(top[c][0]);
      unique case (dir_c)
        PRED_LEFT: pred = l_dc[c];
        PRED_TOP:  pred = top[c][0];
        PRED_BOTH: pred = coef_t'(sum >>> 1);
        default:   pred = '0;
      endcase
      for (int k = 0; k < 16; k++) lp_res[c][k] = lp[c][k];
      lp_res[c][0] = lp[c][0] - pred;
      if (dir_c == PRED_LEFT) begin
        lp_res[c][4]  = lp[c][4]  - l_ad[c][0];
        lp_res[c][8]  = lp[c][8]  - l_ad[c][1];
        lp_res[c][12] = lp[c][12] - l_ad[c][2];
      end else if (dir_c == PRED_TOP) begin
        lp_res[c][1] = lp[c][1] - top[c][1];
        lp_res[c][2] = lp[c][2] - top[c][2];
        lp_res[c][3] = lp[c][3] - top[c][3];
      end
    end
  end

  // Held results for the stream phase.
  pred_dir_e ac_q;
  coef_t     lp_q [NCOMP][16];

  // ---- read pipe from the input buffer ----
  logic       rv;
  logic [7:0] ra;
  logic [1:0] ra_c, ra_row;
  logic [3:0] ra_b;
  logic [1:0] ra_bx, ra_by;
  assign ra_c   = ra[7:6];
  assign ra_b   = ra[5:2];
  assign ra_row = ra[1:0];
  assign ra_bx  = ra_b[1:0];
  assign ra_by  = ra_b[3:2];

  assign ib_rd_en   = (st == S_GATHER && cnt < 8'd48) || (st == S_STREAM && cnt < 8'd192);
  assign ib_rd_addr = (st == S_GATHER) ? {cnt[5:4], cnt[3:0], 2'b00} : cnt;

  // Stream output.
  always_comb begin
    for (int i = 0; i < 4; i++) ob_data[i] = ib_rd_data[i];
    if (ra_row == 2'd0) begin
      ob_data[0] = lp_q[ra_c][ra_b];
      if (ac_q == PRED_TOP && ra_by != 2'd0)
        for (int j = 1; j < 4; j++) ob_data[j] = ib_rd_data[j] - trow[ra_bx][j];
    end else if (ac_q == PRED_LEFT && ra_bx != 2'd0) begin
      ob_data[0] = ib_rd_data[0] - lcol[ra_row];
    end
  end

  assign ob_we      = rv && (st == S_STREAM);
  assign ob_addr    = ra;
  assign ob_commit  = (st == S_COMMIT);
  assign ob_tag     = ib_tag;
  assign ib_release = (st == S_COMMIT);
  assign dir_valid  = (st == S_CALC);
  assign dc_dir     = dir_c;
  assign ac_dir     = ac_c;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st  <= S_IDLE;
      cnt <= '0;
      tn  <= '0;
      rv  <= 1'b0;
      ra  <= '0;
      ac_q <= PRED_NONE;
      tl   <= '{default: '0};
      l_dc <= '{default: '0};
      l_ad <= '{default: '0};
      top  <= '{default: '0};
    end else begin
      rv <= ib_rd_en;
      ra <= ib_rd_addr;
      if (rv && st == S_GATHER || rv && st == S_TOPRD && cnt == 8'd0)
        lp[ra_c][ra_b] <= ib_rd_data[0];
      if (rv && st == S_STREAM) begin
        if (ra_row == 2'd0)
          for (int j = 1; j < 4; j++) trow[ra_bx][j] <= ib_rd_data[j];
        else
          lcol[ra_row] <= ib_rd_data[0];
      end
      unique case (st)
        S_IDLE:
          if (ib_ready && ob_ready) begin st <= S_GATHER; cnt <= '0; end
        S_GATHER:
          if (cnt == 8'd47) begin st <= S_TOPRD; cnt <= '0; tn <= '0; end
          else cnt <= cnt + 8'd1;
        S_TOPRD: begin
          // Address tn issued while cnt < 12; data for tn-1 arrives now.
          cnt <= cnt + 8'd1;
          if (cnt < 8'd12) tn <= tn + 4'd1;
          if (cnt >= 8'd1) begin
            logic [3:0] p;
            p = 4'(cnt - 8'd1);
            if (has_top) top[p / 4][p % 4] <= coef_t'(t_rdata);
            else         top[p / 4][p % 4] <= '0;
          end
          if (cnt == 8'd12) st <= S_CALC;
        end
        S_CALC: begin
          ac_q <= ac_c;
          lp_q <= lp_res;
          for (int c = 0; c < NCOMP; c++) begin
            tl[c]      <= top[c][0];
            l_dc[c]    <= lp[c][0];
            l_ad[c][0] <= lp[c][4];
            l_ad[c][1] <= lp[c][8];
            l_ad[c][2] <= lp[c][12];
          end
          st <= S_TOPWR;
          tn <= '0;
        end
        S_TOPWR:
          if (tn == 4'd11) begin st <= S_STREAM; cnt <= '0; end
          else tn <= tn + 4'd1;
        S_STREAM:
          if (cnt == 8'd192) st <= S_COMMIT;
          else cnt <= cnt + 8'd1;
        S_COMMIT: st <= S_IDLE;
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
