// ae_block_enc: adaptive encoder for one 4x4 coefficient block (or one DC
// value) - adaptive scan, RLE coder, update scan order, update ModelBits,
// code block pattern and FlexBits, feeding the adaptive Huffman encoder.
//
// Operation for a low-pass (AD) or high-pass (AC) block, band context b:
//   LOAD  the 15 coefficients 1..15 are read in the band's current scan order;
//         each is split at ModelBits (flexbits_enc). One code block pattern bit
//         (1 = the block has run-level symbols) goes to the main stream.
//   SYM   one cycle per non-zero coefficient, in scan order (zeros are
//         skipped): its scan-order total is incremented and, if it now exceeds
//         the total of the previous scan position, the two positions swap
//         (update scan order). If its high part is non-zero a run-level
//         symbol (run of zero high parts since the last symbol, level = high
//         part, sign, last flag) is coded by huff_enc.
//   In parallel, FlexBits of four scan positions per cycle go to the FlexBits
//   stream (4 cycles).
//   FIN   update ModelBits: +1 if 4 or more coefficients had a non-zero high
//         part, -1 if no magnitude reached 2^(ModelBits-1); range 0..6.
// A DC request codes the value in one cycle.
// Cycles per block: 3 + number of non-zero coefficients, at least 5 when
// FlexBits are sent (four scan positions of FlexBits per cycle).
//
// Follows the paper: scan order adapted from non-zero counts, run-level
// coding of the part above ModelBits with the rest as FlexBits, the
// update-scan-order and update-ModelBits feedback loops, the code block
// pattern, index/level/run coding. Own choices: initial scan order (zig-zag),
// the ModelBits rule, totals halved when one reaches 255, the per-block CBP bit.
//
// Interface: start with band/coef/dc (sampled on start while ready); ready is
// high when idle; done pulses at the end. Main codes on m_valid/m_code/m_len,
// FlexBits on f_valid/f_code/f_len. ev_* pulse on adaptation events.
module ae_block_enc
  import jxr_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  band_e       band,
  input  coef_t       coef [16],
  output logic        ready,
  output logic        done,
  output logic        m_valid,
  output logic [63:0] m_code,
  output logic [6:0]  m_len,
  output logic        f_valid,
  output logic [31:0] f_code,
  output logic [5:0]  f_len,
  output logic        ev_swap,
  output logic        ev_mb_inc,
  output logic        ev_mb_dec,
  output logic        ev_tbl
);
  localparam logic [3:0] ZIGZAG [15] = '{4'd1, 4'd4, 4'd8, 4'd5, 4'd2, 4'd3, 4'd6,
                                         4'd9, 4'd12, 4'd13, 4'd10, 4'd7, 4'd11,
                                         4'd14, 4'd15};
  typedef enum logic [2:0] {S_IDLE, S_DC, S_LOAD, S_SYM, S_FIN} state_e;

  state_e      st;
  logic        ctx;                  // 0 low-pass, 1 high-pass
  coef_t       blk [16];
  logic [3:0]  order  [2][15];
  logic [7:0]  totals [2][15];
  logic [2:0]  mbits  [2];

  // ---- per scan position split (combinational from latched block) ----
  coef_t             sc   [15];
  logic [COEF_W-1:0] hi   [15];
  logic              ng   [15];
  logic [7:0]        fc   [15];
  logic [3:0]        fl   [15];
  logic [2:0]        cur_mb;

  assign cur_mb = mbits[ctx];

  for (genvar i = 0; i < 15; i++) begin : g_split
    assign sc[i] = blk[order[ctx][i]];
    flexbits_enc u_fb (.x(sc[i]), .mb(cur_mb), .high(hi[i]), .neg(ng[i]),
                       .code(fc[i]), .len(fl[i]));
  end

  // Latched at LOAD for the block.
  logic [COEF_W-1:0] hi_q [15];
  logic [14:0]       ng_q, nz_q, hnz_q;
  logic [7:0]        fc_q [15];
  logic [3:0]        fl_q;
  logic              half_q;          // some magnitude >= 2^(mb-1)
  logic [3:0]        last_q;          // last scan position with a symbol
  logic [4:0]        prev;            // previous symbol position + 1
  logic [2:0]        fr;              // FlexBits row counter
  logic [2:0]        mb_q;

  // Block summary for LOAD.
  logic [3:0] last_c;
  logic       half_c, any_hi;
  always_comb begin
    last_c = '0; half_c = 1'b0; any_hi = 1'b0;
    for (int i = 0; i < 15; i++) begin
      if (hi[i] != '0) begin last_c = 4'(i); any_hi = 1'b1; end
      if (cur_mb != 3'd0 && absval(sc[i]) >= (COEF_W'(1) << (cur_mb - 3'd1))) half_c = 1'b1;
    end
  end

  // ---- current symbol position ----
  logic [3:0] pos;
  logic       have;
  always_comb begin
    pos = '0; have = 1'b0;
    for (int i = 14; i >= 0; i--) if (nz_q[i]) begin pos = 4'(i); have = 1'b1; end
  end

  // ---- Huffman ----
  logic        h_valid, h_dc;
  logic [3:0]  h_run;
  logic [COEF_W-1:0] h_level;
  logic        h_neg, h_last;
  logic [63:0] h_code;
  logic [6:0]  h_len;

  always_comb begin
    h_dc    = (st == S_DC);
    h_valid = (st == S_SYM) && have && hnz_q[pos];
    h_run   = 4'(5'(pos) - prev);
    h_level = h_dc ? absval(blk[0]) : hi_q[pos];
    h_neg   = h_dc ? (blk[0] < 0) : ng_q[pos];
    h_last  = (pos == last_q);
  end

  huff_enc u_huff (
    .clk, .rst_n, .valid(h_valid), .is_dc(h_dc), .ctx, .run(h_run),
    .level(h_level), .neg(h_neg), .last(h_last), .code(h_code), .len(h_len),
    .tbl_switch(ev_tbl)
  );

  // ---- main code output ----
  always_comb begin
    m_valid = 1'b0; m_code = '0; m_len = '0;
    if (st == S_DC) begin
      m_valid = 1'b1; m_code = h_code; m_len = h_len;
    end else if (st == S_LOAD) begin
      m_valid = 1'b1; m_code = 64'(any_hi); m_len = 7'd1;   // code block pattern
    end else if (h_valid) begin
      m_valid = 1'b1; m_code = h_code; m_len = h_len;
    end
  end

  // ---- FlexBits output: four scan positions per cycle ----
  always_comb begin
    f_valid = (st == S_SYM || st == S_FIN) && fr < 3'd4 && fl_q != '0;
    f_code  = '0;
    f_len   = '0;
    for (int j = 0; j < 4; j++) begin
      int p;
      p = 4 * int'(fr[1:0]) + j;
      if (p < 15) begin
        f_code = (f_code << fl_q) | 32'(fc_q[p]);
        f_len  = f_len + 6'(fl_q);
      end
    end
  end

  assign ready = (st == S_IDLE);
  assign done  = (st == S_FIN) && (fr >= 3'd3 || fl_q == '0) && !have;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st        <= S_IDLE;
      ctx       <= 1'b0;
      blk       <= '{default: '0};
      for (int b = 0; b < 2; b++) order[b] <= ZIGZAG;
      totals    <= '{default: '0};
      mbits     <= '{default: 3'd0};
      nz_q      <= '0;
      hnz_q     <= '0;
      ng_q      <= '0;
      fr        <= '0;
      prev      <= '0;
      last_q    <= '0;
      fl_q      <= '0;
      half_q    <= 1'b0;
      mb_q      <= '0;
      ev_swap   <= 1'b0;
      ev_mb_inc <= 1'b0;
      ev_mb_dec <= 1'b0;
    end else begin
      ev_swap   <= 1'b0;
      ev_mb_inc <= 1'b0;
      ev_mb_dec <= 1'b0;
      unique case (st)
        S_IDLE:
          if (start) begin
            blk <= coef;
            ctx <= (band == BAND_HP);
            st  <= (band == BAND_DC) ? S_DC : S_LOAD;
          end
        S_DC: st <= S_IDLE;
        S_LOAD: begin
          // Latch the split of the block taken in the current scan order.
          for (int i = 0; i < 15; i++) begin
            hi_q[i]  <= hi[i];
            fc_q[i]  <= fc[i];
            ng_q[i]  <= ng[i];
            nz_q[i]  <= (sc[i] != '0);
            hnz_q[i] <= (hi[i] != '0);
          end
          fl_q   <= fl[0];
          mb_q   <= cur_mb;
          prev   <= '0;
          last_q <= last_c;
          half_q <= half_c;
          fr     <= '0;
          st     <= S_SYM;
        end
        S_SYM: begin
          if (fr < 3'd4) fr <= fr + 3'd1;
          if (have) begin
            nz_q[pos] <= 1'b0;
            if (hnz_q[pos]) prev <= 5'(pos) + 5'd1;
            // update scan order
            begin
              logic [7:0] t;
              logic       halve;
              t = totals[ctx][pos] + 8'd1;
              halve = (t == 8'd255);
              for (int i = 0; i < 15; i++)
                if (halve) totals[ctx][i] <= totals[ctx][i] >> 1;
              if (pos != 4'd0 && t > totals[ctx][pos - 4'd1]) begin
                order[ctx][pos]         <= order[ctx][pos - 4'd1];
                order[ctx][pos - 4'd1]  <= order[ctx][pos];
                totals[ctx][pos]        <= halve ? totals[ctx][pos - 4'd1] >> 1
                                                 : totals[ctx][pos - 4'd1];
                totals[ctx][pos - 4'd1] <= halve ? t >> 1 : t;
                ev_swap <= 1'b1;
              end else begin
                totals[ctx][pos] <= halve ? t >> 1 : t;
              end
            end
          end else begin
            st <= S_FIN;
          end
        end
        S_FIN: begin
          if (fr < 3'd4) fr <= fr + 3'd1;
          if (done) begin
            st <= S_IDLE;
            if (($countones(hnz_q) >= 4) && mb_q < 3'(MODEL_BITS_MAX)) begin
              mbits[ctx] <= mb_q + 3'd1;
              ev_mb_inc  <= 1'b1;
            end else if (!half_q && mb_q != 3'd0) begin
              mbits[ctx] <= mb_q - 3'd1;
              ev_mb_dec  <= 1'b1;
            end
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end

endmodule
