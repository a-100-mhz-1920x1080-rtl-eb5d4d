// xform_stage: pipeline stage 1 - colour conversion, pre-filter, two-stage PCT
// and quantisation of one 16x16 macroblock.
//
// Pixels arrive one per cycle in raster order inside the macroblock and
// macroblocks in raster order over the frame. Each pixel goes through
// color_conv straight into a macroblock register array (3 components x 256
// samples). The array has two banks: one is filled from the input while the
// other is processed, so input and processing overlap.
//
// Processing of a full bank, in place, one 4x4 block per cycle:
//   PF   27 cycles  pre-filter on the 3x3 interior 4x4 blocks offset by two
//                   samples, per component
//   PCT1 48 cycles  first-stage PCT on the 16 blocks per component; each block's
//                   DC goes into the DC register array
//   PCT2  3 cycles  second-stage PCT on each component's 4x4 DC block; output k
//                   replaces coefficient 0 of block k (k = 0 is the macroblock DC,
//                   k > 0 the low-pass coefficients)
//   QW  192 cycles  quantise one 4-coefficient row per cycle and write it to the
//                   output coef_buffer (row address component*64+block*4+row)
// then the bank is committed with the macroblock position as tag.
// About 272 cycles per macroblock, below the 256-cycle input time plus slack
// the paper's pipeline assumes (612 cycles per macroblock at 100 MHz for
// 1920x1080 at 20 frames/s).
//
// Follows the paper: colour conversion, pre-filter and PCT in one stage on
// 4x4 blocks, a separate DC register array feeding the PCT, three quantiser
// bands. Own choices: the bank scheme, cycle counts, and that the pre-filter
// is applied only inside the macroblock (blocks straddling macroblock edges
// are not filtered).
module xform_stage
  import jxr_pkg::*;
#(
  parameter int MB_COLS = 120,   // 1920 / 16
  parameter int MB_ROWS = 68     // ceil(1080 / 16)
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [7:0]  qp_dc,
  input  logic [7:0]  qp_lp,
  input  logic [7:0]  qp_hp,
  // pixel input
  input  logic        pix_valid,
  output logic        pix_ready,
  input  logic [7:0]  pix_r,
  input  logic [7:0]  pix_g,
  input  logic [7:0]  pix_b,
  // coefficient buffer write side
  input  logic        ob_ready,
  output logic        ob_we,
  output logic [7:0]  ob_addr,
  output coef_t       ob_data [4],
  output logic        ob_commit,
  output logic [15:0] ob_tag
);
  typedef enum logic [2:0] {S_IDLE, S_PF, S_PCT1, S_PCT2, S_QW, S_COMMIT} state_e;

  // Macroblock register array, two banks, stored as 4x4 block words:
  // mbuf[bank][component][block][position], block = 4*by+bx, position = 4*y+x.
  coef_t       mbuf [2][NCOMP][16][16];
  coef_t       dcarr [NCOMP][16];      // DC register array
  logic [1:0]  bank_used;
  logic        abank, pbank;           // accept bank, process bank
  logic [7:0]  acnt;                   // pixels accepted into abank
  logic [7:0]  wcnt;                   // converted pixels written (raster index)
  logic        wbank;
  logic [7:0]  in_mbx, in_mby;
  logic [15:0] bank_tag [2];

  // ---------------- input side ----------------
  logic  acc, cc_valid;
  coef_t cc_y, cc_u, cc_v;

  assign pix_ready = !bank_used[abank];
  assign acc       = pix_valid && pix_ready;

  color_conv u_cc (
    .clk, .rst_n, .in_valid(acc), .r(pix_r), .g(pix_g), .b(pix_b),
    .out_valid(cc_valid), .y(cc_y), .u(cc_u), .v(cc_v)
  );

  // Raster index wcnt = 16*row + col -> block {row[3:2], col[3:2]}, position
  // {row[1:0], col[1:0]}.
  logic [3:0] w_blk, w_pos;
  assign w_blk = {wcnt[7:6], wcnt[3:2]};
  assign w_pos = {wcnt[5:4], wcnt[1:0]};

  // ---------------- processing side ----------------
  state_e      st;
  logic [7:0]  cnt;
  logic [1:0]  pc;          // component being processed
  logic [3:0]  pk;          // block index inside component
  logic        proc_go;

  assign proc_go = bank_used[pbank] && !(cc_valid && wbank == pbank);

  // Pre-filter block k (3x3 grid, offset by two samples) covers the four
  // PCT blocks q = 0..3 at (by + q/2, bx + q%2); sample (i,j) of the filter
  // block lives in quadrant q = 2*(i>=2)+(j>=2), at position ((i+2)%4, (j+2)%4).
  logic [3:0] pf_blk [4];
  always_comb begin
    logic [1:0] by, bx;
    by = 2'(int'(pk) / 3);
    bx = 2'(int'(pk) % 3);
    for (int q = 0; q < 4; q++) pf_blk[q] = {by + 2'(q / 2), bx + 2'(q % 2)};
  end

  function automatic int pf_q(int i);     // quadrant of filter-block sample i
    return 2 * ((i / 4) / 2) + ((i % 4) / 2);
  endfunction
  function automatic int pf_p(int i);     // position inside that quadrant
    return 4 * (((i / 4) + 2) % 4) + (((i % 4) + 2) % 4);
  endfunction

  coef_t quad [4][16];
  coef_t pf_in [16], pf_out [16], pct_in [16], pct_out [16];

  always_comb begin
    for (int q = 0; q < 4; q++) quad[q] = mbuf[pbank][pc][pf_blk[q]];
    for (int i = 0; i < 16; i++) pf_in[i] = quad[pf_q(i)][pf_p(i)];
    pct_in = (st == S_PCT2) ? dcarr[pc] : mbuf[pbank][pc][pk];
  end

  prefilter4x4 u_pf  (.x(pf_in), .y(pf_out));
  pct4x4       u_pct (.x(pct_in), .y(pct_out));

  // Quantiser row read.
  logic [1:0] qrow;
  coef_t      qx [4], qy [4];
  band_e      qband [4];
  assign qrow = cnt[1:0];

  always_comb begin
    for (int i = 0; i < 4; i++) begin
      qx[i] = mbuf[pbank][pc][pk][{qrow, 2'(i)}];
      if (qrow == 2'd0 && i == 0) qband[i] = (pk == 4'd0) ? BAND_DC : BAND_LP;
      else                        qband[i] = BAND_HP;
    end
  end

  quantizer u_q (.x(qx), .band(qband), .qp_dc, .qp_lp, .qp_hp, .q(qy));

  always_ff @(posedge clk) begin
    if (cc_valid) begin
      mbuf[wbank][0][w_blk][w_pos] <= cc_y;
      mbuf[wbank][1][w_blk][w_pos] <= cc_u;
      mbuf[wbank][2][w_blk][w_pos] <= cc_v;
    end
    unique case (st)
      S_PF:
        for (int i = 0; i < 16; i++)
          mbuf[pbank][pc][pf_blk[pf_q(i)]][pf_p(i)] <= pf_out[i];
      S_PCT1: begin
        mbuf[pbank][pc][pk] <= pct_out;
        dcarr[pc][pk]       <= pct_out[0];
      end
      S_PCT2:
        for (int k = 0; k < 16; k++) mbuf[pbank][pc][k][0] <= pct_out[k];
      default: ;
    endcase
  end

  assign ob_we     = (st == S_QW) && ob_ready;
  assign ob_addr   = {pc, pk, qrow};
  assign ob_data   = qy;
  assign ob_commit = (st == S_COMMIT);
  assign ob_tag    = bank_tag[pbank];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st        <= S_IDLE;
      cnt       <= '0;
      pc        <= '0;
      pk        <= '0;
      pbank     <= 1'b0;
      abank     <= 1'b0;
      wbank     <= 1'b0;
      acnt      <= '0;
      wcnt      <= '0;
      bank_used <= '0;
      in_mbx    <= '0;
      in_mby    <= '0;
      bank_tag  <= '{default: '0};
    end else begin
      // input bookkeeping
      if (acc) begin
        acnt <= acnt + 8'd1;
        if (acnt == 8'd255) begin
          bank_used[abank] <= 1'b1;
          bank_tag[abank]  <= {in_mby, in_mbx};
          abank            <= ~abank;
          if (in_mbx == 8'(MB_COLS - 1)) begin
            in_mbx <= '0;
            in_mby <= (in_mby == 8'(MB_ROWS - 1)) ? '0 : in_mby + 8'd1;
          end else begin
            in_mbx <= in_mbx + 8'd1;
          end
        end
      end
      if (cc_valid) begin
        wcnt <= wcnt + 8'd1;
        if (wcnt == 8'd255) wbank <= ~wbank;
      end
      // processing FSM
      unique case (st)
        S_IDLE:
          if (proc_go) begin
            st <= S_PF; pc <= '0; pk <= '0;
          end
        S_PF:
          if (pk == 4'd8) begin
            pk <= '0;
            if (pc == 2'd2) begin pc <= '0; st <= S_PCT1; end
            else pc <= pc + 2'd1;
          end else pk <= pk + 4'd1;
        S_PCT1:
          if (pk == 4'd15) begin
            pk <= '0;
            if (pc == 2'd2) begin pc <= '0; st <= S_PCT2; end
            else pc <= pc + 2'd1;
          end else pk <= pk + 4'd1;
        S_PCT2:
          if (pc == 2'd2) begin pc <= '0; pk <= '0; cnt <= '0; st <= S_QW; end
          else pc <= pc + 2'd1;
        S_QW:
          if (ob_ready) begin
            cnt <= cnt + 8'd1;
            if (qrow == 2'd3) begin
              if (pk == 4'd15) begin
                pk <= '0;
                if (pc == 2'd2) st <= S_COMMIT;
                else pc <= pc + 2'd1;
              end else pk <= pk + 4'd1;
            end
          end
        S_COMMIT: if (ob_ready) begin
          bank_used[pbank] <= 1'b0;
          pbank            <= ~pbank;
          st               <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
