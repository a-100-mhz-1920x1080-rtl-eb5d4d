// jxr_encoder: JPEG XR (HD Photo) still-image encoder core, 4:4:4, 8-bit RGB
// in, two packed bitstreams out.
//
// A three-stage macroblock pipeline, as in the paper's pipeline figure:
//   xform_stage   colour conversion, pre-filter, two-stage PCT, quantisation
//   pred_stage    DC / AD / AC prediction
//   entropy_stage adaptive scan, run-level and adaptive Huffman coding,
//                 FlexBits, packetising
// joined by two ping-pong coefficient SRAMs (coef_buffer, 768 x 4 bytes per
// bank) so that three consecutive macroblocks are in flight. Each stage
// takes about 270-600 cycles per macroblock; the paper's target, 1920x1080
// at 20 frames/s on a 100 MHz clock, allows 612 cycles per macroblock
// (8160 macroblocks per frame).
//
// Interface: pixels (pix_valid/pix_ready, R, G, B) one per cycle in raster
// order inside each 16x16 macroblock, macroblocks in raster order over a
// frame of MB_COLS x MB_ROWS; the source pads the last partial macroblock row.
// qp_dc/qp_lp/qp_hp are the quantiser steps of the three bands and must be
// held for a frame. Outputs: 64-bit words of the main stream and the FlexBits
// stream (valid for one cycle each, no back-pressure), their bit counts,
// mb_done per coded macroblock and frame_done after the final flush. The
// remaining outputs expose prediction directions and adaptation events.
module jxr_encoder
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
  input  logic        pix_valid,
  output logic        pix_ready,
  input  logic [7:0]  pix_r,
  input  logic [7:0]  pix_g,
  input  logic [7:0]  pix_b,
  output logic        main_valid,
  output logic [63:0] main_data,
  output logic        flex_valid,
  output logic [63:0] flex_data,
  output logic [31:0] main_bits,
  output logic [31:0] flex_bits,
  output logic        mb_done,
  output logic        frame_done,
  output logic        dir_valid,
  output pred_dir_e   dc_dir,
  output pred_dir_e   ac_dir,
  output logic        ev_swap,
  output logic        ev_mb_inc,
  output logic        ev_mb_dec,
  output logic        ev_tbl
);
  // stage 1 -> buffer A
  logic        a_wr_ready, a_we, a_commit;
  logic [7:0]  a_waddr;
  coef_t       a_wdata [4];
  logic [15:0] a_wtag;
  // buffer A -> stage 2
  logic        a_rd_ready, a_re, a_release;
  logic [7:0]  a_raddr;
  coef_t       a_rdata [4];
  logic [15:0] a_rtag;
  // stage 2 -> buffer B
  logic        b_wr_ready, b_we, b_commit;
  logic [7:0]  b_waddr;
  coef_t       b_wdata [4];
  logic [15:0] b_wtag;
  // buffer B -> stage 3
  logic        b_rd_ready, b_re, b_release;
  logic [7:0]  b_raddr;
  coef_t       b_rdata [4];
  logic [15:0] b_rtag;

  xform_stage #(.MB_COLS(MB_COLS), .MB_ROWS(MB_ROWS)) u_xform (
    .clk, .rst_n, .qp_dc, .qp_lp, .qp_hp,
    .pix_valid, .pix_ready, .pix_r, .pix_g, .pix_b,
    .ob_ready(a_wr_ready), .ob_we(a_we), .ob_addr(a_waddr), .ob_data(a_wdata),
    .ob_commit(a_commit), .ob_tag(a_wtag)
  );

  coef_buffer u_buf_a (
    .clk, .rst_n,
    .wr_ready(a_wr_ready), .wr_en(a_we), .wr_addr(a_waddr), .wr_data(a_wdata),
    .wr_commit(a_commit), .wr_tag(a_wtag),
    .rd_ready(a_rd_ready), .rd_en(a_re), .rd_addr(a_raddr), .rd_data(a_rdata),
    .rd_tag(a_rtag), .rd_release(a_release)
  );

  pred_stage #(.MB_COLS(MB_COLS)) u_pred (
    .clk, .rst_n,
    .ib_ready(a_rd_ready), .ib_rd_en(a_re), .ib_rd_addr(a_raddr),
    .ib_rd_data(a_rdata), .ib_tag(a_rtag), .ib_release(a_release),
    .ob_ready(b_wr_ready), .ob_we(b_we), .ob_addr(b_waddr), .ob_data(b_wdata),
    .ob_commit(b_commit), .ob_tag(b_wtag),
    .dir_valid, .dc_dir, .ac_dir
  );

  coef_buffer u_buf_b (
    .clk, .rst_n,
    .wr_ready(b_wr_ready), .wr_en(b_we), .wr_addr(b_waddr), .wr_data(b_wdata),
    .wr_commit(b_commit), .wr_tag(b_wtag),
    .rd_ready(b_rd_ready), .rd_en(b_re), .rd_addr(b_raddr), .rd_data(b_rdata),
    .rd_tag(b_rtag), .rd_release(b_release)
  );

  entropy_stage #(.MB_COLS(MB_COLS), .MB_ROWS(MB_ROWS)) u_ent (
    .clk, .rst_n,
    .ib_ready(b_rd_ready), .ib_rd_en(b_re), .ib_rd_addr(b_raddr),
    .ib_rd_data(b_rdata), .ib_tag(b_rtag), .ib_release(b_release),
    .main_valid, .main_data, .flex_valid, .flex_data, .main_bits, .flex_bits,
    .mb_done, .frame_done, .ev_swap, .ev_mb_inc, .ev_mb_dec, .ev_tbl
  );
endmodule
