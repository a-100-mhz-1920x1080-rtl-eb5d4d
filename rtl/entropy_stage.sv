// entropy_stage: pipeline stage 3 - adaptive encode of one predicted
// macroblock into the main bitstream and the FlexBits stream.
//
// Per colour component (Y, U, V) the macroblock is coded as: the DC value,
// the AD (low-pass) block - coefficient 0 of each of the 16 4x4 blocks, with
// the DC in position 0 - and then the 16 AC (high-pass) blocks in raster
// order. A fetcher reads the input coef_buffer into a one-block prefetch
// register (16 single-lane reads for the AD block, 4 row reads for an AC
// block) while ae_block_enc codes the previous block, so reading is hidden
// behind coding. Main-stream codes go through one bit_packer (codeword
// concentrate + packetizer), FlexBits through a second (pre-packetizer).
// After the last macroblock of a frame both packers are flushed and
// frame_done pulses.
//
// Follows the paper: one adaptive-encode stage after prediction, FlexBits
// packed apart from the main codes. Own choices: the coding order, 64-bit
// output words, flush at the end of each frame, and no back-pressure on the
// outputs (a word is presented for one cycle with its valid).
//
// Lint notes: ae_done is not needed because completion is taken from
// ae_ready; rv_i keeps the 5-bit read counter, of which only the low 4 bits
// (block position 0..15 of an AD read) are used.
module entropy_stage
  import jxr_pkg::*;
#(
  parameter int MB_COLS = 120,
  parameter int MB_ROWS = 68
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
  // bitstreams
  output logic        main_valid,
  output logic [63:0] main_data,
  output logic        flex_valid,
  output logic [63:0] flex_data,
  output logic [31:0] main_bits,
  output logic [31:0] flex_bits,
  output logic        mb_done,
  output logic        frame_done,
  // adaptation events
  output logic        ev_swap,
  output logic        ev_mb_inc,
  output logic        ev_mb_dec,
  output logic        ev_tbl
);
  typedef enum logic [1:0] {F_IDLE, F_READ, F_WAIT, F_FULL} fstate_e;

  fstate_e    fst;
  logic [5:0] unit;      // 0..50: component*17 + k, k=0 AD block, k>0 AC block k-1
  logic [4:0] rcnt;      // reads issued for the unit
  logic [1:0] u_c;
  logic [4:0] u_k;
  coef_t      nb [16];   // prefetched block
  logic       dc_sent;
  logic       units_done;
  logic       rv;
  logic [4:0] rv_i;
  logic       last_mb;
  logic       flush_q;

  always_comb begin
    u_c = 2'(unit / 17);
    u_k = 5'(unit % 17);
  end

  assign ib_rd_en   = (fst == F_READ);
  assign ib_rd_addr = (u_k == 5'd0) ? {u_c, rcnt[3:0], 2'b00}
                                    : {u_c, 4'(u_k - 5'd1), rcnt[1:0]};

  // ---- block encoder ----
  logic  ae_start, ae_ready, ae_done;
  band_e ae_band;
  logic  m_valid, f_valid;
  logic [63:0] m_code;
  logic [6:0]  m_len;
  logic [31:0] f_code;
  logic [5:0]  f_len;

  always_comb begin
    ae_start = (fst == F_FULL) && ae_ready;
    if (u_k != 5'd0)  ae_band = BAND_HP;
    else if (!dc_sent) ae_band = BAND_DC;
    else              ae_band = BAND_LP;
  end

  ae_block_enc u_ae (
    .clk, .rst_n, .start(ae_start), .band(ae_band), .coef(nb), .ready(ae_ready),
    .done(ae_done), .m_valid, .m_code, .m_len, .f_valid, .f_code, .f_len,
    .ev_swap, .ev_mb_inc, .ev_mb_dec, .ev_tbl
  );

  bit_packer #(.WORD(64)) u_main (
    .clk, .rst_n, .valid(m_valid), .code(m_code), .len(m_len), .flush(flush_q),
    .out_valid(main_valid), .out_data(main_data), .bits_total(main_bits)
  );

  bit_packer #(.WORD(64)) u_flex (
    .clk, .rst_n, .valid(f_valid), .code(64'(f_code)), .len(7'(f_len)),
    .flush(flush_q), .out_valid(flex_valid), .out_data(flex_data),
    .bits_total(flex_bits)
  );

  assign last_mb    = (ib_tag[7:0] == 8'(MB_COLS - 1)) && (ib_tag[15:8] == 8'(MB_ROWS - 1));
  assign ib_release = units_done && ae_ready && !ae_start;
  assign mb_done    = ib_release;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      fst        <= F_IDLE;
      unit       <= '0;
      rcnt       <= '0;
      dc_sent    <= 1'b0;
      units_done <= 1'b0;
      rv         <= 1'b0;
      rv_i       <= '0;
      flush_q    <= 1'b0;
      frame_done <= 1'b0;
    end else begin
      rv      <= ib_rd_en;
      rv_i    <= rcnt;
      flush_q <= 1'b0;
      frame_done <= flush_q;
      if (rv) begin
        if (u_k == 5'd0) nb[rv_i[3:0]] <= ib_rd_data[0];
        else for (int j = 0; j < 4; j++) nb[{rv_i[1:0], 2'(j)}] <= ib_rd_data[j];
      end
      unique case (fst)
        F_IDLE:
          if (ib_ready && !units_done) begin fst <= F_READ; rcnt <= '0; end
        F_READ: begin
          rcnt <= rcnt + 5'd1;
          if (rcnt == ((u_k == 5'd0) ? 5'd15 : 5'd3)) fst <= F_WAIT;
        end
        F_WAIT: fst <= F_FULL;
        F_FULL:
          if (ae_start) begin
            if (ae_band == BAND_DC) dc_sent <= 1'b1;
            else begin
              dc_sent <= 1'b0;
              if (unit == 6'd50) begin
                unit <= '0;
                units_done <= 1'b1;
                fst <= F_IDLE;
              end else begin
                unit <= unit + 6'd1;
                rcnt <= '0;
                fst  <= F_READ;
              end
            end
          end
        default: fst <= F_IDLE;
      endcase
      if (ib_release) begin
        units_done <= 1'b0;
        if (last_mb) flush_q <= 1'b1;
      end
    end
  end
endmodule
