// tb_jxr_encoder_full: one complete 1920x1080 frame through the encoder at its
// default parameters (120 x 68 macroblocks; the 8 rows below row 1079 repeat
// the last row). The image is generated here: smooth ramps, stripes and
// noise. Checks that all 8160 macroblocks are coded, that the frame ends with
// frame_done, that output word counts match the bit counts, and that the
// frame takes no more than 8160 x 612 = 4,993,920 cycles, i.e. at least 20 frames/s on a
// 100 MHz clock (612 cycles per macroblock).
module tb_jxr_encoder_full;
  import jxr_pkg::*;
  localparam int W = 1920, H = 1080, MBC = 120, MBR = 68, NMB = MBC * MBR;
  logic clk = 0, rst_n = 0;
  logic [7:0] qp_dc = 2, qp_lp = 4, qp_hp = 8;
  logic pix_valid = 0, pix_ready;
  logic [7:0] pix_r, pix_g, pix_b;
  logic main_valid, flex_valid, mb_done, frame_done, dir_valid;
  logic [63:0] main_data, flex_data;
  logic [31:0] main_bits, flex_bits;
  pred_dir_e dc_dir, ac_dir;
  logic ev_swap, ev_mb_inc, ev_mb_dec, ev_tbl;
  int checks = 0, failures = 0;
  longint cycle = 0, c_first = 0, c_done = 0;
  int mwords = 0, fwords = 0, nmb = 0, nframe = 0;

  jxr_encoder dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycle++;
    if (rst_n) begin
      if (main_valid) mwords++;
      if (flex_valid) fwords++;
      if (mb_done) nmb++;
      if (frame_done) begin nframe++; c_done = cycle; end
    end
  end

  function automatic logic [7:0] clip(int v);
    return (v < 0) ? 8'd0 : (v > 255) ? 8'd255 : 8'(v);
  endfunction

  function automatic int img(int x, int y, int ch);
    int v;
    if (y >= H) y = H - 1;
    v = 40 + (x * 150) / W + (y * 60) / H;                      // smooth ramps
    if (((x / 256) + (y / 256)) % 2 == 1) v += 12 * ((x / 3) % 2);   // stripe patches
    if ((x - 900) * (x - 900) + (y - 500) * (y - 500) < 200 * 200) v += 50;  // a disc
    return v + 15 * (ch - 1);
  endfunction

  initial begin
    #200000000;
    failures++;
    $display("watchdog: %0d macroblocks coded", nmb);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    c_first = cycle;
    for (int my = 0; my < MBR; my++)
      for (int mx = 0; mx < MBC; mx++)
        for (int p = 0; p < 256; p++) begin
          int x, y, n;
          x = mx * 16 + p % 16; y = my * 16 + p / 16;
          n = int'($urandom_range(0, 4)) - 2;
          @(negedge clk);
          pix_valid = 1;
          pix_r = clip(img(x, y, 0) + n);
          pix_g = clip(img(x, y, 1) + n);
          pix_b = clip(img(x, y, 2) + n);
          @(posedge clk);
          while (!pix_ready) @(posedge clk);
        end
    @(negedge clk);
    pix_valid = 0;
    while (nframe < 1) @(negedge clk);
    repeat (3) @(negedge clk);
    checks++;
    if (nmb != NMB) begin failures++; $display("coded %0d macroblocks", nmb); end
    checks++;
    if (mwords != (int'(main_bits) + 63) / 64 || fwords != (int'(flex_bits) + 63) / 64) begin
      failures++;
      $display("word counts %0d/%0d for %0d/%0d bits", mwords, fwords, main_bits, flex_bits);
    end
    checks++;
    if (c_done - c_first > 64'(NMB) * 64'd612) begin
      failures++;
      $display("frame took %0d cycles", c_done - c_first);
    end
    $display("frame: %0d cycles (%0d per macroblock), main %0d bits, FlexBits %0d bits",
             c_done - c_first, (c_done - c_first) / 64'(NMB), main_bits, flex_bits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
