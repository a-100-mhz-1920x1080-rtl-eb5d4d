// tb_jxr_encoder_q512: the encoder on a 512x512 picture (32 x 32 macroblocks),
// the size of the classic test images used to compare tile layouts, coded
// twice as whole-frame single tiles: once with every quantiser step at 5 and
// once at 70. The picture is generated here (ramps, a disc, a striped patch
// and +/-6 noise) as a stand-in for a natural image.
//
// Per frame it checks that all 1024 macroblocks are coded, that frame_done
// arrives, and that the 64-bit word counts of both streams equal the rounded-up
// bit counts of that frame. Across frames it checks that the coarse step gives
// a shorter stream than the fine one, and that the fine frame still meets the
// 612-cycle-per-macroblock budget of 1920x1080 at 20 frames/s and 100 MHz.
// The second frame starts only after the first has been flushed, so that the
// step change cannot reach macroblocks of the first frame.
//
// The test sizes (512x512, steps 5 and 70) follow the evaluation setting of
// the design's reference; the picture itself and the checks are this
// testbench's own.
module tb_jxr_encoder_q512;
  import jxr_pkg::*;
  localparam int W = 512, H = 512, MBC = 32, MBR = 32, NMB = MBC * MBR;
  logic clk = 0, rst_n = 0;
  logic [7:0] qp_dc = 5, qp_lp = 5, qp_hp = 5;
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
  int bits_f[2], cyc_f[2];

  jxr_encoder #(.MB_COLS(MBC), .MB_ROWS(MBR)) dut (.*);

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
    v = 50 + (x * 120) / W + (y * 50) / H;
    if (x >= 256 && y < 256) v += 20 * ((x / 2) % 2);
    if ((x - 300) * (x - 300) + (y - 330) * (y - 330) < 110 * 110) v += 60 - 20 * ch;
    return v + 10 * (ch - 1);
  endfunction

  task automatic run_frame(int f);
    int m0, f0, mw0, fw0;
    m0 = int'(main_bits); f0 = int'(flex_bits); mw0 = mwords; fw0 = fwords;
    nmb = 0;
    c_first = cycle;
    for (int my = 0; my < MBR; my++)
      for (int mx = 0; mx < MBC; mx++)
        for (int p = 0; p < 256; p++) begin
          int x, y, n;
          x = mx * 16 + p % 16; y = my * 16 + p / 16;
          n = int'($urandom_range(0, 12)) - 6;
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
    while (nframe < f + 1) @(negedge clk);
    repeat (3) @(negedge clk);
    bits_f[f] = int'(main_bits) - m0 + int'(flex_bits) - f0;
    cyc_f[f] = int'(c_done - c_first);
    checks++;
    if (nmb != NMB) begin failures++; $display("frame %0d: coded %0d macroblocks", f, nmb); end
    checks++;
    if (mwords - mw0 != (int'(main_bits) - m0 + 63) / 64 ||
        fwords - fw0 != (int'(flex_bits) - f0 + 63) / 64) begin
      failures++;
      $display("frame %0d: word counts %0d/%0d for %0d/%0d bits", f, mwords - mw0,
               fwords - fw0, int'(main_bits) - m0, int'(flex_bits) - f0);
    end
    $display("step %0d: %0d cycles (%0d per macroblock), main %0d bits, FlexBits %0d bits",
             qp_hp, cyc_f[f], cyc_f[f] / NMB, int'(main_bits) - m0, int'(flex_bits) - f0);
  endtask

  initial begin
    #100000000;
    failures++;
    $display("watchdog: frame %0d, %0d macroblocks coded", nframe, nmb);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_frame(0);
    qp_dc = 70; qp_lp = 70; qp_hp = 70;
    run_frame(1);
    checks++;
    if (bits_f[1] >= bits_f[0]) begin
      failures++;
      $display("step 70 gave %0d bits, step 5 gave %0d", bits_f[1], bits_f[0]);
    end
    checks++;
    if (cyc_f[0] > NMB * 612) begin failures++; $display("step 5 frame over budget"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
