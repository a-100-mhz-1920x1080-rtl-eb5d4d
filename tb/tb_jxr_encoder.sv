// tb_jxr_encoder: end-to-end test of the encoder on small frames (4 x 3
// macroblocks). Frame 1 is flat grey, which must code to exactly 54 main-stream
// bits per macroblock (per component a DC code "1" and 17 zero code-block-
// pattern bits) and no FlexBits. Frame 2 is a textured image whose macroblock
// brightness and stripe direction are chosen so that every mechanism of the
// design happens: input stall, DC prediction from LEFT, TOP and both, AC
// prediction from LEFT and TOP, scan-order swap, ModelBits increase and
// decrease, index/level table switch, end-of-frame flush. Each is counted and
// one that never happens is a failure. Also checks macroblock and word counts
// and that the average time per macroblock stays within 612 cycles (1920x1080
// at 20 frames/s on 100 MHz).
module tb_jxr_encoder;
  import jxr_pkg::*;
  localparam int MBC = 4, MBR = 3, NMB = MBC * MBR;
  logic clk = 0, rst_n = 0;
  logic [7:0] qp_dc = 1, qp_lp = 2, qp_hp = 3;
  logic pix_valid = 0, pix_ready;
  logic [7:0] pix_r, pix_g, pix_b;
  logic main_valid, flex_valid, mb_done, frame_done, dir_valid;
  logic [63:0] main_data, flex_data;
  logic [31:0] main_bits, flex_bits;
  pred_dir_e dc_dir, ac_dir;
  logic ev_swap, ev_mb_inc, ev_mb_dec, ev_tbl;
  int checks = 0, failures = 0, cycle = 0;
  int mwords = 0, fwords = 0, nmb = 0, nframe = 0;
  int stalls = 0, dc_cnt [4], ac_cnt [4], swaps = 0, incs = 0, decs = 0, tbls = 0;

  jxr_encoder #(.MB_COLS(MBC), .MB_ROWS(MBR)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycle++;
    if (rst_n) begin
      if (main_valid) mwords++;
      if (flex_valid) fwords++;
      if (mb_done) nmb++;
      if (frame_done) nframe++;
      if (pix_valid && !pix_ready) stalls++;
      if (dir_valid) begin dc_cnt[dc_dir]++; ac_cnt[ac_dir]++; end
      if (ev_swap) swaps++;
      if (ev_mb_inc) incs++;
      if (ev_mb_dec) decs++;
      if (ev_tbl) tbls++;
    end
  end

  // Macroblock brightness: gives BOTH at (1,1), LEFT at (2,1), TOP at (1,2).
  int bright [MBR][MBC] = '{'{50, 50, 200, 200}, '{50, 50, 50, 200}, '{200, 50, 200, 50}};

  function automatic logic [7:0] clip(int v);
    return (v < 0) ? 8'd0 : (v > 255) ? 8'd255 : 8'(v);
  endfunction

  task automatic send_frame(bit flat);
    for (int my = 0; my < MBR; my++)
      for (int mx = 0; mx < MBC; mx++)
        for (int p = 0; p < 256; p++) begin
          int x, y, v, t;
          x = p % 16; y = p / 16;
          if (flat) v = 128;
          else begin
            // even macroblocks: ramp along x with vertical stripes; odd: ramp
            // along y with horizontal stripes
            t = ((mx + my) % 2 == 0) ? 6 * (x - 8) + 20 * ((x / 2) % 2)
                                     : 6 * (y - 8) + 20 * ((y / 2) % 2);
            v = bright[my][mx] + t + int'($urandom_range(0, 6)) - 3;
          end
          @(negedge clk);
          pix_valid = 1;
          pix_r = clip(v + (flat ? 0 : 20)); pix_g = clip(v); pix_b = clip(v - (flat ? 0 : 20));
          @(posedge clk);
          while (!pix_ready) @(posedge clk);
        end
    @(negedge clk);
    pix_valid = 0;
  endtask

  task automatic expect_int(int got, int exp, string what);
    checks++;
    if (got != exp) begin failures++; $display("%s: got %0d exp %0d", what, got, exp); end
  endtask

  task automatic expect_seen(int n, string what);
    checks++;
    if (n == 0) begin failures++; $display("mechanism never happened: %s", what); end
  endtask

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int c0, w0, f0, b0, fb0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // frame 1: flat grey
    send_frame(1);
    while (nframe < 1) @(negedge clk);
    repeat (3) @(negedge clk);
    expect_int(int'(main_bits), 54 * NMB, "flat frame main bits");
    expect_int(int'(flex_bits), 0, "flat frame FlexBits");
    expect_int(mwords, (54 * NMB + 63) / 64, "flat frame words");
    expect_int(nmb, NMB, "flat frame macroblocks");
    // frame 2: textured
    c0 = cycle; w0 = mwords; f0 = fwords; b0 = int'(main_bits); fb0 = int'(flex_bits);
    send_frame(0);
    while (nframe < 2) @(negedge clk);
    repeat (3) @(negedge clk);
    expect_int(nmb, 2 * NMB, "macroblocks");
    expect_int(mwords - w0, (int'(main_bits) - b0 + 63) / 64, "main words");
    expect_int(fwords - f0, (int'(flex_bits) - fb0 + 63) / 64, "flex words");
    checks++;
    if ((cycle - c0) > 612 * NMB + 1500) begin
      failures++;
      $display("frame took %0d cycles for %0d macroblocks", cycle - c0, NMB);
    end
    expect_seen(stalls, "input stall");
    expect_seen(dc_cnt[PRED_LEFT], "DC from LEFT");
    expect_seen(dc_cnt[PRED_TOP], "DC from TOP");
    expect_seen(dc_cnt[PRED_BOTH], "DC from LEFT and TOP");
    expect_seen(ac_cnt[PRED_LEFT], "AC from LEFT");
    expect_seen(ac_cnt[PRED_TOP], "AC from TOP");
    expect_seen(swaps, "scan-order swap");
    expect_seen(incs, "ModelBits increase");
    expect_seen(decs, "ModelBits decrease");
    expect_seen(tbls, "Huffman table switch");
    expect_seen(nframe, "end-of-frame flush");
    $display("frame 2: %0d cycles, main %0d bits, FlexBits %0d bits; stalls %0d",
             cycle - c0, int'(main_bits) - b0, int'(flex_bits) - fb0, stalls);
    $display("DC dirs none/left/top/both %0d/%0d/%0d/%0d, AC dirs none/left/top %0d/%0d/%0d",
             dc_cnt[0], dc_cnt[1], dc_cnt[2], dc_cnt[3], ac_cnt[0], ac_cnt[1], ac_cnt[2]);
    $display("swaps %0d, ModelBits +%0d -%0d, table switches %0d", swaps, incs, decs, tbls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
