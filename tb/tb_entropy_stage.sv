// tb_entropy_stage: frame 1 is two all-zero macroblocks, whose bitstream is
// known exactly: per component a DC code "1" and 17 code-block-pattern bits
// "0" (AD block and 16 AC blocks), 54 bits per macroblock, no FlexBits; the
// two output words (one full, one flushed with zero padding) are compared bit
// for bit. Frame 2 is two random macroblocks: the adaptation events must
// occur, the word counts must match the bit counts, frame_done must follow
// the last macroblock, and a macroblock of sparse coefficients (one in four
// non-zero, as after quantisation) must be coded within the 612-cycle
// budget of 1920x1080 at 20 frames/s on a 100 MHz clock.
module tb_entropy_stage;
  import jxr_pkg::*;
  logic clk = 0, rst_n = 0;
  logic a_wr_ready, a_we = 0, a_commit = 0;
  logic [7:0] a_waddr;
  coef_t a_wdata [4];
  logic [15:0] a_wtag;
  logic a_rd_ready, a_re, a_release;
  logic [7:0] a_raddr;
  coef_t a_rdata [4];
  logic [15:0] a_rtag;
  logic main_valid, flex_valid, mb_done, frame_done, ev_swap, ev_mb_inc, ev_mb_dec, ev_tbl;
  logic [63:0] main_data, flex_data;
  logic [31:0] main_bits, flex_bits;
  logic [63:0] words [$];
  int fwords = 0, nmb = 0, nframe = 0, swaps = 0, incs = 0, decs = 0, tbls = 0;
  int checks = 0, failures = 0, cycle = 0, start_cyc = 0, max_mb_cyc = 0;

  coef_buffer u_a (.clk, .rst_n, .wr_ready(a_wr_ready), .wr_en(a_we), .wr_addr(a_waddr),
    .wr_data(a_wdata), .wr_commit(a_commit), .wr_tag(a_wtag), .rd_ready(a_rd_ready),
    .rd_en(a_re), .rd_addr(a_raddr), .rd_data(a_rdata), .rd_tag(a_rtag), .rd_release(a_release));
  entropy_stage #(.MB_COLS(2), .MB_ROWS(1)) dut (.clk, .rst_n, .ib_ready(a_rd_ready),
    .ib_rd_en(a_re), .ib_rd_addr(a_raddr), .ib_rd_data(a_rdata), .ib_tag(a_rtag),
    .ib_release(a_release), .main_valid, .main_data, .flex_valid, .flex_data, .main_bits,
    .flex_bits, .mb_done, .frame_done, .ev_swap, .ev_mb_inc, .ev_mb_dec, .ev_tbl);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycle++;
    if (rst_n) begin
      if (main_valid) words.push_back(main_data);
      if (flex_valid) fwords++;
      if (mb_done) begin
        nmb++;
        // the second macroblock of a frame was waiting: pure coding time
        if ((nmb % 2) == 0 && cycle - start_cyc > max_mb_cyc) max_mb_cyc = cycle - start_cyc;
        start_cyc = cycle;
      end
      if (frame_done) nframe++;
      if (ev_swap) swaps++;
      if (ev_mb_inc) incs++;
      if (ev_mb_dec) decs++;
      if (ev_tbl) tbls++;
    end
  end

  task automatic put_mb(int m, bit zero);
    while (!a_wr_ready) @(negedge clk);
    for (int a = 0; a < 192; a++) begin
      a_we = 1; a_waddr = 8'(a);
      for (int l = 0; l < 4; l++) begin
        int v;
        // sparse, as after quantisation: one coefficient in four is non-zero
        v = ($urandom_range(0, 3) == 0) ? int'($urandom_range(1, 6)) : 0;
        if ($urandom_range(0, 1) == 0) v = -v;
        if ($urandom_range(0, 9) == 0) v = v * 40;
        a_wdata[l] = zero ? '0 : coef_t'(v);
      end
      @(negedge clk);
    end
    a_we = 0; a_commit = 1; a_wtag = {8'd0, 8'(m % 2)};
    @(negedge clk);
    a_commit = 0;
  endtask

  task automatic expect_int(int got, int exp, string what);
    checks++;
    if (got != exp) begin failures++; $display("%s: got %0d exp %0d", what, got, exp); end
  endtask

  initial begin
    #3000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] e;
    int b0, f0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    put_mb(0, 1);
    put_mb(1, 1);
    while (nframe < 1) @(negedge clk);
    repeat (2) @(negedge clk);
    expect_int(int'(main_bits), 108, "zero frame bits");
    expect_int(int'(flex_bits), 0, "zero frame FlexBits");
    expect_int(words.size(), 2, "zero frame words");
    e = '0;
    for (int i = 0; i < 6; i++) e[127 - 18 * i] = 1'b1;
    checks++;
    if (words.size() == 2 && {words[0], words[1]} != e) begin
      failures++;
      $display("zero frame stream %h %h", words[0], words[1]);
    end
    words.delete();
    b0 = int'(main_bits); f0 = int'(flex_bits);
    put_mb(2, 0);
    put_mb(3, 0);
    while (nframe < 2) @(negedge clk);
    repeat (2) @(negedge clk);
    expect_int(nmb, 4, "macroblocks coded");
    expect_int(words.size(), (int'(main_bits) - b0 + 63) / 64, "main words");
    expect_int(fwords, (int'(flex_bits) - f0 + 63) / 64, "flex words");
    checks++;
    if (swaps == 0 || incs == 0 || tbls == 0) begin
      failures++;
      $display("events swap %0d inc %0d tbl %0d", swaps, incs, tbls);
    end
    checks++;
    if (max_mb_cyc > 612) begin failures++; $display("macroblock took %0d cycles", max_mb_cyc); end
    $display("main bits %0d, flex bits %0d, max cycles per macroblock %0d", main_bits, flex_bits, max_mb_cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
