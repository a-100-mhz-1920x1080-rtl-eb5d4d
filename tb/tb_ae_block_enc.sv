// tb_ae_block_enc: drives a DC value and a sequence of blocks through the
// adaptive block encoder and checks, against codes worked out by hand from
// the tables: the DC code, the code block pattern bit, run-level codes, the
// scan-order swap (seen as a changed run in the next block), the switch to the
// flat index table, ModelBits increase and decrease, FlexBits lengths and the
// busy time of each block (nnz+3 cycles, at least 5 when FlexBits are sent).
module tb_ae_block_enc;
  import jxr_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  band_e band;
  coef_t coef [16];
  logic ready, done, m_valid, f_valid, ev_swap, ev_mb_inc, ev_mb_dec, ev_tbl;
  logic [63:0] m_code;
  logic [6:0] m_len;
  logic [31:0] f_code;
  logic [5:0] f_len;
  longint mc [$];
  int ml [$];
  int fbits, swaps, incs, decs;
  int checks = 0, failures = 0;

  ae_block_enc dut (.*);
  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n) begin
    if (m_valid) begin mc.push_back(longint'(m_code)); ml.push_back(int'(m_len)); end
    if (f_valid) fbits += int'(f_len);
    if (ev_swap) swaps++;
    if (ev_mb_inc) incs++;
    if (ev_mb_dec) decs++;
  end

  // Runs one job; returns the number of cycles ready was low.
  task automatic run_job(band_e b, int vals [16], output int busy);
    mc.delete(); ml.delete(); fbits = 0;
    @(negedge clk);
    band = b;
    for (int i = 0; i < 16; i++) coef[i] = coef_t'(vals[i]);
    start = 1;
    @(negedge clk);
    start = 0;
    busy = 0;
    while (!ready) begin busy++; @(negedge clk); end
    @(negedge clk);
  endtask

  task automatic expect_m(int idx, longint c, int l, string what);
    checks++;
    if (mc.size() <= idx || mc[idx] != c || ml[idx] != l) begin
      failures++;
      if (mc.size() > idx) $display("%s: got %b/%0d exp %b/%0d", what, mc[idx], ml[idx], c, l);
      else $display("%s: missing code", what);
    end
  endtask

  task automatic expect_int(int got, int exp, string what);
    checks++;
    if (got != exp) begin failures++; $display("%s: got %0d exp %0d", what, got, exp); end
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int v [16], busy;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // 1. DC value -5: EG0(5) = 00110, sign 1
    v = '{default: 0}; v[0] = -5;
    run_job(BAND_DC, v, busy);
    expect_int(mc.size(), 1, "dc code count");
    expect_m(0, 64'b001101, 6, "dc");
    // 2. AD block, coef 1 = 3, coef 8 = -1 (zig-zag positions 0 and 2)
    v = '{default: 0}; v[1] = 3; v[8] = -1; v[0] = 99;   // coefficient 0 is not coded
    run_job(BAND_LP, v, busy);
    expect_int(mc.size(), 3, "lp1 code count");
    expect_m(0, 1, 1, "lp1 cbp");
    expect_m(1, 64'b011_0_010, 7, "lp1 sym1");
    expect_m(2, 64'b00111_1_1, 7, "lp1 sym2");
    expect_int(swaps, 1, "scan swap");
    expect_int(busy, 2 + 3, "lp1 busy (no FlexBits)");
    // 3. AD block, coef 8 = 5: coef 8 now scanned second -> run 1, and the
    //    index discriminant now selects the flat table: 111 | 0 | EG1(3)=0101 | EG0(0)=1
    v = '{default: 0}; v[8] = 5;
    run_job(BAND_LP, v, busy);
    expect_m(0, 1, 1, "lp2 cbp");
    expect_m(1, 64'b111_0_0101_1, 9, "lp2 sym");
    // 4. AC block with six large coefficients: ModelBits 0 -> 1
    v = '{default: 0};
    for (int i = 1; i <= 6; i++) v[i] = i;
    run_job(BAND_HP, v, busy);
    expect_int(incs, 1, "modelbits increase");
    expect_int(fbits, 0, "no FlexBits at ModelBits 0");
    expect_int(busy, 6 + 3, "hp busy");
    // 5. AC block of ones: all fit in one bit -> no symbols, 15 FlexBits codes 101
    v = '{default: 1};
    run_job(BAND_HP, v, busy);
    expect_int(mc.size(), 1, "hp ones: only the cbp");
    expect_m(0, 0, 1, "hp ones cbp");
    expect_int(fbits, 45, "hp ones FlexBits bits");
    expect_int(busy, 15 + 3, "hp ones busy");
    // 6. zero AC block: ModelBits 1 -> 0
    v = '{default: 0};
    run_job(BAND_HP, v, busy);
    expect_int(decs, 1, "modelbits decrease");
    expect_int(fbits, 45, "zero block FlexBits at ModelBits 1");
    expect_int(busy, 5, "zero block busy");
    // 7. DC 0 -> "1"
    v = '{default: 0};
    run_job(BAND_DC, v, busy);
    expect_m(0, 1, 1, "dc 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
