// tb_huff_enc: checks DC codes (Exp-Golomb order 0 plus sign), run-level
// symbol codes from the skewed index table, and the adaptation: a long run of
// class-7 symbols must switch the context to the flat 3-bit index table, while
// the other context stays on the skewed table.
module tb_huff_enc;
  import jxr_pkg::*;
  logic clk = 0, rst_n = 0, valid = 0, is_dc = 0, ctx = 0, neg = 0, last = 0;
  logic [3:0] run = 0;
  logic [COEF_W-1:0] level = 0;
  logic [63:0] code;
  logic [6:0] len;
  logic tbl_switch;
  int checks = 0, failures = 0, switches = 0;

  huff_enc dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (tbl_switch) switches++;

  task automatic expect_code(longint c, int l, string what);
    #1;
    checks++;
    if (len != 7'(l) || code != 64'(c)) begin
      failures++;
      $display("%s: got %b/%0d exp %b/%0d", what, code, len, c, l);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    is_dc = 1; level = 0; neg = 0;
    expect_code(1, 1, "dc 0");
    level = 5; neg = 1;                      // EG0(5) = 00110, sign 1
    expect_code(64'b0011_01, 6, "dc -5");
    is_dc = 0;
    // class 2 (level>1, run 0, not last), level 3: 011 | 0 | EG0(1)=010
    level = 3; run = 0; last = 0; neg = 0;
    expect_code(64'b011_0_010, 7, "sym lvl3");
    // class 5 (last, run>0), level 1, run 1: 00111 | 1 | EG0(0)=1
    level = 1; run = 1; last = 1; neg = 1;
    expect_code(64'b00111_1_1, 7, "sym last run1");
    // adapt context 1 with class 7 symbols (T0: 5 bits, T1: 3 bits)
    ctx = 1; level = 2; run = 2; last = 1; neg = 0;
    for (int i = 0; i < 6; i++) begin
      @(negedge clk);
      valid = 1;
    end
    @(negedge clk);
    valid = 0;
    // now table 1: class 7 = 111 | 0 | level EG(0) | run EG0(1)=010
    #1;
    checks++;
    if (code[len-1 -: 3] != 3'b111) begin failures++; $display("no switch to flat table %b %0d", code, len); end
    checks++;
    if (switches == 0) begin failures++; $display("no switch event"); end
    ctx = 0;
    level = 3; run = 0; last = 0;
    expect_code(64'b011_0_010, 7, "ctx0 unchanged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
