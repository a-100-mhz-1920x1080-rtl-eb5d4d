// tb_sram_sp: writes every word of the 1440 x 32-bit SRAM, reads it back in a
// shuffled order and checks the one-cycle read latency.
module tb_sram_sp;
  logic clk = 0, en = 0, we = 0;
  logic [10:0] addr;
  logic [31:0] wdata, rdata;
  logic [31:0] model [1440];
  int checks = 0, failures = 0;

  sram_sp dut (.*);
  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 1440; i++) begin
      @(negedge clk);
      en = 1; we = 1; addr = 11'(i); wdata = $urandom; model[i] = wdata;
    end
    for (int n = 0; n < 3000; n++) begin
      int a;
      a = int'($urandom_range(0, 1439));
      @(negedge clk);
      en = 1; we = 0; addr = 11'(a);
      @(negedge clk);
      en = 0;
      checks++;
      if (rdata != model[a]) begin failures++; $display("addr %0d", a); end
      if (n % 7 == 0) begin
        @(negedge clk);
        en = 1; we = 1; wdata = $urandom; model[a] = wdata; addr = 11'(a);
        @(negedge clk);
        en = 0;
        checks++;
        if (rdata != model[a] && rdata == wdata && model[a] != wdata) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
