// tb_coef_buffer: fills both banks, checks that the producer is held off while
// both are full, reads each bank back in order with its tag, and checks that
// releasing a bank frees it for the producer.
module tb_coef_buffer;
  import jxr_pkg::*;
  logic clk = 0, rst_n = 0;
  logic wr_ready, wr_en = 0, wr_commit = 0, rd_ready, rd_en = 0, rd_release = 0;
  logic [7:0] wr_addr, rd_addr;
  coef_t wr_data [4], rd_data [4];
  logic [15:0] wr_tag, rd_tag;
  int checks = 0, failures = 0;

  coef_buffer dut (.*);
  always #5 clk = ~clk;

  function automatic coef_t val(int bank, int a, int l);
    return coef_t'((bank * 7919 + a * 31 + l * 1009) % 200000 - 100000);
  endfunction

  task automatic fill(int bank);
    for (int a = 0; a < 192; a++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = 8'(a);
      for (int l = 0; l < 4; l++) wr_data[l] = val(bank, a, l);
    end
    @(negedge clk);
    wr_en = 0; wr_commit = 1; wr_tag = 16'(bank + 100);
    @(negedge clk);
    wr_commit = 0;
  endtask

  task automatic drain(int bank);
    checks++;
    if (!rd_ready || rd_tag != 16'(bank + 100)) begin failures++; $display("tag/ready bank %0d", bank); end
    for (int a = 0; a < 192; a++) begin
      @(negedge clk);
      rd_en = 1; rd_addr = 8'(a);
      @(negedge clk);
      rd_en = 0;
      for (int l = 0; l < 4; l++) begin
        checks++;
        if (rd_data[l] != val(bank, a, l)) begin
          failures++;
          if (failures < 10) $display("bank %0d addr %0d lane %0d", bank, a, l);
        end
      end
    end
    @(negedge clk);
    rd_release = 1;
    @(negedge clk);
    rd_release = 0;
  endtask

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++;
    if (!wr_ready || rd_ready) failures++;
    fill(0);
    fill(1);
    checks++;
    if (wr_ready) begin failures++; $display("producer not held off"); end
    drain(0);
    checks++;
    if (!wr_ready) begin failures++; $display("bank not freed"); end
    fill(2);
    drain(1);
    drain(2);
    checks++;
    if (rd_ready) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
