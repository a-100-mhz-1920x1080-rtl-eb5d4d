// tb_bit_packer: pushes random codewords of 0..64 bits, keeps the expected
// bit sequence in a queue, and checks every output word and the padded flush
// word against it.
module tb_bit_packer;
  logic clk = 0, rst_n = 0, valid = 0, flush = 0;
  logic [63:0] code;
  logic [6:0] len;
  logic out_valid;
  logic [63:0] out_data;
  logic [31:0] bits_total;
  bit q [$];
  int checks = 0, failures = 0, words = 0, total = 0;

  bit_packer dut (.*);
  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n && out_valid) begin
    logic [63:0] e;
    for (int i = 63; i >= 0; i--) e[i] = (q.size() > 0) ? q.pop_front() : 1'b0;
    checks++;
    words++;
    if (e != out_data) begin
      failures++;
      if (failures < 5) $display("word %0d got %h exp %h", words, out_data, e);
    end
  end

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      int l;
      @(negedge clk);
      l = (n % 97 == 0) ? 64 : int'($urandom_range(0, 40));
      code = {$urandom, $urandom};
      len = 7'(l);
      valid = ($urandom_range(0, 3) != 0);
      if (valid) begin
        for (int i = l - 1; i >= 0; i--) q.push_back(code[i]);
        total += l;
      end
    end
    @(negedge clk);
    valid = 0;
    @(negedge clk);
    flush = 1;
    @(negedge clk);
    flush = 0;
    repeat (3) @(negedge clk);
    checks++;
    if (q.size() != 0) begin failures++; $display("%0d bits left", q.size()); end
    checks++;
    if (int'(bits_total) != total || words != (total + 63) / 64) begin
      failures++;
      $display("bits %0d/%0d words %0d", bits_total, total, words);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
