// tb_xform_stage: feeds flat-colour macroblocks (where colour conversion,
// pre-filter and PCT can be worked out by hand: every component is flat, the
// pre-filter leaves it unchanged, each block gives DC = 4*value, the second
// stage gives DC = 16*value and all other coefficients are zero) and checks
// every coefficient written to the buffer, the DC quantisation, the macroblock
// position tags, the ping-pong overlap of input and processing, and the
// processing time per macroblock.
module tb_xform_stage;
  import jxr_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [7:0] qp_dc, qp_lp, qp_hp;
  logic pix_valid = 0, pix_ready;
  logic [7:0] pix_r, pix_g, pix_b;
  logic ob_ready = 1, ob_we, ob_commit;
  logic [7:0] ob_addr;
  coef_t ob_data [4];
  logic [15:0] ob_tag;
  coef_t got [192][4];
  int ncommit = 0, checks = 0, failures = 0;
  int last_pix_cycle [8], commit_cycle [8];
  int cycle = 0, in_mb = 0;
  int col [3][3] = '{'{200, 200, 200}, '{255, 0, 0}, '{10, 90, 250}};
  int qd [3] = '{1, 4, 7};

  xform_stage #(.MB_COLS(2), .MB_ROWS(2)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  function automatic int fdiv2(int a);
    return (a < 0 && (a % 2) != 0) ? a / 2 - 1 : a / 2;
  endfunction

  function automatic int qround(int x, int s);
    int m;
    m = (x < 0) ? -x : x;
    m = (m + s / 2) / s;
    return (x < 0) ? -m : m;
  endfunction

  always @(posedge clk) if (rst_n) begin
    if (ob_we) for (int l = 0; l < 4; l++) got[ob_addr][l] = ob_data[l];
    if (ob_commit) begin
      int yuv [3], v, t, k;
      k = ncommit;
      commit_cycle[k] = cycle;
      v = col[k % 3][2] - col[k % 3][0];
      t = col[k % 3][0] - col[k % 3][1] + fdiv2(v + 1);
      yuv[0] = col[k % 3][1] + fdiv2(t) - 128;
      yuv[1] = -t;
      yuv[2] = v;
      checks++;
      if (ob_tag != {8'((k / 2) % 2), 8'(k % 2)}) begin failures++; $display("tag %h mb %0d", ob_tag, k); end
      for (int a = 0; a < 192; a++)
        for (int l = 0; l < 4; l++) begin
          int e;
          e = (a % 64 == 0 && l == 0) ? qround(16 * yuv[a / 64], qd[k % 3]) : 0;
          checks++;
          if (int'(got[a][l]) != e) begin
            failures++;
            if (failures < 10) $display("mb %0d addr %0d lane %0d got %0d exp %0d", k, a, l, got[a][l], e);
          end
        end
      ncommit++;
    end
  end

  initial begin
    #400000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    qp_lp = 3; qp_hp = 5;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int m = 0; m < 6; m++) begin
      qp_dc = 8'(qd[m % 3]);
      for (int p = 0; p < 256; p++) begin
        pix_valid = 1;
        pix_r = 8'(col[m % 3][0]); pix_g = 8'(col[m % 3][1]); pix_b = 8'(col[m % 3][2]);
        @(posedge clk);
        while (!pix_ready) @(posedge clk);
        #1;
      end
      last_pix_cycle[m] = cycle;
      pix_valid = 0;
      // hold the quantiser step until this macroblock is processed
      while (ncommit <= m && m < 5) @(posedge clk);
      #1;
      if (m == 2) begin   // stall the output for a while
        ob_ready = 0;
        repeat (400) @(posedge clk);
        #1 ob_ready = 1;
      end
    end
    while (ncommit < 6) @(posedge clk);
    expect_time();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_time();
    // macroblock 0: processing of 27+48+3+192 cycles plus a few cycles of handover
    checks++;
    if (commit_cycle[0] - last_pix_cycle[0] > 280) begin
      failures++;
      $display("processing took %0d cycles", commit_cycle[0] - last_pix_cycle[0]);
    end
  endtask
endmodule
