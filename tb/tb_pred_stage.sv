// tb_pred_stage: runs twelve macroblocks (three 2x2 frames) through the
// prediction stage between two coefficient buffers and compares every output
// coefficient with a reference model written here from the prediction rules:
// DC direction by the weight comparison, AD prediction of the first column
// (LEFT) or first row (TOP) from the neighbouring macroblock, AC prediction
// inside the macroblock from the luma AD weights. Also checks that every DC
// and AC direction occurs and the time per macroblock.
module tb_pred_stage;
  import jxr_pkg::*;
  localparam int NMB = 12;
  logic clk = 0, rst_n = 0;
  // producer side (testbench) -> buffer A
  logic a_wr_ready, a_we = 0, a_commit = 0;
  logic [7:0] a_waddr;
  coef_t a_wdata [4];
  logic [15:0] a_wtag;
  logic a_rd_ready, a_re, a_release;
  logic [7:0] a_raddr;
  coef_t a_rdata [4];
  logic [15:0] a_rtag;
  // stage -> buffer B -> testbench
  logic b_wr_ready, b_we, b_commit;
  logic [7:0] b_waddr;
  coef_t b_wdata [4];
  logic [15:0] b_wtag;
  logic b_rd_ready, b_re = 0, b_release = 0;
  logic [7:0] b_raddr;
  coef_t b_rdata [4];
  logic [15:0] b_rtag;
  logic dir_valid;
  pred_dir_e dc_dir, ac_dir;

  int inmb [NMB][192][4];
  int expmb [NMB][192][4];
  int checks = 0, failures = 0;
  int dc_seen [4], ac_seen [4];
  int commit_cyc [NMB], ncommit = 0, cycle = 0;

  coef_buffer u_a (.clk, .rst_n, .wr_ready(a_wr_ready), .wr_en(a_we), .wr_addr(a_waddr),
    .wr_data(a_wdata), .wr_commit(a_commit), .wr_tag(a_wtag), .rd_ready(a_rd_ready),
    .rd_en(a_re), .rd_addr(a_raddr), .rd_data(a_rdata), .rd_tag(a_rtag), .rd_release(a_release));
  pred_stage #(.MB_COLS(2)) dut (.clk, .rst_n, .ib_ready(a_rd_ready), .ib_rd_en(a_re),
    .ib_rd_addr(a_raddr), .ib_rd_data(a_rdata), .ib_tag(a_rtag), .ib_release(a_release),
    .ob_ready(b_wr_ready), .ob_we(b_we), .ob_addr(b_waddr), .ob_data(b_wdata),
    .ob_commit(b_commit), .ob_tag(b_wtag), .dir_valid, .dc_dir, .ac_dir);
  coef_buffer u_b (.clk, .rst_n, .wr_ready(b_wr_ready), .wr_en(b_we), .wr_addr(b_waddr),
    .wr_data(b_wdata), .wr_commit(b_commit), .wr_tag(b_wtag), .rd_ready(b_rd_ready),
    .rd_en(b_re), .rd_addr(b_raddr), .rd_data(b_rdata), .rd_tag(b_rtag), .rd_release(b_release));

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;
  always @(posedge clk) if (rst_n && dir_valid) begin dc_seen[dc_dir]++; ac_seen[ac_dir]++; end
  always @(posedge clk) if (rst_n && b_commit) begin commit_cyc[ncommit] = cycle; ncommit++; end

  function automatic int iabs(int v); return v < 0 ? -v : v; endfunction
  function automatic int addr(int c, int b, int r); return c * 64 + b * 4 + r; endfunction
  function automatic int lpv(int m, int c, int k); return inmb[m][addr(c, k, 0)][0]; endfunction

  // Reference model.
  task automatic build_expected();
    for (int m = 0; m < NMB; m++) begin
      int mx, my, hl, ht, dir, hs, vs, acd;
      mx = m % 2; my = (m / 2) % 2;
      hl = (mx != 0); ht = (my != 0);
      expmb[m] = inmb[m];
      if (!hl && !ht) dir = 0;
      else if (!ht) dir = 1;
      else if (!hl) dir = 2;
      else begin
        int hw, vw;
        hw = iabs(lpv(m - 3, 0, 0) - lpv(m - 2, 0, 0));
        vw = iabs(lpv(m - 3, 0, 0) - lpv(m - 1, 0, 0));
        dir = (hw > 4 * vw) ? 1 : (vw > 4 * hw) ? 2 : 3;
      end
      for (int c = 0; c < 3; c++) begin
        int p;
        p = (dir == 1) ? lpv(m - 1, c, 0) : (dir == 2) ? lpv(m - 2, c, 0) :
            (dir == 3) ? $floor((lpv(m - 1, c, 0) + lpv(m - 2, c, 0)) / 2.0) : 0;
        expmb[m][addr(c, 0, 0)][0] = lpv(m, c, 0) - p;
        for (int j = 1; j < 4; j++) begin
          if (dir == 1) expmb[m][addr(c, 4 * j, 0)][0] = lpv(m, c, 4 * j) - lpv(m - 1, c, 4 * j);
          if (dir == 2) expmb[m][addr(c, j, 0)][0] = lpv(m, c, j) - lpv(m - 2, c, j);
        end
      end
      hs = iabs(lpv(m, 0, 1)) + iabs(lpv(m, 0, 2)) + iabs(lpv(m, 0, 3));
      vs = iabs(lpv(m, 0, 4)) + iabs(lpv(m, 0, 8)) + iabs(lpv(m, 0, 12));
      acd = (vs > 4 * hs) ? 1 : (hs > 4 * vs) ? 2 : 0;
      for (int c = 0; c < 3; c++)
        for (int b = 0; b < 16; b++) begin
          if (acd == 1 && (b % 4) != 0)
            for (int r = 1; r < 4; r++)
              expmb[m][addr(c, b, r)][0] = inmb[m][addr(c, b, r)][0] - inmb[m][addr(c, b - 1, r)][0];
          if (acd == 2 && b >= 4)
            for (int j = 1; j < 4; j++)
              expmb[m][addr(c, b, 0)][j] = inmb[m][addr(c, b, 0)][j] - inmb[m][addr(c, b - 4, 0)][j];
        end
    end
  endtask

  initial begin
    #3000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // consumer
  initial begin
    wait (rst_n);
    for (int m = 0; m < NMB; m++) begin
      while (!b_rd_ready) @(negedge clk);
      checks++;
      if (b_rtag != {8'((m / 2) % 2), 8'(m % 2)}) failures++;
      for (int a = 0; a < 192; a++) begin
        @(negedge clk);
        b_re = 1; b_raddr = 8'(a);
        @(negedge clk);
        b_re = 0;
        for (int l = 0; l < 4; l++) begin
          checks++;
          if (int'(b_rdata[l]) != expmb[m][a][l]) begin
            failures++;
            if (failures < 10) $display("mb %0d addr %0d lane %0d got %0d exp %0d", m, a, l,
                                        b_rdata[l], expmb[m][a][l]);
          end
        end
      end
      b_release = 1;
      @(negedge clk);
      b_release = 0;
    end
    for (int d = 1; d < 4; d++) begin
      checks++;
      if (dc_seen[d] == 0) begin failures++; $display("DC direction %0d never chosen", d); end
    end
    for (int d = 0; d < 3; d++) begin
      checks++;
      if (ac_seen[d] == 0) begin failures++; $display("AC direction %0d never chosen", d); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // producer
  initial begin
    int dcs [NMB] = '{100, 100, 10, 60,  50, 10, 100, 95,  -20, 30, 25, -200};
    for (int m = 0; m < NMB; m++)
      for (int a = 0; a < 192; a++)
        for (int l = 0; l < 4; l++) begin
          int v;
          v = int'($urandom_range(0, 40)) - 20;
          if (a % 4 == 0 && l == 0) begin
            int c, b;
            c = a / 64; b = (a / 4) % 16;
            if (b == 0) v = dcs[m] + c;
            else if (m % 3 == 0 && b < 4) v = v * 20;           // strong first row
            else if (m % 3 == 1 && (b % 4) == 0) v = v * 20;    // strong first column
          end
          inmb[m][a][l] = v;
        end
    build_expected();
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int m = 0; m < NMB; m++) begin
      while (!a_wr_ready) @(negedge clk);
      for (int a = 0; a < 192; a++) begin
        a_we = 1; a_waddr = 8'(a);
        for (int l = 0; l < 4; l++) a_wdata[l] = coef_t'(inmb[m][a][l]);
        @(negedge clk);
      end
      a_we = 0; a_commit = 1; a_wtag = {8'((m / 2) % 2), 8'(m % 2)};
      @(negedge clk);
      a_commit = 0;
    end
  end
endmodule
