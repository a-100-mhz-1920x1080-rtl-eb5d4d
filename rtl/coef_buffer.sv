// coef_buffer: ping-pong macroblock coefficient SRAM between two pipeline stages.
//
// Each bank holds one macroblock: 768 coefficients of 4 bytes (the paper's
// "SRAM 768x4 bytes"), organised as ROWS rows of four coefficients so a stage
// can move one 4-coefficient row of a 4x4 block per cycle. Row address =
// component*64 + block*4 + row-in-block. Two banks let the producing stage
// fill one macroblock while the consuming stage reads the previous one.
//
// Handshake (own design): the producer may write while wr_ready is high and
// pulses wr_commit (with a tag, e.g. the macroblock position) when the bank is
// complete; the bank then belongs to the consumer, which sees rd_ready, reads
// with rd_en/rd_addr (data and rd_tag valid the next cycle) and pulses
// rd_release when done. Banks alternate strictly.
module coef_buffer
  import jxr_pkg::*;
#(
  parameter int ROWS  = MB_ROWS4,
  parameter int TAG_W = 16
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // producer
  output logic                    wr_ready,
  input  logic                    wr_en,
  input  logic [$clog2(ROWS)-1:0] wr_addr,
  input  coef_t                   wr_data [4],
  input  logic                    wr_commit,
  input  logic [TAG_W-1:0]        wr_tag,
  // consumer
  output logic                    rd_ready,
  input  logic                    rd_en,
  input  logic [$clog2(ROWS)-1:0] rd_addr,
  output coef_t                   rd_data [4],
  output logic [TAG_W-1:0]        rd_tag,
  input  logic                    rd_release
);
  logic [3:0][31:0]  mem [2*ROWS];
  logic [1:0]        full;
  logic              wbank, rbank;
  logic [TAG_W-1:0]  tag [2];
  logic [3:0][31:0]  rword;

  function automatic logic [$clog2(2*ROWS)-1:0] bank_row(input logic bank,
                                                         input logic [$clog2(ROWS)-1:0] a);
    return bank ? $clog2(2*ROWS)'(ROWS + int'(a)) : $clog2(2*ROWS)'(a);
  endfunction

  assign wr_ready = !full[wbank];
  assign rd_ready = full[rbank];
  assign rd_tag   = tag[rbank];

  always_ff @(posedge clk) begin
    if (wr_en && wr_ready) begin
      for (int i = 0; i < 4; i++) mem[bank_row(wbank, wr_addr)][i] <= 32'(wr_data[i]);
    end
    if (rd_en) rword <= mem[bank_row(rbank, rd_addr)];
  end

  always_comb
    for (int i = 0; i < 4; i++) rd_data[i] = coef_t'(rword[i]);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      full  <= '0;
      wbank <= 1'b0;
      rbank <= 1'b0;
      tag   <= '{default: '0};
    end else begin
      if (wr_commit && wr_ready) begin
        full[wbank] <= 1'b1;
        tag[wbank]  <= wr_tag;
        wbank       <= ~wbank;
      end
      if (rd_release && rd_ready) begin
        full[rbank] <= 1'b0;
        rbank       <= ~rbank;
      end
    end
  end

  // A commit or release is only legal when the bank is owned.
  assert property (@(posedge clk) disable iff (!rst_n) wr_commit |-> wr_ready);
  assert property (@(posedge clk) disable iff (!rst_n) rd_release |-> rd_ready);
endmodule
