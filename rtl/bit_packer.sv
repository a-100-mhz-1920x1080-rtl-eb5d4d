// bit_packer: codeword concentrator and packetiser - packs variable-length
// codewords (MSB first) into WORD-bit output words.
//
// Each cycle at most one codeword of up to WORD bits (right-aligned in code,
// length len) is appended. Whenever WORD or more bits are held, the oldest
// WORD bits leave as one output word, so the holding register never exceeds
// 2*WORD-1 bits and the packer never stalls. flush emits the remaining bits,
// zero-padded at the LSB end, as a final word (flush must not coincide with
// valid). Used for the main bitstream (the paper's codeword concentrate and
// packetizer) and for the FlexBits stream (its pre-packetizer). The output
// word width and padding are this design's choice.
module bit_packer #(
  parameter int WORD = 64
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      valid,
  input  logic [WORD-1:0]           code,
  input  logic [$clog2(WORD+1)-1:0] len,
  input  logic                      flush,
  output logic                      out_valid,
  output logic [WORD-1:0]           out_data,
  output logic [31:0]               bits_total
);
  localparam int NW = $clog2(2 * WORD);
  logic [2*WORD-1:0] acc;     // right-aligned pending bits
  logic [NW-1:0]     n;       // number of pending bits (< WORD between cycles)

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acc        <= '0;
      n          <= '0;
      out_valid  <= 1'b0;
      out_data   <= '0;
      bits_total <= '0;
    end else begin
      logic [2*WORD-1:0] a;
      logic [NW-1:0]     m;
      logic [2*WORD-1:0] mask;
      out_valid <= 1'b0;
      a = acc;
      m = n;
      if (valid && len != '0) begin
        mask = ((2*WORD)'(1) << len) - (2*WORD)'(1);
        a = (a << len) | ((2*WORD)'(code) & mask);
        m = m + NW'(len);
        bits_total <= bits_total + 32'(len);
      end
      if (int'(m) >= WORD) begin
        out_valid <= 1'b1;
        out_data  <= WORD'(a >> (int'(m) - WORD));
        m = m - NW'(WORD);
        a = a & (((2*WORD)'(1) << m) - (2*WORD)'(1));
      end else if (flush && m != '0) begin
        out_valid <= 1'b1;
        out_data  <= WORD'(a << (WORD - int'(m)));
        m = '0;
        a = '0;
      end
      acc <= a;
      n   <= m;
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(flush && valid));
endmodule
