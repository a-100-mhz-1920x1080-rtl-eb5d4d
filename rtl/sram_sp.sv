// sram_sp: single-port synchronous SRAM model (one read or write per cycle).
//
// Used for the prediction stage's top-neighbour store, which the paper sizes
// at 1440 x 4 bytes: one word for each of DC and three top-row AD (low-pass)
// coefficients, per colour component, per macroblock column of a 1920-wide
// frame (120 * 3 * 4 = 1440). Read data appears one cycle after the address;
// a write does not update rdata. Contents are not reset.
module sram_sp #(
  parameter int DEPTH = 1440,
  parameter int WIDTH = 32
) (
  input  logic                     clk,
  input  logic                     en,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] addr,
  input  logic [WIDTH-1:0]         wdata,
  output logic [WIDTH-1:0]         rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata <= mem[addr];
    end
  end
endmodule
