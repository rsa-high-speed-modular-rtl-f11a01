// word_reg - WIDTH-bit parameter register loaded through a 32-bit buffer.
//
// The register is held as ceil(WIDTH/32) words. A write (`we`) stores
// `wdata` into word `widx` (word 0 holds bits 31:0); the full register is
// always visible on `q`. Out-of-range indices are ignored. Cleared by the
// asynchronous active-low reset. Used for the modulus, exponent and
// message registers; word-serial loading follows the 32-bit input buffer
// of the register block, the word order is this design's choice.
module word_reg
  import rsa_pkg::*;
#(
  parameter int unsigned WIDTH = 1024,
  localparam int unsigned NW   = n_words(WIDTH),
  localparam int unsigned IW   = idx_bits(NW)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              we,
  input  logic [IW-1:0]     widx,
  input  logic [HOST_W-1:0] wdata,
  output logic [WIDTH-1:0]  q
);

  logic [NW-1:0][HOST_W-1:0] mem;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                       mem       <= '0;
    else if (we && 32'(widx) < NW)    mem[widx] <= wdata;
  end

  assign q = WIDTH'(mem);

endmodule
