// hs_adder - carry-skip / carry-select adder with growing block sizes.
//
// The operand is cut into blocks of 1, 2, 3, 4, ... bits (bits 0 | 1-2 |
// 3-5 | 6-9 | ...), the last block taking whatever is left. Inside a block
// the full-adder cells ripple twice, once for a block carry-in of 0 and
// once for 1, which yields both candidate sums and the block's generate
// (carry-out with carry-in 0) and propagate (all bits propagate) signals.
// Between blocks only the short skip path runs,
//   C[k+1] = G[k] | (P[k] & C[k]),
// and C[k] selects the block's sum. Growing the blocks lets the ripple in
// block k finish while the skip chain reaches it. Combinational.
// Carry-skip with carry-select blocks and the 1,2,3,4-bit start follow the
// published adder; continuing the growth to any width is this design's.
// sum + cout*2^WIDTH = a + b + cin.
module hs_adder #(
  parameter int unsigned WIDTH = 514
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  // number of blocks: smallest k with 1+2+...+k >= WIDTH
  function automatic int unsigned n_blocks(int unsigned w);
    int unsigned k, tot;
    k = 0; tot = 0;
    while (tot < w) begin k++; tot += k; end
    return k;
  endfunction

  localparam int unsigned NB = n_blocks(WIDTH);

  logic [NB:0] bc;  // block carries
  assign bc[0] = cin;

  for (genvar k = 0; k < NB; k++) begin : g_blk
    localparam int unsigned LO = k * (k + 1) / 2;
    localparam int unsigned SZ = (LO + k + 1 > WIDTH) ? (WIDTH - LO) : (k + 1);

    logic [SZ-1:0] s0, s1, pb;
    logic [SZ:0]   r0, r1;
    logic          gk, pk;

    always_comb begin
      r0    = '0;
      r1    = '0;
      pb    = '0;
      r1[0] = 1'b1;
      for (int i = 0; i < SZ; i++) begin
        pb[i]   = a[LO+i] ^ b[LO+i];
        s0[i]   = pb[i] ^ r0[i];
        s1[i]   = pb[i] ^ r1[i];
        r0[i+1] = (a[LO+i] & b[LO+i]) | (pb[i] & r0[i]);
        r1[i+1] = (a[LO+i] & b[LO+i]) | (pb[i] & r1[i]);
      end
      gk = r0[SZ];
      pk = &pb;
    end

    assign bc[k+1]          = gk | (pk & bc[k]);
    assign sum[LO +: SZ]    = bc[k] ? s1 : s0;
  end

  assign cout = bc[NB];

endmodule
