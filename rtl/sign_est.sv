// sign_est - sign estimation of a carry-save number.
//
// The value X = c + s (mod 2^W, two's complement) is never added in full.
// Instead the low T bits of both vectors are dropped and only the top
// K = W-T bits are added with a small carry look-ahead adder; the sign bit
// of that short sum is the estimated sign. With T(.) the truncation, the
// estimate E = T(c)+T(s) satisfies E <= X < E + 2^(T+1), so
//   nonneg = 1  guarantees X >= 0,
//   nonneg = 0  guarantees X <  2^T.
// For a 1024-bit modulus W = 1028 and T = 1022, so K = 6 bits.
// Combinational. The carries are formed in look-ahead (sum of generate
// terms) form rather than rippled. Truncated estimation with a short
// look-ahead adder follows the published method; the 6-bit width (rather
// than 5) follows from this design's choice T = N_BITS-2.
module sign_est #(
  parameter int unsigned W = 1028,
  parameter int unsigned T = 1022
) (
  input  logic [W-1:0] c,
  input  logic [W-1:0] s,
  output logic         nonneg
);

  localparam int unsigned K = W - T;

  logic [K-1:0] g, p;
  logic [K:0]   cy;
  logic         msb;

  always_comb begin
    g = c[W-1:T] & s[W-1:T];
    p = c[W-1:T] ^ s[W-1:T];
    // cy[i] = OR over j<i of ( g[j] AND p[j+1..i-1] ); carry-in is zero
    for (int i = 0; i <= K; i++) begin
      cy[i] = 1'b0;
      for (int j = 0; j < i; j++) begin
        logic term;
        term = g[j];
        for (int k = j + 1; k < i; k++) term = term & p[k];
        cy[i] = cy[i] | term;
      end
    end
    msb    = p[K-1] ^ cy[K-1];
    nonneg = ~msb;
  end

endmodule
