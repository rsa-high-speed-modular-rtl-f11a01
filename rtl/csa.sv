// csa - W-bit 3:2 carry-save adder.
//
// Reduces three operands x, y, z to a sum vector and a carry vector with
// sum + carry == x + y + z (mod 2^W). The carry vector is already shifted
// one place left; its free bit 0 takes `cin`, which is how a two's
// complement subtraction (inverted operand plus one) is completed without
// any carry propagation. Purely combinational, one full-adder delay.
// A textbook cell; the carry-in use is this design's choice.
module csa #(
  parameter int unsigned W = 1028
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic [W-1:0] z,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic [W-1:0] carry
);

  logic [W-1:0] maj;

  always_comb begin
    sum   = x ^ y ^ z;
    maj   = (x & y) | (x & z) | (y & z);
    carry = {maj[W-2:0], cin};
  end

endmodule
