// booth_pp - radix-4 Booth recoder and partial-product generator.
//
// `bits` = (A[2j+1], A[2j], A[2j-1]) is recoded into one digit in
// {-2..+2} following the standard radix-4 recoding table:
//   000 0, 001 +1, 010 +1, 011 +2, 100 -2, 101 -1, 110 -1, 111 0.
// The partial product BP = digit * B is produced, sign-extended to W bits,
// in the form pp + pp_cin: for a negative digit pp is the one's complement
// of |digit|*B and pp_cin = 1 supplies the missing +1 (it enters the
// carry-save adder's free carry bit). `b` is an (N_BITS+1)-bit two's
// complement number. Combinational. The recoding table follows the
// published rules; forming negatives as inversion plus carry-in is this
// design's choice.
module booth_pp
  import rsa_pkg::*;
#(
  parameter int unsigned BW = 1025,  // width of B (two's complement)
  parameter int unsigned W  = 1028   // width of the partial product
) (
  input  logic [2:0]    bits,
  input  logic [BW-1:0] b,
  output booth_digit_t  digit,
  output logic [W-1:0]  pp,
  output logic          pp_cin
);

  logic [W-1:0] b_ext, mag;

  always_comb begin
    unique case (bits)
      3'b000:  digit = '{neg: 1'b0, one: 1'b0, two: 1'b0};
      3'b001:  digit = '{neg: 1'b0, one: 1'b1, two: 1'b0};
      3'b010:  digit = '{neg: 1'b0, one: 1'b1, two: 1'b0};
      3'b011:  digit = '{neg: 1'b0, one: 1'b0, two: 1'b1};
      3'b100:  digit = '{neg: 1'b1, one: 1'b0, two: 1'b1};
      3'b101:  digit = '{neg: 1'b1, one: 1'b1, two: 1'b0};
      3'b110:  digit = '{neg: 1'b1, one: 1'b1, two: 1'b0};
      default: digit = '{neg: 1'b0, one: 1'b0, two: 1'b0};
    endcase
    b_ext  = {{(W-BW){b[BW-1]}}, b};
    mag    = digit.two ? (b_ext << 1) : (digit.one ? b_ext : '0);
    pp     = digit.neg ? ~mag : mag;
    pp_cin = digit.neg;
  end

endmodule
