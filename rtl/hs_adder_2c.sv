// hs_adder_2c - W-bit addition spread over two clock cycles.
//
// Cycle 1 (lo_en high): the low LO_W bits are added by one high-speed
// adder and the low sum and its carry-out are registered.
// Cycle 2: the high W-LO_W bits are added by a second high-speed adder with
// the registered carry as carry-in; `sum` is valid (combinationally) in
// this cycle. a and b must be held for both cycles. sum = a + b mod 2^W.
// The two-cycle budget for the final addition follows the multiplier's
// timing; splitting at the middle bit is this design's choice.
module hs_adder_2c #(
  parameter int unsigned W    = 1028,
  parameter int unsigned LO_W = W / 2
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         lo_en,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] sum
);

  logic [LO_W-1:0]   lo_sum, lo_sum_q;
  logic              lo_co, lo_co_q;
  logic [W-LO_W-1:0] hi_sum;

  hs_adder #(.WIDTH(LO_W)) u_lo (
    .a(a[LO_W-1:0]), .b(b[LO_W-1:0]), .cin(1'b0), .sum(lo_sum), .cout(lo_co));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lo_sum_q <= '0;
      lo_co_q  <= 1'b0;
    end else if (lo_en) begin
      lo_sum_q <= lo_sum;
      lo_co_q  <= lo_co;
    end
  end

  logic hi_co_unused;
  hs_adder #(.WIDTH(W - LO_W)) u_hi (
    .a(a[W-1:LO_W]), .b(b[W-1:LO_W]), .cin(lo_co_q), .sum(hi_sum),
    .cout(hi_co_unused));

  assign sum = {hi_sum, lo_sum_q};

endmodule
