// r4mm - radix-4 modular multiplier, P = A*B mod N, by sign estimation.
//
// A and B are (N_BITS+1)-bit two's complement numbers with -N <= A,B < N;
// N is an N_BITS-bit modulus whose top bit is set. The partial result is
// kept as a carry-save pair (C, S) of W = N_BITS+4 bits, so the loop never
// propagates a carry:
//   loop, n/2+1 cycles:  (C,S) <- reduce(4(C+S) + digit_i * B)
//     Booth digits of A are taken most significant first; `reduce`
//     (r4mm_step) keeps C+S in [0, N + 2^(N_BITS-2)).
//   final, 2 cycles:     P = C+S and P' = C+S-N are formed by two
//     high-speed adders (C+S-N through one more CSA); P' is taken when it
//     is not negative, which lands the result in [0, N).
// Interface: pulse `start` with a, b, n_mod valid and hold a, b, n_mod
// until `done`. `done` is high for one cycle, n/2+2 cycles after the start
// cycle, i.e. on the (n/2+3)-th edge counted from the one that sampled
// start; `p` is valid in that cycle only (it is the adders' output).
// A new start is accepted the cycle after done.
module r4mm #(
  parameter int unsigned N_BITS = 1024,
  localparam int unsigned W     = N_BITS + 4,
  localparam int unsigned T     = N_BITS - 2,
  localparam int unsigned D     = N_BITS / 2 + 1,
  localparam int unsigned DW    = $clog2(D)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [N_BITS:0]   a,
  input  logic [N_BITS:0]   b,
  input  logic [N_BITS-1:0] n_mod,
  output logic              busy,
  output logic              done,
  output logic [N_BITS-1:0] p
);

  import rsa_pkg::*;

  logic          iter, lo_en, fin;
  logic [DW-1:0] digit;

  r4mm_ctrl #(.N_BITS(N_BITS)) u_ctrl (
    .clk, .rst_n, .start, .iter, .digit, .lo_en, .fin, .busy);

  // Booth digit j uses (A[2j+1], A[2j], A[2j-1]) of A sign-extended to
  // N_BITS+2 bits, with A[-1] = 0.
  logic [N_BITS+2:0] a_ext;
  logic [2:0]        dbits;
  assign a_ext = {a[N_BITS], a, 1'b0};
  assign dbits = a_ext[2*digit +: 3];

  booth_digit_t bd;
  logic [W-1:0] pp;
  logic         pp_cin;

  booth_pp #(.BW(N_BITS + 1), .W(W)) u_booth (
    .bits(dbits), .b(b), .digit(bd), .pp(pp), .pp_cin(pp_cin));

  logic [W-1:0] c_q, s_q, c_d, s_d;
  logic         sign0;
  logic [2:0]   acc;

  r4mm_step #(.N_BITS(N_BITS), .W(W), .T(T)) u_step (
    .c_in(c_q), .s_in(s_q), .pp(pp), .pp_cin(pp_cin), .n_mod(n_mod),
    .c_out(c_d), .s_out(s_d), .sign0(sign0), .acc(acc));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c_q <= '0;
      s_q <= '0;
    end else if (iter) begin
      c_q <= c_d;
      s_q <= s_d;
    end else if (fin) begin
      c_q <= '0;
      s_q <= '0;
    end
  end

  // step 3: (C', S') = C + S - N
  logic [W-1:0] cb, sb;
  csa #(.W(W)) u_sub (.x(c_q), .y(s_q), .z(~W'(n_mod)), .cin(1'b1),
                      .sum(sb), .carry(cb));

  // step 4: the two carry-propagate additions
  logic [W-1:0] p_sum, pb_sum;
  hs_adder_2c #(.W(W)) u_add_p  (.clk, .rst_n, .lo_en, .a(c_q), .b(s_q), .sum(p_sum));
  hs_adder_2c #(.W(W)) u_add_pb (.clk, .rst_n, .lo_en, .a(cb),  .b(sb),  .sum(pb_sum));

  // step 5: take C+S-N when it is not negative
  assign p    = pb_sum[W-1] ? p_sum[N_BITS-1:0] : pb_sum[N_BITS-1:0];
  assign done = fin;

  // a start while a multiplication runs would be lost
  a_no_start_busy: assert property (@(posedge clk) disable iff (!rst_n)
                                    start |-> !busy);

endmodule
