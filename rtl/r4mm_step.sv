// r4mm_step - one loop iteration of the radix-4 modular multiplier.
//
// Input and output are carry-save pairs (c, s) whose sum X lies in
// [0, N + 2^T). Four carry-save levels, each followed by a sign
// estimator, form one clock cycle of work:
//   level 1: X0 = 4*X + BP_i                  (BP_i = Booth digit * B)
//   sign0  = estimated sign of X0
//   sign0 >= 0 (reduce):   try X0 - 4N, then - 2N, then - N; every trial
//                          is kept only if its estimated sign is >= 0.
//   sign0 <  0 (restore):  add N; if the estimate is still negative,
//                          add N again; the last level passes through.
// Each "try" is a CSA with the inverted multiple of N and carry-in 1, and
// a 2:1 multiplexer on its estimated sign, so no carry ever propagates.
// The branch structure, the carry-save form, T = N_BITS-2 and the final
// -N level follow the published algorithm; the first reduction level
// subtracts 4N where the algorithm subtracts 2N, because with a Booth
// digit of +2 X0 can reach 6N + 2^(T+2), more than the 2N+2N+N sequence
// can bring back below N + 2^T; 4N+2N+N covers up to 8N + 2^T.
// `acc` reports which of levels 2..4 replaced the running value (for
// coverage counting). Combinational.
module r4mm_step #(
  parameter int unsigned N_BITS = 1024,
  parameter int unsigned W      = N_BITS + 4,
  parameter int unsigned T      = N_BITS - 2
) (
  input  logic [W-1:0]      c_in,
  input  logic [W-1:0]      s_in,
  input  logic [W-1:0]      pp,
  input  logic              pp_cin,
  input  logic [N_BITS-1:0] n_mod,
  output logic [W-1:0]      c_out,
  output logic [W-1:0]      s_out,
  output logic              sign0,
  output logic [2:0]        acc
);

  logic [W-1:0] n1, n2, n4;
  logic [W-1:0] c1, s1, c2t, s2t, c2, s2, c3t, s3t, c3, s3, c4t, s4t;
  logic [W-1:0] op2, op3;
  logic         e2, e3, e4;

  assign n1 = W'(n_mod);
  assign n2 = n1 << 1;
  assign n4 = n1 << 2;

  // level 1: 4(C+S) + BP
  csa #(.W(W)) u_l1 (.x(c_in << 2), .y(s_in << 2), .z(pp), .cin(pp_cin),
                     .sum(s1), .carry(c1));
  sign_est #(.W(W), .T(T)) u_e1 (.c(c1), .s(s1), .nonneg(sign0));

  // level 2: -4N or +N
  assign op2 = sign0 ? ~n4 : n1;
  csa #(.W(W)) u_l2 (.x(c1), .y(s1), .z(op2), .cin(sign0),
                     .sum(s2t), .carry(c2t));
  sign_est #(.W(W), .T(T)) u_e2 (.c(c2t), .s(s2t), .nonneg(e2));

  always_comb begin
    if (!sign0 || e2) begin c2 = c2t; s2 = s2t; end
    else              begin c2 = c1;  s2 = s1;  end
  end

  // level 3: -2N or (+N when the restored value is still negative)
  assign op3 = sign0 ? ~n2 : n1;
  csa #(.W(W)) u_l3 (.x(c2), .y(s2), .z(op3), .cin(sign0),
                     .sum(s3t), .carry(c3t));
  sign_est #(.W(W), .T(T)) u_e3 (.c(c3t), .s(s3t), .nonneg(e3));

  logic take3;
  assign take3 = sign0 ? e3 : ~e2;

  always_comb begin
    if (take3) begin c3 = c3t; s3 = s3t; end
    else       begin c3 = c2;  s3 = s2;  end
  end

  // level 4: -N (reduce branch only)
  csa #(.W(W)) u_l4 (.x(c3), .y(s3), .z(~n1), .cin(1'b1),
                     .sum(s4t), .carry(c4t));
  sign_est #(.W(W), .T(T)) u_e4 (.c(c4t), .s(s4t), .nonneg(e4));

  logic take4;
  assign take4 = sign0 & e4;

  always_comb begin
    if (take4) begin c_out = c4t; s_out = s4t; end
    else       begin c_out = c3;  s_out = s3;  end
  end

  assign acc = {take4, take3, (!sign0 || e2)};

endmodule
