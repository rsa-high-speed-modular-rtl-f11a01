// tb_sign_est - exhaustive check of the sign estimator on 10-bit vectors
// (top 4 bits added) against the truncated sum worked out in the bench,
// plus the two guarantees the multiplier relies on: an estimate >= 0
// means c+s >= 0, an estimate < 0 means c+s < 2^T. A random check at the
// default 1028/1022 size follows.
module tb_sign_est;
  localparam int unsigned W = 10, T = 6;
  localparam int unsigned WD = 1028, TD = 1022;
  int checks = 0, failures = 0;

  logic [W-1:0] c, s;
  logic         nn;
  logic [WD-1:0] cd, sd;
  logic          nnd;

  sign_est #(.W(W), .T(T))   dut   (.c(c), .s(s), .nonneg(nn));
  sign_est #(.W(WD), .T(TD)) dut_d (.c(cd), .s(sd), .nonneg(nnd));

  initial begin
    for (int i = 0; i < (1 << W); i++)
      for (int j = 0; j < (1 << W); j++) begin
        logic signed [W-1:0] est, x;
        c = W'(i); s = W'(j);
        #1;
        est = W'({c[W-1:T], T'(0)} + {s[W-1:T], T'(0)});
        x   = W'(c + s);
        checks++;
        if (nn !== (est >= 0)) failures++;
        // guarantees, for values far enough from the wrap-around
        if (x > -(2 ** (W - 1)) + 2 ** (T + 1)) begin
          if (nn && x < 0) failures++;
          if (!nn && x >= 2 ** T) failures++;
        end
      end
    for (int k = 0; k < 500; k++) begin
      logic [WD-1:0] est;
      for (int b = 0; b < WD; b += 32) begin
        cd[b +: 32] = $urandom; sd[b +: 32] = $urandom;
      end
      #1;
      est = {cd[WD-1:TD], TD'(0)} + {sd[WD-1:TD], TD'(0)};
      checks++;
      if (nnd !== ~est[WD-1]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
