// tb_r4mm_step - checks one multiplier iteration at N_BITS = 16.
// For random moduli (top bit set), random carry-save inputs whose value X
// lies in [0, N + 2^T), random B in [-N, N) and every Booth pattern, the
// output value X' must satisfy X' == 4X + d*B (mod N) and
// 0 <= X' < N + 2^T. Worst cases (X at the top of its range, B = -N or
// N-1) are mixed in. Both branches and every level's accept/reject are
// counted and must each occur.
module tb_r4mm_step;
  localparam int unsigned NB = 16, W = NB + 4, T = NB - 2;
  int checks = 0, failures = 0;
  int n_pos = 0, n_neg = 0;
  int acc_cnt [3], rej_cnt [3];

  logic [W-1:0]  c_in, s_in, pp, c_out, s_out;
  logic          pp_cin, sign0;
  logic [2:0]    acc, bits;
  logic [NB-1:0] n_mod;
  logic [NB:0]   b;
  rsa_pkg::booth_digit_t dg;

  booth_pp #(.BW(NB + 1), .W(W)) u_bp (.bits(bits), .b(b), .digit(dg), .pp(pp), .pp_cin(pp_cin));
  r4mm_step #(.N_BITS(NB)) dut (.c_in(c_in), .s_in(s_in), .pp(pp), .pp_cin(pp_cin),
    .n_mod(n_mod), .c_out(c_out), .s_out(s_out), .sign0(sign0), .acc(acc));

  int expd [8] = '{0, 1, 1, 2, -2, -1, -1, 0};

  initial begin
    for (int i = 0; i < 3; i++) begin acc_cnt[i] = 0; rej_cnt[i] = 0; end
    for (int k = 0; k < 200000; k++) begin
      longint nv, xv, bv, xo, ref_m, got_m;
      nv = longint'({1'b1, 15'($urandom)});
      case (k % 5)
        0: xv = nv + (1 << T) - 1 - ($urandom % 4);
        default: xv = longint'($urandom % (nv + (1 << T)));
      endcase
      case (k % 7)
        0: bv = -nv;
        1: bv = nv - 1;
        default: bv = longint'($urandom % (2 * nv)) - nv;
      endcase
      n_mod = NB'(nv);
      b     = (NB+1)'(bv);
      bits  = 3'($urandom);
      // split X into a random carry-save pair
      s_in  = W'($urandom);
      c_in  = W'(xv) - s_in;
      #1;
      xo = longint'($signed(W'(c_out + s_out)));
      ref_m = (4 * xv + expd[bits] * bv) % nv; if (ref_m < 0) ref_m += nv;
      got_m = xo % nv; if (got_m < 0) got_m += nv;
      checks++;
      if (got_m != ref_m || xo < 0 || xo >= nv + (1 << T)) begin
        failures++;
        if (failures < 10)
          $display("FAIL n=%0d x=%0d b=%0d d=%0d -> %0d", nv, xv, bv, expd[bits], xo);
      end
      if (sign0) n_pos++; else n_neg++;
      for (int i = 0; i < 3; i++) if (acc[i]) acc_cnt[i]++; else rej_cnt[i]++;
    end
    $display("reduce=%0d restore=%0d acc=%0d/%0d/%0d rej=%0d/%0d/%0d", n_pos, n_neg,
             acc_cnt[0], acc_cnt[1], acc_cnt[2], rej_cnt[0], rej_cnt[1], rej_cnt[2]);
    checks++; if (n_pos == 0 || n_neg == 0) failures++;
    for (int i = 0; i < 3; i++) begin
      checks++; if (acc_cnt[i] == 0 || rej_cnt[i] == 0) failures++;
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
