// tb_rsa_top - end-to-end test of the RSA processor at N_BITS = E_BITS = 32.
// Through the host bus only, it loads modulus, exponent and message,
// starts, waits, reads the result and compares it with M^e mod N worked
// out in the bench by square-and-multiply on 64-bit integers. Cases:
// random moduli with the top bit set, exponents 0, 1, all ones and
// random; then an RSA round trip with N = 65521 * 65519, e = 65537 and the
// matching private exponent d (computed here): M -> C -> M must come
// back. Checks the run time E_BITS*(n/2+3)+1 edges, that host writes are
// ignored while busy, and counts each mechanism of the multipliers
// (reduce and restore branches, accept and reject at each reduction
// level, final correction taken or not) and of the controller (exponent
// bits 0 and 1); one that never happens counts as a failure.
module tb_rsa_top;
  import rsa_pkg::*;
  localparam int unsigned NB = 32, EB = 32;
  int checks = 0, failures = 0;
  int cycles = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  logic        host_we, host_go, host_busy, host_done;
  reg_sel_e    host_sel;
  logic [0:0]  host_widx, host_ridx;
  logic [31:0] host_wdata, host_rdata;

  rsa_top #(.N_BITS(NB), .E_BITS(EB)) dut (.clk, .rst_n, .host_we, .host_sel,
    .host_widx, .host_wdata, .host_go, .host_ridx, .host_rdata, .host_busy, .host_done);

  // mechanism counters
  int n_reduce = 0, n_restore = 0, n_corr = 0, n_nocorr = 0, n_e1 = 0, n_e0 = 0;
  int n_blocked = 0;
  int n_acc [3], n_rej [3];
  initial for (int i = 0; i < 3; i++) begin n_acc[i] = 0; n_rej[i] = 0; end
  always @(posedge clk) if (rst_n) begin
    if (dut.u_mul_cm.iter) begin
      if (dut.u_mul_cm.sign0) n_reduce++; else n_restore++;
      for (int i = 0; i < 3; i++)
        if (dut.u_mul_cm.acc[i]) n_acc[i]++; else n_rej[i]++;
    end
    if (dut.u_mul_mm.done) begin
      if (dut.u_mul_mm.pb_sum[NB+3]) n_nocorr++; else n_corr++;
    end
    if (dut.m_we) begin
      if (dut.c_we) n_e1++; else n_e0++;
    end
  end

  task automatic wr(reg_sel_e sel, int idx, logic [31:0] d);
    @(negedge clk);
    host_we = 1; host_sel = sel; host_widx = 1'(idx); host_wdata = d;
    @(negedge clk);
    host_we = 0;
  endtask

  function automatic longint unsigned modexp(longint unsigned m, longint unsigned e,
                                             longint unsigned n);
    longint unsigned r = 1, b = m % n;
    for (int i = 0; i < 64; i++) begin
      if (e[i]) r = (r * b) % n;
      b = (b * b) % n;
    end
    return r;
  endfunction

  task automatic run(logic [31:0] n, logic [31:0] e, logic [31:0] m,
                     output logic [31:0] res);
    int t0;
    wr(SEL_MODULUS, 0, n);
    wr(SEL_EXPONENT, 0, e);
    wr(SEL_MESSAGE, 0, m);
    @(negedge clk); host_go = 1;
    @(posedge clk); #1 host_go = 0;
    t0 = cycles;
    // a write while busy must be ignored
    wr(SEL_MODULUS, 0, ~n);
    checks++; if (dut.n_mod !== n) failures++; else n_blocked++;
    while (!host_done && cycles < t0 + 10000) @(negedge clk);
    checks++;
    if (cycles - t0 != EB * (NB / 2 + 3) + 1) begin
      failures++; $display("run time %0d", cycles - t0);
    end
    host_ridx = 0; #1;
    res = host_rdata;
  endtask

  // modular inverse by the extended Euclidean algorithm
  function automatic longint modinv(longint a, longint m);
    longint t = 0, nt = 1, r = m, nr = a, q, tmp;
    while (nr != 0) begin
      q = r / nr;
      tmp = t - q * nt; t = nt; nt = tmp;
      tmp = r - q * nr; r = nr; nr = tmp;
    end
    if (t < 0) t += m;
    return t;
  endfunction

  initial begin
    logic [31:0] n, e, m, res, c, m2;
    longint d;
    host_we = 0; host_go = 0; host_sel = SEL_NONE; host_widx = 0; host_wdata = 0; host_ridx = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 12; k++) begin
      n = $urandom; n[31] = 1'b1; if (k % 2 == 0) n[0] = 1'b1;
      m = $urandom % n;
      case (k)
        0: e = 0;
        1: e = 1;
        2: e = '1;
        3: begin e = $urandom; m = n - 1; end
        default: e = $urandom;
      endcase
      run(n, e, m, res);
      checks++;
      if (64'(res) != modexp(64'(m), 64'(e), 64'(n))) begin
        failures++;
        $display("FAIL n=%h e=%h m=%h got=%h exp=%h", n, e, m, res,
                 modexp(64'(m), 64'(e), 64'(n)));
      end
    end
    // RSA round trip
    n = 32'(65521 * 65519);
    d = modinv(65537, longint'(65520) * 65518);
    m = 32'h1234_5678;
    run(n, 32'd65537, m, c);
    run(n, 32'(d), c, m2);
    checks++; if (m2 !== m) begin failures++; $display("round trip %h -> %h -> %h", m, c, m2); end
    checks++; if (64'(c) != modexp(64'(m), 65537, 64'(n))) failures++;
    $display("reduce=%0d restore=%0d acc=%0d/%0d/%0d rej=%0d/%0d/%0d corr=%0d nocorr=%0d e1=%0d e0=%0d blocked=%0d",
             n_reduce, n_restore, n_acc[0], n_acc[1], n_acc[2], n_rej[0], n_rej[1], n_rej[2],
             n_corr, n_nocorr, n_e1, n_e0, n_blocked);
    checks++; if (n_reduce == 0 || n_restore == 0) failures++;
    for (int i = 0; i < 3; i++) begin checks++; if (n_acc[i] == 0 || n_rej[i] == 0) failures++; end
    checks++; if (n_corr == 0 || n_nocorr == 0) failures++;
    checks++; if (n_e1 == 0 || n_e0 == 0) failures++;
    checks++; if (n_blocked == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycles == 200000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
