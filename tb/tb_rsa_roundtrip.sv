// tb_rsa_roundtrip - a real 1024-bit RSA encryption and decryption on the
// processor at its default size. The key is built in the bench:
// p = 2^512 - 569 and q = 2^512 - 629 (both prime), N = p*q (1024 bits,
// top bit set), e = 65537, and d = (k*phi + 1) / e for the smallest k
// that makes the division exact, phi = (p-1)(q-1). The bench encrypts a
// random message M < N (C = M^e mod N, also checked against a 2048-bit
// reference), decrypts C with d, and requires the original M back. Each
// exponentiation must take 1024*(1024/2+3) + 1 cycles.
module tb_rsa_roundtrip;
  import rsa_pkg::*;
  localparam int unsigned NB = 1024, EB = 1024, NW = 32;
  int checks = 0, failures = 0;
  int cycles = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  logic        host_we, host_go, host_busy, host_done;
  reg_sel_e    host_sel;
  logic [4:0]  host_widx, host_ridx;
  logic [31:0] host_wdata, host_rdata;

  rsa_top dut (.clk, .rst_n, .host_we, .host_sel, .host_widx, .host_wdata, .host_go,
               .host_ridx, .host_rdata, .host_busy, .host_done);

  task automatic wr(reg_sel_e sel, logic [NB-1:0] v);
    for (int i = 0; i < NW; i++) begin
      @(negedge clk);
      host_we = 1; host_sel = sel; host_widx = 5'(i); host_wdata = v[i*32 +: 32];
    end
    @(negedge clk);
    host_we = 0;
  endtask

  task automatic modexp_hw(logic [NB-1:0] n, logic [NB-1:0] e, logic [NB-1:0] m,
                           output logic [NB-1:0] res);
    int t0;
    wr(SEL_MODULUS, n);
    wr(SEL_EXPONENT, e);
    wr(SEL_MESSAGE, m);
    @(negedge clk); host_go = 1;
    @(posedge clk); #1 host_go = 0;
    t0 = cycles;
    while (!host_done && cycles < t0 + 600000) @(negedge clk);
    checks++;
    if (cycles - t0 != EB * (NB / 2 + 3) + 1) begin
      failures++; $display("run time %0d", cycles - t0);
    end
    for (int i = 0; i < NW; i++) begin
      host_ridx = 5'(i); #1;
      res[i*32 +: 32] = host_rdata;
    end
  endtask

  initial begin
    logic [2*NB-1:0] p, q, n2, phi, num, r, b;
    logic [NB-1:0]   n, e, d, m, c, m2;
    host_we = 0; host_go = 0; host_sel = SEL_NONE; host_widx = 0; host_wdata = 0; host_ridx = 0;
    p   = (2*NB)'(1) << 512; p = p - 569;
    q   = (2*NB)'(1) << 512; q = q - 629;
    n2  = p * q;
    phi = (p - 1) * (q - 1);
    n   = n2[NB-1:0];
    e   = NB'(65537);
    d   = '0;
    for (int k = 1; k < 65537; k++) begin
      num = phi * (2*NB)'(k) + 1;
      if (num % (2*NB)'(65537) == 0) begin
        num = num / (2*NB)'(65537);
        d = num[NB-1:0];
        break;
      end
    end
    checks++; if (d == '0 || !n[NB-1]) failures++;
    for (int i = 0; i < NB; i += 32) m[i +: 32] = $urandom;
    m = m % n;
    repeat (3) @(posedge clk);
    rst_n = 1;
    modexp_hw(n, e, m, c);
    // reference for the ciphertext
    r = 1; b = (2*NB)'(m);
    for (int i = 0; i < 17; i++) begin
      if (e[i]) r = (r * b) % n2;
      b = (b * b) % n2;
    end
    checks++; if (c !== r[NB-1:0]) begin failures++; $display("FAIL: ciphertext differs"); end
    modexp_hw(n, d, c, m2);
    checks++; if (m2 !== m) begin failures++; $display("FAIL: decryption does not return M"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycles == 1200000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
