// tb_rsa_full - one complete 1024-bit exponentiation on the RSA processor
// at its default size (N_BITS = E_BITS = 1024). A random 1024-bit odd
// modulus with the top bit set, a random message below it and a random
// 1024-bit exponent are written as 32-bit words; the result is read back
// word by word and compared with M^e mod N computed in the bench by
// square-and-multiply on 2048-bit numbers. The run time must be
// 1024*(1024/2+3) + 1 edges, i.e. n(n/2+3) cycles plus one load cycle.
module tb_rsa_full;
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

  initial begin
    logic [NB-1:0] n, e, m, res, ref_r;
    logic [2*NB-1:0] r, b;
    int t0;
    host_we = 0; host_go = 0; host_sel = SEL_NONE; host_widx = 0; host_wdata = 0; host_ridx = 0;
    for (int i = 0; i < NB; i += 32) begin
      n[i +: 32] = $urandom; e[i +: 32] = $urandom; m[i +: 32] = $urandom;
    end
    n[NB-1] = 1'b1; n[0] = 1'b1;
    m = m % n;
    // reference
    r = 1; b = (2*NB)'(m);
    for (int i = 0; i < EB; i++) begin
      if (e[i]) r = (r * b) % (2*NB)'(n);
      b = (b * b) % (2*NB)'(n);
    end
    ref_r = r[NB-1:0];
    repeat (3) @(posedge clk);
    rst_n = 1;
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
    $display("cycles for one 1024-bit exponentiation: %0d", cycles - t0);
    for (int i = 0; i < NW; i++) begin
      host_ridx = 5'(i); #1;
      res[i*32 +: 32] = host_rdata;
    end
    checks++;
    if (res !== ref_r) begin failures++; $display("FAIL: result differs"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycles == 700000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
