// tb_r4mm - end-to-end check of the radix-4 modular multiplier.
// Small instance (N_BITS = 16): random moduli with the top bit set,
// A and B drawn from the whole range [-N, N) plus the extremes; the
// product must equal A*B mod N in [0, N). Default instance (1024 bits):
// random A, B in [0, N) checked against a 2048-bit reference. For every
// multiplication, done must come on the (n/2+3)-th edge counted from the
// edge that sampled start. Both outcomes of the final correction
// (C+S-N taken or not) are counted and must occur.
module tb_r4mm;
  localparam int unsigned NS = 16, ND = 1024;
  int checks = 0, failures = 0;
  int cycles = 0;
  int corr_taken = 0, corr_skipped = 0;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  logic          st_s, busy_s, done_s;
  logic [NS:0]   a_s, b_s;
  logic [NS-1:0] n_s, p_s;
  logic          st_d, busy_d, done_d;
  logic [ND:0]   a_d, b_d;
  logic [ND-1:0] n_d, p_d;

  r4mm #(.N_BITS(NS)) dut_s (.clk(clk), .rst_n(rst_n), .start(st_s), .a(a_s), .b(b_s),
    .n_mod(n_s), .busy(busy_s), .done(done_s), .p(p_s));
  r4mm dut_d (.clk(clk), .rst_n(rst_n), .start(st_d), .a(a_d), .b(b_d),
    .n_mod(n_d), .busy(busy_d), .done(done_d), .p(p_d));

  function automatic logic [ND-1:0] rnd_d();
    logic [ND-1:0] r;
    for (int i = 0; i < ND; i += 32) r[i +: 32] = $urandom;
    return r;
  endfunction

  initial begin
    st_s = 0; st_d = 0; a_s = '0; b_s = '0; n_s = '1; a_d = '0; b_d = '0; n_d = '1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 3000; k++) begin
      longint nv, av, bv, rv;
      int edges;
      nv = longint'({1'b1, 15'($urandom)});
      if (k % 4 == 0) nv = nv | 1;
      av = longint'($urandom % (2 * nv)) - nv;
      bv = longint'($urandom % (2 * nv)) - nv;
      case (k % 9)
        0: begin av = nv - 1; bv = nv - 1; end
        1: begin av = -nv; bv = -nv; end
        2: begin av = -nv; bv = nv - 1; end
        3: av = 0;
        default: ;
      endcase
      @(negedge clk);
      n_s = NS'(nv); a_s = (NS+1)'(av); b_s = (NS+1)'(bv); st_s = 1;
      edges = 0;
      do begin
        @(posedge clk); edges++;
        #1 st_s = 0;
      end while (!done_s && edges < 100);
      rv = (av * bv) % nv; if (rv < 0) rv += nv;
      checks++;
      if (longint'(p_s) != rv) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d a=%0d b=%0d got=%0d exp=%0d", nv, av, bv, p_s, rv);
      end
      if (dut_s.pb_sum[NS+3]) corr_skipped++; else corr_taken++;
      @(posedge clk);  // the fin edge
      // done is visible after edge n/2+2; its own edge is the (n/2+3)-th
      checks++;
      if (edges + 1 != NS / 2 + 3) begin failures++; $display("latency %0d", edges + 1); end
    end
    for (int k = 0; k < 12; k++) begin
      logic [2*ND-1:0] prod;
      int edges;
      n_d = rnd_d(); n_d[ND-1] = 1'b1; n_d[0] = 1'b1;
      a_d = {1'b0, rnd_d() % n_d};
      b_d = {1'b0, rnd_d() % n_d};
      if (k == 0) begin a_d = {1'b0, n_d - 1'b1}; b_d = a_d; end
      @(negedge clk); st_d = 1;
      edges = 0;
      do begin
        @(posedge clk); edges++;
        #1 st_d = 0;
      end while (!done_d && edges < 1000);
      prod = (2*ND)'(a_d[ND-1:0]) * (2*ND)'(b_d[ND-1:0]);
      prod = prod % (2*ND)'(n_d);
      checks++;
      if (p_d !== prod[ND-1:0]) begin failures++; $display("FAIL 1024-bit k=%0d", k); end
      @(posedge clk);  // the fin edge
      checks++;
      if (edges + 1 != ND / 2 + 3) begin failures++; $display("latency %0d", edges + 1); end
    end
    $display("final correction taken=%0d skipped=%0d", corr_taken, corr_skipped);
    checks++; if (corr_taken == 0 || corr_skipped == 0) failures++;
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
