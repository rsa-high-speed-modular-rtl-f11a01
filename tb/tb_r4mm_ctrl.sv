// tb_r4mm_ctrl - checks the multiplier sequencer at N_BITS = 16 and at
// the default 1024: after a start, iter must be high for exactly n/2+1
// edges with the digit index counting n/2 .. 0, then lo_en for one edge
// and fin for one edge, fin on the (n/2+3)-th edge from the start edge;
// busy covers the whole run and a start while busy is ignored.
module tb_r4mm_ctrl;
  int checks = 0, failures = 0;
  int cycles = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  logic        st_s, it_s, lo_s, fin_s, busy_s;
  logic [3:0]  dg_s;
  logic        st_d, it_d, lo_d, fin_d, busy_d;
  logic [9:0]  dg_d;

  r4mm_ctrl #(.N_BITS(16)) dut_s (.clk(clk), .rst_n(rst_n), .start(st_s), .iter(it_s),
    .digit(dg_s), .lo_en(lo_s), .fin(fin_s), .busy(busy_s));
  r4mm_ctrl dut_d (.clk(clk), .rst_n(rst_n), .start(st_d), .iter(it_d),
    .digit(dg_d), .lo_en(lo_d), .fin(fin_d), .busy(busy_d));

  initial begin
    int edges, iters, expdig, lo_at, fin_at;
    st_s = 0; st_d = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // small instance: sample outputs before every edge
    for (int rep = 0; rep < 3; rep++) begin
      @(negedge clk);
      st_s = 1; edges = 0; iters = 0; expdig = 8; lo_at = 0; fin_at = 0;
      while (fin_at == 0 && edges < 100) begin
        #1;  // values seen by the coming edge
        if (it_s) begin
          checks++; if (dg_s != 4'(expdig)) failures++;
          expdig--; iters++;
        end
        if (lo_s) lo_at = edges + 1;
        if (fin_s) begin
          fin_at = edges + 1;
          checks++; if (!busy_s) failures++;
        end
        @(posedge clk); edges++;
        @(negedge clk);
        st_s = (rep == 1);   // rep 1 keeps start high: must be ignored
      end
      st_s = 0;
      checks++; if (iters != 9) begin failures++; $display("iters %0d", iters); end
      checks++; if (lo_at != 10) begin failures++; $display("lo %0d", lo_at); end
      checks++; if (fin_at != 11) begin failures++; $display("fin %0d", fin_at); end
      checks++; if (busy_s) failures++;
    end
    // default size: count edges from start to fin
    @(negedge clk);
    st_d = 1; edges = 0; iters = 0;
    #1;
    while (!fin_d && edges < 1000) begin
      if (it_d) iters++;
      @(posedge clk); edges++;
      @(negedge clk); st_d = 0;
      #1;
    end
    checks++; if (iters != 513) begin failures++; $display("iters %0d", iters); end
    checks++; if (edges + 1 != 515) begin failures++; $display("edges %0d", edges + 1); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycles == 5000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
