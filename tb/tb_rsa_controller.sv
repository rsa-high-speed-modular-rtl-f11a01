// tb_rsa_controller - runs the exponentiation sequencer against a
// behavioural multiplier pair that reports done n/2+2 cycles after each
// start (n = 16 here, so a step is 11 edges). For random 16-bit exponents
// it checks: init once after go, one start per exponent bit, start
// never while the multipliers run, c_we exactly on the bits that are 1,
// m_we on every bit, the step period, and done after the last bit.
module tb_rsa_controller;
  localparam int unsigned EB = 16, LAT = 16 / 2 + 3;
  int checks = 0, failures = 0;
  int cycles = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  logic          go, mm_done, init, mm_start, c_we, m_we, busy, done;
  logic [EB-1:0] e;
  logic [3:0]    bit_idx;

  rsa_controller #(.E_BITS(EB)) dut (.clk, .rst_n, .go, .e, .mm_done, .init,
    .mm_start, .c_we, .m_we, .busy, .done, .bit_idx);

  // behavioural multiplier timing: done during the (LAT)-th cycle
  int mcnt;
  logic mbusy;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin mcnt <= 0; mbusy <= 0; end
    else if (!mbusy && mm_start) begin mbusy <= 1; mcnt <= 1; end
    else if (mbusy) begin
      if (mcnt == LAT - 1) mbusy <= 0;
      mcnt <= mcnt + 1;
    end
  assign mm_done = mbusy && (mcnt == LAT - 1);

  initial begin
    go = 0; e = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int rep = 0; rep < 6; rep++) begin
      int n_init, n_start, n_mwe, t_go, t_done, t_last;
      logic [EB-1:0] cw;
      e = EB'($urandom); if (rep == 0) e = '0; if (rep == 1) e = '1;
      @(negedge clk); go = 1;
      @(posedge clk);
      #1 go = 0;
      t_go = cycles;   // number of the edge that sampled go
      n_init = 0; n_start = 0; n_mwe = 0; cw = '0;
      while (!done && cycles < t_go + 1000) begin
        @(negedge clk);
        if (init) n_init++;
        if (mm_start) begin
          if (n_start > 0) begin
            checks++; if (cycles - t_last != LAT) failures++;
          end
          t_last = cycles;
          n_start++;
          checks++; if (mbusy) failures++;
        end
        if (m_we) begin
          cw[n_mwe] = c_we;
          n_mwe++;
        end
        checks++; if (c_we && !m_we) failures++;
      end
      t_done = cycles;
      checks++; if (n_init != 1) failures++;
      checks++; if (n_start != EB) begin failures++; $display("starts %0d", n_start); end
      checks++; if (n_mwe != EB) failures++;
      checks++; if (cw !== e) begin failures++; $display("c_we %h e %h", cw, e); end
      // init edge, then EB steps of LAT edges; done is set on the last one
      checks++;
      if (t_done - t_go != 1 + EB * LAT) begin
        failures++; $display("time %0d", t_done - t_go);
      end
      checks++; if (busy) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycles == 20000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
