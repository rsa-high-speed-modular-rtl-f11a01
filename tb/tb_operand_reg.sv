// tb_operand_reg - checks init (C = 1, M = msg), independent and joint
// loads of C and M, hold when no enable is set, and init priority.
module tb_operand_reg;
  int checks = 0, failures = 0;
  int cycles = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  logic          init, c_we, m_we;
  logic [1023:0] msg, c_d, m_d, c_q, m_q, mc, mm;

  operand_reg dut (.clk(clk), .rst_n(rst_n), .init(init), .msg(msg), .c_we(c_we),
    .c_d(c_d), .m_we(m_we), .m_d(m_d), .c_q(c_q), .m_q(m_q));

  function automatic logic [1023:0] rnd();
    logic [1023:0] r;
    for (int i = 0; i < 1024; i += 32) r[i +: 32] = $urandom;
    return r;
  endfunction

  initial begin
    init = 0; c_we = 0; m_we = 0; msg = '0; c_d = '0; m_d = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    mc = '0; mm = '0;
    for (int k = 0; k < 300; k++) begin
      @(negedge clk);
      init = (k % 10 == 0); c_we = 1'($urandom); m_we = 1'($urandom);
      msg = rnd(); c_d = rnd(); m_d = rnd();
      @(posedge clk);
      if (init) begin mc = 1024'(1); mm = msg; end
      else begin
        if (c_we) mc = c_d;
        if (m_we) mm = m_d;
      end
      #1;
      checks++; if (c_q !== mc) failures++;
      checks++; if (m_q !== mm) failures++;
    end
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
