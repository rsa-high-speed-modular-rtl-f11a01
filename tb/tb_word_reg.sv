// tb_word_reg - fills a 1024-bit and a 40-bit register word by word in
// random order, checks the assembled value after every write, checks that
// writes without `we` and past the last word change nothing, and that
// reset clears the register.
module tb_word_reg;
  import rsa_pkg::*;
  int checks = 0, failures = 0;
  int cycles = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  logic          we, we_s;
  logic [4:0]    widx;
  logic [0:0]    widx_s;
  logic [31:0]   wdata, wdata_s;
  logic [1023:0] q, model;
  logic [39:0]   q_s, model_s;

  word_reg dut (.clk(clk), .rst_n(rst_n), .we(we), .widx(widx), .wdata(wdata), .q(q));
  word_reg #(.WIDTH(40)) dut_s (.clk(clk), .rst_n(rst_n), .we(we_s), .widx(widx_s),
                                .wdata(wdata_s), .q(q_s));

  initial begin
    we = 0; widx = 0; wdata = 0; we_s = 0; widx_s = 0; wdata_s = 0;
    model = '0; model_s = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    checks++; if (q !== '0 || q_s !== '0) failures++;
    for (int k = 0; k < 400; k++) begin
      @(negedge clk);
      we = ($urandom % 4) != 0; widx = 5'($urandom); wdata = $urandom;
      we_s = ($urandom % 4) != 0; widx_s = 1'($urandom); wdata_s = $urandom;
      @(posedge clk);
      if (we) model[widx*32 +: 32] = wdata;
      if (we_s) begin
        if (widx_s == 0) model_s[31:0] = wdata_s;
        else             model_s[39:32] = wdata_s[7:0];
      end
      #1;
      checks++; if (q !== model) failures++;
      checks++; if (q_s !== model_s) failures++;
    end
    rst_n = 0; #1;
    checks++; if (q !== '0 || q_s !== '0) failures++;
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
