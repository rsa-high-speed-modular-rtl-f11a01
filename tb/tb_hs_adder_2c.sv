// tb_hs_adder_2c - drives the two-cycle adder at its default 1028 bits:
// operands held, lo_en for one cycle, sum checked in the next cycle.
module tb_hs_adder_2c;
  localparam int unsigned W = 1028;
  int checks = 0, failures = 0;
  int cycles = 0;

  logic clk = 0, rst_n = 0, lo_en = 0;
  logic [W-1:0] a, b, sum;

  hs_adder_2c dut (.clk(clk), .rst_n(rst_n), .lo_en(lo_en), .a(a), .b(b), .sum(sum));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    a = '0; b = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      for (int q = 0; q < W; q += 32) begin
        a[q +: 32] = $urandom; b[q +: 32] = $urandom;
      end
      if (n % 3 == 0) b = ~a + W'(n % 2);   // long carries across the split
      lo_en = 1;
      @(negedge clk);
      lo_en = 0;
      checks++;
      if (sum !== W'(a + b)) failures++;
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
