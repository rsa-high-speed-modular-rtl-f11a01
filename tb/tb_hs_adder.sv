// tb_hs_adder - checks the carry-skip / carry-select adder against '+':
// exhaustively at 10 bits (blocks of 1,2,3,4 bits) with both carry-ins,
// and randomly at the default 514 bits, including all-propagate operands
// that send a carry through every skip path.
module tb_hs_adder;
  localparam int unsigned WD = 514;
  int checks = 0, failures = 0;

  logic [9:0]    a, b, s;
  logic          ci, co;
  logic [WD-1:0] ad, bd, sd;
  logic          cid, cod;

  hs_adder #(.WIDTH(10)) dut_s (.a(a), .b(b), .cin(ci), .sum(s), .cout(co));
  hs_adder dut_d (.a(ad), .b(bd), .cin(cid), .sum(sd), .cout(cod));

  initial begin
    for (int i = 0; i < 1024; i++)
      for (int j = 0; j < 1024; j++)
        for (int k = 0; k < 2; k++) begin
          a = 10'(i); b = 10'(j); ci = 1'(k);
          #1;
          checks++;
          if ({co, s} !== 11'(a) + 11'(b) + 11'(ci)) failures++;
        end
    for (int n = 0; n < 2000; n++) begin
      for (int q = 0; q < WD; q += 32) begin
        ad[q +: 32] = $urandom; bd[q +: 32] = $urandom;
      end
      if (n % 4 == 1) bd = ~ad;
      cid = 1'($urandom);
      #1;
      checks++;
      if ({cod, sd} !== (WD+1)'(ad) + (WD+1)'(bd) + (WD+1)'(cid)) failures++;
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
