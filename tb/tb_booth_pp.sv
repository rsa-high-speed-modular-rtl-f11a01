// tb_booth_pp - checks the radix-4 recoding table (all eight bit patterns)
// and that pp + pp_cin equals digit * B sign-extended to W bits, for
// random and extreme B.
module tb_booth_pp;
  import rsa_pkg::*;
  localparam int unsigned BW = 17, W = 20;
  int checks = 0, failures = 0;

  logic [2:0]    bits;
  logic [BW-1:0] b;
  booth_digit_t  dg;
  logic [W-1:0]  pp;
  logic          cin;

  booth_pp #(.BW(BW), .W(W)) dut (.bits(bits), .b(b), .digit(dg), .pp(pp), .pp_cin(cin));

  // expected digit per pattern, independent of the RTL's encoding
  int expd [8] = '{0, 1, 1, 2, -2, -1, -1, 0};

  initial begin
    for (int k = 0; k < 3000; k++) begin
      int signed bv, got;
      bits = 3'(k % 8);
      case (k / 8)
        0: b = {1'b0, {(BW-1){1'b1}}};
        1: b = {1'b1, {(BW-1){1'b0}}};
        2: b = '0;
        default: b = BW'($urandom);
      endcase
      #1;
      bv  = int'($signed(b));
      got = int'($signed(W'(pp + W'(cin))));
      checks++;
      if (got !== expd[bits] * bv) begin
        failures++;
        $display("FAIL bits=%b b=%0d got=%0d", bits, bv, got);
      end
      checks++;
      if ((dg.neg ? -1 : 1) * (dg.two ? 2 : (dg.one ? 1 : 0)) != expd[bits]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
