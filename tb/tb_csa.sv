// tb_csa - random check of the carry-save adder: sum + carry must equal
// x + y + z + cin modulo 2^W, at the default width and at a narrow one.
module tb_csa;
  localparam int unsigned W  = 1028;
  localparam int unsigned WS = 8;
  int checks = 0, failures = 0;

  logic [W-1:0]  x, y, z, s, c;
  logic          cin;
  logic [WS-1:0] xs, ys, zs, ss, cs;
  logic          cins;

  csa #(.W(W))  dut   (.x(x), .y(y), .z(z), .cin(cin), .sum(s), .carry(c));
  csa #(.W(WS)) dut_s (.x(xs), .y(ys), .z(zs), .cin(cins), .sum(ss), .carry(cs));

  function automatic logic [W-1:0] rnd();
    logic [W-1:0] r;
    for (int i = 0; i < W; i += 32) r[i +: 32] = $urandom;
    return r;
  endfunction

  initial begin
    for (int k = 0; k < 200; k++) begin
      x = rnd(); y = rnd(); z = rnd(); cin = 1'($urandom);
      if (k == 0) begin x = '1; y = '1; z = '1; cin = 1'b1; end
      #1;
      checks++;
      if (W'(s + c) !== W'(x + y + z + W'(cin))) begin
        failures++; $display("FAIL wide k=%0d", k);
      end
    end
    for (int v = 0; v < 4096; v++) begin
      xs = 8'($urandom); ys = 8'($urandom); zs = 8'($urandom); cins = 1'($urandom);
      #1;
      checks++;
      if (WS'(ss + cs) !== WS'(xs + ys + zs + WS'(cins))) failures++;
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
