// tb_host_if - checks the host interface decode: each register select
// raises only its write enable, index and data pass to the registers,
// writes and go are blocked while busy, and every result word reads back
// (zero past the end). Combinational block, N_BITS = E_BITS = 1024.
module tb_host_if;
  import rsa_pkg::*;
  int checks = 0, failures = 0;

  logic          host_we, host_go, host_busy, host_done;
  reg_sel_e      host_sel;
  logic [4:0]    host_widx, host_ridx, widx;
  logic [31:0]   host_wdata, host_rdata, wdata;
  logic          mod_we, exp_we, msg_we, go, busy, done;
  logic [1023:0] result;

  host_if dut (.host_we, .host_sel, .host_widx, .host_wdata, .host_go, .host_ridx,
    .host_rdata, .host_busy, .host_done, .mod_we, .exp_we, .msg_we, .widx, .wdata,
    .go, .result, .busy, .done);

  initial begin
    for (int i = 0; i < 1024; i += 32) result[i +: 32] = $urandom;
    for (int k = 0; k < 2000; k++) begin
      host_we = 1'($urandom); host_sel = reg_sel_e'($urandom % 4);
      host_widx = 5'($urandom); host_wdata = $urandom; host_go = 1'($urandom);
      host_ridx = 5'($urandom); busy = 1'($urandom); done = 1'($urandom);
      #1;
      checks++;
      if (mod_we !== (host_we && !busy && host_sel == SEL_MODULUS) ||
          exp_we !== (host_we && !busy && host_sel == SEL_EXPONENT) ||
          msg_we !== (host_we && !busy && host_sel == SEL_MESSAGE)) failures++;
      checks++; if (widx !== host_widx || wdata !== host_wdata) failures++;
      checks++; if (go !== (host_go && !busy)) failures++;
      checks++; if (host_rdata !== result[host_ridx*32 +: 32]) failures++;
      checks++; if (host_busy !== busy || host_done !== done) failures++;
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
