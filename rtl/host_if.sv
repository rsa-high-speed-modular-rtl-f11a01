// host_if - 32-bit host interface of the RSA processor.
//
// Writes: with `host_we` high, `host_wdata` goes to word `host_widx` of the
// parameter register chosen by `host_sel` (modulus, exponent or message).
// Writes and `host_go` are ignored while an exponentiation runs, so the
// operands cannot change under the multipliers.
// Reads: `host_rdata` is word `host_ridx` of the result C (combinational;
// zero for an index past the end). `host_busy` and `host_done` mirror the
// controller. All register-side outputs are combinational decodes of the
// host inputs, so a write lands on the same clock edge. The bus protocol
// is this design's own; only its 32-bit width is given.
module host_if
  import rsa_pkg::*;
#(
  parameter int unsigned N_BITS = 1024,
  parameter int unsigned E_BITS = 1024,
  localparam int unsigned NW    = (n_words(N_BITS) > n_words(E_BITS)) ?
                                  n_words(N_BITS) : n_words(E_BITS),
  localparam int unsigned IW    = idx_bits(NW),
  localparam int unsigned NWR   = n_words(N_BITS)
) (
  // host side
  input  logic              host_we,
  input  reg_sel_e          host_sel,
  input  logic [IW-1:0]     host_widx,
  input  logic [HOST_W-1:0] host_wdata,
  input  logic              host_go,
  input  logic [IW-1:0]     host_ridx,
  output logic [HOST_W-1:0] host_rdata,
  output logic              host_busy,
  output logic              host_done,
  // register side
  output logic              mod_we,
  output logic              exp_we,
  output logic              msg_we,
  output logic [IW-1:0]     widx,
  output logic [HOST_W-1:0] wdata,
  output logic              go,
  input  logic [N_BITS-1:0] result,
  input  logic              busy,
  input  logic              done
);

  logic                       wr_ok;
  logic [NWR*HOST_W-1:0]      res_ext;

  always_comb begin
    wr_ok  = host_we && !busy;
    mod_we = wr_ok && (host_sel == SEL_MODULUS);
    exp_we = wr_ok && (host_sel == SEL_EXPONENT);
    msg_we = wr_ok && (host_sel == SEL_MESSAGE);
    widx   = host_widx;
    wdata  = host_wdata;
    go     = host_go && !busy;

    res_ext    = (NWR*HOST_W)'(result);
    host_rdata = '0;
    for (int i = 0; i < NWR; i++)
      if (32'(host_ridx) == i) host_rdata = res_ext[i*HOST_W +: HOST_W];
    host_busy = busy;
    host_done = done;
  end

endmodule
