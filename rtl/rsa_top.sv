// rsa_top - RSA processor computing M^e mod N with two radix-4 modular
// multipliers.
//
// Blocks: a 32-bit host interface; modulus, exponent and message registers
// loaded word by word; the operand register holding the running result C
// and running square M; two radix-4 sign-estimation modular multipliers
// (one computes C*M, the other M*M, in parallel); and the exponentiation
// controller that scans the exponent right to left.
// Use: reset; write the modulus (top bit set), the exponent and the
// message (< N) over the host bus; pulse host_go; wait for host_done; read
// the result words. host_done rises on the edge E_BITS*(N_BITS/2+3) + 1
// edges after the one that sampled go (one edge loads C and M, then each
// exponent bit takes one multiplication of N_BITS/2+3 cycles).
module rsa_top
  import rsa_pkg::*;
#(
  parameter int unsigned N_BITS = 1024,
  parameter int unsigned E_BITS = 1024,
  localparam int unsigned NW    = (n_words(N_BITS) > n_words(E_BITS)) ?
                                  n_words(N_BITS) : n_words(E_BITS),
  localparam int unsigned IW    = idx_bits(NW),
  localparam int unsigned EW    = $clog2(E_BITS)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              host_we,
  input  reg_sel_e          host_sel,
  input  logic [IW-1:0]     host_widx,
  input  logic [HOST_W-1:0] host_wdata,
  input  logic              host_go,
  input  logic [IW-1:0]     host_ridx,
  output logic [HOST_W-1:0] host_rdata,
  output logic              host_busy,
  output logic              host_done
);

  logic              mod_we, exp_we, msg_we, go;
  logic [IW-1:0]     widx;
  logic [HOST_W-1:0] wdata;
  logic [N_BITS-1:0] n_mod, msg, c_q, m_q, p_cm, p_mm;
  logic [E_BITS-1:0] e;
  logic              busy, done, init, mm_start, c_we, m_we;
  logic              cm_busy, mm_busy, cm_done, mm_done;
  logic [EW-1:0]     bit_idx;

  host_if #(.N_BITS(N_BITS), .E_BITS(E_BITS)) u_host (
    .host_we, .host_sel, .host_widx, .host_wdata, .host_go, .host_ridx,
    .host_rdata, .host_busy, .host_done,
    .mod_we, .exp_we, .msg_we, .widx, .wdata, .go,
    .result(c_q), .busy, .done);

  word_reg #(.WIDTH(N_BITS)) u_mod_reg (
    .clk, .rst_n, .we(mod_we), .widx(widx[idx_bits(n_words(N_BITS))-1:0]),
    .wdata, .q(n_mod));
  word_reg #(.WIDTH(E_BITS)) u_exp_reg (
    .clk, .rst_n, .we(exp_we), .widx(widx[idx_bits(n_words(E_BITS))-1:0]),
    .wdata, .q(e));
  word_reg #(.WIDTH(N_BITS)) u_msg_reg (
    .clk, .rst_n, .we(msg_we), .widx(widx[idx_bits(n_words(N_BITS))-1:0]),
    .wdata, .q(msg));

  rsa_controller #(.E_BITS(E_BITS)) u_ctrl (
    .clk, .rst_n, .go, .e, .mm_done(cm_done), .init, .mm_start, .c_we, .m_we,
    .busy, .done, .bit_idx);

  operand_reg #(.N_BITS(N_BITS)) u_opreg (
    .clk, .rst_n, .init, .msg, .c_we, .c_d(p_cm), .m_we, .m_d(p_mm),
    .c_q, .m_q);

  // multiplier 1: C * M
  r4mm #(.N_BITS(N_BITS)) u_mul_cm (
    .clk, .rst_n, .start(mm_start), .a({1'b0, c_q}), .b({1'b0, m_q}),
    .n_mod, .busy(cm_busy), .done(cm_done), .p(p_cm));

  // multiplier 2: M * M
  r4mm #(.N_BITS(N_BITS)) u_mul_mm (
    .clk, .rst_n, .start(mm_start), .a({1'b0, m_q}), .b({1'b0, m_q}),
    .n_mod, .busy(mm_busy), .done(mm_done), .p(p_mm));

  // the two multipliers run in lock step
  a_lockstep: assert property (@(posedge clk) disable iff (!rst_n)
                               (cm_done == mm_done) && (cm_busy == mm_busy));

endmodule
