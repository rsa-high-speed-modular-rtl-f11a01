// operand_reg - working registers of the exponentiation.
//
// Holds C, the running product, and M, the running square, of the
// right-to-left binary method. `init` loads C = 1 and M = msg. Otherwise
// `c_we` loads C from the multiplier computing C*M and `m_we` loads M from
// the squaring multiplier; both may load on the same edge. C is the
// exponentiation result when the controller reports done. Asynchronous
// active-low reset clears both.
module operand_reg #(
  parameter int unsigned N_BITS = 1024
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              init,
  input  logic [N_BITS-1:0] msg,
  input  logic              c_we,
  input  logic [N_BITS-1:0] c_d,
  input  logic              m_we,
  input  logic [N_BITS-1:0] m_d,
  output logic [N_BITS-1:0] c_q,
  output logic [N_BITS-1:0] m_q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c_q <= '0;
      m_q <= '0;
    end else if (init) begin
      c_q <= N_BITS'(1);
      m_q <= msg;
    end else begin
      if (c_we) c_q <= c_d;
      if (m_we) m_q <= m_d;
    end
  end

endmodule
