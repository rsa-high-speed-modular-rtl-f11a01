// rsa_controller - right-to-left binary modular exponentiation sequencer.
//
// Computes C = M^e mod N by scanning e from bit 0 upwards:
//   C := 1
//   for i = 0 .. E_BITS-1:  (C, M) := (e_i ? C*M : C, M*M) mod N
// Both products of one step use the old M and run at the same time on two
// multipliers; the product C*M is always computed and only written when
// e_i = 1, so the run time does not depend on the exponent's weight.
// Timing: `go` (sampled when idle) loads C and M (one edge); each exponent
// bit then takes exactly one multiplication, n/2+3 edges, because the
// results are written on the multipliers' last edge and the next start is
// issued in the following cycle; `done` rises after E_BITS bits and stays
// high until the next go. The exponent scanning order and the parallel
// C*M / M*M schedule follow the published method; the handshake is this
// design's own.
module rsa_controller #(
  parameter int unsigned E_BITS = 1024,
  localparam int unsigned EW    = $clog2(E_BITS)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              go,
  input  logic [E_BITS-1:0] e,
  input  logic              mm_done,
  output logic              init,
  output logic              mm_start,
  output logic              c_we,
  output logic              m_we,
  output logic              busy,
  output logic              done,
  output logic [EW-1:0]     bit_idx
);

  typedef enum logic [1:0] {S_IDLE, S_INIT, S_RUN, S_WAIT} state_e;
  state_e state;

  logic last;
  assign last = (bit_idx == EW'(E_BITS - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      bit_idx <= '0;
      done    <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: if (go) begin
          state   <= S_INIT;
          bit_idx <= '0;
          done    <= 1'b0;
        end
        S_INIT: state <= S_RUN;
        S_RUN:  state <= S_WAIT;
        S_WAIT: if (mm_done) begin
          if (last) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end else begin
            state   <= S_RUN;
            bit_idx <= bit_idx + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    init     = (state == S_INIT);
    mm_start = (state == S_RUN);
    m_we     = (state == S_WAIT) && mm_done;
    c_we     = m_we && e[bit_idx];
    busy     = (state != S_IDLE);
  end

endmodule
