// r4mm_ctrl - sequencer of one radix-4 modular multiplication.
//
// A multiplication of an n-bit modulus takes n/2+3 clock edges counted
// from the edge that samples `start`:
//   n/2+1 loop edges  - one Booth digit of A each, most significant first;
//                       the first of them is the start edge itself
//   1 edge (lo_en)    - final addition, low halves
//   1 edge (fin)      - final addition, high halves; the product is valid
//                       during this cycle and the carry-save registers
//                       are cleared on its edge.
// `iter` marks the cycles whose edge runs a loop iteration, `digit` the
// Booth digit it uses. `start` is ignored while busy. The cycle counts
// follow the published timing of the multiplier; the state encoding is this
// design's own.
module r4mm_ctrl #(
  parameter int unsigned N_BITS = 1024,
  localparam int unsigned D     = N_BITS / 2 + 1,   // Booth digits of A
  localparam int unsigned DW    = $clog2(D)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  output logic          iter,
  output logic [DW-1:0] digit,
  output logic          lo_en,
  output logic          fin,
  output logic          busy
);

  typedef enum logic [1:0] {S_IDLE, S_LOOP, S_FIN1, S_FIN2} state_e;

  state_e        state;
  logic [DW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      cnt   <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          state <= S_LOOP;
          cnt   <= DW'(D - 2);
        end
        S_LOOP: begin
          if (cnt == '0) state <= S_FIN1;
          else           cnt   <= cnt - 1'b1;
        end
        S_FIN1: state <= S_FIN2;
        S_FIN2: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    iter  = (state == S_LOOP) || (state == S_IDLE && start);
    digit = (state == S_IDLE) ? DW'(D - 1) : cnt;
    lo_en = (state == S_FIN1);
    fin   = (state == S_FIN2);
    busy  = (state != S_IDLE);
  end

endmodule
