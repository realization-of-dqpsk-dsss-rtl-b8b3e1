// PN (pseudo-noise) generator: a 31-chip m-sequence.
//
// A 5-stage Fibonacci shift register q[1..5] with taps [2 5], for the
// polynomial x^5 + x^2 + 1. The published circuit feeds stage 1 with the
// inverted XOR (an XNOR) of stages 2 and 5, and its flip-flops are cleared to
// zero. An XNOR register cannot lock in the all-zero state, so the cleared
// register starts the sequence at once. Stage 5 is the output. After reset
// the chips are
//   0000011001011011110101000100111
// and then this repeats with period 31. This is the published sequence.
// The design steps on en (the chip strobe) and has no separate clock.
//
// Ports: clk, rst_n (asynchronous clear, active low); en (advance one chip);
// pn (current chip, valid in the cycle of en).
module pn_gen #(
  parameter int unsigned STAGES = dqpsk_pkg::PN_STAGES,
  parameter int unsigned TAP    = 2
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,
  output logic              pn
);

  // q[i] is stage i+1 of the shift register.
  logic [STAGES-1:0] q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  q <= '0;
    else if (en) q <= {q[STAGES-2:0], ~(q[TAP-1] ^ q[STAGES-1])};
  end

  assign pn = q[STAGES-1];

endmodule
