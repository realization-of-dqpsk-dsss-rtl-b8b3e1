// Phase selected by logic.
//
// At the start of each symbol (sym_stb), this block picks the initial
// carrier phase for the symbol QI and loads it into the phase control word
// P. It also clears the DDS phase accumulator (acc_clr). The published map
// is QI = 11 -> pi/4, 01 -> 3pi/4, 00 -> 5pi/4, 10 -> 7pi/4. The P words
// for N = 10 are 0001111111, 0101111111, 1001111111 and 1101111111.
// P holds until the next symbol, so the carrier keeps the selected offset
// and runs at K per clock in between.
// acc_clr is sym_stb passed through. The accumulator is therefore cleared
// at the same clock edge that loads P. P is 0 after reset, until the first
// symbol arrives.
//
// Ports: clk, rst_n; sym_stb (new symbol); qi (symbol); p (N-bit phase
// word, registered); acc_clr (accumulator clear, same cycle as sym_stb).
module phase_select
  import dqpsk_pkg::*;
#(
  parameter int unsigned N = dqpsk_pkg::PHASE_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         sym_stb,
  input  qi_t          qi,
  output logic [N-1:0] p,
  output logic         acc_clr
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       p <= '0;
    else if (sym_stb) p <= N'(phase_word(qi, N));
  end

  assign acc_clr = sym_stb;

endmodule
