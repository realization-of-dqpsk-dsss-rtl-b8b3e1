// DDS phase accumulator.
//
// An N-bit register that adds the frequency control word K every clock and
// wraps modulo 2^N. The output frequency is therefore K * fclk / 2^N. A
// synchronous clear (the published RESET, issued at each symbol start)
// loads 0, the published initial value. The sum with K resumes on the next
// clock.
//
// Ports: clk, rst_n; clr (synchronous clear); k (frequency word);
// acc (phase, registered).
module phase_accumulator #(
  parameter int unsigned N = dqpsk_pkg::PHASE_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic [N-1:0] k,
  output logic [N-1:0] acc
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   acc <= '0;
    else if (clr) acc <= '0;
    else          acc <= acc + k;
  end

endmodule
