// DDS phase modulator.
//
// Adds the phase control word P to the accumulator phase, modulo 2^N, and
// registers the sum as the sine-table address. The carrier then starts each
// symbol at the phase P. The output register is this design's pipeline
// choice.
//
// Ports: clk, rst_n; acc (accumulator phase); p (phase word);
// addr (registered table address, one clock after its inputs).
module phase_modulator #(
  parameter int unsigned N = dqpsk_pkg::PHASE_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] acc,
  input  logic [N-1:0] p,
  output logic [N-1:0] addr
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) addr <= '0;
    else        addr <= acc + p;
  end

endmodule
