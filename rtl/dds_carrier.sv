// Four-phase carrier generator (DDS).
//
// A phase accumulator, a phase modulator and a sine look-up table in a
// chain: acc (+K each clock) -> addr = acc + P -> amp = LUT[addr].
// A clear at a symbol start zeroes the accumulator. The first sample of the
// new symbol is then the table entry at P. It appears on amp three clock
// edges after the clock cycle in which clr is high:
//   edge 1 clears acc, edge 2 registers addr = P, edge 3 reads the table.
// The published design has the same three-clock delay. The pipeline
// registers are placed here to give it.
//
// Ports: clk, rst_n; k (frequency word); p (phase word); clr (accumulator
// clear); amp (W-bit sample); acc, addr (internal phase, for observation).
module dds_carrier #(
  parameter int unsigned N = dqpsk_pkg::PHASE_W,
  parameter int unsigned W = dqpsk_pkg::AMP_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] k,
  input  logic [N-1:0] p,
  input  logic         clr,
  output logic [W-1:0] amp,
  output logic [N-1:0] acc,
  output logic [N-1:0] addr
);

  phase_accumulator #(.N(N)) u_acc (
    .clk  (clk),
    .rst_n(rst_n),
    .clr  (clr),
    .k    (k),
    .acc  (acc)
  );

  phase_modulator #(.N(N)) u_pm (
    .clk  (clk),
    .rst_n(rst_n),
    .acc  (acc),
    .p    (p),
    .addr (addr)
  );

  sine_lut #(.N(N), .W(W)) u_lut (
    .clk (clk),
    .addr(addr),
    .amp (amp)
  );

endmodule
