// Sine look-up table of the DDS carrier generator.
//
// Entry k holds an unsigned sample of one full sine period. The sample is
//   round(2^(W-1) + (2^(W-1) - 1) * sin(2*pi*(k+1) / 2^N)),
// which is 1..255 for W = 8. The table therefore stores at address
// 0001111111 (127) the pi/4 sample, 218, and at 1001111111 (639) the
// 5pi/4 sample, 38. The published design does the same. The one-address
// offset, the centre value 128 and the swing of 127 are this design's
// reading of those two published values.
// The table is computed at elaboration. It is read synchronously: the sample
// of addr appears on amp one clock after addr is presented. This maps onto a
// block RAM used as a ROM.
//
// Ports: clk; addr (N bits); amp (W bits, registered).
module sine_lut #(
  parameter int unsigned N = dqpsk_pkg::PHASE_W,
  parameter int unsigned W = dqpsk_pkg::AMP_W
) (
  input  logic         clk,
  input  logic [N-1:0] addr,
  output logic [W-1:0] amp
);

  localparam int unsigned DEPTH = 1 << N;
  typedef logic [W-1:0] rom_t [DEPTH];

  function automatic rom_t build_rom();
    rom_t  r;
    real   mid, swing, x;
    mid   = real'(1 << (W - 1));
    swing = mid - 1.0;
    for (int k = 0; k < DEPTH; k++) begin
      x    = mid + swing * $sin(2.0 * 3.141592653589793 * real'(k + 1) / real'(DEPTH));
      r[k] = W'($rtoi(x + 0.5));
    end
    return r;
  endfunction

  localparam rom_t ROM = build_rom();

  always_ff @(posedge clk) amp <= ROM[addr];

endmodule
