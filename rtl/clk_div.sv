// Chip-clock divider.
//
// The modulator runs from one system clock, fclk. The spreading chain (PN
// generator, mod-2 adder, serial-to-parallel converter) steps at
// fclk1 = fclk / M. The published design has M = 48, so fclk = 294912 Hz
// gives fclk1 = 6144 Hz. The published design clocks those stages with a
// derived clock. Here the divider gives instead a one-cycle enable strobe,
// chip_en, so that everything stays in the fclk domain.
//
// A modulo-M counter counts from 0 after reset. chip_en is high in the
// cycle where the counter holds M-1, so the first strobe comes M cycles
// after reset and then one every M cycles.
//
// Ports: clk, rst_n (asynchronous, active low); chip_en (output).
module clk_div #(
  parameter int unsigned M = dqpsk_pkg::CLK_DIV_M
) (
  input  logic clk,
  input  logic rst_n,
  output logic chip_en
);

  localparam int unsigned CW = (M > 1) ? $clog2(M) : 1;

  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                  cnt <= '0;
    else if (cnt == CW'(M - 1))  cnt <= '0;
    else                         cnt <= cnt + 1'b1;
  end

  assign chip_en = (cnt == CW'(M - 1));

endmodule
