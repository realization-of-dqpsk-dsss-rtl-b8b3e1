// Serial-to-parallel converter (S/P).
//
// The spread chip stream is cut into bit pairs. The odd-numbered chips
// (1st, 3rd, ...) go to the I bit a. The even-numbered chips go to the Q
// bit b. A toggle flip-flop marks the odd and even chips, as in the
// published circuit. It halves the chip rate into the symbol rate clk2,
// which is fclk1 / 2 = 3072 Hz at the published sizes.
// On an odd chip the chip is stored. On the following even chip the stored
// chip and the current chip are loaded into a and b together. pair_stb is
// high for the one cycle after that load. It is the clk2 enable of the
// differential coder. a and b hold their values for a whole symbol.
// The first chip after reset counts as odd. This is this design's choice.
// The published reference run pairs the same way. There, one chip enters
// while the PN register is still in reset, which moves the pairing by one
// chip.
// An assertion checks that pair strobes are never back to back.
//
// Ports: clk, rst_n; chip_en (chip strobe); ds (chip, sampled on chip_en);
// a, b (parallel bits, registered); pair_stb (one-cycle new-pair strobe).
module sp_converter (
  input  logic clk,
  input  logic rst_n,
  input  logic chip_en,
  input  logic ds,
  output logic a,
  output logic b,
  output logic pair_stb
);

  logic odd_bit;  // stored odd-numbered chip
  logic second;   // toggle: 0 on odd chips, 1 on even chips

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      odd_bit  <= 1'b0;
      second   <= 1'b0;
      a        <= 1'b0;
      b        <= 1'b0;
      pair_stb <= 1'b0;
    end else begin
      pair_stb <= 1'b0;
      if (chip_en) begin
        second <= ~second;
        if (!second) begin
          odd_bit <= ds;
        end else begin
          a        <= odd_bit;
          b        <= ds;
          pair_stb <= 1'b1;
        end
      end
    end
  end

  // A pair takes two chips, so two pair strobes are never adjacent.
  a_pair_spacing: assert property (@(posedge clk) disable iff (!rst_n)
    pair_stb |=> !pair_stb);

endmodule
