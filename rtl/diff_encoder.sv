// Quaternary differential coder.
//
// The absolute symbol Z_a = 2a + b is added modulo 4 to the previous
// relative symbol, Z_r(i) = Z_a(i) + Z_r(i-1). Written with gates, as
// published:
//   c_i = a_i ^ c_{i-1} ^ (b_i & d_{i-1})
//   d_i = b_i ^ d_{i-1}
// The relative symbol {c, d} is registered on en, the symbol-rate strobe
// clk2 from the serial-to-parallel converter. The outputs are the register
// values and hold for one symbol. qi_stb is high for the one cycle after
// each update. Assertions check that strobe rule and that qi holds between
// strobes. The coder resets to 00. The reset value and the registered
// outputs are this design's choices.
//
// Ports: clk, rst_n; en (symbol strobe); a, b (absolute bits);
// qi ({c, d}, registered); qi_stb (one-cycle new-symbol strobe).
module diff_encoder
  import dqpsk_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  logic a,
  input  logic b,
  output qi_t  qi,
  output logic qi_stb
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      qi     <= '0;
      qi_stb <= 1'b0;
    end else begin
      qi_stb <= en;
      if (en) begin
        qi.c <= a ^ qi.c ^ (b & qi.d);
        qi.d <= b ^ qi.d;
      end
    end
  end

  a_stb_follows_en: assert property (@(posedge clk) disable iff (!rst_n)
    en |=> qi_stb);
  a_qi_holds: assert property (@(posedge clk) disable iff (!rst_n)
    !en |=> $stable(qi));

endmodule
