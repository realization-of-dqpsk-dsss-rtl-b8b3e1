// Shared constants and helpers of the DQPSK-DSSS modulator.
//
// Sizes: the DDS phase word is N = 10 bits wide (a 1024-entry sine table) and
// each sample has 8 bits. These are the published sizes. The system clock
// is divided by M = 48 to give the chip clock. The carrier frequency word
// K = 32 gives f_out = K * fclk / 2^N, which is 9216 Hz for fclk = 294912 Hz.
//
// The symbol-to-phase map is the published one. The symbol QI = {c, d} is
// the output of the differential coder:
//   QI = 11 -> pi/4, 01 -> 3pi/4, 00 -> 5pi/4, 10 -> 7pi/4.
// The phase word of each symbol is the table address one below the exact
// angle: (2m+1) * 2^N/8 - 1, where m counts the odd multiples of pi/4.
// For N = 10 the words are 127, 383, 639 and 895.
package dqpsk_pkg;

  localparam int unsigned PHASE_W   = 10;  // N, phase word width
  localparam int unsigned AMP_W     = 8;   // sample width
  localparam int unsigned CLK_DIV_M = 48;  // fclk / fclk1
  localparam int unsigned FREQ_K    = 32;  // carrier frequency control word
  localparam int unsigned PN_STAGES = 5;   // m-sequence length 2^5-1 = 31

  // Differentially encoded quaternary symbol: {c, d}.
  typedef struct packed {
    logic c;  // high bit, I channel
    logic d;  // low bit, Q channel
  } qi_t;

  // Multiple of pi/4 (1, 3, 5 or 7 -> index 0..3) that each symbol selects.
  function automatic logic [1:0] qi_octant(input qi_t qi);
    unique case ({qi.c, qi.d})
      2'b11:   return 2'd0;  // pi/4
      2'b01:   return 2'd1;  // 3pi/4
      2'b00:   return 2'd2;  // 5pi/4
      default: return 2'd3;  // 2'b10: 7pi/4
    endcase
  endfunction

  // Initial-phase control word of a symbol, in an n-bit phase space.
  function automatic logic [31:0] phase_word(input qi_t qi, input int unsigned n);
    logic [31:0] eighth;
    eighth = 32'd1 << (n - 3);
    return (32'(2 * qi_octant(qi) + 1) * eighth) - 32'd1;
  endfunction

endpackage
