// Reference values shared by the testbenches.
//
// PN_SEQ is the published 31-chip m-sequence, as emitted from a cleared
// register (first chip in bit 30). ref_amp() gives the expected sine sample:
// 8 bits, centre 128, swing 127, where table address k stands for the phase
// 2*pi*(k+1)/1024. It is checked against the four published points
// (addresses 127/383 -> 218, 639/895 -> 38). ref_phase() is the published
// symbol-to-phase-word table.
package tb_ref_pkg;

  localparam logic [30:0] PN_SEQ = 31'b0000011001011011110101000100111;

  // Chip i (0-based) of the repeating sequence.
  function automatic logic pn_chip(input int unsigned i);
    return PN_SEQ[30 - (i % 31)];
  endfunction

  function automatic int ref_amp(input int unsigned addr, input int unsigned n = 10);
    real ph;
    ph = 2.0 * 3.141592653589793 * real'((addr % (1 << n)) + 1) / real'(1 << n);
    return $rtoi(128.0 + 127.0 * $sin(ph) + 0.5);
  endfunction

  // Published phase control words for N = 10, indexed by QI = {c, d}.
  function automatic int ref_phase(input logic [1:0] qi);
    case (qi)
      2'b00:   return 10'b1001111111;
      2'b01:   return 10'b0101111111;
      2'b10:   return 10'b1101111111;
      default: return 10'b0001111111;
    endcase
  endfunction

endpackage
