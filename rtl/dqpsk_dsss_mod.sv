// DQPSK-DSSS modulator, top level.
//
// The data stream is spread with a 31-chip m-sequence. The spread chips are
// grouped in pairs, and the pairs are differentially encoded into
// quaternary symbols QI. Each symbol selects one of four carrier phases
// (pi/4, 3pi/4, 5pi/4, 7pi/4) of a DDS-generated sine carrier. The output is
// a stream of unsigned 8-bit samples for an external D/A converter.
//
//   clk_div ------ chip_en (fclk/M)
//   ds_circuit --- pn_gen, ds = data ^ pn                  per chip
//   sp_converter - (a, b) = (odd chip, even chip)          per 2 chips
//   diff_encoder - {c,d} = {a,b} + previous {c,d} mod 4     per symbol
//   phase_select - P = phase(QI), clear accumulator        per symbol
//   dds_carrier -- acc += K; addr = acc + P; dqpsk = LUT[addr]  per clk
//
// The system clock is fclk. Everything runs on it. The divided chip rate
// and the symbol rate are one-cycle enables, not derived clocks. This is
// this design's choice; the published design uses derived clocks. At the
// published sizes (fclk = 294912 Hz, M = 48, K = 32, N = 10):
//   chip rate 6144 Hz, symbol rate 3072 Hz, carrier 9216 Hz.
// That is three carrier cycles and 96 clocks per symbol.
// Timing: data is sampled in the cycle where chip_en is high. The source
// must hold it for at least that cycle; normally it holds one data bit for
// many chips. A new QI appears one clock after the second chip of a pair
// is sampled. Its first carrier sample appears on dqpsk three clocks after
// that.
// The carrier word K is an input, as in the published diagram. Set it to 32
// for the published carrier.
//
// Ports: clk, rst_n (asynchronous, active low); data; k (N bits);
// chip_en (data sample strobe); pn, ds (current chip before and after
// spreading); qi, qi_stb (symbol and its strobe); phase_acc, phase_addr
// (DDS phase before and after the phase offset); dqpsk (W-bit sample).
module dqpsk_dsss_mod
  import dqpsk_pkg::*;
#(
  parameter int unsigned M = dqpsk_pkg::CLK_DIV_M,
  parameter int unsigned N = dqpsk_pkg::PHASE_W,
  parameter int unsigned W = dqpsk_pkg::AMP_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         data,
  input  logic [N-1:0] k,
  output logic         chip_en,
  output logic         pn,
  output logic         ds,
  output qi_t          qi,
  output logic         qi_stb,
  output logic [N-1:0] phase_acc,
  output logic [N-1:0] phase_addr,
  output logic [W-1:0] dqpsk
);

  logic         a, b, pair_stb;
  logic [N-1:0] p;
  logic         acc_clr;

  clk_div #(.M(M)) u_div (
    .clk    (clk),
    .rst_n  (rst_n),
    .chip_en(chip_en)
  );

  ds_circuit u_ds (
    .clk    (clk),
    .rst_n  (rst_n),
    .chip_en(chip_en),
    .data   (data),
    .pn     (pn),
    .ds     (ds)
  );

  sp_converter u_sp (
    .clk     (clk),
    .rst_n   (rst_n),
    .chip_en (chip_en),
    .ds      (ds),
    .a       (a),
    .b       (b),
    .pair_stb(pair_stb)
  );

  diff_encoder u_diff (
    .clk   (clk),
    .rst_n (rst_n),
    .en    (pair_stb),
    .a     (a),
    .b     (b),
    .qi    (qi),
    .qi_stb(qi_stb)
  );

  phase_select #(.N(N)) u_sel (
    .clk    (clk),
    .rst_n  (rst_n),
    .sym_stb(qi_stb),
    .qi     (qi),
    .p      (p),
    .acc_clr(acc_clr)
  );

  dds_carrier #(.N(N), .W(W)) u_dds (
    .clk  (clk),
    .rst_n(rst_n),
    .k    (k),
    .p    (p),
    .clr  (acc_clr),
    .amp  (dqpsk),
    .acc  (phase_acc),
    .addr (phase_addr)
  );

endmodule
