// Reference run of the spreading and symbol-forming chain:
// ds_circuit -> sp_converter -> diff_encoder, at the default chip divider
// M = 48 (clk_div drives the chip strobe).
//
// The data is held at 1, so the chips are the inverted PN sequence. In the
// reference run, the serial-to-parallel registers take one chip while the PN
// register is still held in reset; that chip is data ^ 0 = 1. This bench
// does the same: the PN generator leaves reset one chip strobe after the
// rest of the chain. The first 13 symbols must then be the reference QI
// sequence
//   11 10 01 01 00 01 01 11 11 00 01 10 01
// It is followed by 20 more symbols checked against an integer modulo-4
// model of the same chip stream. The symbol period (2M clocks) is checked too.
module tb_spread_to_symbols;
  import dqpsk_pkg::*;
  import tb_ref_pkg::*;
  localparam int M = 48;

  logic clk = 1'b0, rst_n = 1'b0, pn_rst_n = 1'b0, data = 1'b1;
  logic chip_en, pn, ds, a, b, pair_stb, qi_stb;
  qi_t  qi;
  int checks = 0, failures = 0;

  clk_div #(.M(M)) u_div (.clk(clk), .rst_n(rst_n), .chip_en(chip_en));
  ds_circuit u_ds (.clk(clk), .rst_n(pn_rst_n), .chip_en(chip_en), .data(data),
                   .pn(pn), .ds(ds));
  sp_converter u_sp (.clk(clk), .rst_n(rst_n), .chip_en(chip_en), .ds(ds),
                     .a(a), .b(b), .pair_stb(pair_stb));
  diff_encoder u_diff (.clk(clk), .rst_n(rst_n), .en(pair_stb), .a(a), .b(b),
                       .qi(qi), .qi_stb(qi_stb));

  always #5 clk = ~clk;

  initial begin
    #(10 * 80 * M * 10);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1:0] ref_qi [13] = '{2'b11, 2'b10, 2'b01, 2'b01, 2'b00, 2'b01, 2'b01,
                                2'b11, 2'b11, 2'b00, 2'b01, 2'b10, 2'b01};
    int nsym, z, last_stb, cyc, chip;
    logic [1:0] za;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    // release the PN register right after the first chip strobe
    @(posedge clk iff chip_en);
    #1 pn_rst_n = 1'b1;
    // chips entering the S/P: 1 (taken in reset), then ~PN
    z = 0;  nsym = 0;  last_stb = -1;  cyc = 0;
    while (nsym < 33) begin
      @(negedge clk);
      cyc++;
      if (qi_stb) begin
        chip = 2 * nsym - 1;  // index into ~PN of the pair's first chip
        za = {(chip < 0) ? 1'b1 : ~pn_chip(chip), ~pn_chip(chip + 1)};
        z = (z + int'(za)) % 4;
        checks++;
        if (int'({qi.c, qi.d}) != z) begin
          failures++;
          $display("symbol %0d: qi=%b model %0d", nsym, {qi.c, qi.d}, z);
        end
        if (nsym < 13) begin
          checks++;
          if ({qi.c, qi.d} !== ref_qi[nsym]) begin
            failures++;
            $display("symbol %0d: qi=%b reference %b", nsym, {qi.c, qi.d}, ref_qi[nsym]);
          end
        end
        if (last_stb >= 0) begin
          checks++;
          if (cyc - last_stb != 2 * M) begin
            failures++;
            $display("symbol %0d: period %0d clocks", nsym, cyc - last_stb);
          end
        end
        last_stb = cyc;
        nsym++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
