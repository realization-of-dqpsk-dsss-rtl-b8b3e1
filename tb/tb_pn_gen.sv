// Testbench for pn_gen: the chips from a cleared register must follow the
// published 31-chip m-sequence for three periods. The enable is gapped at
// random to check that the register only steps on en.
module tb_pn_gen;
  import tb_ref_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, pn;
  int checks = 0, failures = 0;

  pn_gen dut (.clk(clk), .rst_n(rst_n), .en(en), .pn(pn));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int chip;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    chip = 0;
    while (chip < 93) begin
      @(negedge clk);
      en = ($urandom_range(0, 2) != 0);
      checks++;
      if (pn !== pn_chip(chip)) begin
        failures++;
        $display("chip %0d: pn=%0b expected %0b", chip, pn, pn_chip(chip));
      end
      if (en) chip++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
