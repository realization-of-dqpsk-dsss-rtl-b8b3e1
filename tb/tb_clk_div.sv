// Testbench for clk_div: checks that chip_en is a one-cycle strobe every M
// clocks, with the first one M clocks after reset (M = 48, the published
// divider).
module tb_clk_div;
  localparam int unsigned M = 48;
  logic clk = 1'b0, rst_n = 1'b0, chip_en;
  int checks = 0, failures = 0;
  int cyc = 0, strobes = 0;

  clk_div #(.M(M)) dut (.clk(clk), .rst_n(rst_n), .chip_en(chip_en));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    // cyc counts rising edges since reset release; the strobe is due when
    // cyc = M-1, 2M-1, ...
    for (cyc = 0; cyc < 10 * M; cyc++) begin
      @(negedge clk);
      checks++;
      if (chip_en !== ((cyc % M) == M - 1)) begin
        failures++;
        $display("cycle %0d: chip_en=%0b", cyc, chip_en);
      end
      if (chip_en) strobes++;
      @(posedge clk);
    end
    checks++;
    if (strobes != 10) begin
      failures++;
      $display("expected 10 strobes, saw %0d", strobes);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
