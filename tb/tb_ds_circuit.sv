// Testbench for ds_circuit: with random data held for a random number of
// chips, ds must be data XOR the published PN chip, and pn the PN chip.
module tb_ds_circuit;
  import tb_ref_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, chip_en = 1'b0, data = 1'b0, pn, ds;
  int checks = 0, failures = 0;
  int ones = 0, zeros = 0;

  ds_circuit dut (.clk(clk), .rst_n(rst_n), .chip_en(chip_en), .data(data),
                  .pn(pn), .ds(ds));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int chip, hold;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    chip = 0;
    hold = 0;
    while (chip < 200) begin
      @(negedge clk);
      if (hold == 0) begin
        data = 1'($urandom);
        hold = $urandom_range(1, 12);
      end
      chip_en = ($urandom_range(0, 1) != 0);
      #1;
      checks += 2;
      if (pn !== pn_chip(chip)) begin
        failures++;
        $display("chip %0d: pn=%0b", chip, pn);
      end
      if (ds !== (data ^ pn_chip(chip))) begin
        failures++;
        $display("chip %0d: data=%0b ds=%0b", chip, data, ds);
      end
      if (chip_en) begin
        if (data) ones++; else zeros++;
        chip++;
        hold--;
      end
    end
    checks++;
    if (ones == 0 || zeros == 0) begin
      failures++;
      $display("data never took both values");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
