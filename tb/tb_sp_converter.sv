// Testbench for sp_converter: random chips arrive on a gapped chip strobe.
// After every second chip, a must be the odd-numbered chip, b the
// even-numbered one, and pair_stb must be high for exactly the next cycle.
module tb_sp_converter;
  logic clk = 1'b0, rst_n = 1'b0, chip_en = 1'b0, ds = 1'b0;
  logic a, b, pair_stb;
  int checks = 0, failures = 0;

  sp_converter dut (.clk(clk), .rst_n(rst_n), .chip_en(chip_en), .ds(ds),
                    .a(a), .b(b), .pair_stb(pair_stb));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int   chip;
    logic odd_chip, exp_a, exp_b, exp_stb;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    chip    = 0;
    exp_a   = 1'b0;
    exp_b   = 1'b0;
    exp_stb = 1'b0;
    odd_chip = 1'b0;
    while (chip < 400) begin
      @(negedge clk);
      checks += 3;
      if (pair_stb !== exp_stb) begin
        failures++;
        $display("chip %0d: pair_stb=%0b expected %0b", chip, pair_stb, exp_stb);
      end
      if (a !== exp_a || b !== exp_b) begin
        failures += 2;
        $display("chip %0d: a,b=%0b%0b expected %0b%0b", chip, a, b, exp_a, exp_b);
      end
      chip_en = ($urandom_range(0, 2) == 0);
      ds      = 1'($urandom);
      exp_stb = 1'b0;
      if (chip_en) begin
        if (chip % 2 == 0) odd_chip = ds;
        else begin
          exp_a   = odd_chip;
          exp_b   = ds;
          exp_stb = 1'b1;
        end
        chip++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
