// Testbench for phase_accumulator: random frequency words and clears; the
// reference keeps the phase as an integer modulo 2^10. Wrap-arounds and
// clears must both occur.
module tb_phase_accumulator;
  logic       clk = 1'b0, rst_n = 1'b0, clr = 1'b0;
  logic [9:0] k = '0, acc;
  int checks = 0, failures = 0, wraps = 0, clears = 0;

  phase_accumulator #(.N(10)) dut (.clk(clk), .rst_n(rst_n), .clr(clr),
                                   .k(k), .acc(acc));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ph;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    ph = 0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      checks++;
      if (int'(acc) != ph) begin
        failures++;
        $display("cycle %0d: acc=%0d expected %0d", i, acc, ph);
      end
      if (i % 200 == 0) k = 10'($urandom);
      clr = ($urandom_range(0, 49) == 0);
      if (clr) begin
        ph = 0;
        clears++;
      end else begin
        if (ph + int'(k) >= 1024) wraps++;
        ph = (ph + int'(k)) % 1024;
      end
    end
    checks++;
    if (wraps == 0 || clears == 0) begin
      failures++;
      $display("wraps=%0d clears=%0d", wraps, clears);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
