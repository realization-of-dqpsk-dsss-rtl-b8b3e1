// Testbench for phase_modulator: random phases and phase words; addr must
// be (acc + p) mod 2^10 one clock later.
module tb_phase_modulator;
  logic       clk = 1'b0, rst_n = 1'b0;
  logic [9:0] acc = '0, p = '0, addr;
  int checks = 0, failures = 0;

  phase_modulator #(.N(10)) dut (.clk(clk), .rst_n(rst_n), .acc(acc), .p(p),
                                 .addr(addr));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_addr;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    @(negedge clk);
    exp_addr = 0;
    for (int i = 0; i < 1000; i++) begin
      acc = 10'($urandom);
      p   = 10'($urandom);
      exp_addr = (int'(acc) + int'(p)) % 1024;
      @(negedge clk);
      checks++;
      if (int'(addr) != exp_addr) begin
        failures++;
        $display("acc=%0d p=%0d addr=%0d expected %0d", acc, p, addr, exp_addr);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
