// Testbench for sine_lut: the four published points (pi/4 and 3pi/4 at
// 0001111111 and 0101111111 -> 218; 5pi/4 and 7pi/4 at 1001111111 and
// 1101111111 -> 38), then every address against the sine reference, read
// one clock after the address is presented.
module tb_sine_lut;
  import tb_ref_pkg::*;
  logic       clk = 1'b0;
  logic [9:0] addr = '0;
  logic [7:0] amp;
  int checks = 0, failures = 0;

  sine_lut #(.N(10), .W(8)) dut (.clk(clk), .addr(addr), .amp(amp));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_read(input int a, input int expected);
    @(negedge clk);
    addr = 10'(a);
    @(negedge clk);
    checks++;
    if (int'(amp) != expected) begin
      failures++;
      $display("addr %0d: amp=%0d expected %0d", a, amp, expected);
    end
  endtask

  initial begin
    check_read(10'b0001111111, 218);
    check_read(10'b0101111111, 218);
    check_read(10'b1001111111, 38);
    check_read(10'b1101111111, 38);
    check_read(255, 255);
    check_read(767, 1);
    for (int a = 0; a < 1024; a++) check_read(a, ref_amp(a));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
