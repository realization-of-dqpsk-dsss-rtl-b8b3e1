// Testbench for diff_encoder: random symbols (a, b) on a gapped strobe.
// The reference adds 2a+b to the previous relative symbol as an integer,
// modulo 4. qi_stb must follow en by one clock, and qi must hold between
// strobes. The case where the low bit carries into the high bit is counted
// and must occur.
module tb_diff_encoder;
  import dqpsk_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, a = 1'b0, b = 1'b0;
  qi_t  qi;
  logic qi_stb;
  int checks = 0, failures = 0, carries = 0;

  diff_encoder dut (.clk(clk), .rst_n(rst_n), .en(en), .a(a), .b(b),
                    .qi(qi), .qi_stb(qi_stb));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int   z;        // relative symbol, 0..3
    logic exp_stb;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    z = 0;
    exp_stb = 1'b0;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      checks += 2;
      if (qi_stb !== exp_stb) begin
        failures++;
        $display("cycle %0d: qi_stb=%0b", i, qi_stb);
      end
      if (int'({qi.c, qi.d}) != z) begin
        failures++;
        $display("cycle %0d: qi=%0d expected %0d", i, {qi.c, qi.d}, z);
      end
      en = ($urandom_range(0, 1) != 0);
      a  = 1'($urandom);
      b  = 1'($urandom);
      exp_stb = en;
      if (en) begin
        if (b && (z % 2 == 1)) carries++;
        z = (z + 2 * int'(a) + int'(b)) % 4;
      end
    end
    checks++;
    if (carries == 0) begin
      failures++;
      $display("carry case never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
