// Testbench for dds_carrier: symbols of random length are started with a
// clear and a new phase word, using the published word K = 32. From the
// third clock after the clear (P is loaded at the clock that samples the
// clear, as phase_select does), amp must be the sine sample of P + n*K.
// acc must be n*K from the first clock and addr P + n*K from the second.
// The published first samples (218 for pi/4 and 3pi/4, 38 for 5pi/4 and
// 7pi/4) are checked separately for each symbol.
module tb_dds_carrier;
  import tb_ref_pkg::*;
  localparam int K = 32;
  logic       clk = 1'b0, rst_n = 1'b0, clr = 1'b0;
  logic [9:0] k = 10'(K), p = '0, acc, addr;
  logic [7:0] amp;
  int checks = 0, failures = 0;

  dds_carrier #(.N(10), .W(8)) dut (.clk(clk), .rst_n(rst_n), .k(k), .p(p),
                                    .clr(clr), .amp(amp), .acc(acc), .addr(addr));

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input string what, input int got, input int expected, input int cyc);
    checks++;
    if (got != expected) begin
      failures++;
      $display("cycle %0d: %s=%0d expected %0d", cyc, what, got, expected);
    end
  endtask

  initial begin
    // Symbol order of the published waveforms: 01, 11, 00, 10, 01, ...
    logic [1:0] order [5] = '{2'b01, 2'b11, 2'b00, 2'b10, 2'b01};
    int cur_start, cur_p, prev_start, prev_p, len, n;
    logic [1:0] sym;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    n = 0;
    cur_start = -1000;  prev_start = -1000;
    cur_p = 0;          prev_p = 0;
    for (int s = 0; s < 40; s++) begin
      sym = (s < 5) ? order[s] : 2'($urandom);
      len = (s < 5) ? 96 : $urandom_range(4, 150);
      for (int i = 0; i < len; i++) begin
        @(negedge clk);
        // checks of the state reached after n rising edges
        if (s > 0) begin
          if (n == cur_start + 3)
            expect_eq("first sample", int'(amp), (cur_p % 256 == 127 && cur_p < 512) ? 218 : 38, n);
          if (n >= cur_start + 3)
            expect_eq("amp", int'(amp), ref_amp(cur_p + (n - cur_start - 3) * K), n);
          else if (n >= prev_start + 3 && s > 1)
            expect_eq("amp", int'(amp), ref_amp(prev_p + (n - prev_start - 3) * K), n);
          if (n >= cur_start + 1)
            expect_eq("acc", int'(acc), ((n - cur_start - 1) * K) % 1024, n);
          if (n >= cur_start + 2)
            expect_eq("addr", int'(addr), (cur_p + (n - cur_start - 2) * K) % 1024, n);
        end
        clr = (i == 0);
        if (i == 0) begin
          prev_start = cur_start;
          prev_p     = cur_p;
          cur_start  = n;
          cur_p      = ref_phase(sym);
        end
        // P changes right after the edge that samples the clear, as it
        // does when phase_select drives it.
        if (i == 1) p = 10'(cur_p);
        n++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
