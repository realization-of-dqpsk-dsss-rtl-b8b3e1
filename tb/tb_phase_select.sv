// Testbench for phase_select: for random symbols on a gapped strobe, P must
// take the published phase word of the symbol one clock after the strobe
// and hold it; acc_clr must equal the strobe. Each of the four symbols must
// occur.
module tb_phase_select;
  import dqpsk_pkg::*;
  import tb_ref_pkg::*;
  logic       clk = 1'b0, rst_n = 1'b0, sym_stb = 1'b0;
  qi_t        qi = '0;
  logic [9:0] p;
  logic       acc_clr;
  int checks = 0, failures = 0;
  int seen [4] = '{0, 0, 0, 0};

  phase_select #(.N(10)) dut (.clk(clk), .rst_n(rst_n), .sym_stb(sym_stb),
                              .qi(qi), .p(p), .acc_clr(acc_clr));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_p;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    exp_p = 0;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      checks++;
      if (int'(p) != exp_p) begin
        failures++;
        $display("cycle %0d: p=%b expected %b", i, p, 10'(exp_p));
      end
      sym_stb = ($urandom_range(0, 3) == 0);
      qi      = qi_t'($urandom_range(0, 3));
      #1;
      checks++;
      if (acc_clr !== sym_stb) begin
        failures++;
        $display("cycle %0d: acc_clr=%0b", i, acc_clr);
      end
      if (sym_stb) begin
        exp_p = ref_phase(qi);
        seen[int'(qi)]++;
      end
    end
    foreach (seen[s]) begin
      checks++;
      if (seen[s] == 0) begin
        failures++;
        $display("symbol %0d never selected", s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
