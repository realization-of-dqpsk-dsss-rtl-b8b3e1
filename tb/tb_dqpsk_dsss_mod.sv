// End-to-end testbench for dqpsk_dsss_mod at its default sizes
// (M = 48, N = 10, 8-bit samples) with the published carrier word K = 32.
//
// Ten data bits are sent: 0, 1, then random. Each bit is held for one PN
// period (31 chips). A cycle-level reference model derives from the data
// alone:
//   - chip strobes every M clocks;
//   - the spread chip, from the published PN sequence;
//   - the chip pairs, their modulo-4 differential sum and the symbol timing
//     (QI two clocks after the second chip of a pair);
//   - the DDS phase and the carrier samples (first sample of a symbol three
//     clocks after QI changes).
// It compares every output in every cycle. It also counts how often each
// mechanism of the design occurs, and fails if one never does: data
// inversion of the PN chips, PN period wrap, each of the four carrier
// phases, the carry of the differential coder, accumulator clear at a
// symbol start, and accumulator wrap within a symbol.
module tb_dqpsk_dsss_mod;
  import dqpsk_pkg::*;
  import tb_ref_pkg::*;

  localparam int M      = 48;
  localparam int K      = 32;
  localparam int NBITS  = 10;
  localparam int CHIPS  = NBITS * 31;

  logic       clk = 1'b0, rst_n = 1'b0, data = 1'b0;
  logic [9:0] k = 10'(K);
  logic       chip_en, pn, ds, qi_stb;
  qi_t        qi;
  logic [9:0] phase_acc, phase_addr;
  logic [7:0] dqpsk;

  int checks = 0, failures = 0;
  int n_invert = 0, n_pn_wrap = 0, n_carry = 0, n_clear = 0, n_acc_wrap = 0;
  int n_phase [4] = '{0, 0, 0, 0};

  dqpsk_dsss_mod dut (
    .clk(clk), .rst_n(rst_n), .data(data), .k(k),
    .chip_en(chip_en), .pn(pn), .ds(ds), .qi(qi), .qi_stb(qi_stb),
    .phase_acc(phase_acc), .phase_addr(phase_addr), .dqpsk(dqpsk)
  );

  always #5 clk = ~clk;

  initial begin
    #(10 * (CHIPS + 4) * M * 10);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input string what, input int got, input int expected, input int cyc);
    checks++;
    if (got != expected) begin
      failures++;
      if (failures < 20) $display("cycle %0d: %s=%0d expected %0d", cyc, what, got, expected);
    end
  endtask

  initial begin
    logic bits [NBITS];
    logic prev_chip;
    int   z, sched_cyc, sched_z, cur_z;
    int   cur_start, cur_p, prev_start, prev_p, nsym, last_acc;
    bits[0] = 1'b0;
    bits[1] = 1'b1;
    for (int i = 2; i < NBITS; i++) bits[i] = 1'($urandom);

    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    z = 0;  sched_cyc = -1;  sched_z = 0;  cur_z = 0;  prev_chip = 1'b0;
    cur_start = -1000;  prev_start = -1000;  cur_p = 0;  prev_p = 0;
    nsym = 0;  last_acc = 0;

    // n = rising edges since reset release, sampled at the falling edge.
    for (int n = 0; n < (CHIPS + 1) * M; n++) begin
      int j;
      logic exp_en, chip;
      @(negedge clk);
      j = n / M;
      data = bits[(j / 31) % NBITS];
      #1;
      exp_en = ((n % M) == M - 1);
      expect_eq("chip_en", int'(chip_en), int'(exp_en), n);
      expect_eq("pn", int'(pn), int'(pn_chip(j)), n);
      chip = data ^ pn_chip(j);
      expect_eq("ds", int'(ds), int'(chip), n);
      if (exp_en) begin
        if (data) n_invert++;
        if (j % 31 == 30) n_pn_wrap++;
        if (j % 2 == 1) begin
          // prev_chip is the odd-numbered chip (a), chip the even one (b)
          if (chip && (z % 2 == 1)) n_carry++;
          z = (z + 2 * int'(prev_chip) + int'(chip)) % 4;
          sched_cyc = n + 2;
          sched_z   = z;
        end
        prev_chip = chip;
      end

      // symbol boundary
      expect_eq("qi_stb", int'(qi_stb), int'(n == sched_cyc), n);
      if (n == sched_cyc) begin
        prev_start = cur_start;
        prev_p     = cur_p;
        cur_start  = n;
        cur_p      = ref_phase(2'(sched_z));
        cur_z      = sched_z;
        nsym++;
        n_phase[sched_z]++;
      end
      if (nsym > 0) expect_eq("qi", int'({qi.c, qi.d}), cur_z, n);

      // DDS, once the first symbol has reached it
      if (nsym > 0 && n >= cur_start + 1) begin
        expect_eq("phase_acc", int'(phase_acc), ((n - cur_start - 1) * K) % 1024, n);
        if (n == cur_start + 1) n_clear++;
        else if (int'(phase_acc) < last_acc) n_acc_wrap++;
      end
      last_acc = int'(phase_acc);
      if (nsym > 0 && n >= cur_start + 2)
        expect_eq("phase_addr", int'(phase_addr), (cur_p + (n - cur_start - 2) * K) % 1024, n);
      if (nsym > 0 && n >= cur_start + 3)
        expect_eq("dqpsk", int'(dqpsk), ref_amp(cur_p + (n - cur_start - 3) * K), n);
      else if (nsym > 1 && n >= prev_start + 3)
        expect_eq("dqpsk", int'(dqpsk), ref_amp(prev_p + (n - prev_start - 3) * K), n);
    end

    $display("symbols=%0d inverted chips=%0d pn wraps=%0d carries=%0d clears=%0d acc wraps=%0d",
             nsym, n_invert, n_pn_wrap, n_carry, n_clear, n_acc_wrap);
    $display("phases: 11(pi/4)=%0d 01(3pi/4)=%0d 00(5pi/4)=%0d 10(7pi/4)=%0d",
             n_phase[3], n_phase[1], n_phase[0], n_phase[2]);
    checks++;
    if (n_invert == 0 || n_pn_wrap == 0 || n_carry == 0 || n_clear == 0 || n_acc_wrap == 0) begin
      failures++;
      $display("a mechanism never occurred");
    end
    foreach (n_phase[s]) begin
      checks++;
      if (n_phase[s] == 0) begin
        failures++;
        $display("symbol %0d never occurred", s);
      end
    end
    checks++;
    if (nsym != CHIPS / 2) begin
      failures++;
      $display("expected %0d symbols, saw %0d", CHIPS / 2, nsym);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
