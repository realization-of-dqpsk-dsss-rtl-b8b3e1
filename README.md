# DQPSK-DSSS modulator

This modulator spreads a slow binary data stream with a 31-chip pseudo-noise (PN) code. It then carries the spread chips, two at a time, as differential quaternary phase shift keying (DQPSK) on a digitally synthesised sine carrier. The output is a stream of unsigned 8-bit samples for a D/A converter. Apart from that converter, nothing analog is involved.

The modulator does not build I and Q carriers and mix them. It uses *phase selection*. One direct digital synthesiser (DDS) produces the carrier. At every symbol boundary the DDS phase accumulator is cleared, and a constant phase offset P is chosen for the symbol. The offset is one of pi/4, 3pi/4, 5pi/4 or 7pi/4. So each symbol is a fixed stretch of sine wave that starts at the selected phase.

## Signal chain

```
 data ──►(XOR)──► S/P ──► differential ──► phase ──► DDS: accumulator ─► +P ─► sine ─► dqpsk[7:0]
           ▲      (a,b)    coder (c,d)     select        (+K per clk)           table
        PN generator                      (P, clear)
```

| Stage            | Module            | Rate at default sizes              |
|------------------|-------------------|------------------------------------|
| system clock     | -                 | fclk (294912 Hz in the reference setup) |
| chip strobe      | `clk_div`         | fclk / M = 6144 Hz (M = 48)        |
| PN + mod-2 adder | `ds_circuit`, `pn_gen` | one chip per strobe           |
| S/P              | `sp_converter`    | one bit pair per 2 chips = 3072 Hz |
| differential coder | `diff_encoder`  | one symbol per pair                |
| phase selection  | `phase_select`    | once per symbol                    |
| DDS              | `dds_carrier` (`phase_accumulator`, `phase_modulator`, `sine_lut`) | one sample per fclk |

The whole design runs on the single clock `clk`. The chip rate and the symbol rate are one-cycle enable strobes (`chip_en`, `pair_stb`, `qi_stb`), not derived clocks. `dqpsk_dsss_mod` is the top level.

## Spreading: the 31-chip m-sequence

`pn_gen` is a 5-stage shift register for the polynomial x^5 + x^2 + 1. Stage 1 is fed with the inverted XOR (an XNOR) of stages 2 and 5. The chip is read from stage 5. The register is cleared to all zeros on reset. With XNOR feedback, all zeros is a legal state, and the lock-up state is all ones instead. So the cleared register starts at once, and after reset it produces

```
0000011001011011110101000100111   (then repeats, period 31)
```

`ds_circuit` adds the data to the chips modulo 2 (`ds = data ^ pn`). A 0 data bit sends the code and a 1 sends its inverse. Data is sampled in the cycle where `chip_en` is high. A data bit is expected to last many chips (the testbenches use one full code period, 31 chips, per bit). The design itself does not enforce a data rate.

## From chips to quaternary symbols

`sp_converter` numbers the chips from reset: 1, 2, 3, ... Odd-numbered chips become the I bit `a` and even-numbered chips the Q bit `b`. A toggle flip-flop marks odd and even chips. On each even chip, the stored odd chip and the current chip are loaded into `a` and `b` together, and `pair_stb` fires for one cycle. `a` and `b` then hold for a whole symbol.

`diff_encoder` turns the absolute symbol Za = 2a + b into a relative symbol Zr = 2c + d by adding it, modulo 4, to the previous relative symbol:

```
Zr(i) = Za(i) + Zr(i-1)  mod 4
  c_i = a_i ^ c_{i-1} ^ (b_i & d_{i-1})    -- high bit, with the carry from the low bit
  d_i = b_i ^ d_{i-1}
```

The AND term is the carry out of the low bit, and it is the easiest part to get wrong. The coder starts from 00 after reset. The relative symbol is the output `qi = {c, d}`, of type `dqpsk_pkg::qi_t`.

## Phase selection and the DDS

This is the core of the modulator.

**Phase words.** `phase_select` maps each symbol to a 10-bit phase word P:

| QI = {c,d} | carrier phase | P (N = 10)   | first sample |
|-----------|---------------|--------------|--------------|
| 11        | pi/4          | 0001111111 (127) | 218 |
| 01        | 3pi/4         | 0101111111 (383) | 218 |
| 00        | 5pi/4         | 1001111111 (639) | 38  |
| 10        | 7pi/4         | 1101111111 (895) | 38  |

For any N the words are (2m+1)·2^N/8 − 1 with m = 0..3 (`dqpsk_pkg::phase_word`). They sit one address below the exact angle because of the table convention below.

**Sine table.** `sine_lut` has 2^N entries of W bits. Entry k holds

```
amp[k] = round(128 + 127 * sin(2*pi*(k+1) / 2^N))      (W = 8: values 1..255)
```

so address k stands for the phase (k+1) steps of 2π/2^N. With this convention, addresses 127 and 383 hold 218, and 639 and 895 hold 38. The table is computed at elaboration by a constant function, so there is no data file. Reads are synchronous, which suits a block RAM.

**Accumulator and phase modulator.** `phase_accumulator` adds the frequency word K (a top-level input) every clock, modulo 2^N. `phase_modulator` adds P to it and registers the sum as the table address. The carrier frequency is

```
f_out = K * fclk / 2^N  =  32 * 294912 / 1024  =  9216 Hz
```

**Symbol start.** In the cycle where `qi_stb` is high, `phase_select` raises `acc_clr` (the same signal, passed through). The next clock edge loads P and clears the accumulator together. The pipeline then gives:

| clock edge after QI changes | phase_acc (T) | phase_addr (R) | dqpsk |
|-------------|-------------|----------------|-------------------|
| 1           | 0           | (old symbol)   | (old symbol)      |
| 2           | K           | P              | (old symbol)      |
| 3           | 2K          | P + K          | table[P]          |
| 3 + n       | (n+2)K      | P + (n+1)K     | table[P + nK]     |

The first sample of a new symbol therefore appears three clocks after QI changes. Every earlier stage is delayed by the same amount, so symbol alignment is unaffected. At the reference sizes a symbol lasts 2M = 96 clocks, and 96 × 32 = 3 × 1024. Each symbol is then exactly three carrier periods, and the accumulator would be back at 0 anyway when it is cleared. The clear only matters when K·2M is not a multiple of 2^N.

## Parameters and ports of the top

| Parameter | Default | Meaning |
|-----------|---------|---------|
| `M`       | 48      | system clocks per chip |
| `N`       | 10      | phase width, table depth 2^N |
| `W`       | 8       | sample width |

| Port | Dir | Width | Meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | system clock; asynchronous active-low reset of all registers |
| `data` | in | 1 | information bit, sampled when `chip_en` = 1 |
| `k` | in | N | carrier frequency word (32 for 9216 Hz at fclk = 294912 Hz) |
| `chip_en` | out | 1 | chip strobe, one cycle in M |
| `pn`, `ds` | out | 1 | current chip before and after spreading |
| `qi`, `qi_stb` | out | 2, 1 | relative symbol {c,d} and its one-cycle update strobe |
| `phase_acc`, `phase_addr` | out | N | accumulator phase and table address, for observation |
| `dqpsk` | out | W | carrier samples for the D/A converter |

## Where this design departs from the original circuit

- **One clock.** The original clocks the spreading chain, the S/P converter and the coder with divided clocks (clk1 = fclk/48, clk2 = clk1/2). Here they are enables in the fclk domain. The logic is the same, but the timing is counted in fclk cycles.
- **Pairing after reset.** In the original reference run, the S/P registers take one chip, data XOR 0, while the PN register is still held in reset. The first chip of the code then completes a pair rather than starting one. Here the whole design resets together, and the first chip after reset starts a pair. `tb_spread_to_symbols` releases the PN register one chip late and reproduces the original's printed symbol sequence (11 10 01 01 00 01 01 11 11 00 01 10 01 for data = 1).
- **S/P circuit.** The original is drawn as six flip-flops and an inverter. Its exact wiring is not reproduced. This design uses the simplest circuit with the same function: a toggle, a one-chip store and two output registers. Which chip of a pair is called "first" depends on the reset point. Here chip 1 after reset goes to I.
- **Registered coder outputs.** The original takes c and d from the gates ahead of the coder's flip-flops. Here they are the flip-flop outputs. The symbol sequence is the same, one clock later.
- **Phase word during a symbol.** The original's phase-selection code also adds a constant (64) to the phase word on every clock inside a symbol. It is described at the same time as a fixed offset added to the accumulator. This design keeps P fixed and takes the carrier frequency from K alone, so f_out = K·fclk/2^N holds.
- **Waveform detail.** The original's reference waveforms agree with this design on the first sample of every symbol (218 for pi/4 and 3pi/4, 38 for 5pi/4 and 7pi/4) and on the three-clock delay. Their later samples advance by about 22.5° per clock rather than the 11.25° that K = 32 gives. Those later values are not reproduced.
- **Sine table convention.** The centre value 128, the swing 127 and the one-address offset are inferred from the published table values. They are not stated outright.
- **Four-phase carrier.** A block-level view of the original shows a DDS delivering four fixed-phase carriers to a selector. The circuit actually described, and built here, is a single DDS with a selectable phase offset.
- **D/A converter.** The converter is outside the FPGA. Its 8-bit input is the `dqpsk` port.

## Verification

Every module has a self-checking testbench in `tb/`. Each compares against a reference model written independently of the RTL, and ends by printing `TB_RESULT checks=<n> failures=<n>`. `tb_ref_pkg` holds the shared references: the printed PN sequence, the sine formula and the phase-word table. Concurrent assertions in `sp_converter` and `diff_encoder` check the strobe rules while any testbench runs (`--assert`).

| Testbench | What it checks |
|-----------|----------------|
| `tb_clk_div` | strobe every M = 48 clocks, first one M clocks after reset |
| `tb_pn_gen` | 93 chips (three periods) against the fixed sequence, with a gapped enable |
| `tb_ds_circuit` | `ds = data ^ pn` with random data held for random chip counts |
| `tb_sp_converter` | odd chip to `a`, even chip to `b`, strobe timing |
| `tb_diff_encoder` | integer modulo-4 reference; the carry case must occur |
| `tb_phase_select` | phase word table, hold between symbols, `acc_clr` |
| `tb_phase_accumulator` | random K and clears, wrap-around |
| `tb_phase_modulator` | (acc + P) mod 2^N, one clock later |
| `tb_sine_lut` | the four reference points, the peaks, and all 1024 entries |
| `tb_dds_carrier` | symbol sequence 01, 11, 00, 10, 01 then random lengths; every sample, the three-clock latency |
| `tb_dqpsk_dsss_mod` | end to end at the default sizes with K = 32 |
| `tb_spread_to_symbols` | spreading chain at M = 48 against the original's printed 13-symbol QI sequence |

The end-to-end test sends ten data bits, 31 chips each: 310 chips, 155 symbols, about 15,000 clocks. It checks every output in every cycle. It also counts, and requires, each mechanism: data inversion of the code, code period wrap, all four carrier phases, the coder carry, accumulator clears and accumulator wrap inside a symbol.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Wall -Wno-fatal --timescale 1ns/1ps \
    -y rtl -y tb +libext+.sv -Irtl rtl/dqpsk_pkg.sv tb/tb_ref_pkg.sv \
    tb/tb_dqpsk_dsss_mod.sv --top-module tb_dqpsk_dsss_mod
./obj_dir/Vtb_dqpsk_dsss_mod
```

Replace the testbench name to run another one. All of them finish in well under a second.

## Changing the design

- **Another carrier frequency:** drive a different `k`. Keep K·2M a multiple of 2^N if each symbol should hold a whole number of carrier periods.
- **Another chip rate:** set `M`.
- **Finer phase or amplitude resolution:** set `N` and `W`. The table, the phase words and the adders scale with them. The phase words need N ≥ 3.
- **Another code:** `pn_gen` takes `STAGES` and `TAP`. The feedback is always the XNOR of stage `TAP` and the last stage, so choose a primitive polynomial.
