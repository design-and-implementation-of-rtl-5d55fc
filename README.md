# Maximal-length LFSR PN generators for SS-CDMA

In spread-spectrum CDMA every user's data is multiplied by a pseudo-noise
(PN) chip sequence that runs many times faster than the data. The sequence
has to look random, but the receiver must be able to reproduce it exactly.
A linear feedback shift register (LFSR) with a primitive feedback polynomial
does both. An N-stage register steps through all 2^N − 1 allowed states
before it repeats, and it needs only N flip-flops and one small
XNOR gate. There is no carry chain, so it clocks faster than a binary
counter of the same length.

This RTL provides such a generator at 4, 8, 16, 32 and 64 bits. Each one can
be loaded with a seed, raises a flag when it comes back to that seed, and
feeds a spreader that multiplies a message bit by the PN chip.

## The generator (`rtl/lfsr.sv`)

### Stages and feedback

The register is in Fibonacci form. Stages X1…XN are bits 0…N−1 of
`o_LFSR_Data`. On every enabled clock:

- every stage takes the value of the one before it: X1→X2→…→XN, so the word moves one place towards the MSB;
- X1 (bit 0) takes the XNOR of the tap stages;
- XN (bit N−1) is the PN chip, `o_PN`.

| N  | polynomial                  | taps (stages) | `tap_mask(N)`          |
|----|-----------------------------|---------------|------------------------|
| 4  | x^4 + x^3 + 1               | 4, 3          | `0xC`                  |
| 8  | x^8 + x^6 + x^5 + x^4 + 1   | 8, 6, 5, 4    | `0xB8`                 |
| 16 | x^16 + x^15 + x^13 + x^4 + 1| 16, 15, 13, 4 | `0xD008`               |
| 32 | x^32 + x^22 + x^2 + x + 1   | 32, 22, 2, 1  | `0x8020_0003`          |
| 64 | x^64 + x^63 + x^61 + x^60 +1| 64, 63, 61, 60| `0xD800_0000_0000_0000`|

The masks live in `lfsr_pkg::tap_mask`. Bit k−1 of a mask is set when stage
Xk is a tap.

### XNOR feedback and the lock-up state

The feedback is an XNOR, not an XOR. The difference is which state is
forbidden:

- **XNOR:** the all-ones state maps to itself. All zeros is legal, so a plain clear-to-zero reset is safe.
- **XOR:** the all-zeros state maps to itself.

Every polynomial above has an even number of taps. Because of that, the XNOR
register is just the bit-wise complement of the XOR register, and the two
have the same period.

If you load the forbidden state, the register stays there for good. Nothing
in the hardware prevents this. The parameter `FEEDBACK = lfsr_pkg::FB_XOR`
switches the whole block to XOR feedback. Its reset state is then 0…01.

As an example, the 4-bit register with XNOR feedback runs from reset through
these 15 states (shown MSB first) and then repeats. 1111 never appears:

    0000 0001 0011 0111 1110 1101 1011 0110 1100 1001 0010 0101 1010 0100 1000

### Seed, enable and done

| port | dir | meaning |
|------|-----|---------|
| `i_Clk` | in | rising-edge clock |
| `i_Rst_n` | in | asynchronous, active low; clears the register (XNOR) |
| `i_Enable` | in | clock enable; nothing moves while low |
| `i_Seed_DV` | in | when high together with `i_Enable`, the next edge loads `i_Seed_Data` instead of shifting |
| `i_Seed_Data[N-1:0]` | in | seed, and the value the done flag compares with |
| `o_LFSR_Data[N-1:0]` | out | register contents (registered) |
| `o_LFSR_Done` | out | combinational: register == `i_Seed_Data` |
| `o_PN` | out | stage XN, one chip per enabled clock |

Here is how the seed and the done flag are used:

1. Hold `i_Seed_Data` steady.
2. Pulse `i_Seed_DV` for one enabled clock. `o_LFSR_Done` goes high at once, because the register now equals the seed.
3. `o_LFSR_Done` drops after the next shift.
4. It rises again after exactly 2^N − 1 enabled shifts, which marks one full period.

`o_LFSR_Done` is a plain comparator with no register. If `i_Seed_Data` changes,
the flag follows the new value in the same cycle.

Each clock the logic in front of a flip-flop is one XNOR of at most four
inputs and a 2:1 seed multiplexer. The block uses N flip-flops and no other
state.

## The spreader (`rtl/pn_spreader.sv`)

Map bit 0 to +1 and bit 1 to −1. Multiplying a message symbol by a PN chip
is then the XOR of the two bits. On each enabled clock, `o_Chip` registers
`i_Msg ^ i_PN`, so it follows the generator's `o_PN` one clock later.

The spreading factor is the number of chips per message bit. It is not fixed
in hardware: the user holds `i_Msg` for as many enabled clocks as needed.

To despread, the receiver XORs each received chip with the same PN chip, in
step with the transmitter. It then decides each message bit over the chips
that carried it.

## The top (`rtl/ss_cdma_pn_top.sv`)

The top holds five independent channels side by side. Each channel
(`rtl/pn_channel.sv`) is one generator feeding one spreader. The channels
share only `i_Clk` and `i_Rst_n`.

The 1-bit controls and flags are 5-bit vectors indexed by channel: index 0
to 4 are the 4-, 8-, 16-, 32- and 64-bit generators. These vectors are
`i_Enable`, `i_Seed_DV`, `i_Msg`, `o_LFSR_Done`, `o_PN` and `o_Chip`. The
seed and state buses are named by width, for example `i_Seed_Data_16` and
`o_LFSR_Data_16`.

Synthesised, the top has 129 flip-flops: 4 + 8 + 16 + 32 + 64 register bits
plus one chip register per channel.

## What is specified and what is chosen here

These parts follow the specification the design was built from:

- the register lengths and the five polynomials;
- the Fibonacci structure with XNOR feedback into the first stage, and the shift direction;
- the all-ones lock-up state;
- the port names;
- the seed multiplexer in front of clock-enabled flip-flops;
- the done flag as an equality compare with the seed input;
- one register bit per stage.

These parts are this design's own choices:

- **Asynchronous active-low reset.** It clears the register. Without a reset,
  the register would only become defined after the first seed load.
- **`o_PN` port.** It brings out stage XN explicitly. With `i_Rst_n`, a bare
  generator has 2N + 6 pins, against 2N + 4 without these two.
- **Seed load gated by the enable.** A seed is taken only on a clock where
  `i_Enable` is high.
- **XOR feedback option.** The parameter `FEEDBACK` offers plain XOR
  feedback as well as XNOR.
- **Spreader internals.** The XOR bit mapping, the output register and the
  shared enable are not specified.
- **Five channels in one top.** The lengths were specified as separate
  designs. Here they sit together in one top, with a spreader each.

Speed was characterised only for FPGA implementations, at about 965 to
1300 MHz. The RTL makes no timing claim: a clock rate depends on the target.

## Verification

Each testbench checks itself and prints `TB_RESULT checks=… failures=…`.

- `tb/tb_lfsr.sv` runs six generators for about 180,000 clocks with random stalls: XNOR at 4, 8, 16, 32 and 64 bits, and XOR at 8 bits.
  - Every clock it compares each one with a reference model built directly from the polynomial exponents.
  - It also compares the 4-bit generator with the hand-written 15-state list above.
  - It checks that the done flag returns after exactly 2^N − 1 shifts at 4, 8 and 16 bits, over many periods.
  - It also checks the reset values, hold while disabled, seed reloads, the lock-up state and the asynchronous reset.
- `tb/tb_lfsr_period.sv` proves the maximal period at all five lengths, including 32 and 64 bits, whose periods cannot be simulated.
  - One clock of the register is an affine map over GF(2). The testbench reads it from the hardware: it loads seed 0 and every unit vector and clocks once each time.
  - From these results it builds the (N+1)×(N+1) augmented matrix A.
  - It checks A^(2^N−1) = I and A^((2^N−1)/p) ≠ I for every prime p dividing 2^N − 1. So the map has order exactly 2^N − 1.
- `tb/tb_pn_spreader.sv` applies random message bits, PN chips and enables. It compares each output chip with the ±1 product and checks the reset.
- `tb/tb_ss_cdma_pn_top.sv` is the end-to-end test, with the top at its default parameters. Each channel gets:
  - a random seed and its own random enable pattern;
  - a random message with 8 chips per bit.

  The testbench checks every register, done flag, PN chip and spread chip against reference models. It despreads every message bit, about 18,000 per channel. The 4-, 8- and 16-bit channels complete full periods.

  It counts reset, seed loads, stalls, period wraps and despread bits, and fails if any of them never happened.

What has not been run: a full 2^32 − 1-clock period in simulation. It would
take more than 20 minutes. The algebraic test covers that length instead.

## Simulating

The testbenches use `--timing` delays. Two examples with plain Verilator 5:

    verilator --binary --timing --assert rtl/lfsr_pkg.sv rtl/lfsr.sv \
        tb/tb_lfsr.sv --top-module tb_lfsr
    ./obj_dir/Vtb_lfsr

    verilator --binary --timing --assert rtl/lfsr_pkg.sv rtl/lfsr.sv \
        rtl/pn_spreader.sv rtl/pn_channel.sv rtl/ss_cdma_pn_top.sv \
        tb/tb_ss_cdma_pn_top.sv --top-module tb_ss_cdma_pn_top
    ./obj_dir/Vtb_ss_cdma_pn_top

`tb_lfsr_period` is built the same way, from `lfsr_pkg.sv` and `lfsr.sv`.
`tb_pn_spreader` needs only `pn_spreader.sv`. Each testbench runs in well
under a second.

## Changing the design

- **Another register length.** Instantiate `lfsr` with `N` and pass `TAPS`, with bit k−1 set for each tap stage k. The taps must make the polynomial primitive, or the period is shorter than 2^N − 1. Elaboration stops with an error if stage XN is not a tap.
  - To check the new taps, add the length and the prime factors of 2^N − 1 to `tb_lfsr_period`.
  - Keep an even number of taps if the XNOR and XOR versions should be complements of each other.
- **XOR feedback.** Set `FEEDBACK = lfsr_pkg::FB_XOR`. The forbidden state becomes all zeros, and reset goes to 0…01.
- **Another channel in the top.** Add another `pn_channel` instance and widen the 5-bit vectors.

## Files

| file | content |
|------|---------|
| `rtl/lfsr_pkg.sv` | feedback type, tap masks |
| `rtl/lfsr.sv` | the n-bit generator |
| `rtl/pn_spreader.sv` | message × PN spreader |
| `rtl/pn_channel.sv` | generator + spreader |
| `rtl/ss_cdma_pn_top.sv` | five channels (4, 8, 16, 32, 64 bits) |
| `tb/tb_lfsr.sv`, `tb/tb_lfsr_period.sv`, `tb/tb_pn_spreader.sv`, `tb/tb_ss_cdma_pn_top.sv` | testbenches |
