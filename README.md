# Compact GF(p) exponentiator with digit-serial Montgomery arithmetic

This design computes modular exponentiation `g^e mod p` and modular (Montgomery)
multiplication for public-key cryptography (RSA, DSA, Diffie-Hellman) in very little logic.
The datapath works on one K-bit digit at a time. Its size depends only on K, not on the
operand size N. Every operand, every partial product and the exponent live in block RAMs.
The exponentiator uses the Montgomery Powering Ladder. The ladder does the same work for
every exponent bit, so its run time does not depend on the key. That helps against simple
power analysis.

The price of the small area is speed. A 1024-bit exponentiation with 32-bit digits takes
about 1.09 million cycles.

## Contents

- [Arithmetic](#arithmetic)
- [The digit datapath (`mmd`)](#the-digit-datapath-mmd)
- [The multiplier schedule (`mmd_ctrl`)](#the-multiplier-schedule-mmd_ctrl)
- [The ladder and the role-swapping memories (`mpl_core`, `mpl_ctrl`)](#the-ladder-and-the-role-swapping-memories-mpl_core-mpl_ctrl)
- [Host interface (`mpl_axi`)](#host-interface-mpl_axi)
- [Stand-alone multiplier (`mont_mult`)](#stand-alone-multiplier-mont_mult)
- [Top level (`gfp_accel_top`)](#top-level-gfp_accel_top)
- [Timing](#timing)
- [Operand rules and using the result](#operand-rules-and-using-the-result)
- [What is taken from the published architecture and what is not](#what-is-taken-from-the-published-architecture-and-what-is-not)
- [Verification](#verification)
- [Simulating](#simulating)

## Arithmetic

Write β = 2^K and n = N/K. A number is a vector of n digits, least significant first. Montgomery
multiplication with R = β^n computes `X·Y·R⁻¹ mod p` without a trial division. The algorithm
below, for outer index i = 0 … n−1, never holds a whole number in a register. Its inner loop
takes one digit of each operand per step:

```
A <- 0
for i = 0 .. n-1:
    c <- 0
    for j = 0 .. n-1:
        s      = A_j + X_j * Y_i
        if j == 0: q = s * p' mod beta          # p' = -p^-1 mod beta
        {c, t} = s + q * p_j + c                # t: K bits, c: K+1 bits
        if j > 0: A_(j-1) <- t                  # the result shifts down one digit
    A_(n-1) <- c
```

Each outer iteration adds `X·Y_i + q·p` to A and divides by β. The division is free, because
q is chosen to make the lowest digit zero: digit j of the sum goes back to position j−1. The
result reuses the memory that supplied A, in place. So the memory both feeds and receives
the product.

The exponentiation follows the Montgomery Powering Ladder (X = R0, Y = R1). All values stay
in Montgomery form:

```
X <- R mod p      (1 in Montgomery form)
Y <- g * R mod p  (g in Montgomery form)
for i = L-1 downto 0:
    if e_i: X <- MM(X, Y);  Y <- MM(Y, Y)
    else:   X <- MM(X, X);  Y <- MM(Y, X)
result X = g^e * R mod p
```

Both products of a step use the old X and Y, and the hardware computes them in parallel.

## The digit datapath (`mmd`)

`mmd` is the arithmetic of one inner step:

- three K×K multipliers:
  - X_j·Y_i;
  - s·p' (only its low K bits are kept, giving q);
  - q·p_j;
- two adders:
  - A_j + X_j·Y_i, which gives s (2K bits);
  - s + q·p_j + c, which gives 2K+1 bits: the low K bits are t and the high K+1 bits are the new carry c;
- four registers: s, q, c (K+1 bits) and t;
- an output multiplexer that sends t, or the low K bits of c, to the result memory.

The block stores no operands. Every input digit comes straight from a RAM output, and the
output digit goes straight into a RAM. Enables from the controller decide which registers load
in each cycle. The input `a_zero` forces A_j to zero during the first outer iteration. As a
result, the result memory never needs to be cleared. It can still hold the operand from two
ladder steps earlier.

## The multiplier schedule (`mmd_ctrl`)

This is the least obvious part of the design. The RAMs have a read latency of 2 cycles: a
registered read plus an output pipeline register. The datapath has three stages after the
read. Because q depends on s₀, digit 0 is read twice in each outer iteration. The first read
(the "first" slot) loads s₀, which is then used to compute q. The second read loads s₀ again,
now with q valid, and produces t₀. Slots 2 … n read digits 1 … n−1. So an outer iteration takes
n+1 issue slots.

Every issue slot creates a small token (`mmd_pkg::mmd_token_t`). The token passes down a delay
line. Each stage therefore knows which slot its data belongs to:

| cycle   | what happens                                                                    |
|---------|---------------------------------------------------------------------------------|
| T       | read addresses: X_j and A_j at `rd_j`, Y_i at `rd_i`                            |
| T+1     | read address of p_j (`p_addr` is `rd_j` delayed by one cycle)                   |
| T+2     | `s_en`: s ← A_j + X_j·Y_i                                                       |
| T+3     | "first" slot: `q_en`, q ← s·p' mod β; other slots: `e_en`, {c,t} ← s + q·p_j + c |
| T+4     | write back: t → A_(j−1) (j > 0); the "first" slot of the next iteration writes c → A_(n−1) |

The final carry of iteration i is written in the write-back cycle of the "first" token of
iteration i+1. That is the same token whose q-computation opens iteration i+1. So the carry
write and the q step cost one extra slot per iteration between them. One flush slot after the
last iteration writes the last carry. A product takes **n(n+1)+4 cycles**, counted from the
start cycle to the cycle of the last write (`done`).

Digit A_j is rewritten in iteration i and read again in iteration i+1. The read must come after
the write, which needs at least 7 slots per iteration, so it holds directly for **n ≥ 6**
digits. For shorter operands (n = 2..5) the sequencer appends P = 6 − n idle slots to every
iteration. The first idle slot writes the carry, and the last iteration ends there without a
flush slot. The latency is then (n−1)(n+1+P) + n + 5 cycles; for n = 4 that is 30 cycles
instead of 24. This formula also gives n(n+1)+4 when P = 0. An elaboration-time check rejects
n < 2.

## The ladder and the role-swapping memories (`mpl_core`, `mpl_ctrl`)

`mpl_core` contains:

- two `mmd` datapaths, MMD0 (computes X) and MMD1 (computes Y);
- one `mmd_ctrl`, shared by both, because the two products run in lockstep;
- the ladder controller `mpl_ctrl`;
- six RAMs:
  - e and p, single-port;
  - X, Y, XX and YY, true dual-port.

The products are never copied back. The pair {X, Y} and the pair {XX, YY} take turns:

- The source pair is read:
  - port a gives the inner digit X_j;
  - port b gives the outer digit Y_i.
- The destination pair receives the products:
  - port a writes result digits;
  - port b reads the accumulator digit A_j.

After each ladder step the signal `order` flips and the pairs swap roles.

The routing follows from the ladder. The inner operand of MMD0 is always X, and that of MMD1
is always Y. Both multipliers share one outer digit Y_i. It comes from the Y memory when
e_i = 1 and from the X memory when e_i = 0. So the whole ladder needs only:

- one multiplexer on e_i;
- multiplexers on `order` for the two inner operands;
- multiplexers on `order` for the two accumulators;
- multiplexers on `order` for the write enables.

`mpl_ctrl` reads the exponent one K-bit word at a time, top word first, into a shift register.
It then launches one ladder step per bit, from the most significant bit down. Between steps it
spends one cycle, and it spends three cycles on each exponent word fetch. The done flag stays
high until the next start.

Every ladder step runs the same two products with the same memory traffic, whatever the value of
e_i. Only the multiplexer settings differ. The run time therefore depends on L and n alone, never
on the exponent's value. This is why the ladder is used: the regular schedule is meant to resist timing and
simple power analysis. The testbenches check the exact cycle count for exponents 0, 1, all ones
and random values.

## Host interface (`mpl_axi`)

`mpl_axi` is an AXI4-Lite slave with a 16-bit address and 32-bit data. Each 32-bit word carries
one digit in its low K bits, so this wrapper needs K ≤ 32.

| byte address  | write                                  | read                     |
|---------------|----------------------------------------|--------------------------|
| 0x0000        | bit 0 = start (ignored while busy)     | bit 0 = done, bit 1 = busy |
| 0x0004        | p' = −p⁻¹ mod 2^K                      | p'                       |
| 0x1000 + 4·i  | digit i of p                           | digit i of p             |
| 0x2000 + 4·w  | word w of e (bits K·w … K·w+K−1)       | word w of e              |
| 0x3000 + 4·i  | digit i of R mod p (1 in Montgomery form) | digit i of the result X |
| 0x4000 + 4·i  | digit i of g·R mod p                   | digit i of Y             |

The wrapper handles one transaction at a time:

- A write needs AWVALID and WVALID together. It is answered on B in the next cycle.
- A memory write while the core is busy is dropped and answered with SLVERR.
- A memory read returns data 3 cycles after the AR handshake. A register read returns data 1 cycle after.
- WSTRB is ignored.

A typical host sequence:

1. Write p, p', e, R mod p and g·R mod p.
2. Write 1 to 0x0000 to start.
3. Poll 0x0000 until bit 0 is set, or wait for the `done` output.
4. Read the result from 0x3000.

## Stand-alone multiplier (`mont_mult`)

`mont_mult` is a single Montgomery multiplier with its own RAMs for p, X, Y and A, a p'
register and an `mmd_ctrl`. It has a plain port:

- `ld_we`/`ld_sel`/`ld_addr`/`ld_data` load the operands. `ld_sel` selects 0 = p, 1 = X, 2 = Y, 3 = p'.
- `start`/`busy`/`done` control a product.
- `rd_addr`/`rd_data` read the result, with data valid 2 cycles after the address.

It returns `X·Y·2^(−N) mod p` as a value below 2p, n(n+1)+4 cycles after `start`.

## Top level (`gfp_accel_top`)

The top places the AXI exponentiator and the stand-alone multiplier side by side. Each has its
own ports, and they share the clock and an active-low asynchronous reset. The defaults are K = 32
and N = L = 1024 (n = 32 digits). This matches a system-on-chip in which a processor drives the
exponentiator over AXI4-Lite. That processor, the AXI interconnect and the reset generator are
not included. Connect the interconnect to the `s_axi_*` port.

## Timing

| operation | cycles |
|-----------|--------|
| Montgomery product | n(n+1) + 4 |
| exponentiation, start to done | 1 + 3·(L/K) + L·(n(n+1) + 5) |

Some exponentiation cycle counts:

| K  | N    | n  | cycles    |
|----|------|----|-----------|
| 32 | 1024 | 32 | 1,086,561 |
| 16 | 1024 | 64 | 4,265,153 |
| 64 | 1024 | 16 | 283,697   |
| 16 | 512  | 32 | 543,329   |
| 64 | 2048 | 32 | 2,173,025 |

These counts agree with the published average cycle counts of the original architecture
(1087, 4265, 284, 543 and 2174 thousand) to within 1000 cycles.

## Operand rules and using the result

- p must be odd and **4p < 2^N**. This means p has at most N−2 bits. A full 1024-bit RSA modulus
  therefore needs a larger N, for example N = 1056 with K = 32 (33 digits).
- Inputs must be below 2p. Results are below 2p and are not reduced any further. There is no
  final subtraction.
- The host supplies g in Montgomery form (g·R mod p), 1 in Montgomery form (R mod p) and p'.
- The result X is congruent to g^e·R mod p. To get g^e mod p, do one more Montgomery product
  with 1 (for example on `mont_mult`) and reduce the value once if it equals p. Otherwise take
  X·R⁻¹ mod p on the host.
- The exponent has exactly L bits. Leading zero bits cost the same time as ones.
- The design needs n = N/K ≥ 2 and L to be a multiple of K. Below n = 6 each product takes longer (see the `mmd_ctrl` section).

## What is taken from the published architecture and what is not

These parts follow the published architecture:

- the digit-digit Montgomery algorithm with the result kept in RAM;
- the datapath of three multipliers, two adders, and registers s, q, c (K+1 bits) and t with
  an output multiplexer;
- the latency n(n+1)+4 with pipelined memory outputs;
- the ladder with two multipliers running in parallel;
- the four operand memories, with ports a and b, that swap roles;
- the e and p memories as single-port RAMs;
- the `e_i` and `order` selects of the controller;
- a 32-bit AXI4-Lite host interface with a done flag;
- the default size (K = 32, N = 1024).

These are this design's own choices:

- **Slot schedule.** The exact slot schedule, including the double read of digit 0 and the carry
  written in the next iteration's first slot, is chosen to meet the published latency.
- **Accumulator zeroing.** The accumulator is zeroed by masking the memory input, not by clearing
  the RAM.
- **Operand placement.** '1' goes into the X memory and g into the Y memory, as in the ladder
  algorithm. One prose description of the original swaps the two. The choice only decides where
  the host writes each operand.
- **Exponent handling.** The exponent is fetched word by word into a shift register.
- **Interfaces.** The host port, the AXI register map, SLVERR on busy writes and the `mont_mult`
  load port are this design's own.
- **Reset.** Reset is asynchronous and active-low. It clears registers, not memories.
- **Short operands.** The idle slots for n < 6 are this design's own. The published work also
  reports a multiplier with K = 64 and N = 256 (n = 4). Here that configuration works, but its
  latency is 30 cycles rather than n(n+1)+4 = 24.

The original was built for FPGAs: DSP blocks for the multipliers and block RAMs for the
memories. Here the multipliers are plain `*` operators and the memories are arrays with
registered reads. A synthesis tool can map them onto DSP blocks and block RAMs.

## Verification

Every module has a self-checking testbench in `tb/`. Each testbench prints
`TB_RESULT checks=… failures=…` and stops on a watchdog.

- `tb_bram_dp`, `tb_bram_sp`: random accesses against a reference array, with 2-cycle latency and read-first behaviour.
- `tb_mmd`: the register updates against wide-integer arithmetic.
- `tb_mmd_ctrl`: latency, strobe counts, the write-back order, and read-after-write order across
  iterations, for n = 2, 3, 5, 6 and 8 (via `tb/mmd_ctrl_runner.sv`).
- `tb_mont_mult`: 40 random products (K = 16, n = 8), including edge operands, and the latency.
- `tb_mpl_ctrl`: the bit order of e, the `order` toggling and the timing, using modelled RAM and multipliers.
- `tb_mpl_core`: exponentiations at K = 16, N = 128, with exponents 0, 1, all ones and random values.
- `tb_mpl_axi`: the same through the bus, plus SLVERR, STATUS, ignored start and p' read-back.
- `tb_gfp_accel_top`: end to end at K = 16, N = 128. It counts every mechanism and fails if one never happened:
  - steps with e_i = 0 and 1;
  - both memory pairs;
  - repeated exponent fetches;
  - accumulator zeroing;
  - carry write-back;
  - SLVERR;
  - ignored start;
  - p' read-back;
  - stand-alone products.
- `tb_gfp_accel_top_full`: one 1024-bit exponentiation at the default parameters (K = 32) through
  AXI, with a 1024-bit product on the stand-alone multiplier running at the same time. It takes
  about a second in Verilator.
- `tb_mpl_workloads`: the five configurations of the timing table above, each checked for the
  right result and the exact cycle count.
- `tb_mont_mult_workloads`: the stand-alone multiplier over the published size sweep, K = 2..64
  and N = 256..2048 (24 builds), with two random products per build. It checks the result and the
  latency of each product.
- `tb_mpl_sweep`: the exponentiator over the part of the same sweep that simulates in about a
  minute: 14 builds from K = 2, N = 256 (4.2 million cycles) to K = 16, N = 2048 (34 million
  cycles), each checked for the result and the exact cycle count.

The testbenches check results against plain square-and-multiply and `%` on wide vectors. That
reference is independent of the Montgomery arithmetic.

Limits of the checking:

- Results are checked modulo p, together with the bound below 2p.
- Synthesis timing, area and power were not evaluated.

## Simulating

With Verilator 5, run from the repository root:

```
verilator --binary --timing --assert -Irtl -ytb rtl/mmd_pkg.sv tb/tb_gfp_accel_top.sv \
          --top-module tb_gfp_accel_top -Mdir obj && ./obj/Vtb_gfp_accel_top
```

Replace the testbench name to run another one. `-y tb` is needed only for `tb_mmd_ctrl`,
`tb_mpl_workloads`, `tb_mpl_sweep` and `tb_mont_mult_workloads`, which use helper modules in
`tb/`.

Parameters:

- K, N and L on `gfp_accel_top`, `mpl_axi` and `mpl_core`;
- K and NDIG on `mont_mult`;
- RL on `mmd_ctrl`/`mpl_ctrl` describes the RAM read latency. It must match the RAMs' `OUT_REG` (latency 1 + OUT_REG).
