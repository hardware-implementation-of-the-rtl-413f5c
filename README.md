# Compression functions of five SHA-3 round-one candidates in SystemVerilog

A hash function digests a long message by cutting it into fixed-size blocks
and feeding each block, together with the previous chaining value, through a
*compression function*. That function is the only part worth putting in
hardware, and it is what this RTL provides for five first-round SHA-3
candidates, all in their 256-bit-digest variants:

| core | algorithm | block in | state carried | architecture | cycles per block |
|---|---|---|---|---|---|
| `bmw256_compress`    | Blue Midnight Wish (BMW-256) | 512 b | 512 b double pipe | fully combinational | 1 |
| `luffa256_compress`  | Luffa-256 | 256 b | 3 x 256 b chain values | fully combinational | 1 |
| `skein256_compress`  | Skein-256 (Threefish-256, 72 rounds) | 256 b | 256 b + 128 b tweak | fully unrolled | 1 |
| `skein1c_compress`   | Skein-256, "Skein-1c" | 256 b | same | one round, iterated | 72 |
| `shabal256_compress` | Shabal-256 | 512 b | A 384 b, B 512 b, C 512 b, 64 b counter | shift registers, 3 steps per cycle | 16 |
| `blake256_compress`  | BLAKE-32 (10 rounds) | 512 b | 256 b chain value, 128 b salt, 64 b counter | one round (8 G functions) per cycle | 1 + 10 |

Every core sits between an input register and an output register, so its
timing can be measured register to register. The combinational cores trade
area for a single, long cycle. The iterative cores re-use one round and take
many short cycles. `sha3_cores_top` puts all six side by side behind one
32-bit port. Each core gets a serial-in/parallel-out buffer (SIPO) for its
inputs and a parallel-in/serial-out buffer (PISO) for its result. This is how
cores with 1000-plus-bit inputs are made to fit a device with a limited number
of pins. The port runs on its own clock, and the cores on a second one.

Only the compression function is built. Padding and block splitting, the
initial values and the final output transforms are the caller's job. The
top-level testbench shows how they fit together for Skein, BLAKE and Shabal.

## Common handshake

All six cores have the same control interface:

- `start` is a one-cycle pulse. On that edge the inputs are copied into the
  input registers, so the caller may change them on the next cycle.
- `busy` is high while the core works.
- `done` is a one-cycle pulse. From that point the outputs hold the result
  until the next `done`. The exception is Shabal, whose outputs are computed
  from the permutation's registers and change again on the next `start`.
- `rst_n` is a synchronous, active-low reset that clears all registers.

Latency is counted from the edge that samples `start` to the edge after which
`done` is high. It is 1 for the combinational cores, 72 for Skein-1c, 16 for
Shabal and 10 for BLAKE. For BLAKE, the start edge also performs the
initialisation step, which gives the 11 cycles in the table. Starting a core
while it is busy is not supported. `skein1c_compress` asserts this rule.

Multi-word values are packed arrays with word 0 in the least significant
bits, using the types in `sha3_common_pkg` (`w32x16_t` is `logic [15:0][31:0]`,
for example). The 64-bit Skein words are split low half first when they pass
through the 32-bit port.

## BMW-256: three functions, one deep cone

`bmw256_compress` chains three combinational blocks:

- **`bmw_f0`** forms `D_i = M_i ^ H_i`. Each of the sixteen words `W_j` is a
  signed sum of five `D` words. The table of indices and signs is in the
  module. Then `Q_j = s_(j mod 5)(W_j)`, where the s-transforms are xors of
  shifts and rotations.
- **`bmw_f1`** is the critical part. It extends `Q` to 32 words, and each new
  word depends on the sixteen before it, so the sixteen expansions form a
  serial chain of wide adders.
  - `Q_16` and `Q_17` use *Expand1*, the sum of s-transforms of the previous
    sixteen words.
  - `Q_18`..`Q_31` use the cheaper *Expand2*: plain and rotated words in
    turn, then `s4` and `s5` of the last two.
  - Both add `M_(j-16) + M_(j-13) - M_(j-6) + j*0x05555555` (indices mod 16).
- **`bmw_f2`** folds everything into the new 512-bit double pipe.
  `XL` is the xor of `Q_16..Q_23` and `XH` is `XL` xored with `Q_24..Q_31`.
  `H_0..H_7` come from shifted `XH`, `Q` and `M` words. `H_8..H_15` also add a
  rotated copy of `H_4..H_7` and `H_0..H_3`.

The digest is the low half of the double pipe, words `H_8..H_15`
(`digest_o`). This is the first-round BMW: `Q_j` has no added `H` word, and
the expansion constant is `j*0x05555555`.

## Luffa-256: xors, s-boxes and no adders

`luffa256_compress` works on three 256-bit chain values. `luffa_mi` injects
the message. It doubles `H0^H1^H2` in GF(2^8)^32 (`luffa_pkg::mult2`, which
is wiring plus four word xors) and xors the result into every chain value.
Then it xors in `M`, `M*2` and `M*4`.

Three permute blocks `luffa_permute #(.J(j))` follow. They work side by side.
Each block starts with a tweak that rotates words 4..7 left by `j` bits and is
only wiring. Then come eight `luffa_step` instances, and each step has three
parts:

- **SubCrumb** (`luffa_subcrumb`) applies a 4-bit s-box 32 times. Bit `l` of
  four words is one 4-bit value, and word 0 gives its least significant bit.
  It is applied to words (0,1,2,3) and to (5,6,7,4).
- **MixWord** (`luffa_mixword`) mixes the pairs (k, k+4) with xors and
  rotations by 2, 14, 10 and 1.
- **AddConstant** xors two step constants into words 0 and 4.

`digest_o` is `H0^H1^H2`, the Luffa output function applied to the new chain
values. There is no carry chain anywhere, which is why this core gives the
shortest single-cycle path.

## Skein-256: two ways to run Threefish

Both Skein cores compute one UBI block: `Threefish(key, tweak, msg) ^ msg`.

The key is extended with `k4 = C240 ^ k0 ^ k1 ^ k2 ^ k3` and the tweak with
`t2 = t0 ^ t1`. Subkey `s` is `k[(s+i) mod 5]` for word `i`, with three
additions:

- `t[s mod 3]` is added to word 1,
- `t[(s+1) mod 3]` is added to word 2,
- `s` is added to word 3.

A subkey is added before every fourth round and once more after round 72,
which makes 19 subkeys. One round (`threefish_round`) is two MIX functions
(`threefish_mix`: add, rotate, xor) and the word permutation (0,3,2,1).

**`skein256_compress`** unrolls all 72 rounds and 19 `skein_subkey` adders
into one combinational chain. The rotation amounts are constants, so they are
only wiring.

**`skein1c_compress`** keeps one round, with the MIX rotation amounts chosen
by the round counter. `skein1c_key_schedule` holds the extended key and tweak
in two circular shift registers with a 5-bit counter. The current subkey is
formed at the register heads by three 64-bit adders. The core does two things
in rounds 0, 4, 8, and so on:

- a multiplexer adds the current subkey to the state before the round;
- the schedule then advances: both registers rotate by one word and the
  counter counts up.

The schedule therefore runs at a quarter of the round rate. Here that is done
with a clock enable instead of a slower clock, so the core stays in one clock
domain. The last round adds subkey 18 and the message on the way into the
output register, so the block takes exactly 72 cycles after loading.

## Shabal-256: a permutation built from shift registers

Shabal keeps a 12-word `A`, and 16-word `B` and `C`. `shabal256_compress`
loads the keyed permutation `shabal_perm` with:

- `B + M`, added word by word,
- `A`, with the 64-bit block counter `W` xored into `A_0` and `A_1`,
- `C`,
- `M`.

After the permutation, the new state is `A` from the permutation, `B = C - M`
and `C` = the permutation's `B`. The last two are swapped. The digest is
`C_8..C_15`.

The permutation has 48 steps. Each step rewrites one `A` word and one `B`
word, and the index of every word it reads moves on by one per step. In
`shabal_perm`, all four arrays rotate by one word per step, so each step reads
the same register positions every time:

- `a[0]` is the `A` word being replaced and `a[11]` is the one replaced last.
- `b[0]`, `b[6]`, `b[9]` and `b[13]` are `B_i`, `B_(i+6)`, `B_(i+9)` and
  `B_(i+13)`.
- `c[0]` is `C_(8-i)`. `C` is stored starting at word 8 and rotates the
  other way.
- `m[0]` is `M_i`.

After 48 steps every array is back in its original order. Each step is
`U(a0 ^ V(rotl(a11,15)) ^ c0) ^ b13 ^ (b9 & ~b6) ^ m0`, where `U(x) = 3x` and
`V(x) = 5x` are one adder each. The new `B` word is
`~(rotl(b0,1) ^ new A)`.

`STEPS_PER_CYCLE` (default 3) chains that many steps per clock. The default
gives 16 cycles per block. Setting it to 1 gives 48 short cycles. It must
divide 48. The 36 final additions `A_(j mod 12) += C_(j+3)` are made on the
way into the output register in the last cycle.

## BLAKE-32: one round per cycle

`blake256_compress` fills the 16-word state on the start edge. It takes
`h_0..h_7` and the salt xored with `c_0..c_3`. The counter words are xored with
`c_4..c_7` as `t0, t0, t1, t1`. Each of the next ten cycles runs one full
round: four `blake_g` instances on the columns, then four on the diagonals,
eight G functions in all. The message words are picked by `sigma_(r mod 10)`
and xored with the constants. G rotates right by 16, 12, 8 and 7. In the last
round cycle, the finalisation `h'_i = h_i ^ s_(i mod 4) ^ v_i ^ v_(i+8)` is
made on the way into the output register. `ROUNDS` defaults to 10, the
first-round BLAKE-32.

## The top level: `sha3_cores_top`

All cores share one 32-bit input bus and one 32-bit output bus.

1. Write input words with `in_we`, `in_core` (a `core_e` value), `in_addr`
   and `in_data`, one per cycle.
2. Pulse `start` with `start_core`. Set `chain` in the same cycle to use the
   core's own previous result as its chaining input (see below).
3. Wait for `ready[core]`. A start of that core clears it and sets
   `busy[core]`. When the core's `done` has crossed back to the I/O clock,
   `ready` is set and `busy` is cleared.
4. Read the result with `out_core` and `out_addr`. `out_data` is
   combinational.

Cores can run at the same time. Input word maps:

| core | input words | result words |
|---|---|---|
| BMW | 0-15 M, 16-31 H | 0-15 H' |
| Luffa | 0-7 M, 8-15 H0, 16-23 H1, 24-31 H2 | 0-23 H0'..H2' |
| Skein, Skein-1c | 0-7 key, 8-11 tweak, 12-19 message | 0-7 output |
| Shabal | 0-11 A, 12-27 B, 28-43 C, 44-59 M, 60-61 W | 0-11 A, 12-27 B, 28-43 C |
| BLAKE | 0-7 h, 8-23 m, 24-27 salt, 28-29 counter | 0-7 h' |

With `chain` high at the start, these inputs come from the core's last
result instead of from its SIPO: BMW `H`, Luffa `H0..H2`, the Skein key, the
Shabal `A`, `B`, `C`, and BLAKE `h`. Across the blocks of a message, then,
only the message words, counters and tweaks are written. The chaining value
stays inside, and only the final digest has to be read. Without `chain`,
every input comes from the SIPO. This allows any starting value, such as the
Shabal run from the all-zero state.

`sipo` writes the addressed word and ignores addresses past its end. `piso`
captures the whole result on the core's `done` and returns the word chosen by
the select lines, or zero past its end.

### Two clocks

The wide cores are slow and the 32-bit port is fast, so they get separate
clocks. The SIPOs, the port logic and `busy`/`ready` run on `io_clk`. The
cores and their PISOs run on `cf_clk`. The two clocks need no fixed
relationship.

Only two single-bit events cross between the domains, each core's start and
its done. Each passes through `cdc_pulse`, a toggle synchronizer: the source
flips a register, and the destination passes it through two flops and turns
each change into a pulse.

The wide data crosses unsynchronized. This is safe because it is held still
while the other side samples it:

- a core samples its SIPO words and its `chain` selection when its start
  arrives, so do not write that core's words between `start` and `ready`;
- a PISO is loaded at the `done` edge, before the synchronized done sets
  `ready`.

Timing of one operation:

- the start reaches the core 2-3 `cf_clk` edges after the `start` cycle;
- the core then takes its latency in `cf_clk` cycles;
- the done returns 2-3 `io_clk` edges later.

`rst_n` is synchronous to `io_clk` and reaches the core side through two
flops. Hold it low for at least four cycles of the slower clock. An
assertion checks that a start never reaches a core that is still busy.

## Algorithm versions and where the constants come from

The functions follow the first-round versions of the candidates where they
differ from later ones:

- BMW uses the round-one `Q` and expansion constants.
- BLAKE-32 uses 10 rounds.
- The Luffa s-box is `{7,13,11,10,12,4,8,3,5,15,6,0,9,1,2,14}`.

Constants that the architecture needs but does not define were taken from the
algorithm specifications:

| constants | module or package | checked by |
|---|---|---|
| BLAKE `c_i` and `sigma_r` | `blake_pkg` | the BLAKE-32 known-answer test |
| Threefish rotation set and `C240` | `skein_pkg` | the Skein-256-256 known-answer test |
| Luffa step constants | `luffa_pkg` | no published vector (see below) |
| BMW `W_j` index/sign table | `bmw_f0` | no published vector (see below) |
| BMW `f2` shift amounts | `bmw_f2` | no published vector (see below) |

- Skein uses the final (v1.3) Threefish rotation set and `C240`, not the
  earlier v1.1 values. To get the v1.1 algorithm, change `rot_const` and
  `C240` in `skein_pkg`.
- The Luffa constants and the BMW tables are not checked against a published
  test vector. The testbenches check them only against an independently
  written model of the same definitions. Treat these two cores as
  structurally right but not certified bit-exact.

## Differences from the architecture followed

- **Skein subkey count.** The unrolled Skein description counts 18 subkey
  adders, but 72 Threefish rounds need 19: one before each group of four
  rounds and one after the last. The RTL has 19.
- **Shabal block size.** Shabal is sometimes listed with a 256-bit input, but
  its message block is sixteen 32-bit words. The core takes the full 512 bits.
- **Shabal cycle count.** Fitting 48 permutation steps into 16 cycles means
  three chained steps per cycle. The architecture gives the cycle count but
  not how it is reached.
- **Skein-1c key-schedule clock.** It is a clock enable on the main clock,
  not a separate clock at a quarter of the rate.
- **Skein-1c `k4` and `t2`.** They are computed when the key is loaded
  instead of being supplied ready-made.
- **Clock-domain crossing.** The architecture separates the I/O clock from
  the compression clock but does not say how the two are joined. The toggle
  synchronizers and the hold-still rule for data are this design's own.
- **Handshake.** The start/busy/done handshake and the reset are this
  design's own.

## Verification

Every module has a self-checking testbench `tb/tb_<module>.sv`. Expected
values come from `tb/ref_pkg.sv`, plain sequential models of all six
functions written without reference to the RTL. The sequential testbenches
check three things:

- the cycle count of every block against the latency above;
- that `busy` is held while the core works;
- that the core works from its input register: the inputs are scrambled right
  after `start`.

`tb_sha3_cores_top` drives the whole design at its default sizes through the
32-bit port and checks:

- known-answer hashes from the published test vectors:
  - Skein-256-256 of the byte `FF`, two UBI calls, on both Skein cores;
  - BLAKE-32 of one zero byte;
  - Shabal-256 of the empty message: six compressions from the all-zero
    state, which also re-derives the Shabal IV;
- chained random blocks on every core, both rewritten through the port and
  kept on chip with `chain`;
- two cores running at the same time;
- every operation crossing between an I/O clock and a compression clock of
  unrelated periods. The latency is checked in compression-clock cycles,
  and `busy` and `ready` on the I/O side.

It counts each of these and fails if any never happened. It runs in well
under a minute.

To run a testbench with Verilator 5 (the packages first, in this order):

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/sha3_common_pkg.sv rtl/bmw_pkg.sv rtl/luffa_pkg.sv rtl/skein_pkg.sv \
  rtl/shabal_pkg.sv rtl/blake_pkg.sv tb/ref_pkg.sv tb/tb_sha3_cores_top.sv \
  -y rtl -y tb --top-module tb_sha3_cores_top
./obj_dir/Vtb_sha3_cores_top
```

Each testbench ends with one line `TB_RESULT checks=N failures=M`.

## Files

- `rtl/*_pkg.sv`: shared types, rotations and algorithm constants.
- `rtl/bmw_*.sv`, `rtl/luffa_*.sv`, `rtl/threefish_*.sv`, `rtl/skein*.sv`,
  `rtl/shabal*.sv`, `rtl/blake*.sv`: the cores and their parts.
- `rtl/sipo.sv`, `rtl/piso.sv`, `rtl/cdc_pulse.sv`, `rtl/sha3_cores_top.sv`:
  the I/O buffers, the clock-domain crossing and the top level.
- `tb/ref_pkg.sv`: reference models. `tb/tb_*.sv`: testbenches.
