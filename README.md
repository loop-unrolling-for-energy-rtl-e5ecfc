# Unrolled loops with glitch filters on the system clock

Many FPGA designs run on a slow system clock, often well under 100 MHz.
When such a design must run an iterative computation, such as a block cipher
round, a sorting-network stage or a CORDIC step, the usual approach is one of
two. The first is a sequential datapath on a faster, PLL-generated clock,
where the PLL costs a lot of power. The second is to unroll the loop so that
several or all iterations run combinationally within one slow clock period.
Unrolling removes the fast clock, but a long chain of combinational
iterations glitches heavily. Every early, wrong transition in iteration *i*
is passed on and multiplied in iterations *i+1 … N*, and this wasted
switching can cost more energy than the PLL saved.

This RTL unrolls the loop and also cuts the chain into short pieces with
**glitch filters**. A glitch filter is a latch (or, optionally, a flip-flop)
between iterations. Its enable is a short pulse made from the system clock
and delayed by a calibrated **delay element**. Filter *k* opens only once
the iterations before it have settled, and it passes the settled value on in
one clean step. No extra clock is needed, because the timing reference is
the system clock's own edge, delayed.

The design has five loop kernels, all built the same way:

| kernel | iterations | operand | filter after every | delay element (carry slices / LUTs) |
|---|---|---|---|---|
| SIMON-128/128 encryption | 68 rounds | 128-bit block, 128-bit key | 2 rounds | 3 / 18 |
| AES-256 encryption | 14 rounds | 128-bit block, 256-bit key | 2 rounds | 7 / 36 |
| DES encryption | 16 rounds | 64-bit block, 64-bit key | 1 round | 6 / 36 |
| bitonic sort | 15 stages | 32 keys × 16 bit | 2 stages | 7 / 36 |
| CORDIC rotation | 15 iterations | 51 bits (x, y, z) | 1 iteration | 7 / 36 |

Each kernel takes an unroll factor `U`. The default `U = N` is fully
unrolled, giving one result per system clock with a latency of one cycle.
Any smaller `U` gives a partially unrolled loop that takes `ceil(N/U)` clock
cycles, and `U = 1` is the plain sequential loop.

## Timing of the filter enables

Everything depends on the enable timing. Each clock period runs like this:

1. **Enable pulse** (`enable_pulse_gen`): `pulse = clk & ~delay(clk)`. The
   pulse rises at each rising clock edge and lasts as long as one short
   delay.
   - On a Cyclone IV-style fabric this delay is 4 LUTs.
   - On an Artix-7-style fabric it is 4 carry multiplexers, about 115 ps.
2. **Filter enable chain** (`filter_enable_chain`): the pulse runs through
   a series of equal delay elements of length *Tc*. Tap *k* drives filter
   *k*, so filter *k* opens about *k·Tc* after the clock edge and stays open
   for the pulse width.
3. **The loop register**: the result of the last unrolled iteration goes to
   an ordinary register, clocked by the next system clock edge.

*Tc* must be longer than the settling time of the iterations between two
filters. Otherwise a filter opens before its input is final:

- a latch filter still passes the late value while it is open;
- a flip-flop filter holds the stale value for a whole period.

That is why latches are the default. Also, the last filter must open and
its downstream iterations must settle before the next clock edge:
`N_filters · Tc + settling < clock period`.

With the default spacings, the last filter opens at these times after the
edge:

| kernel | Artix-7 style | Cyclone IV style | slowest clock period used for this kernel (Artix-7 / Cyclone IV) |
|---|---|---|---|
| SIMON-128 | 8.6 ns | 326 ns | 340 / 600 ns |
| AES-256 | 3.7 ns | 120 ns | 175 / 300 ns |
| DES | 7.9 ns | 297 ns | 100 / 360 ns |
| bitonic | 4.3 ns | 140 ns | 120 / 220 ns |
| CORDIC | 8.5 ns | 277 ns | 120 / 250 ns |

One combination does not close. CORDIC with LUT-chain delays, a filter after
every iteration and a 250 ns clock would need 277 ns. For that target use
`SPACING = 2`, which needs 140 ns.

On hardware, each delay element is sized after place and route so that it
is longer than the settled delay of the iterations it covers. The slice and
LUT counts in the table above are the ones chosen that way for each kernel.
In simulation the iteration circuits have zero delay. The simulated filter
timing therefore shows the order and spacing of the enables, not the margin
against real logic delay.

## Delay elements

- `lut_delay_chain`: a chain of LUTs used as buffers, each in the next logic
  element. Each stage is 155 ps of LUT plus 390 ps of local routing, so
  36 LUTs make about 19.6 ns.
- `carry_delay_chain`: the carry multiplexers of adjacent slices with their
  selects fixed so that the carry input is passed through. The output is
  taken after the third multiplexer of the last slice, 86 ps per slice.
  Routing between slices is assumed to add nothing (`ROUTE_PS = 0`).

Both have no logic function. They are behavioural models, and each stage is
a Verilog inertial delay (`assign #`). On hardware, each must be a
hand-placed macro: fixed LUT or carry-chain cells kept by synthesis, with
placement constraints. A generic synthesis run sees zero delay in them.
It then reduces the enable pulse `clk & ~clk` to a constant 0, keeps the
filters closed and trims the filtered datapath away. Only the vendor flow
with the placed delay macros gives a working circuit. The sequential form
(`U = 1`) has no filters and synthesizes normally anywhere. The
`TARGET` parameter picks the kind for a whole kernel. `TAP_LUTS` and
`TAP_SLICES` set the length of one element.

## Loop structure of a kernel (`*_unrolled`)

Every kernel wrapper holds the same parts:

- `unroll_ctrl` counts the `ceil(N/U)` cycles of one computation. It gives
  the index of the first iteration handled in the current cycle (`base`),
  and it drives the handshake:
  - `ready`: a new operand can be taken. This includes the last cycle of
    the current one, so a fully unrolled kernel takes an operand every
    cycle.
  - `load`: the operand is being taken this cycle.
  - `last`: this is the final cycle of the computation.
  - `done`: one cycle after `last`.
- `U` copies of the iteration circuit (`simon_round`, `aes_round`,
  `des_round`, `bitonic_stage`, `cordic_iter`). Copy `j` computes iteration
  `base + j`.
  - The round constants, key-schedule step or compare pattern are chosen
    from that index. With `U = N` the index is a constant and synthesis
    folds the choice away.
  - When `U` does not divide `N`, copies whose index is past the end simply
    pass their input on.
- A `glitch_filter` after every `SPACING`-th copy, except after the last
  copy. Filter *k* is enabled by tap *k* of the enable chain.
- The loop register, which takes the operand on `load` and the chain output
  on the other busy cycles. A result register takes the chain output in
  the last cycle.

Timing at the ports: operands are sampled on the clock edge where `start`
and `ready` are both high. The result is valid while `done` is high,
`ceil(N/U)` edges later, and is held until the next result. `rst_n` is
synchronous and active low. It clears only the control state: datapath
registers and filters need no reset, because nothing reads them before
they are written.

## The kernels

- **SIMON-128/128** (`simon_pkg`, `simon_round`): the published cipher.
  - The key schedule uses two words and the constant sequence z2.
  - The key schedule is unrolled with the rounds, so no round-key memory
    is needed.
  - `pt = {x, y}`, `key = {k1, k0}`.
- **AES-256** (`aes_pkg`, `aes_round`): FIPS-197 encryption.
  - The round carries the two previous round keys and expands the next one
    as it goes. The 256-bit key is loaded as round keys 0 and 1.
  - Round 14 skips MixColumns.
  - The S-box is computed at elaboration from the GF(2^8) inverse and the
    affine map.
  - Byte order is that of FIPS-197 (byte 0 in bits [127:120]).
- **DES** (`des_pkg`, `des_round`): FIPS 46-3 tables.
  - The initial permutation and PC-1 are applied when loading, and the
    final swap and inverse permutation on output.
  - Each round rotates the key halves by 1 or 2 and applies PC-2.
  - Key parity bits are ignored.
- **Bitonic sort** (`bitonic_pkg`, `bitonic_stage`): sorts 32 keys of 16
  bits in ascending order. Key *i* is in bits `[16i+15:16i]`.
  - The 15 stages are the 5 merge phases of the bitonic network. Stage *s*
    belongs to phase *p* (1 to 5) and compares elements `2^j` apart.
  - Compare direction: a pair compares upward when bit *p* of its index
    is 0.
- **CORDIC** (`cordic_pkg`, `cordic_iter`): 15 iterations in rotation mode.
  - `din = {x, y, z}` of 17 bits each. x and y are signed Q1.15, and z is
    the angle in radians, signed Q2.14.
  - The arctangent constants are `round(atan(2^-i) · 2^14)`.
  - Starting from `x = 1/K ≈ 0.607253` and `y = 0`, the output is
    `(cos z, sin z)` for |z| ≤ π/2.

## Choosing the unroll factor

`unroll_pkg::choose_unroll(L, C, N, R, G, F)` chooses U. Its inputs, all in
ps, are:

- `L`: required latency
- `C`: clock period
- `N`: iteration count
- `R`: delay of one iteration
- `G`: delay of one filter
- `F`: register overhead

The rule:

1. Use the sequential loop if `L ≥ N·C` and `C ≥ R + F`.
2. Otherwise increase U from 2 while `C ≥ F + U·(R + G)`.
3. Take the first U for which `L ≥ ceil(N/U)·C`.
4. The function returns 0 when no U works without a faster clock.

The result can be passed as the `U` parameter of a kernel.

## Top level

`loop_unroll_top` holds all five kernels side by side, each fully unrolled
at its default spacing. They share only `clk` and `rst_n`. `KIND` (latch or
flip-flop filters) and `TARGET` (carry-chain or LUT-chain delay elements)
apply to all of them.

## Simulation

The testbenches are self-checking. Each prints
`TB_RESULT checks=… failures=…` and stops. Each has a cycle watchdog.
Delays and pulses are in picoseconds, so run them with timing enabled.
Example:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
  rtl/unroll_pkg.sv rtl/simon_pkg.sv rtl/aes_pkg.sv rtl/des_pkg.sv \
  rtl/bitonic_pkg.sv rtl/cordic_pkg.sv tb/tb_ref_pkg.sv \
  tb/tb_loop_unroll_top.sv --top-module tb_loop_unroll_top
./obj_dir/Vtb_loop_unroll_top
```

`-Wno-fatal` keeps lint warnings from stopping the build. One of them is
expected: Verilator reports that the glitch filter's `always_latch` block
holds no latch, although it does.

What the testbenches cover:

- **Building blocks**:
  - `tb_glitch_filter`: latch and flip-flop filters, with data arriving
    before, during and after the pulse.
  - `tb_delay_chains` and `tb_carry_delay_chain`: measured delays.
  - `tb_enable_pulse_gen`: pulse position and width for both targets.
  - `tb_filter_enable_chain`: the order and spacing of the taps.
  - `tb_unroll_ctrl`: cycle counts, back-to-back starts and the `base`
    sequence, for three `N`/`U` pairs under random start requests.
  - `tb_unroll_choice`: the unroll-factor rule, on hand-worked cases and
    against a brute-force search.
- **Kernels** (`tb_simon_unrolled`, `tb_aes_unrolled`, `tb_des_unrolled`,
  `tb_bitonic_unrolled`, `tb_cordic_unrolled`): each runs full, partial and
  sequential instances, against published test vectors where they exist
  and a reference model written independently in the testbench for
  random operands.
  They check the latency in cycles and that a new operand is accepted on
  every cycle.
  `tb_simon_unrolled` also runs the fully unrolled cipher with LUT-chain
  delay elements, where the last filter opens 326 ns into a 340 ns period.
- **Partial unrolling at its clocks** (`tb_unroll_table`): SIMON-128 with
  U = 2, 5, 10 and 17, AES-256 with U = 2, 4, 6 and 8, DES with U = 2, 4 and
  8, and CORDIC with U = 3 and 5. Each runs on the system clock chosen for
  that U, from 100 MHz down to 11 MHz, and the testbench checks results and
  cycle counts.
- **Top** (`tb_loop_unroll_top`): runs the top at its default parameters
  with a 340 ns clock and streams operands into all five kernels, checked
  against the reference models in `tb_ref_pkg`. Monitors
  on several filters count:
  - enable pulses;
  - input transitions that a closed filter held back;
  - leaks, meaning output changes while closed;
  - whether each filter closes before the next clock edge.

## Where this departs from the measured designs

- The AES, DES, bitonic and CORDIC datapaths are independent
  implementations of the standard algorithms. They are not the particular
  cores the energy figures were measured on. For CORDIC, the 51-bit format
  split into three 17-bit words is this design's choice.
- Latency is counted in whole cycles, `ceil(N/U)`, where the unrolling rule
  it comes from is written with `N/U`.
- The start/ready/done handshake and the synchronous reset are this design's
  own. In the measurements, operands came from a ROM stepped by a
  free-running counter, one per clock.
- Delay elements and the pulse generator are timing models. Real delays
  come from placement and must be re-measured on each device.
- The Artix-7 pulse width (four carry multiplexers) is taken as 4/3 of the
  86 ps three-multiplexer delay. No figure for it was available.
