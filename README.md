# x-net: a unified polynomial multiplier for lattice-based KEMs

Lattice-based key encapsulation schemes (Kyber, Saber, NTRU, Streamlined
NTRU Prime) spend most of their time multiplying polynomials in a quotient
ring, r(x) = a(x)·b(x) mod π(x) mod q. The schemes use different rings:

| ring (`ring_e`)     | n   | π(x)          | q    | reduction on read-out |
|---------------------|-----|---------------|------|-----------------------|
| `RING_KYBER`        | 256 | xⁿ + 1        | 3329 | Barrett               |
| `RING_SABER`        | 256 | xⁿ + 1        | 8192 | truncation            |
| `RING_NTRUHPS509`   | 509 | xⁿ − 1        | 2048 | truncation            |
| `RING_NTRUHPS677`   | 677 | xⁿ − 1        | 2048 | truncation            |
| `RING_NTRUHRSS701`  | 701 | xⁿ − 1        | 8192 | truncation            |
| `RING_NTRUHPS821`   | 821 | xⁿ − 1        | 4096 | truncation            |
| `RING_SNTRUP653`    | 653 | xⁿ − x − 1    | 4621 | Barrett               |
| `RING_SNTRUP761`    | 761 | xⁿ − x − 1    | 4591 | Barrett               |
| `RING_SNTRUP857`    | 857 | xⁿ − x − 1    | 5167 | Barrett               |

This RTL implements one multiplier that handles all nine rings, chosen per
operation at run time. The same source, with a parameter restricting the ring
set, gives a smaller multiplier for a single scheme. The module-based schemes
(Kyber, Saber) need no special support: their k×k matrix products are
sequences of 256-coefficient multiplications.

## The main idea: never divide by π(x)

A schoolbook multiplier with one multiply-accumulate (MAC) lane per result
coefficient finishes in n cycles. The direct version produces a product of
degree 2n−2 that still has to be divided by π(x). The x-net avoids the
division by rewriting the product as

    r(x) = Σᵢ bᵢ · (xⁱ · a(x) mod π(x))

and keeping the term `xⁱ·a(x) mod π(x)` in a chain of registers. In each
cycle:

* every lane j adds bᵢ times coefficient j of the register chain to its
  accumulator rⱼ (n MACs in parallel, bᵢ broadcast to all of them);
* the register chain is multiplied by x mod π(x). This is a shift by one
  position plus a small feedback term, which is why the chain is called the
  LFSR.

After n cycles the accumulators hold r(x), still without the reduction mod q.
The operands are read and the result written strictly in order, so the
multiplier needs only one sequential stream to memory.

## The LFSR and its feedback network (`xnet_lfsr`, `xnet_feedback`)

Multiplying by x moves coefficient i to position i+1. The coefficient that
leaves the top, a_{n−1}, multiplies xⁿ, and xⁿ is replaced using π(x):

| π(x)         | xⁿ ≡   | feedback                                   |
|--------------|--------|--------------------------------------------|
| xⁿ + 1       | −1     | a₀ ← −a_{n−1}                              |
| xⁿ − 1       | +1     | a₀ ← a_{n−1}                               |
| xⁿ − x − 1   | x + 1  | a₀ ← a_{n−1}, a₁ ← a₀ + a_{n−1}            |

The general form would have a multiplier for every coefficient of π(x).
These rings have at most three non-zero coefficients, so the feedback is
only:

1. a **tap multiplexer** that picks a_{n−1} for the active n. The unified
   chain is 857 registers long, and the multiplexer reads positions 255,
   508, 652, 676, 700, 760, 820 and 856;
2. an **optional negation** of the tap, for Kyber and Saber;
3. a **conditional adder** in front of the second register, for NTRU Prime.

Registers at position n and above keep shifting, but nothing reads them. The
lanes behind them accumulate values that are never read out.

The LFSR holds the *small* operand a(x), whose coefficients lie in
[−KMAX, KMAX] (ternary for NTRU and NTRU Prime, up to ±5 for Saber). Each
coefficient is a 4-bit two's-complement value. The NTRU Prime adder can
double a coefficient: if a₀ and a_{n−1} are both ±1, then a₁ becomes ±2.
Within one n-cycle multiplication each original coefficient wraps at most
once before it is last used, so the values the lanes see stay within ±2.

With `BETA` > 1 the chain advances by BETA steps per cycle. `xnet_lfsr`
chains BETA feedback networks combinationally and exposes every intermediate
power a·x^k, so that each lane can use BETA large coefficients in one cycle.

## MAC lanes without multipliers (`mult_precompute`, `mac_unit`)

Since aⱼ is small, the product bᵢ·aⱼ is one of only 2·KMAX+1 = 11 values.
`mult_precompute` forms all 11 multiples of bᵢ once per cycle and broadcasts
them. Each `mac_unit` only selects one multiple with aⱼ and adds it to its
accumulator. A multiplier in every one of the 857 lanes is thus replaced by
an 11-way multiplexer.

The accumulators are signed, 26 bits wide, and never reduced during the
computation. 26 bits is ⌈log₂ max(2·p·q·n)⌉ over all supported rings; the
maximum comes from Saber, at 2·11·8192·256. The first compute cycle adds to
zero instead of the old value, which clears r(x) without a separate pass.

## Read-out and reduction mod q (`readout_reduce`, `barrett_reduce`)

During read-out the accumulators form a shift chain: each lane loads the
lane GAMMA below it, and the bottom lanes load zero. `readout_reduce` taps
the GAMMA lanes at positions n−1 … n−GAMMA, using a multiplexer over the
supported n. It then reduces each tapped value:

* **q a power of two** (Saber, NTRU): the low log₂q bits of the
  two's-complement accumulator are the result.
* **q prime** (Kyber, NTRU Prime): Barrett reduction with q chosen at run
  time. For u = |x| < 2²⁶ and m = ⌊2²⁶/q⌋, the quotient estimate
  t = ⌊u·m/2²⁶⌋ is at most one below ⌊u/q⌋. So r = u − t·q needs at most
  one conditional subtraction of q. A negative x then gives q − r, or 0 if
  r is 0. The per-ring m comes from `xnet_pkg::ring_bar_m`.

Both paths are registered, so a result word appears one cycle after its
lanes are tapped. Results leave with the **highest coefficient first**.

Reducing once on read-out, instead of every cycle in every lane, leaves one
reduction unit per output lane in place of 857. The cost is wider
accumulators.

## Packing factors and latency

A multiplication has three phases on the bus:

| phase   | words       | per word                                           |
|---------|-------------|----------------------------------------------------|
| LOAD    | ⌈n/ALPHA⌉   | ALPHA small coefficients shift into the LFSR       |
| COMPUTE | ⌈n/BETA⌉    | BETA large coefficients, accumulated into all lanes |
| READ    | ⌈n/GAMMA⌉   | GAMMA reduced result coefficients                  |

Small coefficients are 4 bits wide, so four of them fit the width of one
13-bit large coefficient. The default is ALPHA = 4, BETA = GAMMA = 1, which
gives a 16-bit bus. sntrup761 then takes 191 + 761 + 761 transfers.
BETA = GAMMA = 2 (an "x²-net") halves the compute and read phases, at the
cost of twice the MAC inputs per lane and two reduction units.

## Bus protocol (`xnet_polymul`)

```
clk, rst_n            rst_n: asynchronous, active low
start, ring_sel       start is accepted while busy = 0; the ring is captured
busy, done            done pulses one cycle after the last result word is taken
in_valid, in_ready    valid/ready; a word transfers when both are high
in_data[DATA_W-1:0]   DATA_W = max(4*ALPHA, 13*BETA)
out_valid, out_ready  valid/ready; out_data is held while out_valid && !out_ready
out_data[GAMMA][13]
```

Word formats, in stream order:

* **LOAD**: word t (t = 0 … ⌈n/ALPHA⌉−1) carries a_{ALPHA·w+l} in bits
  [4l+3:4l], with w = ⌈n/ALPHA⌉−1−t. The block of coefficients holding a₀
  comes **last**. Lanes at index n or above are ignored. The others must lie
  in [−5, 5], and an assertion checks this.
* **COMPUTE**: word t carries b_{BETA·t+k}, with 0 ≤ b < q, in bits
  [13k+12:13k]. b₀ comes first. Lanes at index n or above are ignored.
* **READ**: word t lane l holds r_{n−1−GAMMA·t−l} in [0, q). Indices below 0
  read as 0.

Both streams may stall in any cycle. Without stalls, the last result word
leaves ⌈n/ALPHA⌉ + ⌈n/BETA⌉ + ⌈n/GAMMA⌉ + 1 cycles after the first input
word is taken; the extra cycle is the reduction register. Assertions check
that the ring is supported, that it stays constant during an operation, and
that an offered result word is held until it is taken.

## Scheme-specific builds

`xnet_polymul #(.SUPPORTED(mask))` sizes the array for the largest n in
`mask` (one bit per `ring_e` value). It keeps only those rings' feedback taps
and read-out taps. For example, `NUM_RINGS'(1) << RING_SNTRUP761` gives a
761-lane sntrup761 multiplier, whose feedback is a fixed tap plus the a₁
adder. The testbenches build both this case and a Saber + NTRU-HPS-821
x²-net.

## Files

| file                      | contents                                                   |
|---------------------------|------------------------------------------------------------|
| `rtl/xnet_pkg.sv`         | ring table (n, q, π form, Barrett m), widths, helpers       |
| `rtl/xnet_polymul.sv`     | top: controller, LFSR, precompute, MAC array, read-out      |
| `rtl/xnet_ctrl.sv`        | LOAD / COMPUTE / READ sequencer and handshakes              |
| `rtl/xnet_lfsr.sv`        | register chain for a(x): load by ALPHA, rotate by BETA      |
| `rtl/xnet_feedback.sv`    | one multiplication by x mod π(x)                            |
| `rtl/mult_precompute.sv`  | the 11 multiples of a large coefficient                     |
| `rtl/mac_unit.sv`         | one accumulator lane                                        |
| `rtl/readout_reduce.sv`   | tap multiplexer, Barrett or truncation, output register     |
| `rtl/barrett_reduce.sv`   | registered signed Barrett reduction                         |

## Simulation

Every module has a self-checking testbench `tb/tb_<module>.sv`. Each one
prints `TB_RESULT checks=N failures=M` and stops itself through a watchdog.
With Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/xnet_pkg.sv tb/tb_xnet_polymul.sv \
          --top-module tb_xnet_polymul
./obj_dir/Vtb_xnet_polymul
```

The other testbenches run the same way. What they check:

* `tb_xnet_polymul`: the default unified build. It multiplies random
  operands for six rings (all three π forms, both reduction paths, n up to
  857) and compares each result with a schoolbook product reduced by π(x)
  and q. The first run is stall-free and checks the exact cycle count. The
  other runs insert random input and output stalls. The bench fails if a
  stall, a π form, a reduction path or a ring switch never occurred.
* `tb_xnet_workloads`: one stall-free, cycle-checked multiplication for each
  of the nine rings, followed by the multiplication sequences of the
  module-based schemes. Kyber with rank 4 needs k² + 2k = 24 products for
  decapsulation, which take 13,944 cycles back to back, or 577 transfers
  plus 4 cycles of start and done handling each. Saber with rank 3 needs
  12 products for encapsulation; this sequence runs with stalls.
* `tb_xnet_polymul_x2` and `tb_xnet_polymul_sntrup761`: the two reduced builds
  described above, end to end.
* Unit benches: all products (`mult_precompute`); clear, accumulate, hold
  and shift against a model (`mac_unit`, BETA = 2); the feedback rule at
  every position for every ring, and for a Saber-only network
  (`xnet_feedback`); every step of n rotations after a load, also with
  BETA = 2 (`xnet_lfsr`); extreme and random values modulo every prime q
  (`barrett_reduce`); tap selection and reduction for all rings, also with
  GAMMA = 2 (`readout_reduce`); phase lengths, clear pulse, lane masks and
  stalls (`xnet_ctrl`).

The simulations take a few seconds. A Verilator build of the 857-lane top
takes about 20 s.

## Size

Generic synthesis of the default build gives about 25,800 flip-flop bits:
857 × 26 accumulator bits, 857 × 4 LFSR bits, plus the controller and
read-out. No FPGA mapping or timing has been done.

## Design choices and limits

Points where this RTL fixes something the architecture leaves open:

* The concrete q values come from the schemes' specifications. The
  architecture only distinguishes prime from power-of-two q.
* The bus is a valid/ready stream. The word formats and orders above belong
  to this implementation. So does loading a(x) by a plain shift: no feedback
  is applied during LOAD.
* Small coefficients are 4-bit two's complement. Padding lanes are masked in
  hardware.
* The Barrett variant (magnitude, 2²⁶ scaling, restored sign) and the
  registered truncation path are this implementation's own.
* Reset is asynchronous and active low, and clears every register.

Not included:

* The variant that reduces mod q in every lane and every cycle, by
  comparison and addition. It trades wide accumulators for 857 reduction
  units; this RTL reduces only on read-out.
* The general LFSR with a multiplier per coefficient of π(x). The
  specialised networks replace it.
* The memory that holds the operands and the result. The testbenches model
  it with arrays.
