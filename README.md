# Bit-serial multiplier and inverter for GF(2^m) in a normal basis

This RTL computes products and inverses in the finite field GF(2^m), the
arithmetic behind Reed-Solomon codecs and several public-key schemes. It uses
a **normal basis**. Each element is written as

    beta = b0*alpha + b1*alpha^2 + b2*alpha^4 + ... + b_{m-1}*alpha^(2^(m-1))

where alpha is a root of an irreducible polynomial P(x) whose roots are
linearly independent. In this basis two things become cheap:

* **Squaring is a rotation.** beta^2 = [b_{m-1}, b0, b1, ..., b_{m-2}]. A
  cyclic shift register squares its contents on every clock.
* **All product bits use one function.** Take delta = beta*gamma. If
  f(b; c) gives its top bit d_{m-1}, then every other bit d_j is the same f
  applied to beta and gamma rotated by m-1-j places. This is the
  Massey-Omura multiplier.

The RTL builds two pipelines on these two facts. Both work one bit per clock
and accept a new operand every m clocks, with no idle clocks between
operands:

* `mo_seq_multiplier` uses one copy of f and two rotating operand registers.
  It gives one product bit per clock.
* `mo_inverter` computes alpha^-1 = alpha^2 * alpha^4 * ... *
  alpha^(2^(m-1)). It uses a combinational m-copy multiplier m-1 times in a
  row. A rotating register supplies the successive squares.

The default field is GF(2^4) with P(x) = x^4 + x^3 + 1. Other fields are
chosen with two parameters (see "Choosing the field").

## Element format and bit order

* Bit i of a vector is the coefficient of alpha^(2^i).
* The element 1 is all ones (`4'b1111` for m = 4). Zero is all zeros.
* On a serial port an element takes m consecutive clocks, **highest index
  first**: b_{m-1} in clock 1 of a period and b_0 in clock m.
* Inside the circuits, operand registers hold **complemented** bits. This is
  the polarity the AND plane of f expects. The ports are always in true
  polarity.

## The product function f

For m = 4 and P(x) = x^4 + x^3 + 1, f has nine terms:

    f = b2c2 + b3c2 + b2c3 + b3c1 + b1c3 + b3c0 + b0c3 + b1c0 + b0c1   (mod 2)

`mo_product_f` builds f in two planes:

* **AND plane.** Each term b_i c_j is formed as NOR(~b_i, ~c_j), from the
  complemented operand bits. This is why every operand register holds
  complements.
* **XOR plane.** A tree of two-input XORs adds the n(0) terms. Each level
  pairs the signals of the level before. An odd last signal passes straight
  through, so n(j+1) = ceil(n(j)/2). The tree has k = ceil(log2 n(0))
  levels. For m = 4 that is 9 -> 5 -> 3 -> 2 -> 1: four levels and eight
  XOR gates.

For other fields the term list is not typed in by hand. `gf2m_nb_pkg`
computes it during elaboration:

1. It forms alpha^(2^i) in the polynomial basis by repeated squaring modulo
   P.
2. It inverts the change-of-basis matrix by Gauss-Jordan elimination over
   GF(2).
3. It converts each product alpha^(2^i) * alpha^(2^j) back to the normal
   basis. Coordinate m-1 of that product says whether b_i c_j is a term of
   f.

For m = 4 these steps give exactly the nine terms above.

`XOR_PIPE = 1` puts a register after every XOR level. Use it for large m,
where the XOR tree gets deep. It delays the serial multiplier's output by k
clocks. The default is 0, which makes f combinational. The inverter always
uses combinational f, because its recursion needs a full product every
clock.

## Pipelined serial multiplier (`mo_seq_multiplier`)

Each operand goes through an `mo_input_channel`:

1. An inverter complements each incoming bit.
2. While `ld` is low, an (m-1)-stage buffer B shifts the complemented bits
   in. After clock m-1, stage B_k holds ~b_k.
3. In clock m (`ld` high), the full operand is copied in parallel into the
   m-stage cyclic register R. It takes ~b_0 straight from the inverter and
   ~b_1 .. ~b_{m-1} from B.
4. On every other clock, R rotates by one place, which squares its element.

One f circuit reads the two R registers. Just after the load, R holds beta
and gamma, so f gives d_{m-1}. One clock later R holds beta^2 and gamma^2,
so f gives d_{m-2}, and so on. While R rotates, B is already taking in the
next pair.

Timing for m = 4 (period clocks 1..4, `ld` high in clock 4):

| clock          | 1  | 2  | 3  | 4 (ld) | 1  | 2  | 3  | 4 (ld) |
|----------------|----|----|----|--------|----|----|----|--------|
| beta_in        | b3 | b2 | b1 | b0     | b3'| b2'| b1'| b0'    |
| delta_out      |    |    |    |        | d3 | d2 | d1 | d0     |

The latency is m clocks from the first input bit to the first output bit
(m + k with `XOR_PIPE = 1`). The throughput is one product every m clocks.
`delta_out` is combinational from the R registers.

## Pipelined inverter (`mo_inverter`)

alpha^(2^m) = alpha, so alpha^-1 = alpha^(2^m - 2). Since
2^m - 2 = 2 + 4 + ... + 2^(m-1), this is a product of m-1 successive
squares. The circuit runs this algorithm:

    B <- alpha^2 ; C <- 1
    repeat m-1 times:  D = B * C ;  B <- B^2 ;  C <- D
    alpha^-1 = D

The circuit has these parts:

* **B** is the R register of an input channel built with `LOAD_ROT = 1`. Its
  B-to-R wiring is rotated by one place, so the loaded value is already
  alpha^2. After that, R squares it on every clock.
* **C** is an m-bit register that holds the running product in complemented
  form. Loading all zeros sets it to 1.
* **D** comes from `mo_par_multiplier`: m copies of f, where copy j sees the
  operands rotated by j+1 places.
* **The output buffer** (`mo_output_buffer`) takes D in parallel and shifts
  it out, highest index first.

Two control signals with period m drive it:

| signal | high in clock | effect |
|--------|---------------|--------|
| ld1    | m             | R <- alpha^2 of the element just received; C <- 1 |
| ld2    | m-1           | the (m-1)-th product is alpha^-1: load it into the output buffer; C holds |
| neither| 1 .. m-2      | C <- D; R rotates |

Timing for m = 4. In period p the element comes in; in period p+1 three
multiplications run, one per clock:

| clock | p:1 | p:2 | p:3 | p:4 (ld1) | p+1:1 | p+1:2 | p+1:3 (ld2) | p+1:4 | p+2:1 | p+2:2 | p+2:3 |
|-------|-----|-----|-----|-----------|-------|-------|-------------|-------|-------|-------|-------|
| alpha_in | a3 | a2 | a1 | a0 | next element ... |  |  |  |  |  |  |
| D = B*C |  |  |  |  | alpha^2 | alpha^6 | alpha^14 = alpha^-1 |  |  |  |  |
| inv_out |  |  |  |  |  |  |  | a'3 | a'2 | a'1 | a'0 |

The latency is 2m-1 clocks from the first input bit to the first output
bit. The throughput is one inverse every m clocks. The input of 0 gives 0.

An assertion in `mo_inverter` checks that ld1 and ld2 are never high in the
same clock.

## Top level and framing (`gf2m_top`)

`gf2m_top` places the multiplier and the inverter side by side. One
`mo_ld_gen` drives both. This works because the multiplier's `ld` and the
inverter's `ld1` have the same waveform. `mo_ld_gen` is a modulo-m counter
that is in clock 1 after reset. `ld1` and `ld2` are outputs, so the
surrounding logic can align its streams:

* present bit 0 of an input element in the clock where `ld1` is high;
* take `delta_out` bit m-1 in the clock after that;
* take `inv_out` bit m-1 in the clock where `ld1` is high one period later.

| port | dir | meaning |
|------|-----|---------|
| clk, rst_n | in | clock; asynchronous active-low reset (all state to 0) |
| beta_in, gamma_in | in | multiplier operands, serial |
| delta_out | out | product, serial |
| alpha_in | in | element to invert, serial |
| inv_out | out | inverse, serial |
| ld1 | out | high in the last clock of each m-clock period |
| ld2 | out | high in the clock before ld1 |

## Choosing the field

Set the parameters `M` and `POLY` on `gf2m_top` or on any block.

* `POLY` is the field polynomial with bit k = coefficient of x^k. Its type
  is `logic [MAX_M:0]`, where `MAX_M` = 64 is in `gf2m_nb_pkg`.
* The roots of `POLY` must be linearly independent. If they are not,
  elaboration stops with an error.
* For `mo_inverter` the polynomial must also be irreducible.

Polynomials checked to be irreducible and normal:

| m | POLY | terms in f |
|---|------|-----------|
| 3 | `'b1101` (x^3+x^2+1) | 5 |
| 4 | `'b11001` (x^4+x^3+1, default) | 9 |
| 5 | `'b110111` (x^5+x^4+x^2+x+1) | 9 |
| 6 | `'b1100001` | 17 |
| 7 | `'b11000001` | 21 |
| 8 | `'h187` (x^8+x^7+x^2+x+1) | 29 |
| 16 | `'h18013` | |
| 32 | `'h18000000b` | |

The testbenches simulate m = 4 and m = 5 exhaustively. For m = 8 they
simulate all inverses and random products. m = 16 and m = 32 have been
elaborated and linted. At m = 32, elaboration takes about 15 s in Verilator,
because the term table comes from constant functions.

## Files

| file | block |
|------|-------|
| `rtl/gf2m_nb_pkg.sv` | elaboration-time normal-basis functions and defaults |
| `rtl/mo_product_f.sv` | product function f: AND plane and XOR tree |
| `rtl/mo_par_multiplier.sv` | parallel multiplier, m copies of f |
| `rtl/nb_cyclic_shift_reg.sv` | squaring register: cyclic shift with parallel load |
| `rtl/mo_input_channel.sv` | inverter, input buffer B and cyclic register R |
| `rtl/mo_ld_gen.sv` | ld1 / ld2 generator |
| `rtl/mo_seq_multiplier.sv` | pipelined serial multiplier |
| `rtl/mo_output_buffer.sv` | parallel-in, serial-out output buffer |
| `rtl/mo_inverter.sv` | pipelined inverter |
| `rtl/gf2m_top.sv` | top: multiplier and inverter with shared control |
| `tb/tb_gf_ref_pkg.sv` | reference arithmetic for the testbenches |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

Hierarchy:

    gf2m_top
      mo_ld_gen
      mo_seq_multiplier
        mo_input_channel x2 -> nb_cyclic_shift_reg
        mo_product_f
      mo_inverter
        mo_input_channel (LOAD_ROT=1) -> nb_cyclic_shift_reg
        mo_par_multiplier -> mo_product_f x m
        mo_output_buffer

## Simulating

Every testbench prints `TB_RESULT checks=N failures=F` and stops by itself.
To build and run one with Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb \
      --top-module tb_gf2m_top \
      rtl/gf2m_nb_pkg.sv tb/tb_gf_ref_pkg.sv tb/tb_gf2m_top.sv -y rtl -y tb
    ./obj_dir/Vtb_gf2m_top

Replace `tb_gf2m_top` with any other `tb/tb_*.sv` module.

The reference model (`tb_gf_ref_pkg`) does not use the design's tables. It
multiplies in the polynomial basis and converts back by exhaustive search.
This keeps it independent of the design, but limits it to small m.

What the testbenches cover:

* `tb_gf2m_top` runs at the default parameters. It sends all 256 products
  and all 16 inverses of GF(2^4) through the top, checks every output bit
  in the exact clock it is due, and checks the ld1/ld2 framing. It counts
  operand loads, output loads, overlapped input/output clocks,
  multiplication by 0 and 1, and inversion of 0 and 1; each must occur.
* The block testbenches check f against the hand-written formula and the
  reference (m = 4, 5, and the registered XOR tree). They check the
  parallel multiplier for m = 4, 5 and 8, and squaring by rotation. They run
  the serial multiplier for m = 4, m = 5, m = 4 with `XOR_PIPE = 1` and
  m = 8 with `XOR_PIPE = 1`, and the inverter for m = 4, 5 and 8.

## Design choices beyond the original architecture

The datapath follows the published nMOS architecture closely: inverters,
(m-1)-stage buffers, m-stage cyclic registers, f as a NOR-based AND plane
plus an XOR tree, the parallel m-copy multiplier, and the ld1/ld2 timing.
The following points are choices made for this RTL:

* **Registers and control.** All flip-flops are edge-triggered with an
  asynchronous active-low reset, in place of dynamic pass-transistor
  storage. Where the original circuit leaves a node floating, the register
  holds its value: buffer B while ld is high, and C while ld2 is high. The
  first output-buffer stage shifts in 0.
* **Control signals.** The generator of ld1/ld2 is not part of the original
  description, which gives only the waveforms. A modulo-m counter is used
  here.
* **Generalising f.** The term list of f for general m is computed, not
  written out. Terms are wired in row-major (i, j) order rather than the
  drawn order. XOR is commutative, so the function is the same.
* **XOR_PIPE.** Registering the XOR tree is suggested for large m but not
  specified. It is offered here as a parameter, off by default.
* **Shared top.** Combining the multiplier and the inverter under one
  control generator in `gf2m_top` is an integration choice.
* **Not built.** The standard AND-OR PLA form of f, mentioned as an
  alternative for small m, is not built.
* **Warnings.** Verilator reports `SYNCASYNCNET` on `rst_n`, because
  `rst_n` both resets the flip-flops asynchronously and disables the ld1/ld2
  assertion. This is harmless. `clk` and `rst_n` of `mo_product_f` are
  unused when `XOR_PIPE = 0`.
