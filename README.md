# Serial encoders for the length-31 binary BCH codes

This is the RTL for five encoders for the binary BCH codes of length 31. The
codes differ in how many errors they can correct:

| code     | t (errors corrected) | parity bits n-k | generator polynomial g(x)                                                  | hex (bit i = x^i) |
|----------|----------------------|-----------------|----------------------------------------------------------------------------|-------------------|
| (31,26)  | 1                    | 5               | 1 + x^2 + x^5                                                              | `0x25`            |
| (31,21)  | 2                    | 10              | 1 + x^3 + x^5 + x^6 + x^8 + x^9 + x^10                                     | `0x769`           |
| (31,16)  | 3                    | 15              | 1 + x + x^2 + x^3 + x^5 + x^7 + x^8 + x^9 + x^10 + x^11 + x^15             | `0x8FAF`          |
| (31,11)  | 5                    | 20              | 1 + x^2 + x^4 + x^6 + x^7 + x^9 + x^10 + x^13 + x^17 + x^18 + x^20         | `0x1626D5`        |
| (31,6)   | 7                    | 25              | 1 + x + x^2 + x^5 + x^9 + x^11 + x^13 + x^14 + x^15 + x^16 + x^18 + x^19 + x^21 + x^24 + x^25 | `0x32DEA27` |

Each g(x) is the least common multiple of the minimal polynomials of
alpha, alpha^2, ..., alpha^2t. Here alpha is a primitive element of GF(2^5)
built on x^5 + x^2 + 1. For n = 31 only the minimal polynomials of alpha,
alpha^3, alpha^5, alpha^7, alpha^11 and alpha^15 are distinct (degree 5 each).
So the (31,11) code, with four factors, already corrects 5 errors, and the
(31,6) code, with five factors, corrects 7.

Each encoder is systematic. The codeword polynomial is

    c(x) = x^(n-k) m(x) + p(x),   p(x) = x^(n-k) m(x) mod g(x)

so the k message bits appear unchanged in the codeword, next to n-k parity
bits. The message arrives one bit per shift, and the codeword leaves one bit
per shift. One codeword takes n = 31 shifts, whatever k is.

## The division register and its two switches

The core of every encoder (`bch_encoder_core`) is an (n-k)-stage linear
feedback shift register that divides by g(x). Stage i holds the coefficient
of x^i of the running remainder. On each shift the register moves up one
place, and the feedback bit is XORed into every stage whose generator
coefficient g_i (i < n-k) is 1. This is the internal-XOR (Galois) form.

Two switches steer the register. Both follow the control signal `cecode`:

| shifts         | `cecode` | switch 1 (feedback)              | switch 2 (`dout` source)  |
|----------------|----------|----------------------------------|---------------------------|
| 1 .. k         | 1        | closed: `fb = din ^ lfsr[n-k-1]` | the message bit `din`     |
| k+1 .. n       | 0        | open: `fb = 0`                   | top stage `lfsr[n-k-1]`   |

During the first k shifts the remainder builds up. The message is already
multiplied by x^(n-k), because it enters at the top of the register rather
than at the bottom. Meanwhile the message passes straight to the output.

After k shifts the register holds p(x). With the feedback open, the last n-k
shifts move p(x) out of the top stage, highest coefficient first, and shift
zeros in. At the end of a codeword the register is therefore empty again, and
the next codeword can start on the very next shift with no clearing step. An
assertion in `bch_encoder_core` checks that the register is zero whenever a
codeword completes.

Every output bit also enters a 31-bit output register (`codeword`). After
shift 31, `codeword[i]` is the coefficient c_i. The message sits in
`codeword[30:n-k]` and the parity in `codeword[n-k-1:0]`.

Switch 2 is a multiplexer, so during the message shifts `dout` follows `din`
in the same cycle, with no register in between.

## Bit order

On the serial wires the highest-order coefficient goes first. The message
enters m_(k-1) first. The codeword leaves c_30 first: first the message, then
p_(n-k-1) down to p_0. This order is the one the division circuit needs.

Written as strings c_0 c_1 ... c_30 (parity first, then m_0 ... m_(k-1)),
these are the reference codewords the testbenches check:

| code    | data word m_0 .. m_(k-1)      | codeword c_0 .. c_30               |
|---------|-------------------------------|------------------------------------|
| (31,26) | `10011101001011000110101001`  | `0001110011101001011000110101001`  |
| (31,21) | `100111010010110001101`       | `1110011010100111010010110001101`  |
| (31,16) | `1001110100101101`            | `0100001011110101001110100101101`  |
| (31,11) | `01011101001`                 | `0100001011110010100101011101001`  |
| (31,6)  | `011001`                      | `1111000110111010100001001011001`  |

## Control: the `cecode` signal

`bch_cecode_ctrl` makes the switch timing. It is a shift counter running
0..30 plus a one-bit idle/shifting state. `cecode` is high while the count is
below k. `last` marks shift 31. `busy` enables the datapath.

A start request is latched until the next shift enable. A request that is
still pending at shift 31 starts the next codeword on the following shift
enable, so held or early requests give back-to-back codewords with no gap.
The request latch and the back-to-back behaviour are choices of this design.

Each encoder (`bch31_26_encoder`, `bch31_21_encoder`, `bch31_16_encoder`,
`bch31_11_encoder`, `bch31_6_encoder`) is one controller plus one datapath
with its generator polynomial. The polynomials and code sizes are in
`bch31_pkg`.

### Encoder interface (all five are alike)

| port       | dir | width | meaning |
|------------|-----|-------|---------|
| `clk`      | in  | 1     | clock |
| `rst`      | in  | 1     | synchronous reset, active high; clears the register, output register and controller |
| `ce`       | in  | 1     | shift enable; one shift per clock edge with `ce` high |
| `start`    | in  | 1     | request a codeword (pulse or hold) |
| `din`      | in  | 1     | message bit; taken on edges with `ce & cecode` |
| `cecode`   | out | 1     | high during the k message shifts |
| `busy`     | out | 1     | a codeword is being shifted |
| `dout`     | out | 1     | codeword bit; valid on edges with `ce & busy` |
| `codeword` | out | 31    | output register, bit i = c_i |
| `cw_valid` | out | 1     | one-clock pulse after shift 31; `codeword` is then complete and stays until the next codeword starts |

A data source presents m_(k-1) on `din` and moves to the next bit after each
edge with `ce & cecode` high.

## The bank: `bch31_encoder_bank` (top)

The top puts the five encoders side by side. Each has its own `start`, `din`,
`cecode`, `busy`, `dout`, `codeword` and `cw_valid`, at vector index 0..4 for
(31,26), (31,21), (31,16), (31,11) and (31,6). They share the clock, the reset
and one shift enable from `bch_clk_en`.

`bch_clk_en` divides the clock by `DIV` (default 32) and gives a one-clock
`ce` pulse. From a 50 MHz board clock the encoders then shift at 1.5625 MHz.
A 31-bit codeword takes 31 x 640 ns = 19.84 us. The 50 MHz source is an
assumption; set `DIV` for another clock. `DIV = 1` shifts on every clock.

## Where the design departs from the reference implementation, and why

- **(31,16) polynomial.** The RTL uses the degree-15 product of the minimal
  polynomials of alpha, alpha^3 and alpha^5, shown in the table above. A
  triple-error-correcting code of length 31 needs exactly this polynomial, and
  it reproduces the published (31,16) parity bits for the reference data word.
- **Flip-flop count.** The reference encoders use (n-k) + 32 flip-flops: 37,
  42, 47, 52 and 57. The encoders here use (n-k) + 39 (44 ... 64). The extra
  flip-flops are the 5-bit shift counter, the state bit and the start latch of
  the controller. The original control circuit is not described in enough
  detail to copy.
- **Ports.** The reference board used 6 I/O pins per encoder. The encoders
  here also bring out `busy`, `cw_valid`, the parallel output register and the
  `ce` input.
- **Five in one top.** The reference encoders were built as five separate
  FPGA designs. Here they share one top, and each remains usable on its own.
- **Bit order in time and reset.** The reference material gives neither. The
  choices above (highest order first; synchronous active-high reset) are this
  design's own.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

- `tb_bch_encoder_core`: drives the (31,26), (31,16) and (31,6) datapaths
  from its own sequencer, with back-to-back words and idle or
  shift-disabled clocks mixed in. It compares the output register and the
  serial stream with a long-division model (`tb/bch_tb_pkg.sv`), and checks
  that `cw_valid` comes exactly one clock after shift 31.
- `tb_bch_cecode_ctrl`: a cycle-accurate model of the controller, under
  random `ce` and `start`. It covers idle starts, requests while busy, and
  held requests.
- `tb_bch31_<k>_encoder` (five files): each encodes the reference word and 59
  random messages under a random `ce`. Per codeword it checks the output
  register, the serial stream, 31 shifts, k message shifts and divisibility by
  g(x). It also checks 31 shift enables between back-to-back codewords, and
  that each g(x) divides x^31 + 1.
- `tb_bch_clk_en`: pulse spacing at DIV = 32, 5 and 1, and 640 ns per shift
  at a 50 MHz clock.
- `tb_bch31_encoder_bank`: the whole bank at its default parameters. All five
  encoders run concurrently on their reference words and random messages,
  12 per encoder, with 992 clocks per back-to-back codeword. It counts message
  shifts, parity shifts, stalled clocks, pending requests, back-to-back words
  and idle gaps, and fails if any of them never happened.

The testbench model is long division on plain bit vectors, not a shift
register. Its generator polynomials are written out separately from the RTL
package.

## Simulating

With Verilator 5, from the directory above `rtl/` and `tb/`:

    verilator --binary --timing --assert --timescale 1ns/1ps \
        -Irtl -Itb -y rtl -y tb rtl/bch31_pkg.sv tb/bch_tb_pkg.sv \
        tb/tb_bch31_encoder_bank.sv --top-module tb_bch31_encoder_bank -o sim
    ./obj_dir/sim

Replace the testbench file and top module to run another testbench. Each one
finishes in well under a second.

## Changing it

- **Another code of length 31 (or another n).** Instantiate
  `bch_cecode_ctrl` and `bch_encoder_core` with the new `N`, `K` and `G`.
  `G` has n-k+1 bits, bit i being the coefficient of x^i, and needs g_0 =
  g_(n-k) = 1.
- **Another shift rate.** Change `DIV` on the top.
- **Bit-parallel loading.** Not provided. The encoders are serial, one
  message bit per shift.
