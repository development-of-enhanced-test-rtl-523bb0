# ECC test-data decompressor

Scan test sets are large, and testers have limited memory and limited
bandwidth into the chip. One fix is to store the test set compressed on the
tester and expand it on chip, between the tester pins and the scan chain.
This RTL is such an on-chip decompressor for the **Enhanced Compression Code
(ECC)**. The ECC is a two-stage code:

1. **Integrated Compression Code (ICC).** The scan data is read as
   alternating runs of 0s and 1s. Each run is sent in whichever of three forms
   is shortest: an *Alternating Variable Run-length* (AVR) codeword, a
   *Golomb* codeword with group size m = 16, or raw *bypass* bits for very
   short runs.
2. **Nine-coded (9C) block code.** This is applied to the ICC bit stream. The
   stream is cut into K-bit blocks, each block into two K/2 halves, and nine
   prefix-free codewords say whether each half is all 0s, all 1s or mixed.

The decoder undoes the stages in reverse order. The tester stream goes
through the 9C decoder, then the ICC decoder, then into the scan chain:

```
             clk_ate            |                         clk_soc
 data_in  ──►┌───────────────┐  |  ┌───────────────┐ ICC bits ┌──────────────┐──► scan_in
 dec_en   ──►│ ate_sync_fifo │──┼─►│ ninec_decoder │─────────►│ icc_decoder  │──► scan_en
 ack      ◄──│ (4 × 1 bit)   │  |  │ REG_K/2, Cnt1 │◄─────────│ FSM S0..S6   │
             └───────────────┘  |  │ 0/1/data MUX  │  ready   │ run counter  │◄── select
                                |  └───────────────┘          │ group counter│◄── bypass
                                |                             │ T-FF + XOR   │──► mode_take
                                |                             └──────────────┘
```

All of it is synthesizable SystemVerilog: 245 word-level cells and 78
flip-flops at the default parameters.

## The ICC code, as this decoder reads it

### Runs

The decoder keeps a *run type* `a` in a T flip-flop. It starts at 0 after
reset. A **run of length L** is L bits equal to `a`, followed by one
terminating bit `~a`. After each run, `a` toggles. So runs of 0s end in a 1
and runs of 1s end in a 0, one after the other. For example, with `a` = 0,
the data `0001 110 1` is three runs: L = 3 of 0s, then L = 2 of 1s, then
L = 0 of 0s.

The FSM never emits data bits directly. It emits `fout`: 0 for a run bit and
1 for the terminator. The scan bit is `a XOR fout`, and a 1 on `fout` also
toggles the flip-flop.

### The three codeword kinds

The kind of the next codeword is **not** in the bit stream. It is given on
two side-band inputs, `select` and `bypass`:

| `bypass` | `select` | codeword | run lengths used for |
|---|---|---|---|
| 1 | – | one raw bit `b`: scan bit `a ^ b`; toggles `a` if `b` = 1 | L = 0 (bits `1`), L = 1 (bits `0 1`) |
| 0 | 0 | AVR | 2–4 of either type; all runs of 1s |
| 0 | 1 | Golomb, m = 16 | runs of 0s longer than 4, where Golomb is not longer than AVR |

**AVR codeword, group i (1 ≤ i ≤ K).** The codeword is `p` repeated i times,
then the separator `~p`, then an i-bit tail `j`. The run length is

    L = 2^(i+1) − 3 + p·2^i + j

| group | run lengths | codewords |
|---|---|---|
| 1 | 1–4 | `010 011 100 101` |
| 2 | 5–12 | `001tt` (5–8), `110tt` (9–12) |
| 3 | 13–28 | `0001ttt`, `1110ttt` |
| 4 | 29–60 | `00001tttt`, `11110tttt` |

**Golomb codeword (m = 16).** The codeword is q ones, a zero, then a 4-bit
tail r. The run length is L = 16·q + r. Golomb has no upper limit on L.

The encoder chooses the kind. The reference encoder in the testbenches
(`tb/ecc_tb_pkg.sv`, `icc_encode`) applies these rules:

- L ≤ 1: bypass.
- 2 ≤ L ≤ 4, or any run of 1s: AVR.
- Runs of 0s above 4: the shorter of AVR and Golomb, with Golomb on a tie.
- A run of 1s longer than the AVR range (60 with K = 4): Golomb. The decoder
  accepts Golomb for runs of either type.

### The 9C code

Each half of a block is `0` (all zeros), `1` (all ones) or `U` (mixed). The
codewords are:

| halves | 00 | 11 | 01 | 10 | 1U | U1 | 0U | U0 | UU |
|---|---|---|---|---|---|---|---|---|---|
| codeword | `0` | `10` | `11000` | `11001` | `11010` | `11011` | `11100` | `11101` | `1111` |

Each U half follows its codeword verbatim, left half first. The stream begins
with a `KH_W`-bit header, most significant bit first, which holds K/2. The
decoder loads it into `REG_K/2` and uses it for the whole test set. The
tester side picks K at run time; the design default header width allows
K/2 up to 15. K = 8 (K/2 = 4) is the standard choice.

## How the ICC decoder works (`icc_decoder`)

This is the subtle part of the design. It has seven states:

| state | role | takes input? | emits? |
|---|---|---|---|
| S0 | start of a codeword; samples `select`/`bypass` (`mode_take`). A bypass bit is passed to the output in the same clock. | yes | bypass bits only |
| S1 / S2 | AVR prefix of 0s / 1s. The group counter counts prefix bits. The separator moves to S5. | yes | no |
| S3 | one Golomb prefix `1`: emits 16 run bits | no | yes |
| S4 | Golomb prefix: `1` → S3, `0` → S5 | yes | no |
| S5 | tail: each bit is shifted into the run counter while the group counter counts down the tail length (i for AVR, 4 for Golomb) | yes | no |
| S6 | counts the run out, then emits the terminator and toggles `a` | no | yes |

The AVR arithmetic needs no adder. On the first prefix bit, the run counter
is loaded with the two bits `1,p`. The tail is then shifted in behind them,
which gives the binary number `1 p j` = 2^(i+1) + p·2^i + j. S6 counts this
down to 3 and so emits exactly L run bits. For a Golomb tail, the counter
starts from 0 and counts down to 0. The stop value is the only difference
between the two kinds.

The submodules are:

- `run_counter`: load, serial shift-in, decrement, and `rs` at a given stop
  value.
- `group_counter`: load, increment, decrement, and `rs` when one is left.

`in_ready` (the decoder's *en*) is low in S3 and S6, while a run is being
counted out.

**Timing.** The decoder takes one input bit per clock and emits one scan bit
per clock.

- An AVR codeword of group i takes 2i+1 clocks in, then L+1 clocks out. For
  example, `11011` (twelve 0s) gives its first scan bit in the 6th clock
  after its first bit is accepted, and its terminator 12 clocks later.
- A Golomb codeword with q prefix ones spends 16 output clocks after each
  prefix one, then r+1 output clocks after the tail.
- A bypass bit costs one clock.

## The 9C stage (`ninec_decoder`)

The 9C decoder has three parts: a small FSM, `REG_K/2`, and Counter 1. The
FSM reads codeword bits one per clock until the case is known. It then sets
the 2-bit select of an output multiplexer for each half: constant 0,
constant 1, or the data input.

- **Uniform half.** The decoder emits K/2 bits, one per clock, without
  taking input.
- **Mixed half.** The decoder passes K/2 input bits straight through. In this
  case `out_valid` follows `in_valid`, and `in_ready` follows `out_ready`,
  in the same clock.

Input and output are valid/ready streams, because the ICC stage stalls while
it expands runs.

`blk_case`/`blk_case_valid` report each recognised case (1–9). For K = 8,
with no stalls, a block costs its codeword length plus 8 clocks: 9 clocks
for case 1, 10 for case 2, 12 for case 9 and 13 for the others.

## Clock domains (`ate_sync_fifo`, reset)

The tester shifts data on `clk_ate`. The decoder runs on the faster
`clk_soc`. A 4-entry, 1-bit asynchronous FIFO joins the two domains. It uses
Gray-coded pointers and two-flop synchronisers.

- **Tester side.** The tester offers a bit with `dec_en`. The bit is written
  on a `clk_ate` edge when `ack` is high. `ack` is "not full", so the tester
  must hold a bit while `ack` is low.
- **Decoder side.** A written bit is visible 2–3 `clk_soc` edges later.

`rst_n` is asynchronous. Inside the top it is released through a two-flop
synchroniser in each domain.

## Top-level interface (`ecc_decoder`)

| port | dir | domain | meaning |
|---|---|---|---|
| `clk_ate`, `clk_soc`, `rst_n` | in | | clocks, asynchronous active-low reset |
| `data_in`, `dec_en` | in | ate | compressed bit, and "tester has a bit" |
| `ack` | out | ate | bit accepted on this edge if `dec_en` |
| `select`, `bypass` | in | soc | kind of the *next* ICC codeword (see above) |
| `mode_take` | out | soc | `select`/`bypass` were sampled; present the next kind |
| `scan_in`, `scan_en` | out | soc | data bit for the scan chain, and shift enable |
| `k_half` | out | soc | contents of `REG_K/2` |
| `blk_case`, `blk_case_valid` | out | soc | 9C case just recognised |
| `run_type`, `icc_en`, `icc_err` | out | soc | run type `a`; ICC stage ready; sticky error (AVR prefix longer than K) |

**How to drive the side band.** Keep a queue of codeword kinds, one per
codeword, with each bypass bit counting as one codeword. Present the head of
the queue on `{bypass, select}`, and pop it when `mode_take` is high on a
`clk_soc` edge. When the queue is empty, present `bypass = 1`. The zero
padding of the last 9C block then passes harmlessly as bypass bits.

The scan chain shifts on `clk_soc` edges with `scan_en` high. The decoder
supplies an enable rather than a gated clock.

### Parameters

| parameter | default | meaning |
|---|---|---|
| `K` | 4 | number of AVR groups; AVR covers run lengths 1 … 2^(K+2) − 4 |
| `M` | 16 | Golomb group size (a power of two) |
| `KH_W` | 4 | width of `REG_K/2` and of the stream header |
| `AW` | 2 | log2 of the FIFO depth |

The run counter is max(K+2, log2 M + 1) bits wide. The group counter is
max(⌈log2(K+1)⌉, ⌈log2(log2 M + 1)⌉) bits wide.

## What was measured

`tb_ecc_workloads` builds synthetic test cubes with 25 % specified bits. It
uses the scan widths of the ISCAS'89 circuits s298, s400, s1494 and s1196:
17, 24, 14 and 32 bits, each being primary inputs plus flip-flops. It fills
the don't-cares in four ways:

- column-wise bit stuffing (copy the bit above);
- bit stuffing followed by difference vectors (XOR with the previous vector);
- zero fill;
- minimum-transition fill.

Each filled set is compressed with the reference encoders and decoded
through the RTL, and every scan bit is compared. The testbench also prints
the weighted transition metric (WTM) of the vectors. For a vector of t bits,
this is the sum of (t − i) over every transition between positions i and
i+1, and it serves as the scan-in power estimate. A directed 20-bit cube,
`0000110xxxx1001xxxx0`, checks the fills themselves. Zero fill gives
`00001100000100100000` with a WTM of 58. Minimum-transition fill gives
`00001100000100111110` with a WTM of 54.

With this synthetic data, the ICC stage alone saves about 40–60 % of the bits
for minimum-transition fill, zero fill and difference vectors. It saves
10–15 % for plain bit stuffing. Minimum-transition fill gives both the best
compression and the lowest WTM.

**The 9C second stage did not compress further on this data. It lengthened
the ICC stream by 40–50 %.** It shortened only an artificial set made of
very long runs. The ICC output is dense, with few uniform
halves, so most blocks become case 9 (4 bits of overhead per 8). The
decoder handles either stream correctly. Whether the second stage pays off
depends on the statistics of real test sets, which these testbenches do not
have.

## Verification

Every testbench is self-checking. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. All of them pass.

| testbench | what it checks |
|---|---|
| `tb_run_counter`, `tb_group_counter` | The counters against a model, with random operations. |
| `tb_icc_decoder` | Exact output bits and clock cycles for an AVR codeword (run of 12), a Golomb codeword with two prefix ones (run of 37), and bypass bits. Six random streams, with and without input gaps. Every codeword kind must occur. |
| `tb_ninec_decoder` | Each of the nine cases once, with bits and clock counts. Random streams for K/2 = 4 and 3, with input gaps and output back-pressure. |
| `tb_ate_sync_fifo` | Order and completeness across two unrelated clocks, for a fast and a slow reader. Full and empty must both occur. |
| `tb_ecc_decoder` | End to end at default parameters. Four synthetic data sets plus an aligned long-run set. Every 9C case, every ICC kind, Golomb prefix ones, tester back-pressure (`ack` low) and ICC stalls must each happen at least once. |
| `tb_ecc_workloads` | The four circuits × four fills described above. |

To run one with plain Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/ecc_pkg.sv tb/ecc_tb_pkg.sv tb/tb_ecc_decoder.sv --top-module tb_ecc_decoder
./obj_dir/Vtb_ecc_decoder
```

Each simulation takes well under a second once it is built.

## Design choices and departures

The following follow the published description of the code and its decoder:

- the code tables: AVR, Golomb with m = 16, 9C with K = 8;
- the bypass mode for run lengths 0 and 1;
- the `select`/`bypass` inputs;
- the two counters, the T flip-flop with XOR, and the states S0–S6 of the
  ICC decoder;
- `REG_K/2` loaded from the head of the stream, Counter 1, and the
  0/1/data multiplexer of the 9C decoder;
- the two clocks with a synchronisation circuit, and the `Ack`/`Dec_en`
  names.

The following are this design's own:

- **Run convention and bypass encoding.** The terminator is included in
  every run, and a bypass bit means "flip or keep" relative to `a`. As a
  result, a run of length 1 costs two bypass bits rather than one.
- **Side-band timing.** `select`/`bypass` are sampled at the first bit of
  each ICC codeword and acknowledged with `mode_take`. The published
  decoder draws the inputs but does not say how they are timed.
- **State roles.** The detailed role of each state follows the codes rather
  than a transition-by-transition copy of the published state diagram.
- **K = 4 AVR groups.** The source sizes K from the longest run of the test
  set, which it does not give.
- **Run counter width.** The run counter is one bit wider than the "k+1"
  stated, so that it can hold `1,p,tail`.
- **Handshakes and FIFO.** Valid/ready handshakes between the stages, and
  the FIFO as the synchronisation circuit.
- **Scan clock enable.** The decoder provides `scan_en` instead of an AND
  gate on the clock.
- **Header.** The width and bit order of the K/2 header.

The following are not included:

- the tester;
- the scan chain of the core under test;
- the hardware that would rebuild vectors from difference vectors. Such
  hardware would XOR each decoded vector with the previous one; for the
  difference-vector fill, the decoder outputs the difference vectors
  themselves.
