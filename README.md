# k = 7 Viterbi FEC decoder with two ACS units

This is a maximum-likelihood (Viterbi) decoder for the constraint-length 7,
rate 1/2 convolutional code with generators 133 and 171 (octal), and for its
rate 3/4 punctured form. It was designed for a mobile satellite terminal,
where the channel is noisy and fading and the terminal must be small and
frugal with power. The architecture is a middle course between two extremes:

* one add-compare-select (ACS) unit doing all 64 state updates serially
  (small, but needs a fast clock and burns power);
* 64 ACS units in parallel (slow clock, but big).

Here **two** ACS units share the work. Every information bit needs 64 state
updates, which the two units finish in 32 butterfly slots of two clocks each.
With a 10 MHz clock that is enough for a 250 ksymbol/s rate 1/2 stream
(125 kbit/s): the decoder needs 71 clocks per bit, and 80 are available.

## The code and the input symbols

The encoder is a 6-bit shift register. For input bit `u` and register
contents `u[t-1] .. u[t-6]` it sends

    c1 (I) = u ^ u[t-2] ^ u[t-3] ^ u[t-5] ^ u[t-6]      G1 = 133
    c2 (Q) = u ^ u[t-1] ^ u[t-2] ^ u[t-3] ^ u[t-6]      G2 = 171

It starts each frame at zero and is flushed with six zeros at the end.

For rate 3/4 some outputs are not sent (punctured). The pattern is I = 110,
Q = 101 over three bits, so the channel carries `I0 Q0 I1 Q2` for every
three information bits.

The demodulator delivers each channel symbol as a 3-bit sign-magnitude soft
decision `{sign, mag[1:0]}`. `sign = 1` means "looks like a one", and `mag`
(0 to 3) says how strongly. Symbols arrive one at a time (serial format, BPSK)
or as an I/Q pair (parallel format, QPSK). Each symbol has a puncture flag
that marks it as a dummy, to be ignored.

## Data flow per information bit

```
 symbols ──► symbol_input ──pair──► branch_metric ──4 metrics──► state_metric_unit ──pointer bytes──► trellis_ram
            (buffer, depuncture)                                 (2 ACS, 2 state RAMs)                     │
                                                                          │ best state                      │
                                                                          ▼                                 ▼
                                                                     traceback ◄───────── pointer bytes ────┘
                                                                          │
                                                                      decoded bit
```

`decoder_control` sequences each bit period. It takes one pair and loads
the branch metrics. Then it starts two jobs that run at the same time:

* the state metric step for the new pair;
* a traceback from the best state of the previous step.

It waits until both jobs are done. Both jobs use the one trellis memory
port. A pointer write always gets the port, and the traceback waits.

### Branch metrics

Each soft symbol is placed on a 0 to 7 scale, `v = 4 + mag` for a one and
`v = 3 - mag` for a zero. Its distance from a hypothesised `0` is `v`, and
from a hypothesised `1` it is `7 - v`. The four branch metrics (for `c1c2` =
00, 01, 10, 11) are sums of two such distances, so each is 0 to 14. A dummy
symbol adds 0 to all four.

### Butterflies

Number the states by the last six input bits, newest in bit 5. Then states
`p` and `p + 32` (p = 0..31) both come from states `2p` and `2p + 1`:

    S'(p)    = min( S(2p) + Mi , S(2p+1) + Mj )
    S'(p+32) = min( S(2p) + Mj , S(2p+1) + Mi )

`Mi` is the branch metric of the codeword on the branch 2p → p. `Mj` is the
metric of its complement. One butterfly is one pair of reads and two ACS
operations. ACS unit 0 computes `S'(p)` and ACS unit 1 computes `S'(p+32)`
from the same two metrics. Each unit also gives a one-bit pointer: 0 means
the survivor came from `2p`, and 1 means it came from `2p+1`.

## The state metric memory: parity split and rotating addresses

This is the least obvious part of the design.

The 64 metrics are kept in two 32-word × 6-bit single-port RAMs. A state is
stored in the **even** RAM if its number has an even count of one bits, and
in the **odd** RAM otherwise. Two facts make this work:

* The two states a butterfly reads, `2p` and `2p+1`, differ in one bit. So
  they always have opposite parity, and they are in different RAMs.
* The two states a butterfly writes, `p` and `p+32`, also differ in one bit.
  So they too are in different RAMs.

Each butterfly is therefore exactly one read and one write on each RAM. The
RAM bus alternates read, write, read, write, and is never idle.

The results are written back **in place**, to the two words that were just
read. `p` goes where `2p` was, and it is in the same RAM because
parity(p) = parity(2p). `p+32` goes where `2p+1` was. Within a step this is
safe, because no word is written before it has been read. Across steps, it
means the mapping from states to addresses changes. State `p` now lives at
the old address of `2p`, and `2p` is `p` rotated left by one bit. After `g`
steps the word address of state `s` is

    addr_g(s) = bits [5:1] of (s rotated left by g mod 6)

The RAM is still chosen by parity(s), which rotation does not change. A
3-bit counter `rot` (0 to 5) tracks `g mod 6` and is set at frame start. For
butterfly `p` the read addresses are then `rotl(2p, rot)[5:1]` and
`rotl(2p+1, rot)[5:1]`. The writes reuse the same addresses. No second
metric buffer and no state-order shuffling are needed.

### Pipeline

Each butterfly goes through four stages: RD (RAM read), ADD (two sums per
ACS unit), SEL (compare and choose), and WR (RAM write-back). A new
butterfly starts every two clocks:

| clock | RAM        | ACS        |
|-------|------------|------------|
| 2n    | RD(n)      | SEL(n-1)   |
| 2n+1  | WR(n-1)    | ADD(n)     |

So 32 butterflies take 64 clocks. Two more clocks drain the pipeline, and
two more write the last pointer bytes. `done` comes 68 clocks after
`start`. The controller adds three clocks of its own, so a bit takes 71
clocks.

### Metric range

The RAMs are 6 bits wide. Metrics are kept in range in two ways:

* **Normalisation.** During each step, `best_state` finds the smallest new
  metric. In the next step that value is subtracted from every metric as it
  is read.
* **Saturation.** ACS results saturate at 63. This only affects paths that
  are far worse than the best one.

At frame start, the first step ignores the RAM contents. It uses 0 for
state 0 and 63 for all other states.

## Trellis memory and traceback

Every step stores 64 pointer bits as 8 bytes. Byte `b` holds states
`8b .. 8b+7`, and the bit for state `s` is `s[2:0]`. The memory holds 64
steps (512 bytes) and is addressed as `{slot, byte}`. The pointer bytes for
states `p..p+7` and `p+32..p+39` are complete after butterfly `p+7`. They are
written in the next two clocks, 8 writes per step.

The traceback's address generator is a 6-bit shift register. It starts with
the best state. At each step back it reads the pointer bit of the current
state, from byte `s[5:3]` of that step. Then it shifts left, with the pointer
bit entering at the bottom, which gives the predecessor state. Each read
address depends on the byte just read. With a one-clock memory, the
traceback can still issue one read per clock whenever it has the port. After
`depth` steps, the bit shifted out of the top on the last step is the
decoded bit. That bit is the input bit of the oldest step visited.

The depth is 35 steps (5k) at rate 1/2 and 56 steps (8k) at rate 3/4. A
traceback run needs `depth` reads, and the state metric step needs 8
writes. Together that is at most 64 port cycles, which fits within one
71-clock step.

## Interface of `fec_decoder`

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock (10 MHz nominal), asynchronous active-low reset |
| `frame_start` | in | 1 | one-clock pulse while the decoder is idle; a new frame starts, encoder in state 0 |
| `rate34` | in | 1 | 1 = rate 3/4 punctured stream; hold for the whole frame |
| `serial_mode` | in | 1 | 1 = one symbol per strobe on `sym_i`; 0 = I/Q pair on `sym_i`/`sym_q` |
| `sym_valid` | in | 1 | symbol strobe |
| `sym_i`, `sym_q` | in | 3 | sign-magnitude soft symbols |
| `punct_i`, `punct_q` | in | 1 | this symbol is a dummy; ignore it |
| `out_valid`, `out_bit` | out | 1 | decoded bit strobe and value |
| `overflow` | out | 1 | sticky until `frame_start`: symbols arrived faster than one pair per 71 clocks, and some were dropped |

Decoded bit `k` of a frame comes out during step `k + depth`. So after the
last data bit and the six flush zeros, the transmitter (or the testbench)
must send `depth` more zero bits to push the last bits out. The decoder
has no end-of-frame drain of its own.

Parameters: `TM_STEPS` (64, power of two), `TB_DEPTH_R12` (35) and
`TB_DEPTH_R34` (56). Both depths must be below `TM_STEPS`. A traceback run
takes `depth + 2` clocks, plus one clock for each of the 8 pointer writes
it waits for. Depths up to 58 therefore finish inside the 68-clock state
metric step. A larger depth is still decoded correctly, but each step
takes longer.

## What comes from the source design and what was chosen here

Taken from the source design:

* k = 7, the generators, and the rate 3/4 puncture pattern.
* 3-bit sign-magnitude soft input, in serial or parallel format, with
  puncture inputs.
* Two ACS units and two 32 × 6 state RAMs split by state parity.
* The RD/ADD/SEL/WR pipeline with the RAM bus busy every clock.
* Traceback from the minimum-metric state, with a shift-register address
  generator.
* A byte-addressable trellis memory whose reads and writes are interleaved.
* A longer trellis depth at rate 3/4.

Chosen here:

* The sign convention and the linear 0..7 soft scale.
* The rotating in-place address map.
* Normalisation by the previous minimum, and saturation at 63.
* The frame-start initialisation.
* Both trellis depths, and the 64-step trellis memory.
* The symbol buffer (8 symbols), the valid/ready handshakes, and the
  overflow flag.
* Write priority on the trellis port.
* Ties: a tie goes to the even predecessor, and the state offered first
  wins the best-state search.

Known departures and limits:

* At 10 MHz the decoder runs up to 140.8 kbit/s. A 250 ksymbol/s **rate 3/4**
  stream (187.5 kbit/s) needs 53 clocks per bit and does **not** fit. It
  needs a clock of about 13.3 MHz.
* Code (node) synchronisation and a low-power standby mode are not
  implemented. Their behaviour is not specified.
* The chip used pseudo-static RAMs. Here they are plain register arrays with
  a synchronous read.
* The coding gain has not been measured here. A short noisy-channel run
  (`tb_fec_ber`) gives a rough check. At rate 1/2, about 1500 bits were
  decoded with about 8 % raw symbol errors. At rate 3/4, about 1500 bits
  were decoded with about 1.3 % raw symbol errors. Neither run had a
  decoded error. At rate 3/4 with about 2 % raw errors, an occasional
  error burst of a few tens of bits was seen.

## Files

`rtl/`:

* `fec_pkg.sv`: constants, the pair type, and the parity, rotation and
  codeword functions.
* `symbol_input.sv`: buffer, serial/parallel input, and depuncturing.
* `branch_metric.sv`: the four branch metrics.
* `acs_alu.sv`: one two-stage ACS unit.
* `state_ram.sv`: a 32 × 6 state RAM.
* `best_state.sv`: the minimum search.
* `state_metric_unit.sv`: butterfly sequencing, addresses, and pointer
  packing.
* `trellis_ram.sv`: the pointer memory.
* `traceback.sv`: the traceback unit.
* `decoder_control.sv`: sequencing and port sharing.
* `fec_decoder.sv`: the top level.

`tb/`: one self-checking testbench per module or package (`tb_<name>.sv`), and
`fec_tb_pkg.sv`, which holds the reference encoder. Each prints
`TB_RESULT checks=N failures=M`.

* `tb_fec_decoder` runs the whole decoder at its default sizes. It
  covers both rates, both input formats, dummy symbols, injected hard
  errors, an overflow burst, and the 71-clock step period.
* `tb_fec_ber` sends random frames through a noisy soft-decision channel.
  It compares the raw hard-decision error rate with the decoded error rate.

Simulate with Verilator 5, for example:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb \
  rtl/fec_pkg.sv tb/fec_tb_pkg.sv tb/tb_fec_decoder.sv --top-module tb_fec_decoder
./obj_dir/Vtb_fec_decoder
```

For another unit, replace `tb_fec_decoder` with `tb_<module>`. Add
`tb/fec_tb_pkg.sv` only where the testbench imports it.
