# FCSCAN: fan-out compression scan decompressor

FCSCAN cuts the test data a tester must store and send to a circuit that has
many internal scan chains. Its main idea is as follows. In an ATPG test cube
only a few bits of each *scan slice* are specified. A scan slice is the set of
bits that enter all chains in the same shift cycle. Of the specified bits in a
slice, the bits holding the less common value (0 or 1) are never more than
half. These minority bits are the *coded bits*. FCSCAN sends only:

* one **initial vector** per slice: the majority value, broadcast to every
  chain, plus the number `n` of coded bits;
* one **configuration vector** per coded bit: the position of one output to
  invert.

An on-chip decompressor rebuilds the full slice from these words, one tester
word per clock, and shifts the slice into all chains at once. Don't-care bits
simply take the broadcast value. No special ATPG is needed: any cube set can be
coded this way.

A second stage lowers the channel count further. Compatible scan chains are
grouped into *clusters*. Chains that can always take the same value, or always
the opposite value, form one cluster. One decompressor output then drives a
whole cluster through a fan-out of wires and inverters. The decompressor only
needs as many outputs as there are clusters, which shrinks the word width `M`.

## Data path

```
 tester, M channels
   tvalid, tdata[M-1:0]
        |
 +------v--------------------------- fcscan_decompressor -------+
 |  fcscan_dcu        counter, ms, cck, sck                     |
 |  fcscan_decoder    position -> one-hot flip mask "conf"      |
 |  fcscan_fcn        per output: MUX(ms) + XOR + first cell    |
 +------+--------------------------------------------------------+
        | k[N_CL-1:0]  (one bit per cluster)
 +------v------ fcscan_fanout ------+
 |  wires + inverters per cluster   |
 |  and per chain                   |
 +------+---------------------------+
        | si[N_SC-1:0]
 +------v------ fcscan_scan_chains -+      scan_q / cap_d
 |  N_SC chains x SCAN_LEN cells    |<---> circuit-under-test logic
 +------+---------------------------+      (outside this design)
        | so[N_SC-1:0]
 +------v------ fcscan_misr --------+
 |  signature of the scan outputs   |
 +----------------------------------+
```

`fcscan_top` wires these blocks together. The combinational logic of the
circuit under test is not part of the design. It reads the scan cells through
`scan_q`, and its response is loaded back through `cap_d`.

## The compressed word stream

Every word is `M` bits wide. The word type follows from the decompressor's
state, so no tag bit is needed.

| word | bits | meaning |
|---|---|---|
| initial vector | `tdata[M-1]` | value broadcast to every output |
| | `tdata[M-2:0]` | `n`, the number of configuration vectors that follow |
| configuration vector | `tdata[M-1:0]` | 1-based position `p` of the output to invert (1..N_CL) |

Positions are 1-based. Code 0 selects nothing. So the channel count is
`M = ceil(log2(N_CL + 1))`, computed by `fcscan_pkg::chan_width`. This formula
gives the channel count of every published benchmark configuration. The
majority value is chosen per slice, so `n <= N_CL/2 < 2^(M-1)`, and the `M-1` count bits
always suffice.

### Worked example (the default configuration)

The default parameters reproduce the published ten-chain example. It has 10
chains `c1..c10` and 8 slices. The chains form 4 clusters:

| cluster | chains | inverters |
|---|---|---|
| k1 | c1, c6 | none |
| k2 | c4, c8, c9, c10 | on c9; k2 also inverted as a whole |
| k3 | c2, c7 | on c7 |
| k4 | c3, c5 | none |

So `M = 3`. After coded-bit reduction, the decompressor outputs
(k1, k2', k3, k4) for the eight slices are:

```
slice  outputs  words (init | conf...)
s1     0000     000
s2     1100     010 | 001 010          (tie: broadcast 0, invert k1 and k2)
s3     1000     001 | 001
s4     0001     001 | 100
s5     0000     000
s6     0000     000
s7     1111     100
s8     1101     101 | 011
```

That is 13 words, or 39 bits. The original cubes hold 80 slice bits. In
general the cost is `|T_E| = M * sum over slices of (1 + n)` bits.

## Timing of the decompressor

One word is taken in every cycle with `tvalid` high. A word is taken only
when `capture` is low.

* **Initial vector.** The counter is zero, so `ms` = broadcast (0). Every FCN
  cell loads the broadcast bit, and the counter loads `n`.
* **Configuration vector.** The counter is non-zero, so `ms` = configuration
  (1). The decoder turns the position into a one-hot mask. Each FCN cell loads
  `cell ^ mask`, and the counter counts down.
* **Shift.** When a word completes a slice (`n = 0`, or the last
  configuration vector), `sck_en` is high in the next cycle. In that cycle the
  finished slice moves through the fan-out into cell 0 of every chain. The
  next initial vector can load into the FCN cells in the same cycle, because
  the chains take the cells' old value.

So a slice with `n` coded bits costs exactly `1 + n` cycles. A pattern of `L`
slices is fully in the chains one cycle after its last word. The FCN cells
form a stage of their own, so the tester can already send the next pattern's
first initial vector in that cycle.

`cck` and `sck` are modelled as clock enables (`cck_en`, `sck_en`) on one
clock. The decompressor does not gate clocks.

### Capture and unload

`capture` is a tester input. It is high for one cycle between patterns, and the
tester sends no word in that cycle; an assertion checks this. In that cycle:

* the chains load `cap_d`;
* the decompressor holds completely;
* a slice waiting for its shift keeps waiting until the next cycle.

While the next pattern shifts in, the scan outputs enter the MISR on every
shift. Each MISR step is `sig <= (sig << 1) ^ so`, reduced by the polynomial
`x^10 + x^3 + 1` (for 10 bits). `misr_clear` resets the signature. To unload
the last response, send `SCAN_LEN` one-word slices (initial vectors with
`n = 0`).

A typical sequence for one pattern:

```
cycle:   0    1    2    3  ...  w-1   w        w+1
tdata:   i1   c1   i2   i3 ...  cN    (next)   --
sck_en:            s1        ...       sL       --
capture:                                        1
```

## Configuring for another circuit

The cluster map is not computed in hardware. It comes from an offline
procedure run on the circuit's test cubes, in two steps:

1. Group directly or inversely compatible chains into clusters. The aim is to
   keep `ceil(log2(clusters))` below `ceil(log2(chains))`.
2. Invert whole clusters where that turns a frequent minority value into the
   majority, which lowers the number of coded bits.

Set these `fcscan_top` parameters from the result:

| parameter | meaning | default |
|---|---|---|
| `N_SC` | internal scan chains | 10 |
| `N_CL` | clusters = decompressor outputs | 4 |
| `SCAN_LEN` | cells per chain (slices per pattern) | 8 |
| `M` | tester channels, `chan_width(N_CL)` | 3 |
| `CLUSTER_OF[N_SC]` | 0-based cluster of each chain | `'{0,2,3,1,3,0,2,1,1,1}` |
| `CHAIN_INV` | inverter in front of chain i (bit i = chain i+1) | c7, c9 |
| `CLUSTER_INV` | inverter on cluster output c | k2 |
| `MISR_POLY` | lower coefficients of the MISR polynomial | `10'h009` |

Bit 0 of every chain or cluster vector is c1 or k1.

To get the basic scheme without clustering, set `N_CL = N_SC`, use the
identity map and clear both inverter masks. `tb_fcscan_basic` does this with
the published ten-chain, four-channel stream, which is 18 words or 72 bits.

## Published benchmark configurations

The published results use five ISCAS'89 circuits (50/100/200 chains) and one
industrial design (100/200/400 chains). Each is given in the basic scheme,
with one decompressor output per chain, and in the improved scheme, with
clusters. The defaults do not hold these sizes. The RTL is parameterized,
though, and `tb_fcscan_workloads` builds all 36 configurations, each with its
published cluster count and `M`.

The real test cubes are not available, so each run uses random cubes. Each run
is given the number of coded bits that the published |T_E| implies, which is
`|T_E|/M - slices`. The scan length is `ceil(flip-flops / chains)`. Each run
must take exactly `|T_E| / M` words, and every specified bit must arrive in its
cell. With this scan length, the coded-bit density implied by Eq. (1) matches
the published density (for example 0.6 % for s13207 at 200 chains and 2.7 %
for the industrial design at 400 chains). The smallest-|T_E| improved
configurations:

| circuit | chains | clusters | M | scan length | slices | |T_E| (bits) |
|---|---|---|---|---|---|---|
| s13207 | 200 | 30 | 5 | 4 | 1004 | 10,290 |
| s15850 | 200 | 14 | 4 | 4 | 592 | 7,072 |
| s35932 | 200 | 27 | 5 | 9 | 315 | 8,045 |
| s38417 | 200 | 22 | 5 | 9 | 1647 | 29,550 |
| s38584 | 200 | 13 | 4 | 8 | 2304 | 21,020 |
| industrial | 400 | 27 | 5 | 21 | 5166 | 292,075 |

## Verification

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=F`.

| testbench | what it checks |
|---|---|
| `tb_fcscan_decoder` | all codes, both enable values, at 4 and 10 outputs |
| `tb_fcscan_fcn` | example slice s2 of the basic scheme; 2000 random cycles against a model |
| `tb_fcscan_dcu` | the 18-word basic stream: ms per word, sck exactly once per slice, in the cycle after its last word; pause; capture hold |
| `tb_fcscan_fanout` | the reduced outputs reproduce every care bit of the 8 original cubes; five published slices of the clustering example; all inputs against the equation |
| `tb_fcscan_scan_chains` | random shift/capture against a queue model |
| `tb_fcscan_misr` | random inputs against polynomial arithmetic; period 1023 |
| `tb_fcscan_decompressor` | the 16-word clustered stream (48 bits), 8 slices by cycle 16; 300 random slices with pauses |
| `tb_fcscan_top` | end to end at default size (see below) |
| `tb_fcscan_basic` | basic scheme, the published final slices of all 8 slices |
| `tb_fcscan_workloads` | the 36 benchmark configurations above |

`tb_fcscan_top` runs the top with its default parameters. It loads the example
pattern and checks that it takes 13 words. It then captures a random response
while the next pattern's first slice waits for its shift. Next it loads a
random pattern with tester pauses and checks the MISR signature of the first
response. Finally it captures again, unloads, and checks the signature once
more. It counts each of these events and fails if any never occurs:

* broadcast words and configuration words;
* slices without coded bits;
* a shift overlapped with an initial vector;
* a capture, and a shift held by a capture;
* a tester pause and MISR steps;
* both broadcast values.

Simulate one testbench with plain Verilator:

```
verilator --binary --timing --assert -Irtl -Itb rtl/fcscan_pkg.sv \
    tb/tb_fcscan_top.sv --top-module tb_fcscan_top -Mdir obj -o sim && obj/sim
```

Replace `tb_fcscan_top` with any other testbench name. `-Irtl -Itb` lets
Verilator find the other modules by file name.

## Where this design departs from, or adds to, the technique

* **Clock enables, not gated clocks.** `cck` and `sck` are enables on one
  clock.
* **Tester handshake.** `tvalid` (pause) and `capture` (hold) are additions.
  The technique describes only continuous loading, and says nothing on
  capture.
* **MISR.** The technique assumes response compaction but does not specify
  it. The Galois form, the polynomial and `misr_clear` are choices of this
  design.
* **Channel count.** It is `ceil(log2(N_CL+1))`, not `ceil(log2 N)`. The two
  differ only when the output count is a power of two, where the 1-based
  position `N` needs one more bit.
* **DCU state.** The DCU uses a down-counter and a "slice pending" flag. It
  does not copy the published gate-level DCU.
* **Reset.** Reset is synchronous and active low. All state resets to 0.
* **Slice order.** The first slice sent ends in the cell nearest the scan
  output.
* **Cluster map.** The map and the inverter choices are parameters. The
  offline clustering and inverter-selection procedures are software and are
  not part of the RTL.
* **Reference data.** The testbenches check the example against the care
  bits of the original cubes and against the fully specified slices of five
  of its slices (s1, s3, s4, s7, s8). The clustered example stream is 16 words
  (48 bits), with slice s4 coded as `010 | 010 100`.

## Files

* `rtl/fcscan_pkg.sv`: mode type, `chan_width`, example constants
* `rtl/fcscan_dcu.sv`, `rtl/fcscan_decoder.sv`, `rtl/fcscan_fcn.sv`,
  `rtl/fcscan_decompressor.sv`: the decompressor
* `rtl/fcscan_fanout.sv`: the inverter fan-out network
* `rtl/fcscan_scan_chains.sv`: the circuit's scan chains
* `rtl/fcscan_misr.sv`: the signature register
* `rtl/fcscan_top.sv`: the top level
* `tb/`: the testbenches listed above. `tb/fcscan_workload_run.sv` is a
  helper that drives one benchmark-sized configuration.
