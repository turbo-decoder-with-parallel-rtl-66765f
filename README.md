# Parallel turbo decoding with contention-free interleavers

A turbo decoder alternates two soft-in soft-out (SISO) decoders: one for the code in natural order
and one for the code seen through the interleaver. To go faster, the block is cut into P_S
sub-blocks, and P_S SISO decoders work on them at the same time. The hard part is memory access.
In the interleaved half-iteration, each decoder wants a symbol from a scattered address, and
with an arbitrary interleaver two decoders often want the same memory in the same cycle.

A *contention-free* interleaver removes that problem. When P_S decoders each step through their
own sub-block, the P_S symbols they need in any cycle always sit in P_S different memories, and at
the same offset in each one. What remains is to route the words between memories and decoders
cheaply. This RTL has two such datapaths:

* **`lte_turbo_decoder`**: a complete, reconfigurable decoder for the 3GPP LTE turbo code
  (rate 1/3, QPP interleaver, 40 ≤ N ≤ 6144, 8 | N). It uses 1, 2, 4 or 8 SISO decoders
  (P_S), 8 sub-block memories, and barrel-shift networks built from 2-to-1 multiplexers.
* **`ibp_interleaver`**: the memory and interconnect part of a hybrid-parallel decoder with an
  *inter-block permutation* (IBP) interleaver. It has 32 sub-blocks of 128 symbols, with 2 symbols
  per decoder per cycle. It uses a double-prime permutation inside each sub-block and a butterfly
  network between sub-blocks. Its decoder ports are outputs, because the SISO decoders of that
  design are not included.

`parallel_turbo_top` places the two side by side. They share only the clock and the reset.

## LTE decoder: data flow

```
 in_sys/in_p1/in_p2 ──► 8 × subblock_mem (N/8 words each: sys, p1, p2, extrinsic, decision)
                              │ port A: sys+ext             │ port B: parity
          qpp_addr_gen A ─────┤ (bank, offset)              ├──── qpp_addr_gen B (natural order)
          net_ctrl (→SISO)    ▼                             ▼     net_ctrl (→SISO)
                        bs_network 1-2-4            bs_network 1-2-4
                              └───────────┬─────────────────┘
                                          ▼
                    8 × siso_decoder  (active at ports 0, s, 2s, … with s = 8/P_S)
                     alpha'/beta' boundary metrics passed between neighbours
                                          │ extrinsic + decision + tag (bank, offset)
                         net_ctrl (→memory) + bs_network 4-2-1
                                          ▼
                       written back in place to the address it was read from
```

* **Load.** The block arrives in natural order, one symbol per cycle (`in_valid`/`in_ready`).
  Symbol t goes to memory `t div (N/8)` at offset `t mod (N/8)`. Loading also clears the
  extrinsic field.
* **Half-iteration 1** (first constituent code). Address generator A runs with (f1, f2) = (1, 0),
  which is the natural order. The parity comes from p1.
* **Half-iteration 2** (second code). Generator A runs with the block's (f1, f2). Position t of
  the interleaved sequence is read from F(t) = f1·t + f2·t² mod N. The parity comes from p2,
  which is always read in natural order by generator B.
* **In-place extrinsic.** Every SISO output carries a tag: the (bank, offset) it was read from.
  The extrinsic value is written back to that location. One extrinsic memory therefore serves
  both half-iterations, and no separate de-interleaver is needed.
* **Output.** After `cfg_iter` iterations, the decisions stored with the last extrinsic values
  are streamed out in natural order (`out_valid`, `out_bit`, `out_last`), and `done` pulses.

## QPP addressing with one shared offset

Sub-block x of length M = N/P_S starts at symbol xM. With the memory split into 8 banks of N/8
words, the QPP structure gives two facts:

1. `F(xM + j) mod (N/8)` is the same for every x, so all active decoders use **one offset**.
2. Only the bank differs between decoders. The bank is `F div (N/8)`.

`qpp_addr_gen` never multiplies during the run. It keeps every lane in mixed-radix form
(bank, offset) and steps with the usual second-difference recursion:

```
F(t+1) = F(t) + G(t)        G(t+1) = G(t) + 2·f2        (mod N)
```

A mixed-radix add is an offset add with a compare against N/8, plus a 3-bit bank add with carry.
Because 8 | N, the start values of the lanes need only arithmetic modulo 8 on the bank:

```
F(xM) = ( s·f1·x + f2·(N/8)·s²·x²  mod 8 , 0 )       s = 8/P_S
G(xM) = ( (f1+f2) div (N/8) + 2·f2·s·x  mod 8 , (f1+f2) mod (N/8) )
```

Initialisation takes 5 cycles. Three of them are a restoring division by N/8. Together with the
network controller this meets the target of being ready within 16 cycles of a configuration.

## Barrel-shift networks: why 7 select bits are enough

Word k has to move from memory `bank_k` to decoder port k, which is a rotation by
`(k − bank_k) mod 8`. Rotations differ from lane to lane, so a full crossbar would seem to be
needed. For a QPP interleaver with odd f1 and even f2, however, the shift of sub-block x and
that of sub-block x + 2^i agree modulo 2^(i+1). A rotation can therefore be built from three
stages that shift by 1, 2 and 4:

* the shift-1 stage needs **1** select bit for all 8 multiplexers;
* the shift-2 stage needs **2**, one per residue of k mod 2;
* the shift-4 stage needs **4**, one per residue of k mod 4.

`bs_network` builds these three stages from 2-to-1 multiplexers, 24 per network. The multiplexer
at output k in the stage that shifts by 2^i uses `sel[k mod 2^i]`.

* **Towards memory** (`MSB_FIRST=1`): stages 4, 2, 1, with the select bits indexed by the source
  port.
* **Towards the decoders** (`MSB_FIRST=0`): the mirror order 1, 2, 4, with the select bits
  indexed by the destination.

`net_ctrl` takes the select bits straight from the bits of the per-port shift. It uses the
lowest active ports of each residue class. With P_S < 8, the active decoders sit at ports
0, s, 2s, …, so the rule still holds.

A worked example with N = 64, f1 = 7, f2 = 16, P_S = 8, at position 2 of each sub-block:

* memories 0..7 feed decoders {1, 0, 7, 6, 5, 4, 3, 2};
* the shifts are {1, 7, 5, 3, 1, 7, 5, 3};
* the select bits are shift-4 = `0110`, shift-2 = `10` and shift-1 = `1`.

`tb_bs_network` checks this case.

The top checks the routing while it runs. Valid flags travel with the words, and assertions
fire if an active decoder receives a word from a memory nobody read for it, or if two writes
land in the same memory.

## SISO decoder

`siso_decoder` is a Max-Log-MAP decoder for the 8-state LTE constituent code
G = [1, (1+D+D³)/(1+D²+D³)]. It is built from three kinds of combinational unit (three
branch-metric units, three ACS units and one LLR unit):

* **`bmu`**: branch metrics for the four (u, p) labels. A constant is added so that only
  labels equal to 0 contribute. This needs no halving and leaves every metric difference
  unchanged.
* **`acs_unit`**: one radix-2 add-compare-select step for all 8 states, forward or backward.
  The result is normalised by subtracting the maximum and saturated to 9 bits, so metrics stay
  in [−256, 0].
* **`llr_unit`**: the LLR (the best u=0 path minus the best u=1 path, 10 bits), the extrinsic
  value `0.75·(LLR − ys − la)` computed as `(3x) >>> 2` and saturated to 6 bits, and the hard
  decision.

Fixed-point widths: 6-bit received values, 9-bit state metrics, 10-bit LLR, 6-bit extrinsic.

A pass works on windows of 16 symbols; the last window of a sub-block holds the remainder.
Symbols arrive back to back, one per cycle, in ascending order. Three recursions run at the
same time, each on a different window (slot s is cycles 16s … 16s + 15 of the pass):

1. **alpha** runs with the input on window s. Each input and the alpha before it are stored
   in 64-entry buffers (four windows).
2. **Dummy beta (beta_d)** runs backwards over window s − 1 from all-zero metrics, to give the
   starting metrics for window s − 2.
3. **beta** runs backwards over window s − 3 together with the LLR unit, so one output is
   produced per cycle: window 0 first, descending inside each window.

The dummy recursion of the last window starts from *beta'* (below). The real backward
recursion of the last window starts from *beta'_d*: the dummy result over the first window
of the next sub-block's decoder in the same half-iteration.

The decoder keeps the alpha reached at the end of its sub-block and the beta reached at its
start, one set per half-iteration type. In the next iteration, the top hands these to the
neighbouring decoders as their starting metrics (*alpha'* and *beta'*). Otherwise the
sub-block boundaries would start from no information.

* Sub-block 0 starts in state 0.
* The last sub-block ends with all-zero beta, because no tail bits are processed.
* In the first iteration, interior boundaries start from all-zero metrics.

## Timing

| Step | Cycles |
|---|---|
| Load | N |
| One half-iteration | 16·⌈M/16⌉ + 56: address-generator init, read latency, and a SISO pass of 16·(⌈M/16⌉ + 3) |
| Output | N + 2 |

At 275 MHz, 8 iterations of N = 6144 with P_S = 8 take 16 · 824 cycles, which gives about
128 Mb/s (the original chip: 130 Mb/s). The per-half-iteration overhead of about 56 cycles
dominates for small blocks.

## IBP datapath

The IBP interleaver works in two steps:

* **Within a sub-block** (double-prime rule, with P_T symbols per cycle). Even and odd positions
  are permuted separately:
  ```
  pi(y) = 2·((⌊y/2⌋·ε)     mod M/2) + 1     y odd
  pi(y) = 2·((⌊y/2⌋·ε + θ) mod M/2)         y even         (ε, θ) = (15, 23)
  ```
  With ε odd, the P_T = 2 (or 4) symbols taken in one cycle fall in different banks (index
  mod P_T).
* **Between sub-blocks.** In cycle t, decoder x reads sub-block `x XOR c(t)`. The control word
  c(t) comes from a fixed 32-entry periodic sequence (8, 19, 12, 18, …, 16, 7). Its bits above
  log2(N/M) are forced to zero for smaller blocks.

The XOR is exactly what a butterfly network produces when every stage has one shared control
bit. Stage i exchanges positions x and x + 2^(log2 P_S − i). In `butterfly_network`, bit k of
the control word drives the stage with distance 2^k.

`ibp_interleaver` holds 32 memories, each with 2 banks of 64 words, and has one butterfly
network per bank. It delivers 2 symbols to each of the 32 decoder ports per cycle, in natural or
interleaved order.

* The first output comes 2 cycles after `start`.
* A pass lasts M/P_T = 64 cycles.

`ibp_addr_gen` also runs at the second size, with 16 sub-blocks of 256 symbols and P_T = 4.

## Interfaces

`lte_turbo_decoder` (prefix `lte_` on the top):

* **Configuration.** While the decoder is idle, pulse `start` with `cfg_n`, `cfg_f1`,
  `cfg_f2`, `cfg_iter` (1..8) and `cfg_ps_log2` (0..3). The requirements are 8 | N, f1 odd,
  f2 even and N ≤ 6144. They are not checked.
* **Input.** Soft values are 6-bit two's complement, and positive means bit 0. The decoder takes
  N symbols on `in_valid && in_ready`.
* **Output.** N bits on `out_valid`, with `out_last` on the last one. `done` then pulses.
* **Reset.** `rst_n` is an asynchronous, active-low reset.

`ibp_interleaver` (prefix `ibp_`):

* **Configuration.** Set `nsb_log2` = log2(N/128).
* **Load.** Load N/2 words of 2 symbols on `ld_valid`, in natural order.
* **Read.** Pulse `start` with `interleaved`. `out_data[x][j]` is lane j of decoder port x
  while `out_valid` is high.

## Differences from the chip design this follows

* **SISO schedule.** The windows, the dummy recursion and the alpha'/beta'/beta'_d hand-overs
  follow the original LTE decoder. The symbols enter each decoder in ascending order rather
  than window by window in descending order, and the exact slot offsets are this design's.
* **Not built:**
  - the radix-2² and radix-2⁴ SISO decoders;
  - the control and the interlaced two-codeword schedule of the IBP decoders;
  - the IBP extrinsic write-back;
  - the radix-2⁴ full-efficiency QPP decoder with overlapped half-iterations;
  - the on-chip DLL.
* **Own choices:**
  - extrinsic values written back in place, and the memory-to-decoder network as the mirror of
    the decoder-to-memory network;
  - the mixed-radix address recursion;
  - the placement of the active decoders when P_S < 8;
  - metric normalisation and rounding;
  - all handshakes.
* **Interleaver tables.** The LTE interleaver parameters (f1, f2) used in the testbenches come
  from the LTE standard's table: 40 → (3, 10), 128 → (15, 32), 512…4096 → (31, 64),
  6144 → (263, 480).
* **IBP readings.** The IBP double-prime formula is read with the modulus applied before the
  doubling, and the periodic sequence is indexed by the cycle number. Both are readings of a
  terse description.

## Simulating

Each module is in `rtl/<name>.sv`, and its testbench is in `tb/tb_<name>.sv`. Every testbench
checks itself and ends with `TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv -Irtl \
          rtl/turbo_pkg.sv tb/tb_parallel_turbo_top.sv --top-module tb_parallel_turbo_top -o sim
./obj_dir/sim
```

* **`tb_parallel_turbo_top`** runs everything at the default sizes, in about a second.
  - It encodes random blocks with its own LTE turbo encoder and adds noise.
  - It decodes N = 40 … 6144 in all four parallel modes with up to 8 iterations, and requires
    zero bit errors.
  - It checks the half-iteration cycle count (16·⌈M/16⌉ + 56) and initialisation within 16 cycles.
  - It reads 4096- and 512-symbol blocks through the IBP datapath and compares every word with
    a model.
  - It counts how often the parallel modes, network rotations, alpha'/beta' hand-overs,
    butterfly switching and masked control words occur.
* **`tb_lte_turbo_decoder`** is the same LTE test run directly on the decoder.
* **Unit benches.** The unit benches compare against models written in the bench:
  - `tb_siso_decoder`: a bit-exact windowed Max-Log-MAP model, including the latency;
  - `tb_qpp_addr_gen`: every lane against the QPP formula, for all modes;
  - `tb_net_ctrl`: random QPP routing through both network orders;
  - the other unit benches check their blocks against their own formulas.

`turbo_pkg` holds the shared widths, types and trellis functions.
