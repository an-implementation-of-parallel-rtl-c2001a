# Parallel DNA sequence matching SoC

A DNA base is one of four letters, so it fits in two bits. A 64-base stretch of
DNA is then a 128-bit word. You can compare it with another 64-base stretch in
one clock: XOR the two words and count the bits that agree. This design builds
a system on chip around that operation. The system has:

- A general-purpose **master processor** (outside this RTL). It splits a long
  *source* sequence P into segments, hands one segment to each matcher, and
  merges what the matchers report.
- Four **matchers**. Each one slides a 64-base *target* sequence T along its
  segment, one base per clock, and scores every position. It records
  `[similarity, position]` for each position whose score is above a
  user-given threshold.
- A shared 128-bit **on-chip bus** with an arbiter, an **on-chip memory**, a
  **DMA controller**, and a port to **external memory** (outside this RTL).

This is *rough matching*: the goal is every position where P is similar enough
to T. Exact matching is the special case where the threshold is one below the
full score.

The architecture, block structure, register set, widths and memory sizes follow
the published design: L. Yan, D. Wan, T. Chen, Z. Huang, "An Implementation of
Parallel Accelerating System on Chip for DNA Sequence Matching". That design
was built on a Virtex-4 FPGA with a hard PowerPC405 and a CoreConnect PLB.
Where the publication gives only names or purposes, this RTL makes its own
choices. Each choice is listed in "Departures and choices" below.

## Data layout

| Base | Code |
|------|------|
| A    | 00   |
| C    | 01   |
| G    | 10   |
| T    | 11   |

A sequence is a little-endian bit stream: base *i* occupies bits `[2i+1:2i]`,
so 128-bit word *w* holds bases `64w … 64w+63`. The same layout is used in
memory, in the source banks and in the target register.

## The matcher

```
            bus (slave)                         bus (master)
                 |                                   |
          matcher_ipif --- matcher_regs ---- matcher_dma
                               |   (config)     |        \
                               v                v         \
        result_mem <--- matcher_controller <--- source_mem  |
            ^  [sim,pos]      |   ^                        |
            |                 v   | similarity             |
            +-----------  matcher_comparator               |
            +-------------------------------------------- (transmit)
```

### Comparator: what "similarity" means

`similarity = popcount( ~(window ^ target) & mask & length_mask )`

This counts the **bits** (not bases) where the source window and the target
agree. Only bits where `Seq_Mask` is 1 count, and only bits below
`Seq_Reg_Data_Bits`. The maximum is 128. For a full-length, unmasked target,
a random window scores 64 ± 5.7 on average. A copy of the target with *m*
changed bases scores at least 128 − 2*m*. The result is registered, so it
comes one clock after the window.

### Controller: the sliding window

The controller holds two consecutive words of a source bank, `cur` and `nxt`.
Each clock it presents `({nxt,cur} >> 2*offset)[127:0]`, which is the 64-base
window starting at the next base. When the offset wraps past 63, `nxt` becomes
`cur`. The following word arrives from the memory in that same clock: the read
was issued one clock earlier. A window never needs `nxt` at offset 0, so no
clock is lost.

Consequences worth knowing:

- **Throughput**: one 128-bit comparison per clock per matcher. A scan of *N*
  words takes `(N−1)·64 + 1` clocks plus 5 clocks of overhead (2 to prefetch,
  2 to drain the comparator, 1 for the `done` pulse). At the default
  N = 2048 that is 131,009 clocks, about 1.3 ms at 100 MHz.
- **Windows stay inside the bank.** N words give `(N−1)·64+1` positions. The
  last 63 positions of the last word would need data past the bank. So
  segments given to different matchers, or to successive bank loads, must
  **overlap by one word** (stride `N−1` words). Then every position of P is
  scanned. A position on the seam is scanned twice, and the merge step must
  drop the duplicate.
- **Threshold**: a window is recorded when `similarity > Seq_Similarity`
  (strictly greater).
- **Position**: `Redirect_Addr·64 + relative base offset`, 32 bits.
  `Redirect_Addr` is the word address of the bank's first word within the
  whole of P, so positions come out absolute, in bases.
- **Result overflow**: a result bank holds 256 entries. Further hits are
  dropped, `INT_SOURCE[3]` is set, and the stored count stays at 256.

### Local memories (ping-pong)

- **Source memory**: 64 KB, two banks of 2048 × 128 bits.
- **Result memory**: 4 KB, two banks of 128 × 128 bits. Each word holds two
  64-bit entries `{24'b0, similarity[7:0], position[31:0]}`, the even entry in
  the low half.

The local DMA can load one source bank while the controller scans the other.
It can also store one result bank while the other fills.

### Registers (per matcher, 64-bit, on the low half of the bus word)

| Offset | Name | Use in this RTL |
|--------|------|-----------------|
| 0x00 | MODER | write bit0=1: start a scan (ignored while busy); read {dma_busy, scan_busy} |
| 0x08 | INT_SOURCE | [0] scan done, [1] receive done, [2] transmit done, [3] result overflow; write 1 to clear |
| 0x10 | INT_MASK | irq = OR(INT_SOURCE & INT_MASK) |
| 0x18 / 0x20 | Seq_Reg_Data_h / _l | 128-bit target |
| 0x28 | Seq_Reg_Data_Bits | target length in bits (reset 128) |
| 0x30 | Seq_Similarity | threshold |
| 0x38 / 0x40 | Seq_Mask_h / _l | 128-bit compare mask (reset all ones) |
| 0x48 | MATCHER_Mode | [0] source bank to scan, [1] result bank to fill |
| 0x50 | Src_mem_state | [15:0]/[31:16] valid words in source bank 0/1 (set by the receive DMA, writable); [47:32]/[63:48] entries in result bank 0/1 (read-only) |
| 0x58 | Redirect_Addr | [23:0] bank 0, [55:32] bank 1: word address of the bank in P |
| 0x1000 | Receive_BD | write starts a load: [15:0] words, [16] bank, [63:32] bus byte address |
| 0x1008 | Transmit_BD | write starts a store of result words, same layout |

## The SoC

`dna_soc` parameters: `N_MATCHERS=4`, `SRC_WORDS=2048`, `RES_WORDS=128`,
`OCM_WORDS=4096`.

| Address | Slave |
|---------|-------|
| 0x0000_0000 | on-chip memory, 64 KB (`onchip_mem`) |
| 0x1000_0000 + k·0x1_0000 | matcher k registers |
| 0x2000_0000 | DMA controller (`sys_dma`) |
| 0x8000_0000 | external memory, 64 MB window (`ext_req`/`ext_rsp` ports) |

The bus masters are the processor (`ppu_req`/`ppu_rsp` ports), the four
matcher DMAs and the DMA controller.

**Bus protocol** (`dna_pkg::bus_req_t`/`bus_rsp_t`): one transfer is one
128-bit beat. A master raises `req` with `we`, `addr` and `wdata`. It holds
them until it sees `ack`; read data comes with `ack`. A master may keep `req`
high through the `ack` clock, and slaves ignore a request in their own `ack`
clock.

`onchip_bus` runs each transfer in three steps:

1. It arbitrates (round robin, `bus_arbiter`) in an idle clock.
2. It routes the winner to the slave whose `(addr & MASK) == BASE`.
3. It returns to idle after the `ack`.

A transfer therefore takes at least 3 clocks. Unmapped addresses are
acknowledged with zero data and counted on `bus_decode_errors`.

**DMA controller** registers: 0x00 source, 0x08 destination, 0x10 length in
words, 0x18 control/status. Writing bit0 starts a copy, bit1 enables the
interrupt, and a write clears `done`. A read returns {ien, done, busy}. The
controller copies by reading and then writing each word.

Outside this RTL, and brought out as ports:

- the processor;
- the DDR memory and its controller;
- the interrupt controller (`matcher_irq`, `dma_irq`).

The publication's slower peripheral bus and its peripherals are not modelled:
the bridge to it, Ethernet, UART and LCD controller.

## Using it: one matching job

1. In each matcher, write the target, `Seq_Reg_Data_Bits`, the mask, the
   threshold and `INT_MASK`.
2. Split P into segments of `SRC_WORDS` words with a stride of
   `SRC_WORDS−1`. Write `Receive_BD` so that matcher k loads segment k into
   bank 0. Wait for `INT_SOURCE[1]`.
3. Write `Redirect_Addr` (segment start word per bank) and `MATCHER_Mode`,
   then write `MODER=1`. While the scan runs, you can already post a
   `Receive_BD` for the next segment into the other bank.
4. On `INT_SOURCE[0]`, read the entry count from `Src_mem_state`. Post a
   `Transmit_BD` to move the result bank to memory.
5. Merge in software: take the union of entries by position (this drops seam
   duplicates), then pick or filter by similarity.

A target longer than 64 bases is handled in software. Split it into 64-base
pieces, scan each piece, and combine the per-piece scores by position. The
hardware only ever compares 128 bits against 128 bits.

Workload sizes: a 4 MB source (16.8M bases) takes about 33 bank loads per matcher (129 overlapping segments).
With four matchers it is about 4.2M scan clocks per 64-base target piece,
about 42 ms at 100 MHz, plus DMA time. A 40 MB source takes ten times that. A
1024-byte target is 64 pieces. All of these fit the 64 MB external window and
the 32-bit position field.

## Departures and choices

How far each block follows the publication:

- **Given there**: the structure, the register names, offsets and widths, the
  128-bit compare per clock, and the 64 KB + 4 KB local memories.
- **Given only as a purpose**: the controller, the local DMA, the bus
  interface, the on-chip memory and the DMA controller. Their insides here are
  the simplest logic that does that job.
- **Named only**: the arbiter.

Specific points:

- **Agreement, not difference.** The publication XORs the words and then
  "counts the ones" to get "which bits are the same". Counting the ones of an
  XOR would count *differences*. This RTL counts agreements (the zeros of the
  XOR), which is what "similarity" and the threshold test need.
- **Sliding by one base per clock** is this design's reading. It combines "128
  bits compared every clock" with reported match positions that are not
  multiples of 64.
- **Position format.** `Redirect_Addr` is 24 bits, but reported positions need
  about 29 bits. So the redirect address is taken as a 128-bit-word address and
  scaled by 64.
- **Transmit_BD address.** It is listed at the same address as Receive_BD in
  the publication. Here it sits at 0x1008.
- **Own choices:**
  - the meaning of MODER and MATCHER_Mode bits;
  - the interrupt sources;
  - the Src_mem_state fields;
  - the descriptor bit layout;
  - the result-entry layout;
  - overflow handling;
  - the address map;
  - the on-chip memory size (64 KB);
  - the single-beat bus protocol, which stands in for CoreConnect PLB;
  - round-robin arbitration.
- **Not modelled:** the publication mentions 8-bit memory-state test codes
  (`[Src_Mem_State, Rsut_Mem_State]`) without defining them.
- **Reset:** an active-low asynchronous reset clears all control state.
  Memories are not reset.

## Verification

Every module has a self-checking testbench in `tb/`. Each one ends with
`TB_RESULT checks=N failures=M` and has a watchdog.

- `tb_matcher_comparator`: random and corner-case windows, masks and lengths
  against a bit-by-bit count; one-clock latency.
- `tb_matcher_controller`: controller + comparator + memories. Checks every
  result entry against a sliding reference, exact scan time (windows + 5),
  both banks, redirect, one-word banks and overflow.
- `tb_matcher_regs`, `tb_matcher_ipif`, `tb_source_mem`, `tb_result_mem`,
  `tb_matcher_dma`, `tb_bus_arbiter` (including a starvation bound),
  `tb_onchip_bus` (three concurrent masters, three slaves, decode errors),
  `tb_onchip_mem` and `tb_sys_dma`.
- `tb_matcher`: a whole matcher. Checks a ping-pong load during a scan, two
  scans and both result banks transmitted, against a reference.
- `tb_dna_soc`: the whole SoC at its **default sizes**.
  - It builds a source of about 1M bases (8 segments with one-word overlaps)
    with planted, mutated copies of the target.
  - It dispatches to four matchers, scans both banks of each with ping-pong
    loading, and moves the results to on-chip memory. The DMA controller then
    copies them to external memory.
  - It merges, removing the duplicates on the seams, and checks every entry,
    the counts and the best `[similarity, position]`.
  - It checks that the four scans ran in parallel (all done within one scan
    time).
  - It then forces a result overflow in every matcher.
  - It counts, and requires at least once: bus contention, scan/DMA overlap,
    overflow, interrupts, the DMA-controller copy and seam duplicates.
  - It runs in about 10 s.
- `tb_workloads`: the evaluated workloads on the default SoC. It runs in
  about 1 minute.
  - A 64-base target against a full **4 MB source** (16.8M bases, 129
    overlapping segments, ping-pong loading). It runs 16,777,153 windows in
    4.21M clocks, 3.99 windows per clock for the four matchers. Every merged
    hit is checked against a reference.
  - A **1024-byte target** (4096 bases) split into 64 pieces against a 64 KB
    source. The per-piece hits are combined by target start position, and the
    best starts must be the planted copies.
  - The 40 MB source, and the 1024-byte target against megabyte sources, are
    not simulated: 64 pieces × 4 MB alone is about 270M clocks.

`tb/tb_bus_master.sv` (processor stand-in) and `tb/tb_ext_mem.sv` (external
memory model with configurable latency) are used only by testbenches.

To simulate with Verilator (5.x), from the directory that holds `rtl/` and
`tb/`:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv -Irtl \
  rtl/dna_pkg.sv tb/tb_dna_soc.sv --top-module tb_dna_soc
./obj_dir/Vtb_dna_soc
```

Use the same command with another `tb_*` for a single block. Testbenches of
single blocks use reduced memory sizes through parameters. The top-level test
uses the defaults.

## Files

- `rtl/dna_pkg.sv`: bus structs, base encoding, register offsets, address map.
- `rtl/dna_soc.sv`: top.
- `rtl/onchip_bus.sv`, `rtl/bus_arbiter.sv`: bus and arbiter.
- `rtl/onchip_mem.sv`: on-chip memory.
- `rtl/sys_dma.sv`: DMA controller.
- `rtl/matcher.sv`: one matcher, built from `matcher_ipif.sv`,
  `matcher_regs.sv`, `matcher_controller.sv`, `matcher_comparator.sv`,
  `source_mem.sv`, `result_mem.sv` and `matcher_dma.sv`.
