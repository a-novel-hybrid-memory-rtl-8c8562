# SPHSD packet buffer in SystemVerilog

This is a packet buffer for a router line card, built on the semi-parallel
hybrid SRAM/DRAM (SPHSD) architecture from "A Novel Hybrid Memory Architecture
with Parallel DRAM for Fast Packet Buffers". Packets of Q flows enter at line
rate, one bus word per cycle. Bulk storage is k parallel DRAMs (or DRAM
banks), each with 1/k of the bandwidth. An on-chip tail buffer and head buffer
hide the DRAM access time. Any packet an external arbiter asks for leaves, in
request order, a fixed number of cycles after the request.

Defaults (top `sphsd_packet_buffer`):

- w = 512-bit bus.
- k = 20 DRAMs, the value for a 100 Gbit/s line card with DDR3 SDRAM.
- Q = 256 flows.
- Tail buffer of Q(k+1)/2 = 2688 words.
- Constant read latency of 5188 cycles: the Qk = 5120 slots of the
  architecture plus 68 cycles of pipeline and DRAM margin.

## Main idea

- **Time.** One block is one bus word, and one clock cycle is one time slot.
  A DRAM needs k slots for one write plus one read, so each DRAM accepts one
  block write and one block read every k cycles. With all k DRAMs working in
  parallel, the total bandwidth is exactly twice the line rate, with no
  over-provisioning.
- **Per-flow round robin.** Block n of a flow always goes to DRAM n mod k, on
  both the write side and the read side. Each DRAM keeps one FIFO per flow. At
  most Q blocks can pile up in one DRAM queue, and the tail buffer is
  allocated dynamically over all DRAM queues. So the tail buffer needs only
  Q(k+1)/2 blocks, against Qk for a statically partitioned one.

## Tail part (`rtl/aggregation.sv` to `rtl/tail_read.sv`)

1. **Aggregation.** The aggregation module packs each flow's bytes back to
   back into W/8-byte blocks, with no padding. It keeps one partial word per
   flow. The memory is held twice, so the short-cut can read it in the same
   cycle as new data are merged in.
2. **Dispatch.** When a block is complete, the dispatcher names its DRAM.
3. **Write.** In the same cycle, the write module:
   - takes an address from the free list;
   - writes the block into the tail buffer (dual-port SRAM, one write and one
     read per cycle);
   - links the block into one of Qk linked lists, one per (flow, DRAM), using
     the pointer memory and the queue table.

   The queue table also keeps, per DRAM, a FIFO of flow numbers in block
   arrival order.
4. **Transfer.** Every cycle, the tail transferor scans the DRAM queues round
   robin. It looks for one that holds a block and whose DRAM has been idle for
   k cycles. It pops the order FIFO and tells the read module to move the
   oldest block of that flow to the DRAM. If the block has already left over
   the short-cut, the order entry finds the list empty and is skipped.
5. **Read.** The read module unlinks the block, frees its address, and puts
   the data on `dram_wr_*` one cycle later.

## Head part (`rtl/requester.sv` to `rtl/reassembler.sv`)

- **Requester.** A packet request is a flow and a length in bytes. The
  requester follows the flow's byte stream with the same round-robin pointer
  as the dispatcher, so it knows which DRAM holds each block of the packet. It
  then:
  - cuts the packet into output words, one per cycle, and raises `pr_ready`
    again after the last word;
  - sends a block request to the per-DRAM request buffer for each block the
    packet touches for the first time (up to two per cycle);
  - gives the reassembler one delivery task per word.
- **Head transferor.** Serves every request as early as possible. It counts,
  per (flow, DRAM), the blocks that reached DRAM and were not read back:
  - If the block is in DRAM, it issues a DRAM read, at most one per DRAM every
    k cycles. The data come back tagged with the head-buffer slot.
  - Otherwise, it fetches the block over the **short-cut** path straight from
    the tail part. The tail transferor takes the oldest block of that
    (flow, DRAM) list from the tail buffer, or the partial word if the block
    is still being aggregated.
- **Reassembler.** Exactly `READ_LAT` cycles after a word's task was issued,
  it builds the word from one or two head-buffer slots, shifted by the byte
  offset and cut to the byte count. It also keeps the last block used per flow
  as that flow's *remainder*: the bytes fetched but not yet requested.

### Partial blocks and re-requests

A short-cut of a partial word does not remove it. The block keeps filling and
later goes to DRAM like any other. When the next packet of that flow starts
inside such a block, the requester asks for the block again (the request is
marked `re`).

The head transferor keeps one bit per (flow, DRAM). The bit records whether
the last fetch of that queue was a full block:

- If it was full, the re-request is served from the flow's remainder in the
  head buffer without any memory access (counted as `ev_cached`).
- If it was partial, the block is fetched again, from DRAM or the short-cut.

This way, a flow with light traffic gets its bytes out with no added delay,
and every block is still written to DRAM exactly once.

## Interface and timing

All ports of the top are synchronous to `clk`. `rst_n` is an asynchronous,
active-low reset.

| Port group | Direction | Purpose |
|---|---|---|
| `in_valid/in_flow/in_data/in_nbytes` | in | One word per cycle; 1..W/8 valid bytes from byte 0; packets of a flow are contiguous |
| `pr_valid/pr_flow/pr_len`, `pr_ready` | in / out | Packet request (flow, bytes); the request is taken when `pr_ready` is high |
| `out_valid/out_flow/out_data/out_nbytes/out_sop/out_eop` | out | Requested packet, one word per cycle, exactly `READ_LAT` cycles after its request |
| `dram_wr_*` | out | Write a block to the FIFO of (bank, flow) |
| `dram_rd_*` | out | Read the oldest block of (bank, flow) with a tag |
| `dram_rsp_*` | in | Data with the tag, within `DRAM_RD_LAT` cycles |
| `tail_used`, `*_overflow`, `late`, `ev_*`, `sc_fill` | out | Occupancy, sticky error flags and event strobes |

Each bank gets at most one write and one read every K cycles. The arbiter may
ask for any flow whose packet has fully arrived. Requests of one flow must
follow the arrival order.

## Parameters

| Parameter | Default | Origin |
|---|---|---|
| `W` | 512 | Bus width of the prototype |
| `K` | 20 | 100 Gbit/s with DDR3 (T = 49 ns, 64-byte blocks) |
| `Q` | 256 | Own choice |
| `MAXLEN` | 9216 | Own choice (jumbo frame) |
| `TB_DEPTH` | Q(K+1)/2 = 2688 | Tail buffer bound for dynamic allocation |
| `READ_LAT` | QK + 2K + DRAM_RD_LAT + 8 = 5188 | QK from the architecture, the rest is own margin |
| `ODEPTH`, `RQ_DEPTH` | 2Q | Own choice; the bound is Q per queue |
| `DRAM_RD_LAT` | K | Own assumption about the DRAM controller |

## Departures and limits

- **Head buffer allocation.** The head buffer is a ring of
  2^ceil(log2(2(READ_LAT+MAXW))) = 16384 slots, handed out in request order.
  The paper's head buffer is allocated dynamically, with a bound of
  Q(k+1) = 5376 blocks. The ring is simpler and always safe, but larger. The
  head buffer is therefore only partly as described.
- **Head transferor strategy.** Only the "as early as possible" strategy is
  built. The "as late as possible" option is not.
- **Not designed here.**
  - The DRAMs themselves: `tb/dram_model.sv` is a behavioural stand-in with
    per-flow FIFOs that also checks the access pacing.
  - The external arbiter.
- **Own choices.** The request format, the re-request and remainder
  mechanism, the order FIFOs, the priority of the short-cut over transfers,
  and the reset behaviour are not given by the architecture description.
- **Lint warning.** Verilator reports SYNCASYNCNET on `rst_n`, because the
  reset also disables simulation-only assertions. The affected modules explain
  it in their header comments.

## Verification

Every block has a self-checking testbench `tb/tb_<module>.sv` with a
reference model, random stimulus (`$urandom`) and a watchdog. Each prints
`TB_RESULT checks=.. failures=..`. All of them passed with zero failures.

- `tb_sphsd_packet_buffer` runs the whole buffer at reduced size (W=64, Q=4,
  K=4) for 12000 cycles. It checks every output word and its exact cycle. It
  fails unless these all occurred:
  - DRAM writes and reads;
  - stale order entries skipped;
  - full and partial short-cuts;
  - cached re-requests;
  - request stalls;
  - multi-word packets;
  - overbooked DRAM queues.
- `tb_sphsd_full` runs the top at its default size, with no parameter
  overrides. It passes about 4400 output words with all the mechanisms above.
  The tail buffer peaked at 417 of its 2688 words.

For each block, one deliberately broken copy of the module was also run
against that block's testbench. Every broken copy produced failures.

Simulation with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/sphsd_pkg.sv tb/tb_sphsd_full.sv \
          --top-module tb_sphsd_full -Mdir obj -o sim
obj/sim +verilator+rand+reset+2
```
