# CoBloom hashing accelerator (SystemVerilog)

Counting K-mers in a genome with a counting Bloom filter takes two kinds of work:

- For every K-mer, several hashes have to be computed. This is pure arithmetic, and on a CPU
  it is most of the run time.
- For every hash, a counter in a huge table has to be incremented. These are random memory
  accesses, and a CPU's out-of-order cores and prefetchers handle them well.

CoBloom splits the work along that line. An FPGA computes the hashes with deep pipelines
and writes them to its own DRAM. The host copies the hashes back and does the table updates
in software. Host threads and FPGA cores work asynchronously, so a thread updates the table
with one block of hashes while its core is already hashing the next block.

This repository holds the FPGA side of that system as synthesizable SystemVerilog:

- 24 independent hashing cores, one per host thread.
- Each core hashes one 8-byte K-mer per clock, four times, with 32-bit Murmur3.
- A memory interconnect puts all cores on the board's single DRAM channel.
- A command router connects the cores to the host link.

The host software, the PCIe/DMA shell and the DRAM controller are not included. The
testbenches contain a behavioural DRAM model and a small host model.

## How a block of K-mers is processed

1. The host writes a block of K-mers into FPGA DRAM. Each K-mer is a 64-bit word, and eight
   of them fit in one 512-bit memory word.
2. The host sends a command (`cmd_t`) to one core. The command gives the source address, the
   destination address, the number of K-mers, a seed and a mask.
3. The core's **stream reader** fetches the block in bursts. It hands out one K-mer per clock.
4. The **mask stage** ANDs each K-mer with the job's mask. Bits that are not part of the K-mer
   are cleared this way.
5. Four **Murmur3 units** hash the masked K-mer in lock-step. Unit *i* uses seed `seed + i`,
   which gives the four independent hash functions that a Bloom filter needs.
6. The **stream writer** packs the four hashes into a 128-bit record, and four records into a
   512-bit beat. It writes them to the destination: record *j* lands at `dst + 16*j`, with
   hash *i* in bytes `4i..4i+3`.
7. When every write has been acknowledged, the core sends a response (`resp_t`). The response
   gives the core's index, the K-mer count and the number of cycles the job took. The host
   then copies the records to its memory and increments the counters at `hash mod table_size`.

A core takes one job at a time. `cmd_ready` stays low from the moment a job is accepted
until its response has been taken.

## The Murmur3 pipeline (`murmur3_pipe`)

Murmur3_x86_32 of an 8-byte key has two 4-byte blocks and no tail. Each block is mixed into
the state with multiplications, rotations and XORs, and then a finalisation mix runs. The
pipeline has seven stages, with at most one 32-bit multiply in any stage:

| stage | work |
|---|---|
| 1 | `k0 *= C1`, `k1 *= C1` (both blocks in parallel) |
| 2 | `k = rotl(k,15) * C2` for both blocks |
| 3 | `h = rotl(seed ^ k0, 13) * 5 + 0xe6546b64` |
| 4 | `h = rotl(h ^ k1, 13) * 5 + 0xe6546b64` |
| 5 | `h ^= 8; h ^= h >> 16; h *= 0x85ebca6b` |
| 6 | `h ^= h >> 13; h *= 0xc2b2ae35` |
| 7 | `h ^= h >> 16` |

Here `C1 = 0xcc9e2d51` and `C2 = 0x1b873593`. The key's low 32 bits are the first block, as a
little-endian host would store the bytes.

All stages advance together on `en`. In `hash_datapath`, `en` is low only while a finished
record waits at the output. One signal therefore stalls the mask stage and all four lanes
together, and the datapath needs no buffers inside it. Latency from a K-mer entering the
datapath to its record leaving is 8 cycles: 1 for the mask stage and 7 for the hash.

Each lane has six full 32-bit multiplies; the two `*5` steps are shifts and adds. Four lanes
therefore need 24 multiplies. On a device where a 32×32 multiply takes three DSP slices, that
makes 72 DSP slices per core, which is the per-core DSP count reported for the deployed design.

## Keeping the pipeline fed (`stream_reader`, `stream_writer`)

At full rate a core reads one 512-bit beat every 8 cycles and writes one every 4 cycles.

**Reader.** The reader uses credit-based flow control:

- It requests a burst only if its FIFO has room for every beat of that burst, counting beats
  that are already requested but not yet consumed.
- As a result it can accept read data at any time (`r_ready` is always 1), and a slow core
  never blocks the shared read-data channel.
- Bursts hold at most `BURST_BEATS` (8) beats and are cut at 4 KB page boundaries.
- Addresses must be 64-byte aligned.
- Unused K-mer slots in the last beat are dropped.

**Writer.**

- The writer addresses a burst only once all of that burst's beats are already in its FIFO.
  Write data therefore follows the address with no gaps, and the interconnect can give the
  write-data channel to one core per burst without risk of a deadlock.
- A partial last beat carries byte strobes only for the records it holds.
- The writer reports busy until every burst has been acknowledged.
- If the writer's FIFO fills up, `in_ready` falls and the hash pipeline stops (a *hash stall*).

## Sharing one DRAM channel (`mem_interconnect`) and the host link (`cmd_router`)

All cores share one DRAM channel, with separate read and write sides.

**Read side.**

- A round-robin arbiter picks one read request per cycle and replaces its ID with the core's
  index.
- Read data goes back to the core that the ID names.

**Write side.**

- A round-robin arbiter picks a write burst.
- The winning core keeps the write-data channel until the last beat of its burst.
- Write responses are routed by ID.

A request that the memory has not yet accepted keeps its grant, so the address never changes
while it waits.

**Host link.** The command router sends each command to the core named in its `core` field.
While that core is busy, the host link stalls. Commands for a core index that does not exist
are accepted and dropped. Responses from the cores are merged round-robin onto the host link.

## Interfaces

All types are in `rtl/cobloom_pkg.sv`.

- **Host link** (`cobloom_top`): `cmd_valid/cmd_ready/cmd` and `resp_valid/resp_ready/resp`,
  both valid/ready handshakes.
  - `cmd_t` = {core, src_addr, dst_addr, n_kmers, seed, mask}.
  - `resp_t` = {core, n_kmers, cycles}.
- **DRAM port**: a simplified AXI4-style bus with five channels, each a valid/ready handshake:
  - `ar`: id, 64-bit byte address, length in beats minus 1.
  - `r`: id, 512-bit data, last.
  - `aw`: same fields as `ar`.
  - `w`: data, 64-bit byte strobe, last.
  - `b`: id.

  Bursts of the same ID return in order. Read data is accepted at any time.
- **Reset**: `rst_n`, asynchronous, active low. It clears all control state. Data registers
  and FIFO storage are not reset.

Parameters of `cobloom_top`:

| parameter | default | meaning |
|---|---|---|
| `N_CORES` | 24 | cores; one per host thread in the deployment |
| `BURST_BEATS` | 8 | maximum beats per DRAM burst |
| `RD_FIFO` | 32 | reader buffer, in 512-bit beats |
| `WR_FIFO` | 16 | writer buffer, in 512-bit beats |

The workload constants are fixed in the package: 64-bit K-mers, four 32-bit hashes and a
512-bit memory word.

## Performance

These figures are from simulation, with a DRAM model that has 20 to 30 cycles of read latency.

- One core with an ideal memory hashes 1000 K-mers in 1036 cycles. That is one K-mer (four
  hashes) per clock, plus about 36 cycles to fill and drain the pipeline.
- The full 24-core system, given 200 K-mers per core while the memory randomly stalls 20% of
  the time, finishes all 4800 K-mers in 1776 cycles. At that point the single write channel
  is the limit: it carries four records per clock.
- `tb_bloom_workload` limits the DRAM model to 93 beats per 100 cycles, which is a 14.9 GB/s
  DDR4 channel seen through a 512-bit port at 250 MHz. All 24 cores then hash 49,152 K-mers
  at 2.39 K-mers (9.56 hashes) per cycle, about 2.4 G hashes/s at 250 MHz. That is 96% of
  what the channel can carry at 24 bytes per K-mer (8 read, 16 written).
- At 250 MHz one core running at full rate needs 2 GB/s of reads and 4 GB/s of writes, so a
  handful of cores already fills the channel. Adding more cores raises power, not throughput.
  The host's table updates remain the slower half of the system: the complete system,
  including those updates, has been reported at about 500 M hashes/s.

## Where this RTL makes its own choices

The published design was generated with a hardware framework. Its stream and interconnect
logic is not described in detail, so the following are choices made here:

- **Bus and command formats.** The bus widths and the AXI-like bus are choices made here. So
  are the command and response fields.
- **Mask stage.** Only its position in the pipeline is known. Reading it as an AND with a
  host-supplied mask is an interpretation.
- **Seeds.** Hash *i* uses seed `seed + i`.
- **Buffers.** The burst length and buffer depths are small defaults. The deployed cores use
  about 18.6 UltraRAM blocks each, which suggests much deeper stream buffers. Raise `RD_FIFO`
  and `WR_FIFO` if you need to match that.
- **Arbitration.** The interconnect uses round robin and moves one write burst at a time.
- **Bandwidth figure.** The deployment reports a per-core bandwidth of 3.7 GB/s. This design
  needs 6 GB/s per core at full rate (8 bytes in and 16 bytes out per K-mer), so the two
  figures are not directly comparable.
- **Not included.** There is no DMA engine and no PCIe logic. Moving the hashes to host memory
  is left to the platform shell.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`. All hash values are compared against a separately written
sequential Murmur3 in `tb/mm3_ref_pkg.sv`. `tb_murmur3_pipe` also checks fixed vectors that
come from a software Murmur3 which reproduces published reference values.

| testbench | what it establishes |
|---|---|
| `tb_murmur3_pipe` | fixed vectors, random keys and seeds, 7-cycle latency, stalls |
| `tb_kmer_mask` | masking under random back-pressure |
| `tb_hash_datapath` | four-seed records; 1000 K-mers within 1009 cycles; back-pressure |
| `tb_stream_reader` | data, page-split bursts, partial and zero-length jobs, rate |
| `tb_stream_writer` | placement, byte strobes of a partial beat, memory stalls, rate |
| `tb_mem_interconnect` | three generators under contention: read routing, whole-burst writes, responses |
| `tb_cmd_router` | routing, dropped commands, round-robin responses |
| `tb_accel_core` | whole jobs; the cycle count in the response; one K-mer per clock |
| `tb_cobloom_top` | 4 cores, 13 jobs, host-side counting Bloom filter; requires every mechanism below at least once |
| `tb_cobloom_full` | all 24 cores at default parameters, one block each |
| `tb_bloom_workload` | the insertion workload on 24 cores with a bandwidth-limited channel: hashes, counting Bloom filter, false-positive rate, throughput |

`tb_cobloom_top` counts the following events and fails if any of them never happens:

- several cores busy at once
- read contention
- DRAM back-pressure
- a stalled hash pipeline
- a partial last beat
- a burst cut at a page boundary
- a command waiting for a busy core
- responses competing for the host link

The DRAM model (`tb/dram_model.sv`) is behavioural. It reports bursts that cross a page,
fall outside memory, or carry a wrong `last` flag as violations.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_cobloom_top \
    -y rtl -y tb +libext+.sv rtl/cobloom_pkg.sv tb/mm3_ref_pkg.sv tb/tb_cobloom_top.sv
./obj_dir/Vtb_cobloom_top
```

Replace the module and file names to run another testbench. The testbenches take seconds;
`tb_cobloom_full` spends most of its time compiling.
