# Statistical wear leveling for PCM — on-chip RTL

Phase-change memory (PCM) cells survive only about 10^8 writes. A program, or an attacker,
that keeps rewriting one block could wear out a frame in minutes. Wear-leveling schemes
therefore remap blocks to randomly chosen frames from time to time. Each remap costs extra
reads and writes, though. Older schemes trigger remaps on the raw write count, as if every
write rewrote the same block. That keeps the worst case safe but charges ordinary programs
for it.

Statistical wear leveling (SWL), from the paper "Statistical Wear Leveling for PCM:
Protecting Against the Worst Case Without Hurting the Common Case", remaps in proportion to
the **overwrite rate** instead. Real programs rewrite a block rarely: the typical distance
between two writes to the same block is well over 10,000 writes. SWL does not watch every
write. It samples about one write in 1,165 and measures how long each sampled block goes
before it is written again. From that estimate it works out how many random block swaps the
region owes. An attack drives the estimate to its maximum and the swaps to their maximum.
Normal programs pay about a tenth of a percent in extra writes.

This repository holds synthesizable SystemVerilog for the SWL logic of one PCM chip. It has
16 banks of 512 Mb, grouped four at a time around a shared 13-entry sample buffer. It also
holds self-checking testbenches for every module and for the whole chip.

## What happens on a write

```
 host request ──► swl_chip ── address decode, nack while swapping
                      │
                      ▼ (one of 4)
                 swl_region ─────────────────────────────────────────────┐
                   │  swl_sampler        sample this write?  (900 / 2^20)│
                   │  swl_sample_buffer  13 sampled addresses + distances│
                   │  swl_rate_estimator total distance, sample count,   │
                   │                     batch size per population       │
                   │  swl_swap_trigger   6 completed samples → a batch   │
                   │  swl_swap_engine    2 reads + 2 writes per swap     │
                   │  4 × swl_bank_remap pointer, old/new key, XOR map   │
                   └──► bank array ports (physical frame numbers) ───────┘
```

1. **Translation.** The request's block number is mapped to a physical frame by its bank's
   `swl_bank_remap` (`frame = block XOR key`). The request goes to that bank's array port.
2. **Sampling.** Every accepted write to a region draws from an LFSR. The write is sampled
   when the low 20 bits are below 900, so 900 writes are sampled per 2^20 on average.
3. **Distance measurement.** The sample buffer compares each write with every held sample.
   A match means the block was overwritten, and the sample completes with its distance. A
   sample that reaches the cut-off of 4000 writes completes with distance 4000. When a new
   sample finds the buffer full, the oldest one is pushed out and completes with the
   distance it has reached so far.
4. **Accumulation.** A completed sample adds `max(distance − 200, 1)` to the region's total
   distance and 1 to its sample count. The 200 is the allowed error ε. Subtracting it makes
   the estimate err towards more overwrites, never fewer.
5. **Swap scheduling.** Every 6 completed samples release a batch of swaps. The swap engine
   performs them one at a time, handing them to the region's four banks in turn. While any
   swap is owed or running, the chip refuses every request with `req_nack`, and the memory
   controller resends it later.

## The estimate and the batch size

Measured over one population of 2^20 writes:

    sampleOverwriteRate = sample count / total distance

The paper sets one swap per `numPopulation / numFrames` estimated overwrites. Converted into
completed samples, that is one swap every

    sampleSwapThreshold = numSamples / numFrames / sampleOverwriteRate

completed samples. For a region shared by four banks this is usually a fraction: numFrames
is 2^22 and numSamples is 900. The swap count therefore fires every `SWAP_THR` = 6 completed
samples, and each firing releases

    batch = ceil( 6 · numFrames · count / (numSamples · total) )

swaps. `swl_rate_estimator` computes this with a serial divider once per population (about
40 cycles). The result applies for the whole next population. Examples at the defaults:

| situation | rate | sampleSwapThreshold | batch per 6 samples | swaps per write |
|---|---|---|---|---|
| ordinary program (distances ≥ cut-off) | 1/3800 | 0.815 | 8 | ≈ 0.001 |
| paper's example | — | 0.86 | 7 | — |
| one block rewritten continuously | 1 | 0.000215 | 27,963 | ≈ 4 (400 %) |

Two cases use a fixed batch of 8, the value for the lowest rate the estimator can report,
1/(4000−200): before the first population ends, and after a population in which no sample
completed.

## Block swaps and the running pointer

Each bank has a 20-bit running pointer `p`, an old key and a new key. One swap step at
pointer `p` exchanges frames `p ^ k_old` and `p ^ k_new`. The block that leaves
`p ^ k_new` is `p`'s partner `q = p ^ k_old ^ k_new`. Block `p` reaches its new frame in
that step, and so does its partner. Two rules follow:

* block `a` is looked up with the new key if `a < p` **or** its partner is below `p`, and
  with the old key otherwise;
* a step whose partner is already below the pointer has nothing to move. It only advances
  the pointer (`ev_skip`).

When the pointer wraps, the new key becomes the old key and a fresh key is taken from the
bank's own LFSR. A swap costs two reads and two writes.

XOR mapping also keeps DRAM-style row locality. The upper key bits move a whole 32-Kb row to
another row, and the lower 6 bits permute the 64 blocks within it. The key is declared as a
`{row, blk}` struct to make that split visible.

Statistics are shared by four banks, but blocks never leave their own bank. Swaps must stay
inside a bank so that the memory controller can still schedule bank by bank.

## Host interface and timing

| signal | meaning |
|---|---|
| `req_valid`, `req_we`, `req_addr[42:0]`, `req_wdata[511:0]` | request; address bits [19:0] = block in bank, [21:20] = bank in region, [23:22] = region |
| `req_nack` | same cycle: refused because a swap is owed or running; resend later |
| `req_accept` | same cycle: the addressed bank took the request |
| neither | bank busy; hold the request |
| `rsp_valid`, `rsp_data` | read data, in order |
| `mem_*[15:0]` | one request/ready port per bank array, physical frame numbers, in-order read data |
| `busy`, `ev_*`, `batch`, `pending` | per-region monitoring: swap activity, event pulses, batch size, swaps owed |

Sample-buffer completions are registered, so the statistics lag the write by one cycle. A
skipped swap step takes 2 cycles. A full swap takes 5 cycles plus the array's read and write
latencies. A swap starts only once no host read of that region is still outstanding.

## Parameters (defaults)

| parameter | default | meaning |
|---|---|---|
| `P_CUTOFF` | 4000 | distance at which a sample completes |
| `P_EPSILON` | 200 | allowed error, subtracted from every distance |
| `P_NUM_SAMPLES`, `P_POP_W` | 900, 20 | samples per population of 2^20 writes |
| `P_DEPTH` | 13 | sample-buffer entries (overflow probability < 0.01 %) |
| `P_TAG_W` | 43 | block-address bits held per entry |
| `P_SWAP_THR` | 6 | completed samples per batch |
| `P_FRAME_W` | 20 | 2^20 frames of 512 bits per bank |
| `P_ROW_BLK_W` | 6 | 64 blocks per row |
| `NREGIONS`, `NBANKS_REGION` | 4, 4 | sample buffers per chip, banks per buffer |
| `P_DATA_W` | 512 | bits per block held by one chip |
| `P_BATCH_W` | 32 | batch and owed-swap counter width |

All of these numbers come from the paper, except `P_BATCH_W` and the bit assignment of the
address. The constants are in `swl_pkg`.

## Choices made here that the published scheme leaves open

* **Random source**: 32-bit Galois LFSR (x^32+x^22+x^2+x+1). The sampler advances it 32
  shifts per draw. With one shift per draw, consecutive values are shifted copies of each
  other, and the sample count came out noticeably biased.
* **Partner rule** for XOR keys, described above. The key after reset is 0, so the mapping
  starts as the identity.
* **Batch size rounding**: rounded up, so the region never swaps less than the estimate
  asks for.
* **Overflowed samples** also have ε subtracted. The paper adds their current distance,
  which is already an underestimate. Subtracting ε is the more conservative reading.
* **Swap count** is 4 bits instead of 3, because up to three samples can complete on one
  write: an overwrite, a cut-off and an overflow.
* **Round-robin assignment** of a region's owed swaps to its four banks. Over one
  generation of 2^21 estimated overwrites, each bank then receives a full sweep.
* **Chip-wide nack**, rather than per region or per bank. Plus an accept/hold handshake for
  a bank that is still busy with its previous access.
* **Exact division** once per population, instead of the power-of-two approximation the
  paper suggests as a simplification.
* All state is reset asynchronously by `rst_n` (active low).

Not included: the PCM array itself (cells, sensing, row buffers) and the memory controller.
The testbenches model both.

## Files

| file | content |
|---|---|
| `rtl/swl_pkg.sv` | constants, swap-engine state type |
| `rtl/swl_lfsr.sv` | LFSR |
| `rtl/swl_sampler.sv` | sampling decision |
| `rtl/swl_sample_buffer.sv` | 13-entry associative FIFO with distances |
| `rtl/swl_divider.sv` | serial divider |
| `rtl/swl_rate_estimator.sv` | population counter, totals, batch size |
| `rtl/swl_swap_trigger.sv` | swap count and owed swaps |
| `rtl/swl_bank_remap.sv` | per-bank pointer, keys, XOR map |
| `rtl/swl_swap_engine.sv` | swap state machine |
| `rtl/swl_region.sv` | one shared buffer and four banks |
| `rtl/swl_chip.sv` | top level: 4 regions, 16 banks |
| `tb/pcm_bank_model.sv` | behavioural bank array (sparse, with per-frame wear count) |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_swl_chip_full` and `tb_swl_workloads` |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. To build and run
one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/swl_pkg.sv rtl/*.sv tb/pcm_bank_model.sv tb/tb_swl_chip.sv \
    --top-module tb_swl_chip -o sim
./obj_dir/sim +verilator+rand+reset+2
```

What the testbenches establish:

* **Unit tests** compare each module cycle by cycle with an independent reference model in
  the testbench. The reference for the sample buffer is a queue, and the divider is checked
  against the simulator's own division. The latencies are checked as well.
* **`tb_swl_chip`** runs all 16 banks at reduced sizes (64 blocks per bank, population
  1024, cut-off 64). It uses a host model that resends nacked requests and checks every
  read against a reference copy of memory. It runs an ordinary phase, a phase that rewrites
  one block 12,000 times, and a full read-back. It requires that sampling, all three kinds
  of completion, population end, batch release, swaps, skipped steps, key renewal and nacks
  each happen at least once. It also requires that the batch grows under the attack and
  that the attacked block's writes are spread over several frames. In one run, 12,000
  writes to one block left no frame with more than about 2,400 writes.
* **`tb_swl_chip_full`** uses the default configuration with no parameter changes. It
  writes 2^20 + 4096 blocks to one region and reads back every 64th. It checks that the
  population ends after exactly 2^20 writes, that the batch size matches the formula, that
  swaps happen and that data stays intact. The array model answers in 1–2 cycles rather
  than PCM's 55/132 memory cycles, to keep the run short (about 20 s).

* **`tb_swl_workloads`** also runs the default configuration. It drives region 0 with
  synthetic write streams, one per program in the published evaluation. Each stream rewrites
  D distinct blocks round after round, in a new random order every round. D is that program's
  reported average overwrite distance: apache 14,800; OLTP 17,005; SPECjbb 17,100; radix
  16,047; FFT 10,300; FMM 19,900. Each stream runs one population of 2^20 writes, then
  2^17 more writes during which the swap steps are counted. All these distances lie far
  beyond the cut-off, so every stream saturates the estimate near 1/3800 and gets batch 8.
  The measured rate is 0.122 % swap steps per write, against 0.11–0.13 % published for the
  programs. The testbench then rewrites a single block. The batch rises to 27,963 and the
  rate to about 4.3 swap steps per write, against 400 % published for the worst case. It
  takes about 50 s. It does not check data; `tb_swl_chip` does that.

## Limits

* The statistics that motivate the 13-entry buffer and the error bound (Poisson occupancy,
  99.99 % confidence) are properties of the scheme. The testbenches do not re-derive them;
  they only check the sample count of one population against its expected spread.
* Lifetimes and performance at the system level depend on the memory controller, caches
  and real program traces. This RTL does not model them. The write overheads above come
  from synthetic streams with the right average distance, not from the programs themselves.
* A memory module is built from eight such chips, each running its own sampler and keys.
  The RTL covers one chip. How a module combines the chips' nacks, so that a request is
  taken by all chips or by none, is left to the module and its controller.
* The LFSR-generated keys give randomization, not cryptographic secrecy.
