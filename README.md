# FHEIns: homomorphic-encryption accelerators inside an SSD controller

Encrypted database queries under CKKS fully homomorphic encryption (FHE) are
limited by data movement more than by arithmetic. An encrypted database
is hundreds of times larger than the plaintext one. A host accelerator
has to pull all of it through the SSD's PCIe link, which is much slower
than the bandwidth the SSD has internally across its flash channels.

This RTL puts the homomorphic kernels inside the SSD controller, directly
behind the per-channel flash controllers (after ECC):

* **Channel-level HE accelerators.** Each one consumes the data of K flash
  channels as it streams off the NAND. It runs the per-record part of a
  query: plaintext-ciphertext products, rotations and key-switching.
* **One SSD-level HE accelerator.** It collects the results of all
  channel-level accelerators over an on-chip network. It combines them,
  for example by summing across channels, and sends the final ciphertext
  towards the host.
* **A global buffer and a broadcast unit (BrU).** They deliver data that
  every accelerator needs, such as the query ciphertext and key material.
  Each row crosses the controller only once and is received by all
  accelerators in the same cycle.
* **A mode switch.** In conventional-I/O mode the SSD behaves as an
  ordinary drive: channel bytes go to the host path and the accelerators
  are idle. In FHE mode the channel bytes feed the accelerators.

The default configuration is the small SSD ("SSD-S"): 16 flash channels
and 4 channel-level accelerators, each taking K = 4 channels. The large
SSD ("SSD-L") is the same top with `NACC = 8`: 32 channels, still K = 4.

## Arithmetic model

* **Residues.** All arithmetic is on residues modulo word-sized primes.
  A CKKS polynomial of ring dimension N is held as L+1 limbs, and each limb
  is N residues modulo one prime (RNS form).
* **Word width.** One residue is a 36-bit word (`fhe_pkg::W`). The primes
  must satisfy 2^35 < q < 2^36.
* **Barrett constant.** Every modulus comes with mu = floor(2^72 / q).
  The host computes mu offline along with the rest of the schedule
  metadata.
* **Rows and superrows.** A row is 128 words, one per lane. A superrow is
  8 rows. The 8 modular units (MODUs) process one superrow per cycle, and
  the scratchpads are organised by superrow.
* **Supported sizes.** The ring dimension is chosen at run time (`logn`).
  It can be anything from 2·128 up to 2^16 words per limb.

The hardware works on one limb at a time. A key-switching operation or a
full ciphertext is a sequence of per-limb instructions in the static
schedule.

## The HE accelerator (`he_acc`)

The unit mix per accelerator is:

* 4 NTT engines
* 4 base-conversion (BCONV) engines
* 8 fully pipelined MODUs (modular add, subtract and multiply on 128 lanes)
* a KeyGen PRNG
* a 256 KB Galois-key buffer
* a 7 MB scratchpad (13 MB in the SSD-level accelerator)

### Why there is a sequencer but no control flow

FHE programs never branch on data, because the data is encrypted. Every
query therefore compiles to a fixed schedule, prepared offline. The host
(through the SSD firmware) writes three things into each accelerator
before a run:

* the program (`prog_we`)
* a constant table of {q, mu, c} entries (`cst_we`)
* a PRNG seed

`start` then runs the program from address 0 until `OP_END`, and the
accelerator raises `done`. The instructions are:

| op | effect |
|----|--------|
| `RECV` | Receive n rows from the channel stream or from the broadcast stream, into the scratchpad or the key buffer. In gather mode (SSD-level), the rows of each source are filed into that source's region. |
| `SEND` | Send n scratchpad rows to the output stream (one row every 2 cycles). |
| `NCFG` | Give an NTT engine its prime, mu, psi, psi^-1 and N^-1. The engine builds its twiddle seed tables. |
| `NLOAD` / `NSTORE` | Move one polynomial limb between the scratchpad and an NTT engine. |
| `NRUN` | Start a forward NTT, inverse NTT or automorphism (Galois element g) on an engine. Does not block, so the 4 engines overlap. |
| `VOP` | For n superrows, compute d = a op B mod q, where op is +, - or ·. B is taken from the scratchpad, the key buffer, the PRNG or a constant. One superrow per cycle. |
| `BCONV` | Convert n source limbs to 1..4 target primes (fast base conversion). |
| `SYNC` / `END` | Wait for all NTT engines / stop. |

`fhe_pkg::instr_t` gives the exact field layout. The header of
`rtl/he_acc.sv` documents the operand conventions.

### Constant-geometry NTT (`cg_ntt`)

A normal in-place radix-2 NTT uses a different butterfly stride at every
stage. With 128 lanes this needs either a large crossbar or a banked
memory that suffers bank conflicts. The constant-geometry form makes every
stage identical: it reads X[j] and X[j+N/2] and writes

    Y[2j]   = X[j] + X[j+N/2]
    Y[2j+1] = (X[j] - X[j+N/2]) * w^((j >> s) << s)        w = psi^2, stage s

It ping-pongs between two arrays of N words. Each engine does 64
butterflies (128 words) per cycle.

This is the decimation-in-frequency order, so the result would come out
bit-reversed. The last stage therefore writes to bit-reversed addresses,
and the data stays in natural order between operations.

The ring is Z_q[X]/(X^N+1) (negacyclic), which needs extra passes around
the stages:

* **Forward NTT:** one twist pass (x_i · psi^i), then log N stages.
* **Inverse NTT:** log N stages with psi^-1, then an untwist pass, then a
  1/N scaling pass.
* **Automorphism:** X → X^g. Coefficient i moves to i·g mod 2N and changes
  sign when the index wraps past N. A homomorphic rotation is then inverse
  NTT, automorphism, forward NTT, all on the same engine.

A forward NTT of N = 2^16 takes about 2N/128 + 16·N/128 + 7·17 ≈ 9.3 k
cycles (9336 measured).

### On-the-fly twiddles (`otf_gen`)

Storing all twiddle factors for N = 2^16 and many primes would take
megabytes. Instead, each NTT engine keeps two small seed tables per
direction:

* LO[k] = psi^k, for k < 256
* HI[k] = psi^(256·k)

Any power psi^e is then LO[e mod 256] · HI[e / 256]: one modular
multiplication, served three cycles after the request. 64 twiddles come
out per cycle. The tables take 4.6 KB per engine and are filled on chip
from psi alone (about 5 cycles per entry) when `NCFG` runs.

### Base conversion (`bconv`)

Key-switching needs limbs converted between RNS bases. The engine
computes

    y = Σ_i [x_i · (Q/q_i)^-1]_{q_i} · [Q/q_i]_p  mod p

It takes one source limb per beat and keeps a running sum per lane. The
result appears 7 cycles after the last limb. The sequencer can use up to 4
engines in parallel, one per target prime.

### KeyGen PRNG (`keygen_prng`)

Half of a key-switching key is uniformly random. Instead of storing that
half, the accelerator regenerates it from a seed. The PRNG has 1024 lanes
(a full superrow per step). Each lane is an xorshift64 generator,
differently seeded, reduced into [0, q) by one conditional subtraction.

It is a placeholder generator. It is **not** cryptographically secure and
is slightly non-uniform. The host that computes the key's other half must
use the same generator.

### Memories (`spad_mem`)

* **Scratchpad and key buffer.** Both are `spad_mem` arrays organised as
  superrows. Each has two synchronous read ports (one-cycle latency) and
  one write port with a per-row mask.
* **Sizes.** 1592 superrows is 7.0 MB; 2958 superrows is 13.0 MB; the
  56-superrow key buffer is 252 KB.
* **Implementation.** They are plain arrays. A real chip would map them
  to SRAM macros.

## Around the accelerators

* **`chan_agg`.** Each flash channel delivers one byte per cycle on its
  8-bit bus. Five bytes, least significant first, make one 36-bit word.
  Channel k fills lane slice k of the row. When the accelerator stalls,
  channels that are already done with their slice are held off, and
  `stall_cnt` counts those cycles.
* **`global_buffer` and `bru`.**
  * The host writes rows into the global buffer.
  * A streamer sends a range of rows through the BrU, one row every 2
    cycles.
  * The BrU presents a row to all accelerators selected in `dst_mask`.
  * A row advances only when every selected accelerator takes it.
* **`noc_gather`.** A round-robin arbiter of whole rows from the
  channel-level accelerators to the SSD-level one. It tags every row with
  its source, and `contention_cnt` counts cycles with competing requests.
* **`ssd_acc`.** The gather network plus an `he_acc` with the 13 MB
  scratchpad.

## What is outside this RTL

The following are represented only by top-level ports:

* the NVMe/PCIe host interface
* the embedded ARM cores and the flash translation layer
* the DMA engine
* the LPDDR DRAM and its controller
* the flash controllers with ECC
* the NAND itself

Schedules, constants and seeds enter through `md_*`. In a real drive the
firmware would write them from SSD DRAM, where they are kept after being
prepared on the host. The end-to-end testbench has a behavioural model of
the flash channels (a page-read delay, then a byte stream).

## Where this design makes its own choices

The design follows its source for:

* the overall organisation (channel-level and SSD-level accelerators,
  K-channel aggregation, broadcast unit, global buffer, two modes)
* the unit mix and 128-lane width
* the memory sizes
* the use of a constant-geometry NTT, on-the-fly twiddles and a PRNG for
  key material

The following are this design's own choices, because the source does not
specify them:

* the 36-bit word width and Barrett reduction
* the instruction set and sequencer
* the superrow memory organisation
* the seed-table scheme of the twiddle generator
* the negacyclic twist passes
* the byte packing in the aggregator
* the handshakes
* the xorshift PRNG
* the size of the global buffer (1024 rows)

Known gaps and limits:

* **Large rings do not fit on chip.** At N = 2^16 with 40 limbs, a
  ciphertext is 22.5 MB, more than either scratchpad. The source keeps
  such data in SSD DRAM, which this RTL does not connect to. Large
  parameter sets therefore depend on firmware streaming limbs through the
  global buffer. Small sets (N = 2^12, 4 limbs: 144 KB per ciphertext)
  fit comfortably.
* **No rescale or key-switching macro-instruction.** Both are sequences
  of NTT, VOP and BCONV instructions that the offline schedule must spell
  out.
* **One polynomial per NTT engine at a time.** Loading and storing a limb
  costs N/128 cycles each way.
* **No physical memories.** Memories are behavioural arrays; no SRAM
  macros or timing closure are included.

## Simulating

Every block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog. The expected values
come from direct `%` arithmetic, not from the datapath under test.
Examples with plain Verilator 5:

    verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
        rtl/fhe_pkg.sv rtl/mod_mul.sv rtl/otf_gen.sv rtl/cg_ntt.sv \
        tb/tb_cg_ntt.sv --top tb_cg_ntt -Mdir obj && ./obj/Vtb_cg_ntt

    verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/fhe_pkg.sv tb/tb_fheins_top.sv --top tb_fheins_top -Mdir obj_top && ./obj_top/Vtb_fheins_top

**`tb_fheins_top`: reduced end-to-end run.** It simulates a scaled-down
fabric: 8 lanes, 2 MODUs, 2 accelerators of 2 channels, N = 16. It walks
through one query:

1. Conventional-I/O traffic.
2. The mode switch.
3. Channel streaming with back-pressure.
4. Broadcast of the query and keys.
5. In every channel accelerator:
   * a plaintext product
   * a rotation (inverse NTT, automorphism, forward NTT)
   * rotate-and-add
   * key products with key-buffer and PRNG keys
   * base conversion
6. Gathering at the SSD level and summation across channels.

It counts each of these mechanisms and fails if any of them never occurs.

**`tb_fheins_full`: the same run at full size.** It uses the top at its
default (SSD-S) parameters, with N = 4096 as used for private information
retrieval. Verilator needs several minutes to build it, and the
simulation takes about a minute.

**`tb_cg_ntt_workloads`: the NTT engine at full size on both workload
ring sizes.** It runs one engine with 128 lanes at N = 2^12 and
N = 2^16. It spot-checks the forward transform, checks that the inverse
restores the input exactly, and checks the rotation automorphism.
Measured forward-NTT times are 540 cycles at N = 2^12 and 9336 cycles at
N = 2^16.
