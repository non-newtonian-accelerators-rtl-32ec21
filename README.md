# Non-Newtonian accelerators: fixed-function accelerators that survive a broken stage

A hardware accelerator usually works as one block. A single permanent fault
anywhere inside it makes some outputs wrong. The accelerator is then thrown away
and the whole computation moves back to software, even though almost all of the
silicon still works.

A *Non-Newtonian accelerator* (NNA) is built so that a fault costs only the
broken part. The function `f` is cut into sub-accelerators `f_0 … f_{N-1}` with
`f = f_{N-1} ∘ … ∘ f_1 ∘ f_0`. Each sub-accelerator has two sets of connections:

* **direct links** to its neighbours. While nothing is faulty, data flows only
  over these links, and the chain behaves like an ordinary pipelined accelerator;
* **software queues**: a *consumer* queue (software → sub-accelerator) and a
  *producer* queue (sub-accelerator → software).

When stage `k` is marked faulty, the chain routes around it. Stage `k-1` writes
its result into its own producer queue. Software reads it and runs a software
version of `f_k`. Software then pushes the result into the consumer queue of
stage `k+1`, and the rest of the chain runs in hardware again. Any number of
stages, adjacent or not, can be bypassed this way. With every stage bypassed,
the accelerator degrades to pure software.

This repository holds synthesizable SystemVerilog for:

* the generic NNA skeleton: queues, bypass register and routing;
* three accelerators built on it, as case studies:
  * AES-128 encryption, in an 11-stage and a 3-stage configuration;
  * a 16-point FFT;
  * an 8×8 2-D DCT.

The software thread, the host processor and the fault detectors are not part of
the RTL. The testbenches model the software thread behaviourally.

## Structure

```
nna_top
├── aes_nna  (STAGES=11)  u_aes     ─┐
├── aes_nna  (STAGES=3)   u_aes3     │ each:  nna_chain  + N × <stage>
├── fft_nna  (N=16)       u_fft      │
└── dct_nna               u_dct     ─┘
nna_chain
├── cohort_engine   N × (consumer cohort_fifo, producer cohort_fifo)
├── nna_bypass_ctrl bypass register | hw_fault
└── routing         (combinational, per stage)
<stage> = aes_stage | fft_stage | dct_stage   (combinational datapath + stage_reg)
```

| file | what it is |
|---|---|
| `rtl/nna_chain.sv` | The NNA skeleton. Routes each stage's input and output between its neighbours and the software queues. |
| `rtl/cohort_engine.sv` | One consumer and one producer queue per sub-accelerator. |
| `rtl/cohort_fifo.sv` | A single queue: a valid/ready FIFO. |
| `rtl/nna_bypass_ctrl.sv` | The bypass register (software-written), ORed with the hardware fault lines. |
| `rtl/stage_reg.sv` | Output register of every datapath stage, with a one-word skid buffer. |
| `rtl/aes_pkg.sv`, `rtl/aes_stage.sv`, `rtl/aes_nna.sv` | AES-128 rounds, the AES sub-accelerator and the AES accelerator. |
| `rtl/dsp_pkg.sv`, `rtl/fft_stage.sv`, `rtl/fft_nna.sv` | Elaboration-time trigonometry for the coefficients, the FFT butterfly stage and the FFT accelerator. |
| `rtl/dct_stage.sv`, `rtl/dct_nna.sv` | The 1-D DCT pass with transpose, and the 2-D DCT accelerator. |
| `rtl/nna_top.sv` | All four accelerator instances side by side. |

## The routing rule (nna_chain)

`faulty[i]` is `bypass_reg[i] | hw_fault[i]`. For stage `i` of `N`:

| | from/to a neighbour | from/to software |
|---|---|---|
| input of stage `i` | output of stage `i-1`, when `i > 0` and stage `i-1` is healthy | consumer queue `i`, when `i == 0` or stage `i-1` is faulty |
| output of stage `i` | input of stage `i+1`, when `i < N-1` and stage `i+1` is healthy | producer queue `i`, when `i == N-1` or stage `i+1` is faulty |

A faulty stage gets no input (`in_valid` is held low). Any word left in its
output register is drained and discarded. Its queues are not touched.

The direct links are plain wires, with no queue or register in the path. A
fault-free chain therefore has exactly the latency of its datapath stages.
Queues are only involved at the two ends and next to a bypassed stage.

**What the software must do.** It pushes a job into consumer queue `j`, where
`j` is the first healthy stage. Before that, it runs any faulty leading stages
itself. It watches every producer queue. When a word shows up in producer queue
`i` and `i` is not the last stage, the word must be carried on:
1. Run the software versions of stages `i+1, i+2, …` up to, but not including,
   the next healthy stage `j`.
2. Push the result into consumer queue `j`.
3. If no healthy stage follows, the result is the accelerator's output.

`tb/nna_sw_agent.sv` is a reference for this protocol.

**Changing the bypass state.** Change it only while the accelerator is empty.
Words already in flight are routed by the state at the moment they cross a
stage boundary, so a change mid-stream can send a word down the wrong path.

The two ways to mark a stage faulty are equivalent:
* software writes the register (`cfg_we`, `cfg_wdata`, one bit per stage;
  read back on `bypass_reg`);
* a detector drives `hw_fault[i]`, which acts in the same cycle.

After reset nothing is bypassed.

## Timing

All streams use valid/ready. A word moves on a rising edge where both are high.

* `cohort_fifo`: a word written on edge `t` can be read from edge `t+1` on (no
  fall-through). `in_ready` means "not full". The default depth is 4.
* `stage_reg`: one cycle of latency and one word per cycle. `in_ready` is the
  inverse of the skid-register flag, which is itself a register. The ready path
  therefore never ripples combinationally through the chain. When the output
  stalls, the word already accepted is caught in the skid register.
* End to end with no fault, measured from the consumer-queue-0 write to the
  producer-queue-(N-1) read: **N + 2 cycles**. That is N stages plus one cycle
  in each queue. Throughput is one job per cycle.

  | configuration | latency |
  |---|---|
  | AES, 11 stages | 13 cycles |
  | AES, 3 stages | 5 cycles |
  | FFT | 6 cycles |
  | DCT | 4 cycles |

Every datapath stage is combinational logic followed by one register. The
3-stage AES packs 3–4 rounds into one cycle, and the DCT stage does 64 8-term
dot products per cycle. These are long paths. Nothing is pipelined inside a
stage.

## The case-study accelerators

### AES-128 (`aes_nna`, `aes_stage`, `aes_pkg`)

* **Token.** The 256-bit token between stages is
  `{state[255:128], key[127:0]}`, where `key` is the round key the state last
  received.
  * Software pushes `{plaintext, cipher key}`.
  * It gets back `{ciphertext, round key 10}`.
  * Byte order is that of FIPS-197: byte 0 sits in the most significant bits.
* **Rounds.** Round 0 is the initial AddRoundKey. Rounds 1–9 are full rounds.
  Round 10 has no MixColumns.
* **Stage mapping.** With `STAGES = 11`, each stage does one round. With
  `STAGES = 3`, stage `s` does rounds `⌊11s/3⌋ … ⌊11(s+1)/3⌋-1`, that is 0–2,
  3–6 and 7–10.
* **Key expansion.** Each stage expands the next round key from the one it
  receives. A stage therefore depends only on its input token, which is what
  allows software to stand in for it.
* **S-box.** It is computed rather than stored: the inverse in GF(2⁸) as x²⁵⁴,
  followed by the affine map.
* Only encryption is built.

### FFT (`fft_nna`, `fft_stage`)

* **Structure.** An `N`-point radix-2 decimation-in-time FFT. The default
  `N = 16` gives four butterfly stages, one per sub-accelerator.
* **Word layout.** Sample `k` is at bits `[k*32 +: 32]`:
  * real part in the upper 16 bits;
  * imaginary part in the lower 16 bits;
  * both two's complement.
* **Stage operation.**
  * Stage 0 first reorders its input into bit-reversed order. Input and output
    are therefore both in natural order.
  * Stage `s` forms butterflies of span `H = 2^s` with the twiddle
    `w = e^{-2πi·j/2H}`.
  * It outputs `(a ± b·w) >>> 1`.
* **Arithmetic.**
  * Twiddles are Q1.14 and rounded to nearest.
  * Both the product and the halving are truncated (floor).
  * The accelerator returns DFT(x)/N.
  * Keep inputs within ±2^14 for headroom.
* **Twiddle factors.** They are computed at elaboration time by a Taylor
  series in `dsp_pkg`.

### 2-D DCT (`dct_nna`, `dct_stage`)

* **Block layout.** 8×8 blocks, with element `(r,c)` at bits
  `[(8r+c)*16 +: 16]`.
* **One stage.** Each stage computes the orthonormal 8-point DCT-II of every
  row and writes the result transposed. Two stages give `C·X·Cᵀ`, the 2-D DCT,
  with row = vertical frequency.
* **Arithmetic.**
  * Coefficients are Q1.14.
  * Each dot product is rounded to nearest.
  * Level-shifted 8-bit pixels (±128) cannot overflow 16 bits.
* **Two sub-accelerators.** They are the row pass and the column pass.
  Bypassing one leaves the other in hardware.

## Where this RTL departs from, or goes beyond, what it is based on

The source describes the architecture, meaning queues per sub-accelerator,
queue bypassing, and a software-set or hardware-driven bypass. It names the three
case studies and the two AES stage counts. Everything below is this design's
own choice:

* **Queues.** In the original system the queues are memory-backed,
  cache-coherent queues managed by an engine on the host's memory system. Here
  they are on-chip FIFOs with the same FIFO behaviour, and their software ends
  are plain ports. The memory-backed machinery, the host interface and the
  configuration registers of such an engine are not built.
* **Sizes and formats.**
  * FFT: size, radix, number format and scaling.
  * DCT: block size and number format. The DCT is computed as a direct matrix
    product. The original uses a fast DCT algorithm, which is not identified,
    so this datapath is larger than the original's.
  * AES: 128-bit key, the round split of the 3-stage configuration, and
    carrying the round key with the state.
* **Handshake and queues.** The valid/ready handshake, the skid buffer in
  `stage_reg`, the queue depth of 4, and synchronous active-low reset.
* **Routing rules.** Discarding a bypassed stage's leftover output, and allowing
  bypass changes only while the accelerator is idle.
* **No fault detection.** The bypass bits come from software or from whatever
  drives `hw_fault`.
* **Top level.** The four accelerators share nothing but clock and reset. How
  they would be placed in a larger system is open.

## Simulating

Every testbench in `tb/` is self-checking. Each ends by printing
`TB_RESULT checks=<n> failures=<m>`, and each has a watchdog. Example with
Verilator 5:

```
verilator --binary --timing --assert --top-module tb_nna_top \
  -y rtl -y tb +libext+.sv -Irtl -Itb \
  rtl/aes_pkg.sv rtl/dsp_pkg.sv tb/nna_sw_pkg.sv tb/tb_nna_top.sv
./obj_dir/Vtb_nna_top
```

| testbench | covers |
|---|---|
| `tb_cohort_fifo`, `tb_cohort_engine`, `tb_nna_bypass_ctrl` | Queues and the bypass register, with random traffic against models. |
| `tb_nna_chain` | The routing, with four stand-in stages (`toy_core`). |
| `tb_aes_stage` | FIPS-197 vectors, single rounds against a software AES, and back-pressure. |
| `tb_fft_stage`, `tb_dct_stage` | Each stage against a software model, and the whole transform against floating-point DFT/DCT. |
| `tb_aes_nna`, `tb_aes3_nna`, `tb_fft_nna`, `tb_dct_nna` | One accelerator end to end (see below). |
| `tb_nna_top` | All four accelerator instances at default sizes, concurrently. |

The end-to-end tests (`tb/nna_scenario.sv`) run the same sequence on every
accelerator:
1. A fault-free stream, with the N+2 latency and one result per cycle checked.
2. Each stage bypassed in turn through the register.
3. A stage taken out through `hw_fault`.
4. Two stages at once, then all stages.
5. A stream with the reader stalled, so back-pressure reaches the datapath.

Each result is compared two ways:
* bit-exactly with the all-software chain in `tb/nna_sw_pkg.sv`;
* with an independent reference: a software AES whose S-box is generated
  differently, a floating-point DFT within 4 LSB, or a floating-point 2-D DCT
  within 2 LSB.

The sequence also counts a failure if any mechanism was never exercised: a
direct link, output to software, software feeding a later stage, the hardware
fault path, a multi-stage bypass, or back-pressure.

`tb_nna_top` takes about 4 minutes to build with Verilator and well under a minute to run.

## Changing it

* **Another accelerator.**
  1. Write a stage module with the `in_*`/`out_*` stream ports, ending in a
     `stage_reg`.
  2. Instantiate `nna_chain` with `N` and `W`.
  3. Wire `core_*[i]` to stage `i`, as `fft_nna` does.

  A stage must be a pure function of its input word. That is what lets
  software take its place.
* **Queue depth.** `DEPTH` on every accelerator and on `nna_top`.
* **FFT size.** `FFT_N` (any power of two ≥ 2). The word width grows as
  `32·N`.
* **AES configuration.** `STAGES` anywhere from 1 to 11.
