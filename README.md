# DES on an FPGA: a 16-stage pipeline and a one-round iterative core

This is SystemVerilog for two hardware versions of the Data Encryption Standard
(DES) in electronic-code-book (ECB) mode. Both come from the same set of round
circuits.

* **Pipelined.** All sixteen DES rounds are unrolled into sixteen stages, with
  a register pair between rounds. A new 64-bit block can enter on every clock
  and sixteen blocks are in flight at once. That gives one block per cycle, at
  about sixteen times the logic of a single round.
* **Full rolling.** One round circuit is reused sixteen times. Two
  multiplexers feed it either the freshly permuted input block or its own
  registered result. It finishes a block every 17 cycles in a fraction of the
  area.

The architectures, the word-serial converter that fits the pipelined design
into a 144-I/O package, and the controller and multiplexer structure of the
rolling core follow a published study of DES on Xilinx Spartan-II devices,
"Efficient Uses of FPGAs for Hardware Implementation of Data Encryption
Standard". That study reports 4231 Mbit/s for the pipeline at 66.11 MHz and
386 Mbit/s for the rolling core at 96.45 MHz. Its authors wrote VHDL. This
code is an independent SystemVerilog design. Where the study leaves a detail
open, the choice made here is listed in [Design choices](#design-choices).

## DES in one paragraph

A 64-bit block goes through a fixed initial permutation (IP) and is split into
halves L and R. Sixteen Feistel rounds follow. Each round computes
`L' = R` and `R' = L xor f(R, K_i)`, where `K_i` is that round's 48-bit key.
The f-function expands R to 48 bits (E), XORs it with the key, passes eight
6-bit groups through eight S-boxes (6 bits in, 4 bits out), and permutes the
32-bit result (P). After round 16 the halves are put together swapped,
`{R16, L16}`, and the final permutation (FP = IP⁻¹) gives the result.

The round keys come from the 64-bit key:

* PC-1 drops the 8 parity bits and leaves two 28-bit halves, C and D.
* Before each round, C and D are rotated left by 1,1,2,2,2,2,2,2,1,2,2,2,2,2,2,1.
* PC-2 picks 48 of the 56 bits as the round key.

Deciphering runs the same datapath with the round keys in reverse order. The
hardware does this with different rotations only: no rotation before round 1
(the left rotations add up to 28, so C16/D16 equal C0/D0). Then C and D are
rotated *right* by 1,2,2,2,2,2,2,1,2,2,2,2,2,2,1. The only difference between
the two directions is this rotation table.

Permutations, the expansion and the key selections are pure wiring
(`des_permute`, with the standard's tables as parameters). The S-boxes are
64×4 read-only tables (`des_sbox`). All tables are in `des_pkg`.

## The pipelined chip (`des_pipeline_top`)

```
 data_in[15:0] ──► des_converter ─┐                    ┌────────── des_pipeline ─────────────┐
 key_in[15:0]  ──► des_converter ─┼─ block, key, ─────►│ IP → round1 → Reg(1) → round2 → …   │──► data_out[63:0]
 start ──────────► des_converter_ctrl ── upload ──────►│ … → round16 → Reg(16) → FP          │──► out_valid
 cipher ─────────► cipher register ─────────────────── │ (key state and valid bit per stage) │
                                                       └─────────────────────────────────────┘
```

### Why a converter, and how to drive it

A plaintext pin set, a key pin set and a result pin set of 64 bits each, plus
clock, start, cipher and reset, need 196 pins. The target package has 144. So
plaintext and key arrive as 16-bit words, and two 16-to-64-bit shift
registers (`des_converter`) collect them. A small FSM (`des_converter_ctrl`)
steps both registers. That leaves 16 + 16 + 64 + 4 = 100 pins, plus an
`out_valid` flag.

The protocol:

* Hold `start` high and present the four words of a block on `data_in` and
  the four words of its key on `key_in` in consecutive cycles, most
  significant word first.
* `cipher` (1 = encipher, 0 = decipher) is registered with each word. The
  value given with the fourth word applies to the block.
* In the cycle after the fourth word, the FSM raises `upload` for one cycle.
  At the next edge the block, key and direction enter the pipeline.
* If `start` stays high, the first word of the next block is taken in that
  same upload cycle. Blocks then stream at one per four cycles, the most
  16-bit pins can carry.
* Dropping `start` before the fourth word discards the partial block.

Latency: if the first word is sampled at rising edge *t*, the result is on
`data_out` with `out_valid` high just after edge *t*+19. That is 20 clock
edges: 4 in the converter and 16 in the pipeline. `data_out` is meaningful
only while `out_valid` is high.

### Inside the pipeline (`des_pipeline`)

Stage *i* holds the register pair `Reg(i)` (L and R, 32 bits each). Next to
it, the stage holds:

* the block's 56-bit key state C,D,
* its direction bit,
* a valid bit.

The combinational part of stage *i* has two pieces:

* a `des_key_step` with the round number fixed to *i*, which rotates C,D
  and selects the round key;
* a `des_round`.

The key state therefore travels down the pipeline with its block. Each of
the sixteen blocks in flight can use its own key and direction, and changing
key costs nothing. The block-per-clock core is usable on its own with 64-bit
ports (`in_valid`, `in_cipher`, `in_block`, `in_key` → `out_valid`,
`out_block`, latency 16). There is no back-pressure. Only the valid bits are
reset.

## The full rolling chip (`des_rolling_top`, `des_rolling`)

```
          ┌──────── des_controller (idle, rounds 1..16) ────────┐
          │ load           first          round_idx, active      │ last
 data_in ─► input reg ─► IP ─► des_mux ×2 ─► XOR | f ─► L,R regs ─┼─► FP ─► output reg ─► data_out
          │                     ▲    (IP in round 1)  │          │
          │                     └──── rounds 2..16 ◄──┘          │
 key ─────► des_key_schedule (C,D register, rotate per round) ──► round key
```

**Controller.** `des_controller` is a counter with an idle state and the
sixteen round states.

* A `start` while idle is accepted (`load`). The block, key and direction
  are latched; this is the extra "start" cycle.
* In round 1 the two 32-bit multiplexers pass the IP of the latched block.
  In rounds 2–16 they pass the fed-back registers.
* The key schedule unit rotates its C,D register once per round. It rotates
  left to encipher and right to decipher, as above.
* At the end of round 16, FP of `{R16, L16}` is loaded into the output
  register and `done` pulses for one cycle.

A block therefore takes 17 cycles from its start cycle. A `start` while
`busy` is ignored, and `data_out` holds the last result.

**Chip.** `des_rolling_top` puts the same converter front end in front of
the core. The converter's `upload` is the core's `start`. From the first
word to `done` takes 4 + 1 + 16 = 21 cycles.

An upload that arrives while the core is busy is dropped, so the user must
pace blocks. The fourth word of the next block may come no earlier than the
cycle in which the current block's `done` is expected. Overlapping the next
block's words with the rounds this way gives one block every 17 cycles.
`busy` is brought out for this.

## The top level (`des_top`)

`des_top` places both chips side by side. They share only `clk` and `rst`.

* The `p_*` ports are the pipelined chip.
* The `r_*` ports are the rolling chip.

Reset is synchronous and active high.

## Module map

| module | role |
|---|---|
| `des_pkg` | DES tables (IP, FP, E, P, PC-1, PC-2, rotations, S-boxes) and the rotation helpers |
| `des_permute` | a table-driven bit permutation/selection/expansion, wiring only |
| `des_ip`, `des_fp` | initial and final permutation |
| `des_sbox` | one S-box as a 64×4 ROM (parameter `BOX` = 1..8) |
| `des_f` | f-function: E, key XOR, 8 S-boxes, P |
| `des_round` | one Feistel round |
| `des_key_step` | one key-schedule step (rotate C,D by the round's amount and direction, PC-2) |
| `des_pipeline` | the 16-stage pipeline, one block per clock |
| `des_converter`, `des_converter_ctrl` | 16→64-bit word accumulator and its control FSM |
| `des_pipeline_top` | pipelined chip with the word interface |
| `des_controller`, `des_mux`, `des_key_schedule` | round counter, 32-bit feedback multiplexer, registered key schedule of the rolling core |
| `des_rolling` | the full rolling core, 64-bit ports |
| `des_rolling_top` | rolling chip with the word interface |
| `des_top` | both chips side by side |

## Simulating

Every module has a self-checking testbench in `tb/<module>_tb.sv`.
`des_ip` and `des_fp` share `des_perm_tb`. Each testbench prints one line
`TB_RESULT checks=N failures=M` and stops. The expected values are in
`tb/des_tv_pkg.sv`. They come from a software DES model that was checked
against a standard cryptographic library. There are 40 key/plaintext/
ciphertext triples, including the widely published example (key
`133457799BBCDFF1`, plaintext `0123456789ABCDEF` → `85E813540F0AB405`). There
are also the round keys and round-by-round L, R and f values of that example,
and S-box spot values.

With Verilator 5, from the repository root:

```
verilator --binary --timing --assert -Irtl -Itb rtl/des_pkg.sv tb/des_tv_pkg.sv \
          tb/des_top_tb.sv --top-module des_top_tb -Mdir obj -o sim && obj/sim
```

Replace `des_top_tb` with any other testbench name. Other files are found
through `-Irtl -Itb`.

`des_top_tb` is the end-to-end test, at the default sizes:

* It enciphers all 40 vectors and deciphers their ciphertexts through both
  chips at once, over 300 checks in all.
* It checks the 20-cycle (pipeline) and 21-cycle (rolling) latencies.
* It counts the mechanisms and fails if any never happened: back-to-back
  streaming, several blocks in the pipeline at once, deciphering in each
  chip, a discarded partial block, and an upload dropped by a busy rolling
  core.

`des_pipeline_tb` drives the bare pipeline at one block per clock, mixing
keys and directions. It checks the 16-cycle latency and 16 or more
back-to-back results.

`des_throughput_tb` measures the sustained rate of each datapath over a long
ECB stream:

* the bare pipeline: 1 cycle per block;
* the pipelined chip: 4 cycles per block;
* the rolling core: 17 cycles per block.

It prints the rates in Mbit/s at the clock rates reported for the original
implementations.

## Throughput against the reported figures

* **Pipeline core.** The pipeline takes 64 bits per cycle. At the reported
  66.11 MHz that is 4231 Mbit/s, the study's figure.
* **Pipelined chip.** Behind the 16-bit pins of `des_pipeline_top` only 16
  bits per cycle arrive, a quarter of that. The reported figure is the rate of
  the pipeline core, not of the pin-limited chip.
* **Rolling core.** It finishes 64 bits per 17 cycles, 363 Mbit/s at
  96.45 MHz (measured by `des_throughput_tb`). The reported 385.8 Mbit/s
  equals 64 bits per 16 cycles, which leaves out the start cycle that the same study counts elsewhere. This RTL
  keeps the start cycle.

No timing or area result was obtained for this RTL on an FPGA. The S-box
ROMs, the 16 stages of 56 + 64 + 2 flip-flops and the wiring-only permutations
are what a synthesis tool will see.

## Design choices

These points are not fixed by the source description and were decided here:

* **Register placement in the pipeline.** One figure of the original design
  draws the first register pair right after IP. The prose puts it after round
  1. The prose is followed: IP → round 1 → Reg(1) … round 16 → Reg(16) → FP,
  16 cycles.
* **Key handling in the pipeline.** Only sub-key arrows into each stage are
  described. Here each stage carries the key state and direction of its
  block, so every block may use its own key.
* **S-box style.** Three S-box styles were compared in the study: logic
  equations, FPGA ROM and block RAM. The fastest result used block RAM. Here
  the S-box is a ROM read combinationally. A synchronous block-RAM read would
  add a cycle per round and break the 16-cycle latency, and how the original
  clocked its block RAMs is not known. A synthesis tool may still map the
  tables to block RAM if a register is added. The logic-equation style is not
  provided.
* **Controller size.** The round controller is described both as a
  "twenty-stage" counter and as a 16-state counter. The 16 round states plus
  an idle state are built. Twenty matches the pipelined chip's 4 converter +
  16 round cycles.
* **Converter details.** The converter's upload timing is read as "upload in
  the cycle after the fourth word". The following are this design's own:
  most-significant-word-first order, streaming while `start` stays high,
  aborting when `start` drops, and registering `cipher` with each word.
* **Front end of the rolling chip.** The converter front end on the rolling
  chip is inferred from its reported I/O count (98 pins), which a 64-bit
  interface cannot meet. The text describes the converter only for the
  pipelined chip.
* **Added ports and reset.** `out_valid`, `done` and `busy` are added.
  `cipher` = 1 means encipher. Reset is synchronous and active high.
* **Busy rolling core.** A busy rolling core ignores `start` and drops an
  upload.
