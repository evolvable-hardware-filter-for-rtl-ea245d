# Evolvable 3x3 image filter for surface-roughness imaging

Camera images of machined surfaces are noisy. A fixed filter cannot suit every kind of noise. Roughness measured from such images also depends on how the image was cleaned up. This design does not use a hand-made filter. It holds a small reconfigurable circuit whose 250 configuration bits define a 3x3 spatial filter. A genetic algorithm, also in hardware, searches those bits. It trains on a noisy image and a clean reference image of the same scene. The configuration that brings the filtered image closest to the reference is kept. The chip then filters the image with it.

Everything is synthesizable SystemVerilog (IEEE 1800-2017). `ehw_top` is the chip.

## How the chip works

```
 host ──► input_buffer ──window I0..I8──► vrc ──pixel──► fitness_unit ──fitness──┐
          (noisy + reference       ▲  (25 PEs,        │                          │
           frame stores,           │   7-stage pipe)  └──► output_buffer ──► host │
           line buffers)           │ cfg (250 bits)                               │
                                   └──────────── ga_processor ◄───────────────────┘
                                      prng · chromosome_memory · selection_unit · ga_operators
```

1. The host writes the noisy image (`img_sel=0`) and the reference image (`img_sel=1`) pixel by pixel, then pulses `start`.
2. `ga_processor` fills the population with 16 random 250-bit chromosomes.
3. Each chromosome in turn is loaded into the VRC's configuration register. Then one *pass* runs: `input_buffer` streams every overlapping 3x3 window of the noisy image, one per clock. The VRC produces one filtered pixel per clock. `fitness_unit` adds up |filtered − reference| over all interior pixels.
4. When the whole population has been scored, the next generation is bred (see below). The population banks then swap.
5. After `GENERATIONS` generations, the best chromosome ever seen is loaded. A last pass writes the filtered image into `output_buffer`. `done` rises, and the host reads the result through `out_addr` / `out_data`.

The filtered image holds the (W−2)×(H−2) interior pixels in raster order. Border pixels have no full window and are not produced.

## The virtual reconfigurable circuit (VRC)

This is the filter itself, and the part that takes the most care to read.

**Processing element (PE).** A PE has two 8-to-1 multiplexers and a function unit. The multiplexers pick operands X and Y from the PE's eight candidate signals. The function unit applies one of 16 operators. The result goes into an 8-bit register. A PE is configured by a 10-bit *gene*:

| bits | field | meaning |
|---|---|---|
| 9..7 | `sel_x` (slice 1) | which candidate is X |
| 6..4 | `sel_y` (slice 2) | which candidate is Y |
| 3..0 | `func` (slice 3) | operator code |

**Operators** (`fu.sv`, enum `fu_op_e` in `ehw_pkg.sv`):

| code | result | code | result |
|---|---|---|---|
| 0 | X >> 1 | 8 | X & 0x0F |
| 1 | X | 9 | X & 0xF0 |
| 2 | ~X | 10 | X \| 0x0F |
| 3 | X & Y | 11 | X \| 0xF0 |
| 4 | X \| Y | 12 | min(X, Y) |
| 5 | X ^ Y | 13 | max(X, Y) |
| 6 | (X + Y) >> 2 | 14 | Y << 1 (mod 256) |
| 7 | (X + Y) >> 1 | 15 | X + Y (mod 256) |

Codes 6 and 7 use a 9-bit sum, so there is no overflow before the shift. Codes 14 and 15 wrap around; they do not saturate.

**Array.** There are 24 PEs in six columns of four, followed by one output PE (PE 25). Every PE output is registered, so each column is one pipeline stage. Operands may come from the previous two columns ("level-back" 2). Four PEs per column times two columns gives exactly the eight multiplexer inputs. The candidate lists are:

| PEs | candidates 0..3 | candidates 4..7 |
|---|---|---|
| column 1 (PE 1–4) | X: I0..I3, Y: I1..I4 | X: I4..I7, Y: I5..I8 |
| column 2 (PE 5–8) | column 1 outputs | I1, I3, I5, I7 |
| column c = 3..6 | column c−1 outputs | column c−2 outputs |
| PE 25 | column 6 outputs | column 5 outputs |

Column 1 has nine inputs but only 8-input multiplexers. X therefore sees I0..I7 and Y sees I1..I8, so every pixel is reachable.

**Alignment.** A signal that skips a column gets one extra register. Without it, a PE would combine data from two different windows. With it, the whole VRC is a pure function of a single window. The latency is `VRC_LAT` = 7 clocks, at one window per clock.

**Chromosome.** The chromosome is the 25 genes concatenated, with PE 1 in bits 9..0 and PE 25 in bits 249..240. `ehw_pkg::gene()` extracts a gene.

## Window generation (`input_buffer`)

The noisy image is read in raster order, one pixel per clock. The pixel enters a 3x3 register window together with the two pixels above it, which come from two one-line buffers. When the pixel at (x, y) arrives with x, y ≥ 2, the window centred on (x−1, y−1) is complete. Pixels are numbered I0..I8 row by row, and I4 is the centre. Successive windows overlap by two columns.

The reference pixel at the same centre is read from the second frame store in the same clock. It travels with the window, and `fitness_unit` delays it by the VRC latency. A pass takes W·H + 3 clocks. The first window appears 2W + 4 clocks after `start`.

## Scoring (`fitness_unit`)

The score is the mean difference per pixel (MDPP) between filtered and reference images. The hardware keeps the sum instead of the mean; this ranks filters identically and needs no divider. The GA keeps the fittest chromosome and selects in proportion to fitness. For that, the unit reports

    fitness = 255 · N − Σ |filtered − reference|,   N = (W−2)(H−2)

which is largest for the best filter. `best_fitness` on the top uses the same scale.

## The genetic algorithm (`ga_processor`)

| setting | value |
|---|---|
| population | 16 (`POP`) |
| crossover | single cut, probability 0.9 per pair (threshold 58982 / 65536) |
| mutation | bit flip, probability 0.01 per bit (threshold 655 / 65536) |
| selection | roulette wheel |
| elitism | the best chromosome found so far fills slot 0 of each new generation |
| generations | `GENERATIONS`, default 64 |

- **Population store.** `chromosome_memory` has two banks of 16 × 250 bits. One bank holds the generation being scored, the other receives the next one.
- **Roulette wheel.** `selection_unit` keeps the 16 fitness values and their total. A spin draws t = (r · total) >> 16 from a 16-bit random r. It then scans the table and stops at the first entry whose running sum exceeds t. This takes index + 2 clocks.
- **Offspring.** `ga_operators` takes two parents. With probability 0.9 it cuts both at a random point p (1 ≤ p < 250) and swaps the tails. It then runs through the 250 bits of both children, one bit per clock, flipping each with probability 0.01.
- **Filling a generation.** Slots 1..15 are filled by eight such pairs. The second child of the last pair is dropped.
- **Randomness.** `prng` is a 32-bit xorshift generator that produces a new word every clock. Everything that needs randomness samples it.

**Timing.** One generation costs 16 passes of W·H + 13 clocks each. Breeding adds about 8 × (250 + 15) clocks. At the defaults (64 × 64 image, 64 generations) a full run takes 4.34 M clocks from `start` to `done`.

## Top-level interface (`ehw_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset |
| `img_we`, `img_sel`, `img_addr`, `img_data` | in | 1, 1, log2(W·H), 8 | write one pixel of the noisy (0) or reference (1) image; only while not busy |
| `start` | in | 1 | begin evolution |
| `busy`, `done` | out | 1 | running; finished, with the result in the output buffer |
| `out_addr` / `out_data` | in / out | log2((W−2)(H−2)) / 8 | read the filtered image, one clock latency |
| `best_fitness` | out | 32 | fitness of the best chromosome |
| `best_chrom` | out | 250 | best configuration found |
| `generation` | out | 16 | generations evaluated |

Parameters: `IMG_W`, `IMG_H` (64), `POP` (16), `GENERATIONS` (64), `SEED`. The VRC geometry is fixed in `ehw_pkg`.

## What is fixed by the architecture and what is this design's choice

These follow the architecture this design implements:
- 25 PEs, four per pipeline stage, plus an output PE;
- level-back 2 and 8-input multiplexers;
- 10 configuration bits per PE and the 16 operators;
- nine 8-bit inputs and one 8-bit output replacing the centre pixel;
- MDPP against a reference image;
- population 16, crossover 0.9, mutation 0.01, roulette wheel, keeping the best;
- the set of on-chip blocks: input buffer, VRC, fitness, selection, chromosome memory, PRNG, output buffer.

These are this design's own choices:
- the candidate lists of column 1, column 2 and PE 25, and the alignment registers;
- the gene bit order;
- letting X and Y of a PE select the same signal (nothing forbids it in hardware);
- that operators 4, 10 and 11 are OR, 5 is XOR, and the wrap-around arithmetic;
- the fitness mapping 255·N − sum;
- single-point crossover and per-bit mutation, done serially;
- elitism through slot 0;
- the xorshift generator;
- the frame stores, line buffers and host interface;
- the default image size and generation count;
- reset behaviour, and dropping border pixels.

Not included, because they are outside the chip:
- the camera;
- the board processor;
- the computation of the roughness parameters (Ga, Ra) from the filtered image.

How far to trust it: every block is checked against an independent model (see below). The behaviour of the evolved filters has only been tested on synthetic images. Trained on a striped test surface with 20 % salt-and-pepper noise, a default run lowers the mean difference per pixel from 24.6 to 11.3 grey levels.

## Simulation

Each testbench prints `TB_RESULT checks=N failures=M` and stops on its own, with a watchdog. With Verilator 5:

```
verilator --binary --timing --assert --top-module tb_ehw_top -Irtl -Itb -y rtl -y tb +libext+.sv \
          rtl/ehw_pkg.sv tb/ehw_tb_pkg.sv tb/tb_ehw_top.sv -o sim && ./obj_dir/sim
```

| testbench | what it checks |
|---|---|
| `tb_fu` | all 16 operators over a grid of operand pairs |
| `tb_pe` | random genes and candidates; multiplexers, operator, one-clock latency |
| `tb_vrc` | random configurations and windows against the network model in `ehw_tb_pkg`; 7-clock latency |
| `tb_input_buffer` | every window and reference pixel of a 9 × 7 image; pass timing |
| `tb_fitness_unit` | sum, fitness and `done` timing with gaps in the stream |
| `tb_output_buffer` | frame write, read-back, restart after clear |
| `tb_chromosome_memory` | both banks, mixed reads and writes |
| `tb_selection_unit` | totals, best individual, every spin against the roulette model |
| `tb_ga_operators` | children, crossover decision, mutation count, rebuilt from the same random words |
| `tb_prng` | sequence against an xorshift model |
| `tb_ga_processor` | GA against a stand-in evaluator (bit-match score): evaluation count, elitism, best tracking, progress |
| `tb_ehw_top` | whole chip on a 12 × 10 image, 5 generations. Checks every output pixel against the model with `best_chrom`, `best_fitness` against a recomputed sum, the run time, and that each mechanism occurs. The mechanisms are: initial population, window stream, evaluations, roulette spins, crossover, skipped crossover, mutation, elitist copy, bank swap, new best, final pass. |
| `tb_ehw_full` | the same at every default (64 × 64, 64 generations, about 3 s of simulation), plus the check that the evolved filter improves the image |

`ehw_tb_pkg` holds integer reference models, written independently of the RTL: the operators and the full 25-PE network.
