# Stream-based crossover engine for genetic algorithms

A genetic algorithm breeds each new generation by crossing pairs of parent
chromosomes and mutating the children. Dozens of crossover algorithms are in
use, and a fixed hardware operator cannot cover them all. This design splits
the problem differently. The chromosome layout is a small set of registers. A
fixed streaming datapath walks the genes. All the randomness that makes one
crossover algorithm differ from another sits in a separate randomization
module. Because of that split, one-point, k-point, uniform, shuffle, reduced
surrogate, discrete, flat and arithmetic crossover share the same hardware and are picked by registers,
separately for binary, integer and floating-point genes.

The engine reads two parents from external memory. It crosses them gene by
gene: binary and integer genes go at one gene per clock, float genes at the
pace of the floating-point multiplier. It then mutates the two children and
writes them back. It repeats this for every pair of the population. It handles
only two-parent crossover.

## Chromosome description

A chromosome is a sequence of up to 16 *genesets*. Each geneset is a run of
0 to 63 genes of one type. Four 32-bit registers describe the chromosome,
with one byte per geneset. Byte `j` of register `r` describes geneset `4r+j`:

| bits | meaning |
|------|---------|
| 7:6  | gene type: `00` binary, `01` integer, `10` float, `11` terminator |
| 5:0  | number of genes in the set |

A terminator geneset ends the chromosome, and any sets after it are ignored.
Without a terminator, all 16 sets are used. Empty sets are skipped. The
longest chromosome has 16 × 63 = 1008 genes.

In memory, each geneset starts on a new 32-bit word. Binary genes are packed
32 per word, with the first gene in bit 0. Integer genes (signed 32-bit) and
float genes (IEEE-754 single) take one word each. A chromosome therefore takes
at most 1008 words (4032 bytes). Individual `i` of a population is stored at
`base + i * chrom_words`. `ga_config_regs` computes `chrom_words` and the gene
count from the four registers.

## Data flow

```
 memory ─► data_read_module ─► gene_deserializer A ─┐        ┌─► gene_serializer C ─┐
 (2 read   (parent selection,   gene_deserializer B ─┤        │                      ├─► data_write_module ─► memory
  ports)    FIFOs)                                  ▼        │   gene_serializer D ─┘    (2 write ports)
                                          crossover_module ─► mutation_module
                                          (BCM / ICM / FCM + mux)
                 gene_set_tracker ──(gene type, last flags)──┘
                 rand_module ───────(switch bit, alpha)──────┘
```

* **gene_set_tracker** holds three counters: the gene within its geneset, the
  geneset, and the gene index within the chromosome. From them it gives the
  current gene type and whether the current gene is the last of its set or of
  the chromosome. It advances each time the crossover module accepts a gene
  pair.
* **gene_deserializer** (one per parent) shows the current gene of its
  parent's word stream. For a binary gene that is one bit of the head word.
  For an integer or float gene it is the whole word. A word is popped after
  its last bit or its only gene is used.
* **crossover_module** sends each gene pair to the unit for its type:
  * `bin_crossover` for binary genes. It passes A→C and B→D, or crosses them
    when the switch bit is set.
  * `int_crossover` for integer genes. It is combinational.
  * `float_crossover` for float genes. It takes several clocks.

  A multiplexer then picks the result of that unit. The gene type and the
  "last" flags travel with the children.
* **mutation_module** inverts one random bit of each child gene with a
  probability set by a register (`mut_thr / 2^16`). For a binary gene that is
  the gene's only bit.
* **gene_serializer** (one per child) packs the genes back into words in the
  same layout. It marks the word that holds the chromosome's last gene.
* **data_write_module** writes child C of pair `p` as individual `2p` and
  child D as `2p+1` of the child population.

All stages between the de-serializers and the write ports use valid/ready
handshakes. A float gene or a slow memory stalls the stream without losing
data.

## Randomization: one datapath, many crossover algorithms

`rand_module` is driven by a 16-bit LFSR (a Galois LFSR with taps `0xB400`)
that moves 16 bit positions per draw.

At the start of each pair it makes one draw to decide whether the pair is
crossed at all. The pair is crossed when `random16 < PCROSS`, so `PCROSS` is
the crossover probability times 2^16, and 2^16 (the reset value) means always.
An uncrossed pair is copied to its children unchanged, in every mode, and is
then mutated as usual.

For a crossed pair it provides a switch bit and an alpha for the current gene.
The switch bit depends on the binary algorithm:

* **k-point crossover** (`k = 1` is one-point). At the start of each pair the
  module draws `k` cut points, one per clock. Each point is
  `random16 * (genes-1) / 2^16 + 1`. The switch bit of gene `g` is the parity
  of the number of cut points `≤ g`. This gives the alternating A/B segments of
  k-point crossover with no need to sort the points. At most 8 points
  (`K_MAX`) are supported.
* **uniform crossover**. Three fresh random bits per gene, read as an
  integer, are compared with a 3-bit threshold `t`. The gene is swapped when
  they are below it, so the swap probability is `t/8`. `t = 4` is the usual
  coin toss.
* **shuffle crossover**. Textbook shuffle crossover permutes both parents the
  same way, cuts them at one point and permutes back. The result swaps a
  uniformly random subset of `c` genes, with `c` uniform in `1..n-1`. The
  module produces that directly, with no permutation memory. It draws `c`
  like a cut point. Gene `g` is then swapped with probability
  `left / (n - g)`, where `left` is the number of swaps still to make. This is
  sequential sampling, tested as `random16 * (n - g) < left * 2^16`, and it
  makes exactly `c` swaps.
* **reduced surrogate crossover**. This works like k-point crossover, but the
  cut points are drawn among, and counted over, only the genes where the two
  parents differ. Every cut therefore changes the children. To know how many
  genes differ, the engine first streams the pair once without writing
  anything (a compare pass), counting those genes. It then reads the pair a
  second time for the crossover pass. The pair's memory traffic and time
  roughly double.

**alpha** for the arithmetic modes is either a fixed Q0.16 constant from a
register or 16 fresh random bits per gene.

The same switch bit drives the binary crossover, and also the exchange mode of
the integer and float units. So a k-point or uniform pattern applies across a
mixed chromosome.

## Integer and float crossover

Both units offer four modes, chosen separately for integer and float genes.
`a` below is alpha, a fraction in [0, 1).

| code | mode | child C | child D |
|------|------|---------|---------|
| 0 | exchange (discrete) | A or B by the switch bit | the other |
| 1 | mean | (A+B)/2 | same as C |
| 2 | blend | a·A + (1−a)·B | a·B + (1−a)·A |
| 3 | difference | a·(B−A) + A | a·(A−B) + B |

Mode 3 with random alpha is flat crossover: each child is a random point
between the parents, and C + D = A + B.

* **Integer arithmetic** is exact, rounded toward minus infinity. Every
  result lies between A and B.
* **The float unit** has one multiplier and one adder, used one operation per
  clock under a small sequencer. Its latency from accepting the operands to
  the result is 1, 2, 7 and 6 clocks for modes 0 to 3. A float gene in mode 2
  therefore holds its crossover module for 8 clocks.

### Parallel crossover modules

A float gene keeps a crossover module busy for several clocks. The top-level
parameter `N_CM` instantiates that many crossover modules side by side. Gene
pairs are dealt to them in turn (round robin), and their results are collected
in the same order, so the child stream keeps the gene order. The float unit
keeps its own copy of the operands, so a module takes a float gene at once and
the next gene can go to the next module. With `N_CM = 3`, a chromosome of
mostly float genes in blend mode ran about 2.6 times faster than with one
module, with bit-identical children. Binary and integer genes run at one per
clock either way.

The float arithmetic is reduced:

* Subnormal numbers are treated as zero.
* Results are truncated, not rounded to nearest.
* Infinity and NaN get no special handling.

The error is a few units in the last place of the larger operand.

## Configuration registers

Write through `cfg_we / cfg_addr / cfg_wdata`. Read back on `cfg_rdata`,
which is combinational.

| addr | name | fields |
|------|------|--------|
| 0–3 | CHROM0–3 | genesets, see above (reset 0: empty chromosome) |
| 4 | XOVER | [1:0] binary algorithm (0 k-point, 1 uniform, 2 shuffle, 3 reduced surrogate); [3:2] integer mode; [5:4] float mode; [11:8] k; [12] random alpha; [13] random parent selection; [18:16] uniform swap threshold `t` (reset: 1-point, `t` = 4) |
| 5 | ALPHA_MUT | [15:0] alpha (Q0.16); [31:16] mutation threshold (reset: alpha 0.5, no mutation) |
| 6 | POP | population size; pop/2 pairs are processed |
| 7 | PBASE | word address of the parent population |
| 8 | CBASE | word address of the child population |
| 9 | SEED | [15:0] randomization seed; [31:16] mutation seed |
| 10 | SELSEED | seed of the random parent selection |
| 11 | PCROSS | [16:0] crossover probability × 2^16 (reset 0x10000: every pair crossed) |

The seeds are loaded into the LFSRs when `start` is pulsed. With the same
seeds, a run repeats exactly.

Parent selection has two modes:

* **Consecutive** (default): pair `p` uses individuals `2p` and `2p+1`. This
  fits a population that an earlier fitness/selection step has already sorted
  into a mating pool.
* **Random**: each parent is drawn uniformly from the population by a 32-bit
  LFSR.

Fitness evaluation and selection are outside this engine.

## Ports and timing

Top module: `ga_crossover_top`.

**Parameters**

| parameter | default | meaning |
|-----------|---------|---------|
| `ADDR_W` | 32 | word address width |
| `K_MAX` | 8 | most cut points |
| `FIFO_DEPTH` | 4 | read buffer per parent |
| `N_CM` | 1 | crossover modules working in parallel |

**Control**

* Program the registers, then pulse `start` for one clock.
* `busy` stays high until `done` pulses for one clock, after the last child
  word is written.

**Read ports** `rda_*` (parent A) and `rdb_*` (parent B)

* A request (`req`, `addr`) is accepted in a cycle where `gnt` is high.
* Each accepted request is answered by exactly one `rvalid`/`rdata`, in order.
* Responses may come at any latency and cannot be stalled. The engine issues
  only as many requests as its FIFO can absorb.

**Write ports** `wrc_*` (child C) and `wrd_*` (child D)

* `valid`/`addr`/`data` are held until `ready`.

**Status outputs**

* `cur_gene`, `cur_set`, `cur_type`: the tracker position.
* `cur_pair`, `parent_a`, `parent_b`: the current pair and its parents.
* `mut_count`: the number of mutated child genes since `start`.

**Throughput**

Pairs are processed one after another. Each pair costs:

* a few clocks of setup,
* `k` clocks to draw the cut points (one for shuffle, none for uniform),
* for reduced surrogate crossover, a compare pass of one clock per gene,
* one clock per binary or integer gene (given one word per clock per port),
* the float unit's time for each float gene (shared among `N_CM` modules),
* a short drain.

In simulation, a pair of 1008-gene chromosomes took 1015 clocks with binary
genes only, and the same with integer genes only. Reset (`rst_n`) is
asynchronous and active low.

## Where this design departs from, or adds to, its source

These are the design's own choices, where the source description gives only
the function:

* the memory layout of genes
* the register map
* the port protocols
* the way cut points are drawn
* how shuffle and reduced surrogate crossover are produced (direct
  subset sampling; a compare pass that reads each pair twice)
* the crossover-probability register
* the exchange mode of the integer and float units
* the second child of the arithmetic formulas (the formula with A and B
  swapped)
* the bit-flip mutation
* the child placement
* pair-by-pair sequencing

The description lists some things that are not built:

* The description suggests adding crossover modules in parallel when float
  genes limit throughput, without a number. Here this is the `N_CM`
  parameter, with a default of one module.
* The description quotes up to 2^10−1 genes. Its own 6-bit counts in 16
  genesets reach 1008, and that is the limit here.

## Verification

Each module has a self-checking testbench in `tb/` named `tb_<module>`. Each
one prints `TB_RESULT checks=N failures=M`.

The unit testbenches compare against models written independently:

* floor arithmetic for the integer unit
* double-precision arithmetic with a tolerance for the float unit
* a software LFSR for the randomization module
* the testbench's own packing for the de-/serializers

They also check the float latencies and the one-gene-per-clock rate.

`tb_ga_crossover_top` runs the whole engine with its default parameters
against a memory model. The model gives random grants, 1–3 clock read latency
and random write back-pressure. The test:

1. programs ten configurations, including the largest chromosome (16 × 63
   genes);
2. decodes every child from memory;
3. checks each child against its parents (see the testbench header for the
   rules).

It counts every mechanism and fails if one never happens:

* empty and terminator genesets
* k-point, uniform, shuffle and reduced surrogate crossing
* pairs crossed and pairs copied under a crossover probability below 1
* all integer and float modes
* float stalls
* random selection
* mutation
* read and write stalls

`tb_ga_crossover_par` runs an engine with three crossover modules next to one
with the default single module, on the same parents and seeds. It requires
every child word to be equal, and requires the parallel engine to be clearly
faster on float-heavy chromosomes.

To run a testbench with Verilator:

```
verilator --binary --timing --assert -Wno-fatal -y rtl +libext+.sv -Irtl \
  rtl/ga_pkg.sv tb/tb_ga_crossover_top.sv --top-module tb_ga_crossover_top
./obj_dir/Vtb_ga_crossover_top
```

`-y rtl` lets Verilator find each module in `rtl/<name>.sv`. The package has
to be named first. `-Wno-fatal` keeps the testbenches' width warnings from
stopping the build. The top-level test takes about ten seconds.
