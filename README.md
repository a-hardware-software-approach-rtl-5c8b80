# Nonbonded-force accelerator for molecular dynamics (write-back design)

In a molecular dynamics step, about three quarters of the time goes into the
nonbonded forces: the Lennard-Jones and Coulomb forces between every pair of
atoms closer than a cutoff. This RTL moves that one task into an FPGA next to
a host processor. The host keeps everything else: integration, the
neighbor-list build and the bonded forces. At each step the host hands the
accelerator three things: the atom positions and charges, a neighbor list, and
a force array. The accelerator adds the nonbonded force on every atom into the
force array and returns the total nonbonded potential energy. All arithmetic
is IEEE single precision.

The organisation follows the *write-back* scheme of Scrofano, Gokhale, Trouw
and Prasanna, "A Hardware/Software Approach to Molecular Dynamics on
Reconfigurable Computers". It uses Newton's third law: each pair is evaluated
once, and the pair force is added to atom i and subtracted from atom j. The
core problem is the read-modify-write of f_j in a deep floating-point
pipeline. The sections below explain how the write-back scheme makes that
safe.

## Data flow

```
 neighbor-list      +-----------+   +-------------------+   +---------------+
 buffers (2x) ----> | nl_reader |-->| distance_pipeline |-->| neighbor_fifo |
                    +-----------+   +-------------------+   +---------------+
                          ^ stall (almost full)  ^ positions        |
                          +------------------------------------------+
                                                                    v
  force memory <------> force_controller <------------> force_pipeline
  (f_i, f_j, write-back)   (force_ram inside)     (CALC_NBF, accumulators,
                                                   lj_const_ram inside)
```

* **nl_reader** reads the packed neighbor list, one 64-bit word per cycle.
  It decodes each word into an *i header* (a new atom i), a *neighbor* j, or,
  after the last word, an *end* marker.
* **distance_pipeline** reads the {x, y, z, q} record of every atom it
  meets. It forms r_ij = r_i - r_j under the minimum-image convention, then
  r² = |r_ij|². A neighbor goes on only if r² < rc². The list is built with a
  radius larger than rc, so this test is where pairs are rejected.
* **neighbor_fifo** (2048 entries) decouples the two halves. The distance
  side has no dependences and runs ahead at one item per cycle. The force side
  must stop after every atom, as explained below.
* **force_pipeline** computes the pair force and potential (CALC_NBF).
  It sums f_ij and the pair potential into four accumulators: f_i.x, f_i.y,
  f_i.z and the energy. It reads f_j from force memory and stores
  f_j − f_ij in the on-chip **force_ram**.
* **force_controller** sequences each atom and owns the single port of
  force memory.

## The write-back scheme, and why the pipeline drains after every atom

Force memory is single-ported, and it needs **four dead cycles** whenever it
switches between read and write mode. A naive pipeline reads f_j, subtracts
f_ij and writes it back in the same stream. That design stalls on every port
conflict. It also has a read-after-write hazard: a later atom can read f_j
before the earlier subtraction is written.

The controller avoids both problems. For every atom i it does the following:

1. Read f_i (1 + `OBM_RD_LAT` cycles). Load it into the force accumulators
   as their starting value.
2. Stream i's neighbors from the FIFO, one per cycle. The force pipeline
   reads each f_j on the same memory port, timed so that f_j arrives in the
   same cycle as f_ij. f_j − f_ij goes to force RAM slot n.
3. When the FIFO head is the next i header (or the end marker), stop taking
   entries and **drain** the pipeline (13 cycles).
4. Switch force memory to write mode (4 cycles). Write f_i, then write every
   force RAM slot back to its atom j, one per cycle.
5. Switch back to read mode (4 cycles).

An atom j appears at most once in atom i's list, so the slots never collide.
A new atom starts only after the previous write-back is done, so the hazard
cannot occur, and the memory changes mode only twice per atom. The cost is
the drain. The FIFO limits that cost to the force half: while the force side
drains and writes back, the distance side keeps filling the FIFO. For an
atom with N surviving neighbors, one atom takes exactly

```
2N + 26 cycles  =  (N + p) + (N + 1) + 1 + 2s + overhead
```

Here p = 13 is the drain and s = 4 the dead cycles. This is the cost model
of the original publication, n(N + p) + n(N + 1) + n + 2sn, plus RD_LAT + 1
cycles for the f_i read and for seeing the next header. An atom with no
neighbors inside the cutoff costs 14 cycles. `tb_force_controller` checks
these numbers exactly.

Back-pressure is by admission. When fewer than `2*OBM_RD_LAT + 12` FIFO
entries are free, the reader stops issuing reads. That margin covers every
item already in flight through the two memory reads and the six distance
stages, so the FIFO cannot overflow. An assertion in `neighbor_fifo` checks
this.

## The force formula (CALC_NBF)

For a pair with r² < rc², types (ti, tj) and charges qi, qj:

```
s   = (12A/r^6 − 6B)/r^8 − FS/r + qq (1/r² − 1/rc²)/r        f_ij = s · r_ij
v   = A/r^12 − B/r^6 + FS·r − PS + qq (1/r − 2/rc + r/rc²)
qq  = ke · qi · qj
```

The first two terms are the Lennard-Jones force (A/r^12 − B/r^6
potential), and the last is cutoff Coulomb. Both are *shifted*, so force and
potential go continuously to zero at rc. Per type pair, the host loads four
constants into `lj_const_ram`:

* A and B;
* FS = 12A/rc^13 − 6B/rc^7, the LJ force at rc;
* PS = A/rc^12 − B/rc^6 + rc·FS.

The Coulomb constant ke (for example 332.06 kcal·Å/(mol·e²)), 1/rc² and 2/rc
are registers.

The pipeline is 12 operator stages deep: sqrt → 1/r → 1/r², r →
1/r⁴ → 1/r⁶, 1/r⁸ → … → s, v → f_ij. It is followed by the f_j subtraction and
the force RAM write. Every operator is an `fp_core` instance with a one-cycle
latency. The operands a later stage needs travel alongside in `pipe_delay`
shift registers.

## Memory formats and host protocol

| memory | word | layout |
|---|---|---|
| neighbor list | 64 bit | `[63]` new-i flag, `[32 +: 5]` atom type, `[19:0]` atom index |
| positions | 128 bit (two 64-bit banks read together) | `{q, z, y, x}` fp32 |
| forces | 128 bit (two banks) | `{pad, z, y, x}` fp32 |

The list is one flat stream. Each atom i appears as a flagged word, followed
by its neighbors j > i (a half list). Because the type travels in the same
word, no separate type array is needed. Because the charge sits in the unused
fourth position word, no separate charge array is needed. Together with two
buffers of two banks each for the list, that is eight 64-bit banks.

**Neighbor-list buffers.** The host copies the list in sections into two
alternating buffers. It raises `sec_valid[s]` with `sec_len[s]` words, and
sets `sec_last[s]` on the final section. The reader pulses `sec_release[s]`
after issuing the last read of a buffer, then moves to the other buffer. The
host may then refill the released one. This lets the copy of one section
overlap the computation on the other.

**Configuration** (`cfg_we`, `cfg_addr`, `cfg_wdata`), before `start`:

| cfg_addr | content |
|---|---|
| `0x000`–`0x002` | box length x, y, z |
| `0x003` | rc² |
| `0x004` | ke |
| `0x005` | 1/rc² |
| `0x006` | 2/rc |
| `0x800 + sel*0x200 + ti*MAX_TYPES + tj` | sel 0 A, 1 B, 2 FS, 3 PS |

Force memory must hold zero, or whatever the forces should be added to,
before `start`. `done` pulses once all forces are in force memory. `pe_total`
then holds the summed potential. The event counters record pairs tested and
kept, minimum-image corrections, buffer switches, FIFO-full cycles, starved
cycles, mode switches and atoms processed.

All three memory ports assume a fixed read latency of `OBM_RD_LAT` cycles
(default 2, at least 2). A write takes effect at the clock edge.

## Sizes

| parameter | default | basis |
|---|---|---|
| `FIFO_DEPTH` | 2048 | four 512-word block RAMs per field; ≥ 2 × 750 neighbors |
| `FRAM_DEPTH` | 1024 | two block RAMs per force component; ≥ 750 neighbors |
| `LJ_DEPTH` | 512 | one block RAM per constant |
| `MAX_TYPES` | 22 | 22² = 484 type pairs fit 512 entries |
| `DEAD_CYCLES` | 4 | memory read/write turnaround |
| `ATOM_W` | 20 bits | up to 1 M atoms |

The two reference systems of the original work fit these sizes:

* palmitic acid: 52 558 atoms, 8 types;
* CheY protein: 32 932 atoms, 17 types.

Both use a cutoff of 10 Å and a list radius of 12 Å, and no atom has more
than 750 neighbors. With N ≈ 192 neighbors per atom, the force side needs
about 52 558 × 410 ≈ 21.5 M cycles per step for palmitic acid. That is
0.22 s at 100 MHz, while the distance side works through the 17 M list
entries in parallel.

## Where this RTL departs from the original

* **Floating-point operators.** The original uses vendor cores, and its
  pipeline is about 200 stages deep. Here `fp32_pkg` and `fp_core` supply
  single-cycle operators with these properties:
  * round-to-nearest-even;
  * denormals flushed to zero;
  * no NaN propagation.

  A single-cycle divider and square root are far too slow for 100 MHz on a
  real FPGA. Retiming them into several stages means lengthening
  `force_pipeline` (the `LATENCY` and delay-line lengths) and the drain count
  in the cycle-count check.
* **Accumulators** are single-cycle adder loops. The original's accumulator
  pipeline needed a flush. Here the flush is simply the load of f_i at a new
  atom.
* **FIFO** is one wide record per entry with first-word-fall-through reads,
  which map to distributed RAM. The original uses six 32-bit block-RAM
  fields. The record also carries the neighbor's index, needed for the f_j
  update.
* **Open choices.** These are this design's own: the minimum-image correction
  (applied once per component), the bit positions in the neighbor-list word,
  the buffer handshake, the register map, the reset (asynchronous, active
  low) and the memory read latency.
* **Not built:** the host software, the DMA engine and the board memories,
  which the testbenches model as arrays. Also not built: the multi-node
  variant, in which several accelerators each take part of the list and the
  host sums their forces. Each node would be one `nbf_top`.

## Simulating

Each block has a self-checking testbench in `tb/` that ends with a
`TB_RESULT checks=… failures=…` line. `tb_pkg.sv` holds the real-valued
reference helpers: the fp32↔real conversion, minimum image, the pair force
and the shift constants.

```
verilator --binary --timing --assert -y rtl -y tb \
  rtl/fp32_pkg.sv tb/tb_pkg.sv tb/tb_nbf_top.sv \
  --top-module tb_nbf_top -o sim && obj_dir/sim
```

Replace `tb_nbf_top` with any other testbench name. The testbenches, and
what they establish:

* `tb_nbf_top` runs the whole accelerator at default parameters, in about
  12 s of simulation. It uses 800 atoms of three types and a 35 605-entry
  list split into nine buffer sections, with one deliberately late refill.
  It checks every force to 1e-5 of the largest term of the formula, and the
  total energy. It also checks that each mechanism happened: cutoff
  rejection, minimum-image correction, buffer switching, FIFO back-pressure,
  starvation of the force side, and two mode switches per atom.
* `tb_workload_chey` runs a slice of a protein system at default
  parameters: 1100 atoms of 17 types at protein density (0.08 atoms/Å³) in
  the smallest box the 12 Å list allows. That gives realistic neighbor
  counts: 284 652 list entries, up to 310 kept neighbors per atom and
  358 274 cycles. It checks every force, the energy and that all 289 type
  pairs were used.
* `tb_force_controller` checks the exact cycle count of the write-back
  scheme.
* `tb_force_pipeline` checks the 12-cycle latency and every force-RAM write.
* `tb_fp_core` checks each operator against correctly rounded results.

These tests show that the arithmetic matches the formulas and that the
sequencing is consistent. They cannot show fidelity to the original's
unpublished internals.
