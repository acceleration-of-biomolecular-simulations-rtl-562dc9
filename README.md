# One-pair-per-clock non-bonded force kernel for molecular dynamics

This is an FPGA kernel for the most expensive part of a classical molecular
dynamics time-step: the non-bonded forces between atoms. It implements the
CHARMM force field as LAMMPS evaluates it with the `lj/charmm/coul/long` pair
style:

- a Lennard-Jones term, smoothly switched off between an inner and an outer
  cut-off (8 Å and 10 Å in the Rhodopsin protein benchmark);
- the real-space part of an Ewald (PPPM) Coulomb sum.

For every local atom it returns the total force on that atom. For the whole
call it returns the van der Waals energy, the Coulomb energy and the six
virial terms.

The main idea is to turn off Newton's third law and use a *full* neighbour
list, in which each atom lists all of its neighbours. That doubles the
arithmetic, because every pair is computed twice, once from each side. In
exchange, the kernel never adds a force back into a neighbour `j`, so it never
has to write to the memory that holds the atoms. The loop then has no memory
dependence between iterations: a new pair enters the pipeline every clock, and
the force on atom `i` is a plain running sum over its own list. A conventional
half-list kernel would need a read-modify-write of atom `j` per pair. On
single-ported SRAM that costs extra clocks per pair, and it makes one pair
depend on the ones before it.

## Data path

A pair travels through these blocks in order:

```
 64-bit neighbour-list stream ──► nl_unpack ──► one 32-bit index / clock
                                                   │
                 banks AL AH CL (atom i) ◄── pair_sequencer ──► banks BL BH DL (atom j)
                                                   │  pair: x,y,z,q,type of i and j
                                 lj_coeff_ram ◄────┤  lj1..lj4 for (type i, type j)
                                                   ▼
                                          pair_force_pipe   7 stages, binary32
                                 ┌─────────────────┴──────────────────┐
              3 × stream_fp_accum (binary32)          8 × stream_fp_accum (binary64)
              fx, fy, fz summed per list               evdwl, ecoul, 6 virial terms,
                        │                              summed over the whole call
                   force_pack ──► 128-bit record {atom, fz, fy, fx} per local atom
```

All stages advance together on one signal, `en`, like a compiled loop
pipeline. `en` is the AND of the accumulators' ready signals. It drops only
when a neighbour list ends before the previous list's sum has cleared the
accumulator. When the stream has no index ready, the pipeline carries an
empty slot (a bubble) instead.

The files are:

| file | what it is |
|---|---|
| `rtl/fp_pkg.sv` | binary32/binary64 arithmetic functions: add, multiply, reciprocal, 1/√x, exp |
| `rtl/md_pkg.sv` | sizes, bank numbers and the pair, parameter and result structs |
| `rtl/obm_bank.sv` | one single-ported 64-bit on-board SRAM bank, with read/write turnaround |
| `rtl/nl_unpack.sv` | 64-bit words → 32-bit neighbour indices |
| `rtl/pair_sequencer.sv` | flattens the loop "for each i, for each neighbour j" into one pair per clock |
| `rtl/lj_coeff_ram.sv` | the 69 × 69 table of Lennard-Jones coefficients |
| `rtl/pair_force_pipe.sv` | the force, energy and virial arithmetic |
| `rtl/stream_fp_accum.sv` | a one-value-per-clock floating-point accumulator |
| `rtl/force_pack.sv` | joins three force streams into 128-bit records |
| `rtl/map_compute_forces.sv` | the top level |

## Memory layout

Six 4 MB banks are used. Each holds 512K words of 64 bits. Atom `i` and atom
`j` are read from separate copies of the same data, so both reads happen in
the same clock without competing for a single port.

| bank | contents, high half : low half | read for |
|---|---|---|
| AL, BL | Py : Px | atom i, atom j |
| AH, BH | q : Pz | atom i, atom j |
| CL, DL | neighbour count : type | atom i, atom j |

- Index `k` of each bank holds atom `k`.
- Atoms `0 .. nlocal-1` are the local atoms. Ghost atoms, which are periodic
  images and neighbouring domains, follow them.
- The neighbour count is only used for local atoms.
- The host must write the same data into the B/D banks as into the A/C banks.

The Lennard-Jones table holds one 128-bit word `{lj4, lj3, lj2, lj1}` per
type pair, at address `ti*69 + tj`. For the switched CHARMM form,
`lj1 = 48 ε σ¹²`, `lj2 = 24 ε σ⁶`, `lj3 = 4 ε σ¹²` and `lj4 = 4 ε σ⁶`.

The neighbour list is not stored on the FPGA. It arrives as a stream of
indices: the lists of atoms 0, 1, 2, … one after another, two indices per
64-bit word, low half first. If the total is odd, the high half of the last
word is ignored, and the next call drops it when it starts.

## The force pipeline

`pair_force_pipe` computes everything for every pair, with no branches and no
lookup tables. The cut-off tests only decide, at the end, whether the pair
contributes or gives zeros. The arithmetic is:

```
del = x_i − x_j,  rsq = |del|²,  r2inv = 1/rsq,  r6inv = r2inv³
Coulomb:  r = √rsq, g = g_ewald·r, e = exp(−g²), t = 1/(1 + 0.3275911·g)
          erfc ≈ t(A1 + t(A2 + t(A3 + t(A4 + t·A5))))·e
          pre = qqrd2e·q_i·q_j / r
          forcecoul = pre·(erfc + 2/√π·g·e),  ecoul = pre·erfc
LJ:       forcelj = r6inv(lj1·r6inv − lj2),   philj = r6inv(lj3·r6inv − lj4)
          when inner² < rsq < outer², with D = outer² − rsq:
            sw1 = D²(outer² + 2rsq − 3inner²)/denom,  sw2 = 12·rsq·D(rsq − inner²)/denom
            forcelj = forcelj·sw1 + philj·sw2,  evdwl = philj·sw1
fpair = (forcecoul + forcelj)·r2inv,   f_i = del·fpair
```

- `denom = (outer² − inner²)³`. It comes in as its reciprocal, `inv_denom_lj`,
  in the `prm` input, so the pipeline never divides by it.
- A1..A5 are the usual LAMMPS polynomial coefficients.
- Every pair is met twice in a full list. Each visit therefore adds half of
  the pair's energy and half of its virial `(del_a · f_b)`.

There are seven stages:

1. the differences `del`;
2. `rsq` and the range tests;
3. `1/rsq` and `1/r`;
4. `g`, `r6inv` and the charge prefactor;
5. the exponential, `t`, the Lennard-Jones terms and the switching factors;
6. erfc and the sums;
7. zeroing of pairs outside the cut-off.

The results leave seven advancing clocks after the pair entered.

**Arithmetic.** `fp_pkg` implements the binary32 operators directly:

- add and multiply round to nearest even;
- subnormal numbers are flushed to zero;
- the reciprocal and `1/√x` use a bit-trick seed followed by three Newton
  steps;
- `exp` uses Cody–Waite range reduction and a degree-7 polynomial.

Against a double-precision model, the force of a single pair agrees to about
3·10⁻⁵ relative to the size of its terms. This is more than ordinary binary32
rounding error, because the reciprocal and the exponential are approximations.

The functions are written as large combinational expressions. Each is
evaluated within one stage. To reach a high clock rate, the stages would have
to be retimed or the operators replaced with pipelined floating-point cores.
`LAT` in `pair_force_pipe` and the `en` pipeline-wide advance are the only
things that change if the pipeline gets deeper.

## Accumulating at one value per clock

A floating-point add takes several clocks in real hardware. A plain running
sum could therefore not take a new value every clock. `stream_fp_accum` gets
around this with two adders:

- **First adder.** It keeps `NPART` (default 4) partial sums in a ring.
  Value `k` of a list is added into partial sum `k mod NPART`, so the adder
  can be pipelined `NPART` deep without any wait.
- **Second adder.** When the last value of a list is taken, the `NPART`
  partials move to a buffer. The second adder folds them into one sum over the
  next `NPART` clocks. Meanwhile the first adder already starts on the next
  list.

The result of a list appears `NPART` clocks after its last value was taken.
A list that ends while the previous list is still being folded has to wait.
This happens only for lists shorter than `NPART` values. `in_ready` then drops
for that last value, and the whole pipeline stalls with it.

The same module is used in two ways:

- In binary32, once per force component, with lists of one atom's
  neighbours.
- In binary64, for the two energies and the six virial terms. There, the
  whole call is a single list, and the last pair of the last atom closes it.

The totals are summed in binary64 because, over tens of millions of pairs, a
binary32 sum drifts visibly.

## Flattening the loop

`pair_sequencer` turns the two nested loops into one stream of pairs.

- It reads atom `i` ahead of time into a holding register while the current
  atom is still issuing neighbours.
- For every neighbour index on the stream, it reads atom `j` from the B/D
  banks and issues a pair that carries:
  - the data of both atoms;
  - a `last` flag on the final neighbour of `i`;
  - a `last_atom` flag on the final pair of the call.
- An atom with an empty list issues one *dummy* pair. The dummy gives zeros
  and carries `last`, so every local atom still gets exactly one force
  record.
- A new atom can start at most once every three clocks. Lists of three or
  more neighbours run at full rate, but an atom with fewer than three
  neighbours costs one or two extra clocks. Real lists (hundreds of neighbours per atom)
  never notice.

## Using the top level

1. While `busy` is low, write the six banks through
   `host_wr_valid/bank/addr/data`.
   - A write is taken on a clock with `host_wr_ready` high.
   - After the kernel has been reading, the first write waits 2 clocks. This
     is the read/write turnaround of a single-ported SRAM.
2. Write the table through `lj_wr_en/addr/data`.
3. Set `prm`. It holds the binary32 values of `cut_bothsq`, `cut_coulsq`,
   `cut_ljsq`, `cut_lj_innersq`, `1/denom`, `qqrd2e` and `g_ewald`.
4. Pulse `start` with `nlocal ≥ 1`.
5. Stream exactly `Σ nn[i]` indices on `nl_valid/nl_data/nl_ready`.
6. Collect `nlocal` records on `f_valid/f_data/f_ready`.
   - The records arrive in atom order.
   - Each record is `{atom number, fz, fy, fx}`, with the atom number in bits
     127:96.
7. `done` pulses once the totals are valid on `eng_vdwl`, `eng_coul` and
   `virial[0..5]` (xx, yy, zz, xy, xz, yz). All of them are binary64.
   `busy` falls at the same time.

The banks, the table and `prm` keep their contents between calls. Only the
positions need rewriting every time-step.

**Throughput.** One pair per clock. A call takes
`pairs + (short-list cost) + about 40` clocks. The fixed part is made up of
the bank turnaround, the first read, the 7-stage pipeline and the final folds
of the accumulators. For the Rhodopsin benchmark, a call covers:

- about 32K local atoms;
- 80K atoms including ghosts;
- 24M pairs in the full list.

At 150 MHz that is about 160 ms per time-step. The banks would be 80K words
full, out of 512K.

## Where this design departs from the original, or goes beyond it

- **Periphery.**
  - A plain host write port stands for the vendor DMA into on-board memory.
  - A valid/ready stream stands for the global-memory stream that delivers
    the neighbour list.
  - `start`/`done` stand for the host function call.
  - These outside parts are not part of this RTL.
- **Neighbour list.** The list is built elsewhere. Building it on the FPGA
  was considered as an alternative and is not included.
- **Special bonds.** The scaling factors for bonded neighbours (1-2, 1-3 and
  1-4 exclusions) are not applied. The kernel assumes these pairs are already
  absent from, or handled outside, the list.
- **Ghost neighbours.** A pair with a ghost neighbour adds half of its energy
  and virial, like any other pair. This is exact when every local pair
  appears twice. It may differ from a given MD code's bookkeeping for pairs
  that cross a domain boundary.
- **Energy precision.** The two energies are summed in binary64. The original
  names 64-bit sums only for the virial.
- **Erfc.** The polynomial erfc is used instead of the table interpolation
  that LAMMPS normally uses. The original kernel also dropped the tables, to
  fit one FPGA.
- **Own choices.** The following are this design's own choices:
  - the bank packing and the second copy of the banks;
  - the prefetch register;
  - the dummy pair;
  - the 7-stage split;
  - `NPART = 4`;
  - the atom number in the record's spare word;
  - all handshakes.

## Verifying and simulating

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`. `tb/md_ref_pkg.sv` holds a double-precision
reference of the pair force, and the force-related testbenches share it.

| testbench | what it checks |
|---|---|
| `tb_fp_pkg` | all arithmetic functions against real-number results, including edge cases |
| `tb_obm_bank` | read/write data and the 2-clock turnaround (256-word bank) |
| `tb_nl_unpack` | index order, gaps, back-pressure, clear of a spare half |
| `tb_lj_coeff_ram` | random writes and reads of the full 69 × 69 table |
| `tb_pair_sequencer` | every issued pair field by field, empty lists, stalls, gaps, issue rate |
| `tb_pair_force_pipe` | random pairs inside, in the switching region and beyond the cut-offs; latency; stalls |
| `tb_stream_fp_accum` | sums of random lists, one-value-per-clock rate, result latency, short-list stall |
| `tb_force_pack` | record contents and order, gaps, back-pressure, restart of the atom number |
| `tb_map_compute_forces` | the whole kernel end to end, at full size (below) |

`tb_map_compute_forces` runs the top level with all default sizes.

- **System.** It builds a random system of 48 local and 16 ghost atoms:
  - charged atoms of random types;
  - a complete 69 × 69 coefficient table;
  - full neighbour lists out to 12 Å, so some pairs fall beyond the 10 Å
    cut-off and some in the switching region.
- **Checks.** It runs one time-step twice:
  - once at full rate, where it checks the clock count;
  - once with random gaps in the neighbour stream and random back-pressure
    on the output.
- **Comparison.** Every force record, both energies and all six virial terms
  are compared with the reference.
- **Mechanisms.** It counts each of the following, and fails if any never
  happened:
  - the bank turnaround;
  - an accumulator stall (two one-neighbour lists back to back);
  - a dummy pair;
  - a pair beyond the cut-off;
  - a pair in the switching region;
  - a stream gap;
  - output back-pressure;
  - a dropped spare half-word.

To simulate with Verilator 5, run from the repository root. This example is
for the top level:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/fp_pkg.sv rtl/md_pkg.sv tb/md_ref_pkg.sv rtl/obm_bank.sv rtl/nl_unpack.sv \
  rtl/lj_coeff_ram.sv rtl/pair_sequencer.sv rtl/pair_force_pipe.sv \
  rtl/stream_fp_accum.sv rtl/force_pack.sv rtl/map_compute_forces.sv \
  tb/tb_map_compute_forces.sv --top tb_map_compute_forces -o sim
./obj_dir/sim
```

For a block testbench, list the two packages, `tb/md_ref_pkg.sv` where the
testbench uses it, the block's files and the testbench. The whole end-to-end
test builds in well under a minute and simulates in under a second. The
testbenches drive inputs just after a rising edge and check at the falling
edge.

**Limits of the checks.**

- The testbenches show that the kernel matches the reference force law on
  small random systems. They do not run the Rhodopsin benchmark itself.
- The arithmetic has been checked against a reference for accuracy, not
  proven IEEE-exact. The reciprocal, square root and exponential are
  approximations, as noted above.
- No timing closure or resource numbers exist for this RTL.
