# Dual-field ECC processor with a heterogeneous dual-PE datapath

This is a hardware processor for elliptic-curve scalar multiplication, K·P. It works over
prime fields GF(p) and binary fields GF(2^m). The field size m can be anything up to the
datapath width (160 bits by default), and the modulus or field polynomial is set at run
time. Three ideas shape the design:

1. **Two unequal processing elements (PEs) working in parallel.**
   - The GFAU (Galois field arithmetic unit) can divide, multiply, add and subtract.
   - The MAS (multiplier–adder/subtractor) is smaller and cannot divide.
   - Points use affine coordinates, so every point doubling and every point addition needs
     exactly one field division. The division is the slowest operation.
   - A scheduler keeps both PEs busy and sends every division to the GFAU. The result is
     close to the speed of two full units, at much less area.
2. **A scalar-multiplication order that resists power analysis.**
   - The loop is right-to-left double-and-add-always. It is rewritten so that the doubling
     and the addition of one iteration are independent. They run as two parallel threads.
   - The base point is masked with a random point, which defeats DPA and the "doubling
     attack". The mask is refreshed after every run.
   - The same field operations run for every key bit.
3. **A two-level memory.**
   - A narrow shared memory, w bits wide, holds all operands.
   - Each PE's operand and result registers act as a small local level.
   - A result can go straight from one PE's result register into the other PE's input
     ("local memory synchronization"), without a round trip through memory.

The whole design has been simulated end to end at full size: a 160-bit key over GF(p) and
over GF(2^160), with the results checked against a reference model.

## Scalar multiplication: the masked right-to-left loop (`ecsm_seq`)

With a random mask point M and N = K·M, the processor computes

    K·P = K·(P + M) − N

It uses the right-to-left double-and-add-always loop. Let P' = P + M. Start with Q2 = P'
and Q0 = 0 (the point at infinity). For each key bit K_i, from the least significant bit
upwards:

    QT = Q2          (the old Q2)
    Q2 = 2·Q2        thread 0: point doubling (ECPD)
    Q1 = Q0 + QT     thread 1: point addition (ECPA)
    Q0 = Q_{K_i}     keep Q1 if the bit is 1, keep Q0 if it is 0

The doubling reads only Q2, and the addition reads Q0 and the old Q2. So inside one
iteration the two threads do not depend on each other and can run on the two PEs at the
same time. Either way the addition is computed, so the operation sequence does not depend
on the key.

The sequencer never copies points. It renames them:

- **Q2 and QT** live in a pair of memory slots, Q2A and Q2B. The selector `par` flips every
  iteration, so the doubling writes the other slot, and the slot it read becomes QT.
- **Q0 and Q1** live in a second pair of slots. "Q0 = Q1" is a flip of the selector `sel`.
- The datapath does the same work whatever the key bit is. Only a selector register
  changes.

While Q0 is still the point at infinity (from the start, until the first 1 bit of K has
been processed), the addition thread runs a two-task *move*, Q1 = QT, instead of an
addition. Affine coordinates cannot represent infinity. This shortens those first
iterations, so it reveals how many zero bits K ends with, just as the design this
follows does.

The stages, in order:

| stage    | threads                             | what it does |
|----------|-------------------------------------|--------------|
| PRE      | 0                                   | x, y of P and the curve constant a into the Montgomery domain (3 divisions by 1) |
| MASK     | 1                                   | Q2 = P + M |
| LOOP ×L  | 0 and 1                             | doubling of Q2; addition Q0 + QT (or move) |
| UNMASK   | 1                                   | R = Q0 − N |
| POST     | 1                                   | x, y of R out of the Montgomery domain (2 multiplications by 1) |
| REFRESH  | 0 (M) and 1 (N), optional           | M = (−1)^α·2M and N = (−1)^α·2N |

L is `key_len`, the number of key bits the host asks for. The loop always runs L
iterations. The random bit α comes in on a port; there is no random source on chip.

## Field arithmetic in the Montgomery domain

All arithmetic inside the loop is on Montgomery representations: X = x·2^m mod p, or
x·x^m over GF(2^m).

- **MM(A, B) = A·B·2^−m** is the Montgomery multiplication. It runs at radix 4: two bits
  of A are used per cycle, so it takes ceil(m/2) cycles. The quotient digit is
  q = −t·p mod 4, using p^−1 ≡ p (mod 4) for odd p. Over GF(2^m) the carry-free form is
  used. For odd m the last step is radix 2.
- **MD(A, B) = A·B^−1·2^m** is the Montgomery division. Dividing two Montgomery values
  gives a Montgomery value directly, so no correcting multiplications are needed. It runs
  at radix 4 (see below).
- The domain conversions fall out of these two:
  - MD(x, 1) = x·2^m converts into the domain;
  - MM(X, 1) = X·2^−m converts back out.
- ADD and SUB work modulo p, or are XOR over GF(2^m). They take one cycle.

### The radix-4 division

The division is the hardest part of the design. Its registers start as U = p, V = b,
R = 0, S = a. Each iteration looks at the two low bits of U and V and at which of the two
is larger. It then removes one or two factors of 2 (t = 1 or 2) from U or V, and
subtracts one from the other where needed. Every iteration keeps two invariants:

    b·S ≡ a·V·2^i   and   b·R ≡ a·U·2^i   (mod p)

R and S are updated with small shifts and a subtraction:

- R' = k_rr·R − k_rs·S and S' = k_ss·S − k_sr·R, with each k in {0, 1, 2, 4};
- followed by a reduction modulo p.

When V reaches 0, U is 1, so R = a·b^−1·2^i.

- The counter i stops at m. Further iterations halve R and S instead, so the result is
  scaled by exactly 2^m.
- If V reaches 0 before i = m, R is doubled until i = m. This fix-up is this design's own
  addition and costs at most a few cycles.

The cases where U ≡ 2 or V ≡ 2 (mod 4) use the forms ((U/2) − V)/2 and (V − U/2)/2, and
the mirrored forms for V. These are the forms that keep both invariants.

Over GF(2^m), subtraction becomes XOR, and "larger" compares the coefficient vectors as
integers, which orders them by degree.

The unit is pipelined in two stages:

1. The first stage updates U and V and decides the case.
2. The decision is registered, and the second stage applies the matching R/S update one
   cycle later.

Each iteration therefore costs one cycle of throughput.

Measured mean division latency, including pipeline fill and fix-up:

| field      | mean latency |
|------------|--------------|
| GF(p)      | about 0.87·m cycles |
| GF(2^m)    | about 1.04·m cycles |

The reference design quotes an average of 0.66·m iterations. This implementation does
not reach that figure, and this is the main reason the whole scalar
multiplication is slower than the reference figures (see Performance).

## The two processing elements (`gfau`, `mas`)

- **`gfau`** performs MD, MM, ADD and SUB. It holds U, V, R and S, and the two pipeline
  stages described above.
- **`mas`** performs MM, ADD and SUB. It uses the same multiplication step (`mm_step`) and
  the same adder (`gf_addsub`) as the GFAU. An assertion fires if it is ever given a
  division.

Both PEs have the same interface and timing:

- `start` with `op`, `field`, `m`, `p`, `a`, `b`;
- `done` is high for one cycle;
- `res` holds the result until the next start.

Latencies:

| operation | cycles after start |
|-----------|--------------------|
| ADD / SUB | 1 |
| MM        | ceil(m/2) + 2 |
| MD (GFAU only) | iterations + fix-up + 3 |

## Priority-oriented task scheduling (`task_sched`, `instr_fifo`)

Each stage hands the scheduler up to two threads. A thread is a fixed program of field
operations, called *tasks*, with each operand given by its role:

- the point coordinates X1, Y1, X2, Y2, X3, Y3, which the sequencer binds to memory
  slots;
- the curve constant a;
- the constants 0 and 1;
- five temporaries per thread.

The programs are in `dfecc_pkg::prog_task` and follow the affine formulas:

| program  | GF(p) | GF(2^m) |
|----------|-------|---------|
| doubling | 12 tasks, 1 MD | 9 tasks, 1 MD |
| addition | 9 tasks, 1 MD | 11 tasks, 1 MD |

- Point subtraction adds one negation task in front: −(x, y) is (x, −y) over GF(p), and
  (x, x + y) over GF(2^m).
- The refresh program is a doubling followed by two moves. For α = 1 the second move is a
  negation.

A thread runs its tasks in order, one at a time. It issues the next task only after the
previous result has been stored. Tasks have three priorities:

| priority | operations |
|----------|------------|
| high     | MD |
| medium   | MM |
| low      | ADD, SUB |

Each thread is bound to one PE by its *PE ID*. At reset the doubling is bound to the GFAU
and the addition to the MAS.

- An MM, ADD or SUB task runs on the PE its thread is bound to.
- An MD task is pushed into the instruction FIFO (depth 2, one entry per thread). If the
  pushing thread was bound to the MAS, the two threads **exchange PE IDs**: the other
  thread moves to the MAS, and this thread will continue on the GFAU after its division.
- The GFAU, when free, serves the FIFO first, then its own thread's other tasks.
- The MAS serves only its own thread.

So the thread that is dividing always holds the GFAU, and the other thread keeps the MAS
busy with multiplications and additions. A stage ends when both threads have finished.
The sequencer then starts the next stage. This waiting point is the dependency between
loop iterations. PE IDs carry over from stage to stage.

Each PE slot runs a task in four steps:

1. load in1;
2. load in2;
3. start the PE and wait for `done`;
4. store the result.

The loads and the store are commands to the memory hierarchy.

## Memory hierarchy (`mem_hier`, `shared_mem`)

The shared memory is a simple dual-port array, `WM` = w bits wide, with a registered read.
A field element takes ceil(W/w) consecutive words. Entry e, word k is at address
e·ceil(W/w) + k. Slot assignments (`dfecc_pkg`):

| entries | contents |
|---------|----------|
| 0 | a |
| 1–4 | the Q0/Q1 pair |
| 5–8 | the Q2/QT pair |
| 9–10 | M |
| 11–12 | N |
| 15–16 | P |
| 17–18 | the result R |
| 19–23 | thread-0 temporaries |
| 24–28 | thread-1 temporaries |

Entries 30 and 31 name the constants 0 and 1. They are not stored: they are selected on
the input multiplexers.

`mem_hier` serves one command at a time, alternating round-robin between the two PEs. A
load of a PE input comes from the fastest place that holds the value:

| source | cycles |
|--------|--------|
| the constant 0 or 1 | 1 |
| the PE's own result register, if it still holds that entry (*reuse*) | 1 |
| the other PE's result register, if that holds the entry (*local memory synchronization*, the value moves register to register) | 1 |
| the shared memory: ceil(m/w) word reads through the w-bit buffer, plus one cycle of SRAM latency | T_MEM = ceil(m/w) + 1 |

Every result is **written through** to memory, which takes T_MEM cycles. Afterwards the
writing PE's result register is tagged with that entry. A tag is dropped when:

- its PE starts a new operation;
- the other PE writes the same entry;
- the host uses the memory;
- a new scalar multiplication begins.

Writing every result through costs memory time, but it means every value can always be
found in memory. The reference design keeps some values only in the local registers
(write-back).

## Using the processor (`dfecc_top`)

Parameters:

| parameter | default | meaning |
|-----------|---------|---------|
| W  | 160 | datapath width; any field with m ≤ W runs |
| WM | 80  | shared-memory width w |
| NWPE, AW, MW | derived | words per element, memory address width, width of m |

Inputs:

- `field`: `FLD_P` or `FLD_B`;
- `m`: the field length;
- `p`, W+1 bits:
  - over GF(p), the odd prime, which must be exactly m bits long;
  - over GF(2^m), the field polynomial including its x^m term;
- `key` and `key_len`;
- `refresh_en` and `alpha`.

To run a scalar multiplication:

1. While `busy` is low, write these through the host port (`host_we`, `host_addr`,
   `host_wdata`):
   - the curve constant a, and P = (x, y), in **normal** form;
   - M and N = K·M in **Montgomery** form (value·2^m mod p, or times x^m over GF(2^m)).

   The host chooses M, computes N, and keeps both for the next run.
2. Pulse `start`. Hold all inputs stable until `done` (one cycle).
3. Read the result from entries 17 and 18. Read data appears one cycle after `host_re`.
   Only the first ceil(m/w) words of an entry are defined.
4. With `refresh_en` set, M and N have been replaced in memory by (−1)^α·2M and
   (−1)^α·2N, ready for the next run.

The `stats` output (type `dfecc_pkg::stats_t`) carries counters that accumulate from
reset:

- MD tasks queued in the FIFO;
- PE-ID exchanges;
- loads by each route (synchronization, reuse, fetch);
- write-through stores;
- move iterations and Q0/Q1 swaps;
- tasks and occupied cycles per PE.

They are meant for performance analysis.

Curves:

- GF(p): y² = x³ + ax + b;
- GF(2^m): y² + xy = x³ + ax² + b.

b is never used.

The processor does not handle the exceptional cases of affine addition: adding a point to
itself or to its negative, or an input at infinity. With a random mask these occur with
negligible probability. A caller that needs certainty must check for them.

## Performance

Cycle counts of one full scalar multiplication with a 160-bit key at the default
parameters:

| field      | this RTL      | estimate from the reference design's operation model | reference chip |
|------------|---------------|------------------|------------------------|
| GF(p160)   | 101,836 cycles | 65,865 | 66.2K cycles |
| GF(2^160)  | 99,165 cycles  | 63,230 | 62.5K cycles |

The estimate uses T_MM = m/2, T_MD = 0.66·m, T_ADD = 1 and T_MEM = ceil(m/w) + 1. The
RTL is about 1.5× slower, for three reasons:

- the slower division;
- writing every result through to memory;
- the simple load–load–execute–store task sequence, which does not overlap memory
  traffic with computation.

Division latency is data-dependent. The sequence of operations, and so the overall shape
of the power trace, does not depend on the key. The exception is the initial move
iterations, which reveal how many zero bits the key ends with.

## How far it follows the reference design, and where it departs

Follows:

- the dual-field radix-4 Montgomery multiplication and division, with the two-stage
  division pipeline;
- one full-function PE and one divider-less PE;
- MD-first priority scheduling through an instruction FIFO, with exchange of PE IDs;
- the two-level memory with a w-bit buffer, T_MEM = ceil(m/w)+1, write-through and local
  synchronization between the PEs;
- the reformulated right-to-left double-and-add-always loop as two threads;
- the randomized base point with refresh M ← (−1)^α·2M.

This design's own choices:

- w = 80. The reference design does not give w; 80 makes its cycle model match its
  measured 66.2K cycles.
- Every result is written through.
- The threads run freely within a stage rather than in the fixed sub-stage timetable of
  the reference schedule.
- The division fix-up when V reaches 0 early.
- The FIFO depth of 2.
- The round-robin memory arbiter.
- The host port and the memory layout.
- M and N are supplied in Montgomery form.
- Points are renamed instead of copied.

Not included:

- the on-chip random number generator (α is an input);
- pads, clocking, and any test-chip infrastructure.

The larger configurations of the reference family (192 to 521 bits, and the 163-bit
binary-field design) need `W` raised to at least the field size. A W = 256 build has been
simulated with a 48-bit key over four fields: GF(p192), GF(p256), GF(2^163) and
GF(2^233).

| field | cycles | estimate from the operation model |
|-------|--------|-----------------------------------|
| GF(p192)  | 38,180 | 24,921 |
| GF(p256)  | 49,356 | 32,812 |
| GF(2^163) | 32,530 | 20,907 |
| GF(2^233) | 43,137 | 28,020 |

Sizes up to 521 bits have not been simulated.

## Simulating

Each testbench in `tb/` checks itself. It prints `TB_RESULT checks=N failures=F` and has a
watchdog. Example with verilator 5:

    verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
      rtl/dfecc_pkg.sv tb/ecc_ref_pkg.sv tb/tb_dfecc_top.sv --top-module tb_dfecc_top
    ./obj_dir/Vtb_dfecc_top

| testbench | what it checks |
|-----------|----------------|
| `tb_gfau`, `tb_mas` | random MD/MM/ADD/SUB against their defining relations (a·b·2^−m, b·res ≡ a·2^m, …) over several primes and polynomials up to 160 bits; MM, ADD and SUB latencies exactly; MD mean latency against a bound |
| `tb_shared_mem`, `tb_instr_fifo` | the memory and the FIFO against simple models |
| `tb_mem_hier` | each load route and its latency, write-through, tag invalidation, simultaneous requests, for m = 160 and m = 70 |
| `tb_task_sched` | behavioural PEs and memory with random latencies; after each stage, memory must equal an in-order execution of the threads; no division on the MAS; PE-ID exchanges and parallel PE activity happen |
| `tb_ecsm_seq` | an abstract "points as integers" stage model; checks K·P, mask refresh, loop count and the number of move iterations for random keys |
| `tb_dfecc_top` | end to end on a 16-bit prime curve and a GF(2^17) curve, checked against a reference double-and-add model (`ecc_ref_pkg`); counts every mechanism (FIFO, PE-ID exchange, synchronization, reuse, fetch, write-through, moves, Q0/Q1 swaps, both α values, both fields) and fails if one never occurs |
| `tb_dfecc_full` | one 160-bit scalar multiplication over GF(p) and one over GF(2^160) at default parameters, with mask refresh; about 100K cycles each |
| `tb_dfecc_sizes` | the processor built with W = 256, over GF(p192), GF(p256), GF(2^163) and GF(2^233) with NIST moduli, 48-bit keys |

## Files

| file | contents |
|------|----------|
| `rtl/dfecc_pkg.sv` | types, memory map, task programs |
| `rtl/dfecc_top.sv` | the processor |
| `rtl/ecsm_seq.sv` | stage sequencer and key loop |
| `rtl/task_sched.sv`, `rtl/instr_fifo.sv` | scheduler and MD FIFO |
| `rtl/gfau.sv`, `rtl/mas.sv` | the two PEs |
| `rtl/mm_step.sv`, `rtl/gf_addsub.sv` | the shared arithmetic they use |
| `rtl/mem_hier.sv`, `rtl/shared_mem.sv` | the memory hierarchy |
| `tb/ecc_ref_pkg.sv` | the arbitrary-precision reference model of curve arithmetic |
