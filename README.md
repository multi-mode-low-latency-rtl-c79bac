# PGDBF LDPC decoder: one bit-flipping iteration per clock

Flash storage wears out as it is written, and its raw bit error rate climbs with
it. An LDPC code can protect it, but the usual soft-decision decoders (min-sum,
belief propagation) need many registers and many clocks per iteration. This RTL
is a hard-decision LDPC decoder small enough to run every node in parallel,
doing a full decoding iteration in a single clock. It uses **Probabilistic Gradient Descent Bit-Flipping
(PGDBF)**. Every node value is one bit. A check node is an XOR gate. A variable node
needs a small adder, a comparator and an XOR. A little randomness in the flipping
decision gives much of the error-correction gap back to the soft decoders.

The default build decodes a 1296-bit, rate-1/2, regular (dv = 3, dc = 6) LDPC code.
The channel is a binary symmetric channel: each stored bit is read back either right
or flipped.

## The algorithm

The code has N variable nodes (code bits) and M check nodes (parity equations).
Its Tanner graph joins variable node n to check node m when `H(m,n) = 1`. Each
variable node keeps two bits: `y`, the bit read from the channel, and `v`, the
current estimate. Each clock of decoding does the following:

1. Every check node computes `c_m = XOR of the v` of its dc neighbours. A 1 marks an
   unsatisfied parity equation.
2. If all `c_m` are 0, the estimate is a codeword: stop with `done`.
3. Every variable node computes its **energy**
   `E_n = (v_n xor y_n) + (number of its dv check nodes that are unsatisfied)`.
   The energy is an integer in 0..dv+1. A high energy means the bit disagrees with the
   channel and with its parity checks.
4. `E_max` is the largest energy over all N nodes.
5. Every node with `E_n = E_max` **and** a random bit `R_n = 1` flips `v_n`.

Plain GDBF flips every node at the maximum. Energies are small integers, so many nodes
tie at the maximum and too many flip together, which can stall convergence. PGDBF
flips each tied node only with probability p0. The default p0 is 230/256 ≈ 0.9.

The decoder begins with 10 iterations of plain GDBF (the random mask is ignored).
Only after those does it switch to PGDBF. Many error patterns are corrected by GDBF
within a few iterations, and the random mask would only slow them down.

## Hardware structure

```
 data_in ──► [VNU N-1] ─► [VNU N-2] ─► ... ─► [VNU 0] ──► data_out     (load chain: y and v)
                 │  ▲                              │  ▲
                 v  c   (fixed Tanner-graph wiring) v  c
                 ▼  │                              ▼  │
              [CNU 0 .. CNU M-1]  XOR of dc estimates ──► syndrome_zero = NOR of all c
 energies E_0..E_{N-1} ──► [max_finder] ──► E_max ──► back to every VNU
 [pgdbf_rng] 32-bit LFSR ─► 1 Bernoulli bit/clock ─► N-bit shift register ─► R_n to VNU n
 [pgdbf_ctrl] IDLE/RUN, iteration counter, done / give_up, GDBF window
```

| File | Module | Role |
|---|---|---|
| `rtl/pgdbf_pkg.sv` | package | code geometry and the parity-check matrix as constant functions |
| `rtl/cnu.sv` | `cnu` | check node: XOR of dc inputs |
| `rtl/vnu.sv` | `vnu` | variable node: `y` and `v` registers, energy, `>= E_max` comparator, AND with random bit, flip XOR |
| `rtl/max_finder.sv` | `max_finder` | maximum of the N energies in one clock |
| `rtl/pgdbf_rng.sv` | `pgdbf_rng` | LFSR plus N-bit random shift register |
| `rtl/pgdbf_ctrl.sv` | `pgdbf_ctrl` | load/run control, termination, GDBF/PGDBF mode |
| `rtl/pgdbf_decoder.sv` | `pgdbf_decoder` | top level: instantiates and wires all of the above |

### The critical path is one iteration

Everything between the estimate registers and their next value is combinational: the
CNU XORs, the energy adders, the N-wide max finder, the comparators and the flip XORs.
There is no pipelining, so the clock period is set by this path. In exchange, an
iteration costs exactly one clock. Expected throughput is
`N × f_clk / (average iterations × 1)`, counting decoding time only.

### Max finder

Energies take only dv+2 values, so the max finder uses no comparator tree. For each
level L = 1..dv+1, one N-input OR answers "does any node have `E >= L`?". `E_max` is
the highest level whose OR is set. This costs a few gates per node plus dv+1 wide OR
trees.

### Random bits

A 32-bit Fibonacci LFSR (x^32 + x^22 + x^2 + x + 1) advances once per clock. Each clock
it yields one Bernoulli bit: 1 when its low byte is below `P0_NUM`, so
`p0 = P0_NUM/256`. That bit enters an N-bit shift register, and bit n of the register
is node n's random bit. The register shifts every clock, including during loading, so
it is already full when decoding starts. Between iterations each node's random bit is
its neighbour's bit from the previous clock. This costs only N + 32 flip-flops.
`P0_NUM = 256` makes every bit 1, which turns the decoder into plain GDBF.

### Parity-check matrix

H is quasi-cyclic: a dv × dc array of Z × Z circulant permutation matrices. The block
in block-row i and block-column j is the identity rotated by `s(i,j) = (i·j) mod Z`.
Row r of that block has its one in column `(r + s) mod Z`. With
`Z > (dv−1)(dc−1)` the graph has no 4-cycles. Two constant functions in the package,
`cn_of_vn` and `vn_of_cn`, give the wiring, so changing the code means changing those
functions. **This matrix is this design's own choice.** The code the decoder was first
evaluated with (a 1296-bit regular rate-1/2 code) is not reproduced here. Error rates
measured with this RTL will therefore not match published curves for that code.

## Interface and timing (`pgdbf_decoder`)

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `rst` | in | 1 | clock; synchronous active-high reset |
| `data_in` | in | 1 | serial channel bits |
| `load_data_in` | in | 1 | shift `data_in` in, one bit per clock |
| `start` | in | 1 | one-clock pulse: begin decoding |
| `max_iteration` | in | 8 | iteration limit, sampled at `start` |
| `data_out` | out | 1 | serial corrected bits of the previous word |
| `iteration` | out | 8 | flipping iterations performed |
| `done` | out | 1 | converged to a codeword |
| `give_up` | out | 1 | `max_iteration` iterations done without converging |

* **Load**: hold `load_data_in` high for N clocks and present bit 0 of the word first.
  At the same time the previous decoded word leaves on `data_out`, also bit 0 first,
  so unloading costs no extra clocks. `load_data_in` clears `done` and `give_up`.
* **Decode**: pulse `start` with `load_data_in` low. In each following clock the
  controller checks the syndrome first. If the syndrome is zero it raises `done`. If the
  counter has reached `max_iteration` it raises `give_up`. Otherwise it flips and
  counts. A word needing k iterations therefore shows `done` on the (k+1)-th rising edge
  after the `start` edge, with `iteration = k`. A codeword with no errors takes one
  clock and reports `iteration = 0`.
* `done` and `give_up` hold until the next load or start. `start` and `load_data_in`
  are ignored while decoding.
* Per word, the time is N load clocks plus k+1 decode clocks. The serial load dominates
  the word rate: 1296 clocks against about 20. The one-clock iteration count is what
  sets the decoding throughput.

Parameters (defaults in brackets): `Z` [216], `DV` [3], `DC` [6], giving N = DC·Z = 1296
and M = DV·Z = 648. `P0_NUM` [230]. `GDBF_ITERS` [10]. `SEED` [32'hACE12468, non-zero].
The dv = 4, dc = 8 rate-1/2 code of the same length is `DV=4, DC=8, Z=162`.

Synthesized at the defaults, the decoder has 3939 flip-flops:
2 × 1296 node bits, 1296 random bits, 32 LFSR bits and 19 control bits.

## Where this design makes its own choices

The following follow the decoder architecture this RTL implements: the algorithm, one
iteration per clock, the top-level ports, loading through a shift register, the 32-bit
LFSR feeding an N-bit random shift register, the GDBF-first schedule (10 iterations),
1296-bit rate-1/2 codes with dv = 3 or 4, p0 ≈ 0.9, and the 8-bit iteration fields.

The following are choices of this design:

* the parity-check matrix (above);
* dc = 6 for dv = 3, derived from rate 1/2;
* the Bernoulli threshold encoding of p0, the LFSR polynomial and the seed;
* the threshold-OR max finder;
* serial unloading of the corrected word through `data_out`, overlapped with the next load;
* synchronous active-high reset, a two-state controller, `max_iteration` latched at
  `start`, and load taking priority over flipping.

The stopping rule allows at most `max_iteration` flipping iterations. `give_up` is
raised in the clock after the last one, once the syndrome is seen to be non-zero.

## Verification

Each testbench in `tb/` checks itself and ends with a `TB_RESULT checks=… failures=…`
line. Each has a watchdog.

| Testbench | What it checks |
|---|---|
| `tb_pgdbf_pkg` | the full-size matrices (N = 1296; dv = 3/dc = 6 and dv = 4/dc = 8): every node has the right degree, every edge is consistent in both directions, and there are no 4-cycles |
| `tb_cnu` | all 64 inputs of a 6-input check node |
| `tb_vnu` | 5000 random clocks against a model of the node's registers, energy and flip rule |
| `tb_max_finder` | corner cases and 2000 random energy sets, N = 50 |
| `tb_pgdbf_rng` | the whole random register every clock against an independent LFSR model; fraction of ones over 20000 draws within 0.88–0.92 |
| `tb_pgdbf_ctrl` | every output every clock against a model of the controller; latency k+1 for k = 0..11; random traffic |
| `tb_pgdbf_decoder` | end to end, 66-bit code (Z = 11, dv = 3), 400 words, against a lockstep model of the whole decoder |
| `tb_pgdbf_dv4` | same on the dv = 4, dc = 8 code, 184 bits (Z = 23), 150 words |

The two end-to-end tests compare `data_out`, `done`, `give_up` and `iteration` with the
model on every clock. Apart from the model, they check three things for every word. A
word reported `done` must satisfy every parity check when it is unloaded. Latency must
be `iteration + 1`. And `give_up` must come exactly at the limit. They count, and
require at least once, each of these mechanisms:

* a load with overlapped unload;
* convergence without flips;
* convergence after flips;
* `give_up`;
* GDBF iterations and PGDBF iterations;
* a maximum-energy node whose flip the random mask blocked;
* an iteration that flips several nodes.

Test codewords are built from whole circulant blocks of ones. Each check row meets
one "1" per chosen block, so an even number of chosen blocks satisfies every check.

**Largest size simulated: N = 184 (dv = 4).** At the default N = 1296, Verilator turns
the fully parallel datapath into about 1300 C++ files. Several of those files each take
the compiler more than 4 minutes and about 4 GB, even at -O0, so a build runs well
past an hour. The default size is checked by lint and synthesis. Its parity-check
matrix is checked by `tb_pgdbf_pkg`. The full decoder is not simulated at that size.
A full-size test would load a 1296-bit codeword carrying 16 errors, decode it with
`max_iteration = 20`, and unload it while loading the next word. It can be written from
`tb_pgdbf_decoder` by setting `Z = 216` and `GDBF_ITERS = 10`, for a simulator with the
time for it.

To run one testbench with plain Verilator:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/pgdbf_pkg.sv tb/tb_pgdbf_decoder.sv --top-module tb_pgdbf_decoder -o sim
./obj_dir/sim
```

To change the code size, override `Z`, `DV` and `DC` on `pgdbf_decoder`. Keep
`Z > (DV-1)(DC-1)`, and keep `DC` even if you build test codewords as above.
