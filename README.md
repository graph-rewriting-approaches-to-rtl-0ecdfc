# Turning asynchronous-read memories into synchronous-read ones by circuit rewriting

Circuits are easiest to design, and need the fewest clock cycles, when a
memory can be read combinationally. You put an address in and the word comes
out in the same cycle. The block RAMs of most FPGAs cannot do that. They sample
the address at a clock edge and deliver the word one cycle later. A designer who
just inserts a register to make up for that usually doubles the cycle count of
the loop it sits in.

This repository holds the example circuits of a method that removes the
problem mechanically. Each circuit is written with asynchronous-read memories
(AROM, ARAM). A graph-rewriting procedure then produces an equivalent circuit
built only from registers, combinational logic and synchronous-read memories
(SROM, SRAM), which maps onto block RAMs. For every example the repository gives:

- the original circuit with asynchronous-read memories;
- where one is needed, the original with extra output registers (the
  "padded" circuit; see below);
- the rewritten circuit with synchronous-read memories;
- a testbench that checks, cycle by cycle, that the rewritten circuit produces
  the same output sequences.

All circuits are synthesizable SystemVerilog. The top module `a2s_top` places
them side by side.

## Circuits as sequence transformers

Each element is described by the sequence it outputs at clock times 0, 1, 2, ….
Time *t* is the state just after rising edge *t*, and edge 0 is the last edge
at which reset is high. Inputs applied during cycle *t* are written d0, d1, ….

| element | module | output sequence |
|---|---|---|
| register R | `reg_r` | 0, d0, d1, d2, … (synchronous reset to 0) |
| asynchronous ROM | `arom` | M[d0], M[d1], … (combinational) |
| synchronous ROM | `srom` | 0, M[d0], M[d1], … (registered, reset to 0) |
| asynchronous-read RAM | `aram` | M[a_t] as currently stored; write at the edge |
| synchronous RAM | `sram` | 0, then the word at a_{t-1}; `RAW`=0 returns the word before the write, `RAW`=1 the new data |
| combinational circuit CC | any logic | f(a_t, b_t, …) |

The RAM behaviour is fixed by one reference pattern, which `tb_prims` replays.
Addresses 1,2,3,1,2,3, data 11,12,13, and write enable 1,1,1,0,0,0 give these
outputs:

| memory | output |
|---|---|
| ARAM | 0,0,0,11,12,13 |
| SRAM in write-after-read mode (the default) | 0,0,0,0,11,12 |
| SRAM in read-after-write mode | 0,11,12,13,11,12 |

So SROM = AROM followed by R, and SRAM (write-after-read) returns what an ARAM
would have returned one clock earlier.

Three small modules hold these identities in hardware. `tb_equiv` checks them:

| module | forms | output |
|---|---|---|
| `equiv_rom3` | SROM, R→AROM, AROM→R | M[d(t−1)] |
| `equiv_rom3r` | SROM→R, R→SROM, R→AROM→R | M[d(t−2)] |
| `equiv_ram3` | SRAM, registers on we/A/D→ARAM, ARAM→R | identical on every cycle |

In `equiv_ram3`, the register-first form writes its memory one clock later
than the other two. With the pattern above, its word 1 reads 0,0,11,11,…
while the other two read 0,11,11,….

`cc_fig33` is the small gate network used to explain CC sequences:
F = A·¬B + B·C and G = ¬(B·C).

## The rewriting

The method rests on one imaginary element, the **negative register** (NR). It
outputs its input one cycle *early*: d1, d2, …. It cannot be built, but it gives
a useful identity: AROM = SROM followed by NR. Rewriting runs in these steps:

1. **Replace every asynchronous memory** by its synchronous twin followed by an NR.
2. **Push each NR toward the outputs** with local rules that preserve the
   sequences:
   - an NR moves across a memory, from its input to its output;
   - an NR moves across a CC. It leaves an NR on every CC output and adds a
     real register on every *other* CC input, so all inputs stay aligned;
   - a real register moves across a CC or a memory in the same way.
3. **Cancel each NR against the next real register**, since R followed by NR
   is a wire.

A RAM has three inputs (we, address, data). An NR on one of them moves to the
output only after the other two have been delayed by a register. With
write-after-read SRAMs, the rewritten RAM then holds the same words as the
original, but one cycle later.

The procedure succeeds when every NR is cancelled. Whether that will happen can
be told in advance by counting along each path to an output:

> potentiality = (registers on the path) − (asynchronous memories on the path)

The method uses the minimum over all paths. If it is negative, that output is
short of registers. The remedy is to add that many registers just before the
output. The result is the **padded** circuit: its outputs are the original
ones delayed by that many clocks, and the padded circuit can then be rewritten
exactly.

In a circuit with feedback, every cycle must also have a potentiality of zero
or more. The counting works the same way around the loop.

Rewriting moves registers toward the outputs, so the rewritten circuits often
have long combinational paths from one memory through several CCs. Two
remedies are possible:

- add pipeline layers, which delays every output equally (`layered_srom`);
- remove registers that end up directly in front of every output, which
  shortens latency.

## The example circuits

Every example below exists in an original and a rewritten version, and the
testbench named in the last column compares them. `≡` means equal on every
cycle from reset. "Delayed k" means the padded circuit's outputs are the
original's k clocks later.

| example | original | padded | rewritten | relation checked | testbench |
|---|---|---|---|---|---|
| recurrence X_n = X_{n−1} + f(X_{n−1}) | `xseq_arom` | – | `xseq_srom_conv` | ≡; new X every clock | `tb_xseq` |
| same recurrence, naive SROM version | – | – | `xseq_srom_naive` | one X every **two** clocks | `tb_xseq` |
| acyclic, two ROMs, three CCs | `dag_arom` | `dag_arom_padded` (out2 +1) | `dag_srom` | rewritten ≡ padded | `tb_dag` |
| acyclic, three RAMs, one addressed by logic | `ramdag_aram` | `ramdag_aram_padded` (out1 +2) | `ramdag_sram` | rewritten ≡ padded; RAM contents compared | `tb_ramdag` |
| loop, ROM before the loop | `cyc_arom` | – | `cyc_srom` | ≡ | `tb_cyc` |
| loop, ROM inside the loop | `cyc2_arom` | `cyc2_arom_padded` (+1) | `cyc2_srom` | rewritten ≡ padded | `tb_cyc2` |
| loop through a ROM, counter as input | `drg_arom` | – | `drg_srom` | ≡ | `tb_drg` |
| rewritten SROM circuit, pipelined | `layered_srom` (`LAYER_REGS`=0) | – | `layered_srom` (`LAYER_REGS`=1) | outputs delayed by exactly 2 | `tb_layered` |

Notes on the examples:

- **X_n recurrence.** All three versions have a `load` input. While `load` is
  high, the loop multiplexer takes the start value `x0`.
  - The original's loop is mux → AROM → adder → R.
  - The naive designer's version puts an SROM and a balancing register in
    parallel and still keeps the loop register. It produces X_k after 2k
    clocks.
  - The rewritten version moves the loop register onto the memory's address
    side, as SROM and R in parallel, and leaves the adder output unregistered.
    It produces X_k after k clocks, exactly like the original.

  `tb_xseq` checks both rates.
- **Acyclic ROM circuit.** The path from in2 through CC_T, CC_L and CC_B to
  out2 crosses one AROM and no register, so out2 has potentiality −1. The path to out1 is balanced.
  - One register is added before out2 (`dag_arom_padded`).
  - In the rewritten circuit, the register on out1's path after CC_L and
    the padding register are gone. The two registers in front of CC_L and
    CC_B sit where the negative registers crossing those CCs put them.
- **RAM circuit.** CC_L computes the write enable, address and data of the
  third RAM. The path ARAM2 → CC_T → CC_L → ARAM3 → out1 crosses two RAMs and no register, so out1 has potentiality −2, so two registers are added
  before out1.
  - In the rewritten circuit all three memories are SRAMs.
  - `tb_ramdag` also checks every word of every memory, every clock. SRAM1 and
    SRAM2 match ARAM1 and ARAM2. SRAM3 matches what ARAM3 held one clock
    earlier.
- **Loops.**
  - `cyc_arom` has potentiality 0 and is rewritten into an exactly equivalent
    circuit: the loop register moves onto the feedback edge.
  - `cyc2_arom` reads its ROM inside the loop and drives the output straight
    from the ROM, so it is padded by one register. In the rewritten circuit
    the loop register disappears into the SROM.
  - `drg_arom` feeds its sum back through a ROM. Its other input is a free
    running counter (`counter_inc`: 0, 1, 2, …, wrapping at 2^W). That turns
    an input-less source into an ordinary input for the rewriting.
- **Layering.** `layered_srom` is a typical rewritten circuit. Three SROMs
  feed a web of CCs, which feeds three more SROMs. Its longest path is
  S3 → CC_B → CC_A → CC_C → S5. `LAYER_REGS`=1 adds registers at two cut
  lines, and every path gets exactly two. The outputs are then the
  unpipelined ones two clocks later, and no path spans more than one CC layer.

## Memory contents and CC functions

The example circuits name their combinational blocks only "CC" and describe
their ROMs only as "address i holds f(i)". The concrete functions here are
this design's own choice, collected in `rtl/a2s_pkg.sv`:

- ROM word at address a for ROM number `seed`:
  `x = a·(0x9E3779B1 + 16·seed); x ^= x>>15; x ·= 0x2C1B3C6D; x ^= x>>12`,
  truncated to W bits. This is a hash, so wrong addressing shows up at once.
- The CC functions use only +, ^, shifts and small constant multipliers.

Every function maps all-zero inputs to zero, ROMs included (f(0) = 0). This
matters for equivalence. Registers and SROM/SRAM outputs reset to 0, and the
zero-preserving functions then make the original and rewritten circuits agree
from the very first cycle after reset. With arbitrary functions they would
agree only after a few start-up cycles, which is all the method itself
promises.

## Reset, widths and other choices

- `W` (default 8) is the width of every data word and address. Memories have
  2^W words. The source gives no widths.
- Reset is synchronous and active high. It clears every register and the
  output registers of SROMs and SRAMs. Memory contents are not cleared: RAMs
  start at zero through their initial values, and ROMs are computed at
  elaboration.
- RAMs ignore writes while reset is high. This is this design's addition: a
  write enable computed from registers that are not yet reset could otherwise
  write a random word during reset, in the original and rewritten circuits
  differently.
- RAMs are single-port. Data width equals address width.
- Fan-out is an ordinary net. The source models fan-out as a "copy" CC,
  which is not needed in RTL.

## Top level

`a2s_top #(W)` instantiates every example once per version, and each example
has its own input ports:

| example | port prefix |
|---|---|
| gate network | `cc_` |
| recurrence | `xs_` |
| ROM circuit | `dag_` |
| RAM circuit | `rd_` |
| loops | `cyc_`, `cyc2_`, `drg_` |
| layering | `lay_` |
| memory equivalences | `eq_` |

The versions of one example share those inputs. Each version's outputs come out
under its own suffix:

| suffix | version |
|---|---|
| `_arom`, `_aram` | original |
| `_pad` | padded |
| `_srom`, `_sram`, `_conv` | rewritten |
| `_naive` | naive two-clock version |
| `_flat`, `_cut` | layered circuit without and with pipeline layers |

The memory-equivalence outputs are named after their form: `eq_rom_*`,
`eq_rom2_*` and `eq_ram_*`.

All versions share `clk` and `rst`.

## Simulating

Every testbench in `tb/` checks itself and ends with a line
`TB_RESULT checks=<n> failures=<m>`. Each uses random stimulus from `$urandom`
and a watchdog. Build and run one with plain Verilator 5:

```sh
verilator --binary --timing --assert -Wno-fatal rtl/a2s_pkg.sv -y rtl tb/tb_dag.sv --top-module tb_dag
./obj_dir/Vtb_dag
```

| testbench | what it checks |
|---|---|
| `tb_prims` | the primitives against the RAM reference pattern and shadow models; writes blocked in reset |
| `tb_cc_fig33` | truth tables of F and G |
| `tb_equiv` | the three memory-equivalence modules: RAM pattern with outputs and stored words, then random traffic |
| `tb_xseq` | X_k after k clocks (original, rewritten) and after 2k clocks (naive) |
| `tb_dag`, `tb_cyc`, `tb_cyc2`, `tb_drg`, `tb_layered` | closed-form or cycle models of the original, then rewritten ≡ padded/original |
| `tb_ramdag` | a three-memory cycle model, outputs and every RAM word per clock |
| `tb_a2s_top` | all examples at default parameters for 1500 cycles |

`tb_a2s_top` also counts the events that make the examples meaningful, and
fails if any never happened:

- start-value loads;
- all eight gate-network input combinations;
- writes into the RAM addressed by logic;
- reads of a word written the clock before;
- counter wrap-around;
- non-zero outputs from each example;
- a word of the equivalence RAMs rewritten and read back on the next clock.

All testbenches pass with Verilator's random initialisation of undefined state
(`--x-assign unique --x-initial unique`, `+verilator+rand+reset+2`).

## What is not here

- **The rewriting procedure** is a software transformation, not hardware.
  The rewritten circuits in `rtl/` were derived by hand by applying its rules,
  and are verified by simulation against the originals.
- **The negative register** has no implementation: it would have to output
  next cycle's input.
- **The FPGA fabric** (logic blocks, block RAMs, multipliers) is the target
  the circuits map onto, and is not modelled.
