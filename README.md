# Autocorrelation engines for Boolean functions: instance-specific and parameter-specific

The autocorrelation transform of a Boolean function f of n inputs gives 2^n
coefficients

    B(u) = sum over v = 0 .. 2^n-1 of f(v) * f(v xor u),     u = 0 .. 2^n-1

with f taking the values 0 and 1, so B(u) counts the inputs v where f is 1 both
at v and at v xor u. The coefficients are used for variable ordering in BDDs and
in testing. Done naively, the transform costs 2^(2n) function evaluations, but
the work is very parallel.

This RTL holds two engines for the transform. They follow the two approaches
compared by Rice, Ronda, Kent and Yong in "Instance-specific versus
Parameter-specific Circuit Generation":

* **Instance-specific engine** (`is_accelerator`). The function is built into
  the circuit as a BDD. Copies of it evaluate f(v) and f(v xor u) in every
  clock cycle. A new function needs a new circuit, but each evaluation is only
  a chain of multiplexers.
* **Parameter-specific engine** (`ps_accelerator`). One circuit serves any
  function of up to 32 inputs, given as a list of disjoint cubes in an
  external SRAM. It works on 64 coefficients at once, and each cube it reads
  from SRAM advances all 64.

`ac_top` places the two engines side by side. They share only clock and reset.

## Instance-specific engine

```
            host (start, coefficients out)
                     |
               is_controller ----------------+
               |  v_k         |  v_k xor u   | calc_sum
        bdd_function    bdd_function         |
          f(v_k)          f(v_k xor u)       |
               \             /               |
                ac_calculator ---------------+
```

**Function component (`bdd_function`).** This block turns a BDD into logic.
Each node is a 2:1 multiplexer. The node's input variable drives the select,
and its two children drive the data inputs. The root multiplexer outputs f.
The BDD is given as a parameter: a table of `ac_pkg::bdd_node_t` records
`{var_idx, lo, hi}`.

* Node `i` of the table has id `i+2`. Ids 0 and 1 are the constants.
* Children must have smaller ids than their parent, and the last node is the
  root. Elaboration stops with an error if the table breaks these rules.
* The default instance is 5-input parity (`xor5`, `ac_pkg::XOR5_BDD`), with
  9 nodes and no complement edges.

To build an engine for another function, pass its table as `NODES`, its size
as `N_NODES` and its input count as `N_VARS`. The testbenches show this with a
3-input multiplexer.

**Pairing and parallelism.** Function components come in pairs. One of a pair
gets v and the other gets v xor u. The XOR is formed on the controller's
outputs. The calculator ANDs each pair's two outputs and adds the ones to a
running sum.

* With `TERMS = 1`, the default, the engine has two function components and
  computes one term of the sum per cycle.
* `TERMS = k` replicates the pairs, so the engine computes k terms per cycle.
  The source explored 2 to 252 function components, which is `TERMS` = 1 to
  126.
* `TERMS` can be any value from 1 to 2^n. When it does not divide 2^n, the
  last group of each u runs past 2^n-1. The controller switches those terms
  off through `term_en`, and the calculator ignores them.

**Controller (`is_controller`) and timing.**

* The controller counts u from 0 to 2^n-1 and, for each u, counts v in steps
  of `TERMS`.
* The calculator restarts its sum with the first terms of each u, so no cycle
  is lost between coefficients.
* When the last terms of a u have been added, the sum is copied into an output
  register. The host takes it through a `coef_valid`/`coef_ready` handshake,
  while the engine is already working on the next u.
* If the host has not taken the previous coefficient, the controller stops
  issuing terms until it does.

Without stalls, the whole transform takes 2^n · ceil(2^n/TERMS) issue cycles.
`done` rises two cycles after the last issue cycle. For xor5 that is 1024 + 2
cycles with two components and 32 + 2 cycles with 64 components.

## Parameter-specific engine

### Cube lists and the shift-and-search procedure

A cube is a product of literals. Some inputs are fixed to 0 or 1 and the rest
are free ("don't care"). A cube with d free inputs covers 2^d input vectors. A
disjoint cube list covers the vectors where f = 1, and no two of its cubes
overlap. Software on the host prepares the list.

XORing a cube c with u flips c's fixed inputs wherever u is 1. The result is
again a cube, c xor u, holding exactly the vectors v xor u for v in c. The
engine applies the procedure of the source to every coefficient:

    for each cube c in the list
        form c xor u
        search the list for a cube d that contains c xor u
        if one is found, add 2^dc(c) to B(u)      (dc(c) = free inputs of c)

If such a d exists, f(v) = f(v xor u) = 1 for all 2^dc(c) vectors v of c, so
each of them adds 1 to B(u).

**Limit of the procedure.** The procedure adds nothing for a shifted cube that
lies only partly inside the covered set. So the result equals the true B(u)
only when every shifted cube lies wholly inside one listed cube or wholly
outside all of them.

* This always holds for a list of minterms, where every cube fixes every
  input. The engine is then exact, and the testbenches check that case against
  the truth table.
* For general disjoint lists with free inputs, the procedure can undercount.
  In random trials with 6-input functions, about half of the coefficients fell
  below the true value.
* The engine faithfully implements the procedure as stated. A host that needs
  exact values for every function can supply a minterm list, within the
  2^19-cube limit.

### Datapath

The block names are those of the original architecture.

| Block | Module | Role |
|---|---|---|
| Don't care counter | `dc_counter` | Counts the free inputs of a cube. The two halves of the mask are counted in parallel and the counts added. |
| Cube register, don't care register | inside `ps_accelerator` | Hold the cube c of the outer loop and its count. |
| U generator | `u_generator` | Presents u_base+0 .. u_base+63 at once. Advances by 64 per batch. |
| Cube comparison | `cube_comparison` | Computes the part of "c xor u inside d" that does not depend on u (see below). |
| Comparator | `comparator` (64 × `comparator_cell`) | Finishes the test for each of the 64 u values in one cycle. |
| Contribution registers | `contribution_registers` | One accumulator and one "found" flag per u. |
| Controller | `ps_controller` | Sequences the SRAM, one access per cycle. |

**Containment test.** c xor u lies inside d exactly when both of these hold:

1. Every input that d fixes is also fixed by c. This is `compatible`, which
   does not depend on u.
2. On the inputs that d fixes, u equals `c.value xor d.value`.

The cube comparison computes condition 1, the care mask (the inputs d fixes)
and the pattern `diff`. Each comparator cell then needs only
`((u xor diff) and care) == 0`. One cube read from SRAM therefore tests all 64
shifted cubes in the same cycle.

**Accumulation.** While the list streams past the cube c, each u sets its
found flag on a hit. The read of the last d commits the result: every
accumulator whose flag is set, or whose hit arrives in that same cycle, adds
2^dc(c). Then the flags clear. Accumulators are `CUBE_BITS+1` bits wide.

### SRAM word, memory map and schedule

The external SRAM is synchronous. It takes one access per cycle, and read data
arrives one cycle after the read.

```
word (DW = 2*CUBE_BITS + DC_W = 70 bits by default)
  [CUBE_BITS-1:0]            value   bit i = value of input x_i (ignored where free)
  [2*CUBE_BITS-1:CUBE_BITS]  mask    bit i = 1 when x_i is free
  [DW-1:2*CUBE_BITS]         free-input count, written by the engine

address i                       cube i,  i < n_cubes <= 2^19
address 2^RESULT_LOG2 + r       B(u_first + r), zero-extended,  r < 64*n_batches
```

Inputs above the function's own n must be fixed to 0 (value 0, mask 0). Then a
u that reaches beyond 2^n gets B(u) = 0.

**Running the engine.**

1. While the engine is idle, the host writes the cubes, with any value in the
   count field.
2. The host sets `n_cubes`, `u_first` and `n_batches` and pulses `start`.
3. When `done` pulses, the results are in the result area.

A run does the following:

1. **Count pass.** For each cube: read it, then write it back with its count
   (2 cycles per cube).
2. **Per batch of 64 u values, per cube c.** One read loads c and its count
   into the registers. Then n_cubes reads stream every d past the comparator.
   That makes n_cubes + 1 reads per c.
3. **Write-back.** One drain cycle, then 64 writes of the batch results.

The run therefore takes `2N + batches*(N(N+1) + 1 + 64)` cycles for N cubes.
Reads and writes never share a cycle. A batch of 64 coefficients costs the same
SRAM traffic as a single coefficient would. This is where the parallel version
gains over a sequential one: the cost per coefficient drops by up to 64×.

For scale, at 26 MHz, the clock of the original board:

* Without that parallelism, N(N+1) cycles per coefficient gives about 32 s for
  a 16-input, 112-cube function over all 2^16 values of u. This is the order
  of the sequential times reported for such functions.
* With 64 coefficients per batch, this schedule needs 13.0 M cycles (0.50 s)
  for that function. For a 10-input, 837-cube function it needs 11.2 M cycles
  (0.43 s).
* Both cases are simulated in `tb_ps_benchmark_sizes`. The times reported for
  the original parallel hardware are longer, about 2.1 s and 1.2 s, so the
  original includes costs that this schedule does not model.

### Sizes

The defaults follow the source:

* 32-bit cube words (`CUBE_BITS`), which allows functions of up to 32 inputs.
* 64 coefficients in parallel (`N_PAR`).
* Up to 2^19 cubes (`MAX_CUBES_LOG2`).

The result area holds 2^20 coefficients per run (`RESULT_LOG2`, this design's
choice). A 21-input function needs two runs with different `u_first`. Narrower
configurations, such as 10–26 cube bits or 1 or 32 coefficients in parallel,
are parameter changes.

## Top level (`ac_top`)

| Ports | Engine |
|---|---|
| `is_start`, `is_busy`, `is_done`, `is_coef_valid`, `is_coef_ready`, `is_coef_u`, `is_coef_value` | Instance-specific engine, host side. |
| `ps_start`, `ps_n_cubes`, `ps_u_first`, `ps_n_batches`, `ps_busy`, `ps_done` | Parameter-specific engine, host side. |
| `sram_en`, `sram_we`, `sram_addr`, `sram_wdata`, `sram_rdata` | The SRAM port of the parameter-specific engine. |

The SRAM itself and the host are outside the RTL. `tb/sram_model.sv` is a
behavioural SRAM for simulation. Reset (`rst_n`) is asynchronous and active
low.

## Interpretations and departures

These choices fill gaps in the source, or settle points that can be read more
than one way:

* **Weight of a found cube.** The weight is taken as 2^(free inputs of c). This
  is the number of vectors in the cube, and it is why the free inputs are
  counted at all.
* **Where the XOR sits (instance-specific).** The source gives the calculator
  the exclusive-or and the summation, but draws no link from the calculator
  back to the function components. Here, v xor u is formed at the controller's
  outputs, and the calculator forms the product (an AND for 0/1 values) and
  the sum.
* **Free-input counts.** The counts are kept in spare bits of each cube's SRAM
  word rather than in a separate area, so loading a cube is a single access.
  The SRAM map, the word layout, the host handshakes and the exact schedules
  are this design's own.
* **Search without early exit.** The search does not stop early. Every cube c
  is compared with the whole list.
* **BDD tables.** The example BDD has no complement edges. The original
  benchmark BDDs (other than xor5, which is fixed by its name) are not part of
  this RTL.
* **Scope.** The clock-rate and area behaviour of the original FPGA
  implementations is not modelled. Neither is the tool that generated the
  instance circuits.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops itself after a fixed number of
cycles.

| Testbench | What it checks |
|---|---|
| `tb_dc_counter` | Corner masks and random masks. |
| `tb_u_generator` | Load, advance and wrap-around. |
| `tb_cube_comparison` | Every u for random cube pairs, against minterm enumeration. |
| `tb_comparator` | All 64 cells against the definition. |
| `tb_contribution_registers` | Random scans against a reference model. |
| `tb_ps_accelerator` | 8-bit cubes and 8 coefficients in parallel. Random minterm lists and disjoint lists, unaligned u ranges, a single cube and the universe cube. Results are checked against the procedure and, where it applies, the exact transform. It also checks the stored counts, the run length formula and the SRAM read and write counts. |
| `tb_bdd_function` | xor5 and a multiplexer, exhaustively. |
| `tb_ac_calculator` | Four terms per cycle. |
| `tb_is_accelerator` | xor5 with one term per cycle, and a 3-input function with three terms per cycle, which leaves uneven groups. Exact coefficients, the cycle count 2^n·ceil(2^n/TERMS) + 2, and random host stalls. |
| `tb_ac_top` | Both engines at their default sizes, running at once. xor5 on both engines, checked against each other and against the exact transform. Then a random 7-input disjoint list over two batches. It counts host stalls, count write-backs, batch advances, commits of weight above 1 and reads that hit several u values, and requires each to happen. |

To simulate with Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/ac_pkg.sv tb/ac_tb_pkg.sv tb/tb_ac_top.sv --top-module tb_ac_top
./obj_dir/Vtb_ac_top
```

Three further testbenches run the workloads of the original study:

* `tb_is_parallelism` sweeps the instance-specific engine on xor5 with 2, 10,
  20, 30, 32 and 64 function components. It checks the values and the run
  lengths.
* `tb_ps_configs` runs the eight cube-width and parallelism combinations of
  the original space-usage table, from 32 bits × 64 down to 32 bits × 1 and
  10 bits × 32.
* `tb_ps_benchmark_sizes` runs the default parameter-specific engine on
  random minterm lists of benchmark sizes: 10 inputs with 837 cubes, and
  16 inputs with 112 cubes. It checks all 1024 and all 65536 coefficients
  and the cycle counts.

The helpers `is_par_run` and `ps_config_run` hold one engine each for these.

Replace `tb_ac_top` with any other testbench name. The full-size top-level
test builds and runs in seconds. The benchmark-size test simulates 24 M cycles
in about 20 s.

## Files

| File | Contents |
|---|---|
| `rtl/ac_pkg.sv` | Shared constants, the BDD node type and the xor5 table. |
| `rtl/ac_top.sv` | The top level. |
| `rtl/is_accelerator.sv`, `rtl/is_controller.sv`, `rtl/bdd_function.sv`, `rtl/ac_calculator.sv` | The instance-specific engine. |
| `rtl/ps_accelerator.sv`, `rtl/ps_controller.sv`, `rtl/dc_counter.sv`, `rtl/u_generator.sv`, `rtl/cube_comparison.sv`, `rtl/comparator.sv`, `rtl/comparator_cell.sv`, `rtl/contribution_registers.sv` | The parameter-specific engine. |
| `tb/ac_tb_pkg.sv` | Reference models: random disjoint cube lists, the exact transform, the cube-list procedure. |
| `tb/sram_model.sv` | The behavioural SRAM. |
| `tb/is_par_run.sv`, `tb/ps_config_run.sv` | Workload helpers. |
| `tb/tb_*.sv` | The testbenches. |
