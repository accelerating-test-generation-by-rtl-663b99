# NAND-array test pattern generator (Hopfield-network emulation)

This design generates test vectors for single stuck-at faults in combinational
circuits. The search runs in parallel hardware, not in software. It follows the
method described in "Accelerating Test Generation by VLSI Hardware Emulation".

The circuit under test is built from 2-input NAND gates and is programmed twice
into identical arrays of NAND cells:

* **The good copy** runs as a Hopfield neural network. Every net is a neuron
  holding 0 or 1. Every gate pulls its three neurons towards a consistent
  state. The pull works backwards as well as forwards, so you can force the
  output nets to a value and let the network find (justify) primary inputs that
  produce it.
* **The faulty copy** only evaluates forward. One of its nets is forced to a
  stuck-at value.

The two copies share their primary inputs. A test controller goes round a loop:

1. Propagate the current inputs through the faulty copy.
2. Force the good copy's outputs to the faulty outputs with one bit inverted.
3. Let the good copy settle.

If the good copy settles into a consistent state without changing the inputs,
those inputs make the good and faulty outputs differ, so they are a test. If the
inputs changed, the loop runs again from the new inputs.

```
                +-------------------+   nets    +------------------+
  gate/PO/fault | good cell_array   |---------->| output_interface |
  programming ->| (BIDIR, Hopfield) |<----------| PO clamp = faulty|
                +-------------------+  force    |  POs ^ one bit   |
                     | primary inputs           +------------------+
                     v                                  ^ nets
                +-------------------+  force   +----------------+
                | faulty cell_array |<---------| fault_injector |<-- fault_list
                | (forward)         |          +----------------+
                +-------------------+
         test_controller sequences everything; results go to test_store
```

## The NAND neuron and how gates are joined

A 2-input NAND with inputs `a`, `b` and output `y` has the energy

    E = 2ab - 4a - 4b + 4ay + 4by - 6y + 6

This energy is 0 exactly on the four consistent rows of the truth table and
positive elsewhere (2 or 6). It comes from the standard AND-gate network
(weights a–b −2, a–y 4, b–y 4; thresholds 0, 0, −6) with the output neuron
inverted.

A neuron `k` is updated from its energy difference
`dE_k = E(v_k = 0) - E(v_k = 1)`:

* `dE_k > 0`: the neuron becomes 1.
* `dE_k < 0`: the neuron becomes 0.
* `dE_k = 0`: the neuron keeps its value.

Each update therefore never raises the energy.

For one gate, the energy differences seen by each terminal are:

| terminal | dE                  | meaning for a lone gate                                                   |
|----------|---------------------|---------------------------------------------------------------------------|
| output y | `6 - 4a - 4b`       | y becomes NAND(a, b)                                                       |
| input a  | `4 - 2b - 4y`       | y=0 → a becomes 1; y=1, b=1 → a becomes 0; y=1, b=0 → a holds             |
| input b  | `4 - 2a - 4y`       | the same with a and b swapped                                              |

The "input holds" row is why the inputs need storage: every neuron is a
flip-flop.

When gates share a net, their networks merge. Equal neurons become one, their
thresholds add, and so do the weights of equal edges. This has a simple
digital consequence: the energy difference of a net is the **sum** of the local
differences that every gate touching it reports. `cell_array` does exactly this:

* every `nand_cell` reports `de_a` and `de_b` for its input nets;
* an adder per net collects the reports of all cells whose configured input is
  that net (`fb`);
* the cell that drives the net adds its own output term and updates its hold
  register from the sign of the total.

With one gate per net, this reduces to the table above. The whole network is
consistent, with total energy 0, exactly when every cell's stored output
equals the NAND of its stored inputs. That per-cell equality is the `stable`
flag. The controller takes the AND of all cells' flags to detect a valid end
state.

The network is updated in parallel, but not all neurons at once.

* **Partial updates.** Each cycle a random subset of about half of the neurons
  updates (the `upd_mask`, from two LFSRs). Updating all neighbours in the same
  cycle would let them flip back and forth forever.
* **Perturbation.** Gradient descent can stop in a local minimum, where nothing
  moves but the energy is still positive. The controller then inverts about one
  neuron in eight (`perturb`). This move can raise the energy, so the search can
  leave the minimum.

Forced nets never move:

* In the good copy, the clamped primary outputs are forced.
* In the faulty copy, the stuck-at net is forced.

## The generation loop (`test_controller`)

For each fault `i` in `0 .. n_faults-1`:

1. **Inject.** The fault goes into `fault_injector`, which turns it into a
   one-hot stuck-at force for the faulty copy. The shared primary inputs are
   set to 0.
2. **Propagate.** The faulty copy loads the inputs and evaluates forward. In
   the same cycles the good copy also runs forward, with its inputs held. The
   step ends when both copies are stable. It lasts at least `MIN_WAIT` (2)
   cycles and at most about the logic depth plus 2. Because the good copy ran
   forward, justification starts from a consistent state in which only the
   clamped outputs disagree.
3. **Latch.** `output_interface` captures the faulty outputs with bit
   `toggle_idx` inverted and keeps the good copy's outputs forced to that
   target. `toggle_idx` starts at the lowest valid output.
4. **Justify.** The good copy runs the Hopfield update until `stable`.
   * If it is not stable after `SETTLE_MAX` (32) cycles, it is perturbed. This
     can happen up to `MAX_RESTARTS` (2) times.
   * If it is still not stable after that, `toggle_idx` moves to the next valid
     output, and the round counts as a failed attempt.
5. **Check.**
   * Inputs unchanged: the vector is saved as `RES_TEST` in `test_store`.
   * Inputs changed: go back to step 2 with the new inputs.
   * After `MAX_ITER` (64) attempts without a test, the fault is stored as
     `RES_ABORT`.

A saved vector is always a real test. The good copy is consistent at those
inputs and at the clamped outputs, so its outputs equal the target. The faulty
copy was evaluated at the same inputs. The target differs from the faulty
outputs in one bit, so the vector detects the fault.

What the loop does *not* guarantee is completeness. The search is a bounded
heuristic, so a testable fault can be aborted. Untestable (redundant) faults
always end as `RES_ABORT`, after the full `MAX_ITER` attempts.

The counters `n_tests`, `n_aborts`, `n_rounds` (inputs changed),
`n_perturbs` and `n_toggles` show how often each mechanism was used in the
last run.

## Programming and running

Nets are numbered:

* `0 .. N_PI-1` are the primary-input registers;
* `N_PI + g` is the output of cell `g`.

Sizes are in `atpg_pkg`: `N_PI = 16`, `N_PO = 8`, `N_GATES = 64`, so 80 nets,
and `MAX_FAULTS = 256`.

A run on `atpg_emulator` goes like this. All write strobes are sampled on the
rising clock edge.

1. For every gate, write `gate_cfg = {valid, a, b}` at `gate_idx`
   (`gate_we`). The write goes to both copies. The gates may be in any order,
   but the circuit must be combinational.
2. For every primary output, write `{po_valid_in, po_net}` at `po_idx`
   (`po_we`).
3. Write the collapsed fault list, `fault_in = {net, stuck}` at `fault_addr`
   (`fault_we`), and set `n_faults`.
4. Pulse `start`. `busy` stays high during the run and `done` rises at the end.
5. Read results asynchronously through `res_addr` → `res = {status, pi}`.

A fault is a stem fault: forcing a net affects every reader of that net.
Fanout-branch faults cannot be expressed. Primary inputs that no gate reads
come out of a run with arbitrary values; they are don't-cares in the vector.

The observation outputs (`pi_now`, `faulty_po`, `good_po`, `po_target`,
`po_differ`, `fault_now`, `fault_active`) show the loop as it runs.

## Timing and size

* Every register updates on the rising edge. Reset is asynchronous and active
  low, and clears all registers. The fault-list and test-store memories are not
  cleared.
* One propagate/justify round takes a few to a few hundred cycles. On c17 (6
  gates, 22 faults) a full run takes about 16,000 cycles. On a random 64-gate
  circuit (148 faults) it takes about 0.7 million cycles, most of them spent on
  aborted faults.
* The feedback adders are the expensive part. They grow as
  `N_NETS × N_GATES`. Synthesis at the default size gives about 46k word-level
  cells and 2.4k flip-flops for the whole emulator.
* None of the ISCAS-85 circuits the method was evaluated on fits the default
  arrays. The smallest, C432, needs at least 160 cells (more when its wide gates
  are broken into 2-input NANDs) and 36 inputs. To hold such circuits, the
  summation would need a scalable form: a bounded fanout list per net instead
  of a full comparison.

## How far it is verified

Each testbench in `tb/` checks its block against values computed
independently, and ends with a `TB_RESULT` line.

* `nand_cell_tb` compares the feedback values with the energy formula for all
  eight states. It also checks forward evaluation, stuck-at forcing, the
  stable flag, holding at zero energy difference and perturbation.
* `cell_array_tb` checks:
  * forward settling with and without an injected fault, within the logic
    depth;
  * exact single-neuron updates against the summed energy of the merged
    network;
  * the forward mode of the good copy;
  * justification of all four output values of c17.
* `fault_injector_tb`, `output_interface_tb`, `fault_list_tb` and
  `test_store_tb` check the small blocks against reference models.
* `test_controller_tb` runs the controller against a behavioural model of the
  arrays. It covers a direct test, a round where the inputs changed, and an
  aborted fault with its restarts and toggle moves.
* `atpg_emulator_tb` is the end-to-end test at default parameters on c17.
  Every one of the 22 stuck-at faults must get a vector, and every vector is
  re-simulated in the testbench. Each mechanism must occur at least once.
* `atpg_random_tb` fills all 64 cells with a random 10-input circuit. It first
  decides testability by exhaustive simulation, then requires:
  * no false test;
  * no test for an untestable fault;
  * tests for at least half of the testable faults.

  With the default settings about 56 of 96 testable faults get a test.
  Raising `SETTLE_MAX` or `MAX_RESTARTS` did not improve this, because the
  limiting factor is the local minima of the network. This testbench takes
  about two minutes of simulation; the others take seconds.

To simulate, for example, the end-to-end test:

```
verilator --binary --timing --assert -Irtl rtl/atpg_pkg.sv tb/atpg_emulator_tb.sv \
  -y rtl --top-module atpg_emulator_tb -o sim && obj_dir/sim
```

Other testbenches build the same way. The package must come first.

## Where this design departs from the method, or fills gaps

These points follow the method:

* the NAND-only array;
* neuron weights and the update rule;
* adding the contributions of merged neurons;
* the three parts of the cell (input feedback, output hold register, set/reset
  forcing with a stable check);
* a forward-only faulty copy with fault-injection forcing;
* shared primary inputs;
* outputs passed on with a toggled bit;
* zero starting inputs;
* the loop: select, inject, propagate, justify, "inputs changed?", save.

The following are this design's own:

* **Interface.** The good outputs are clamped to the faulty outputs with one
  inverted bit, chosen in turn. The method also describes an interface built
  from bidirectional XOR gates feeding an OR forced to 1. That lets the network
  choose which output differs, but needs XOR neurons the NAND-only array does
  not have. The OR of the output differences is still available as
  `po_differ`.
* **Registers per net.** Input storage is not inside each cell: every net has
  exactly one register, and the feedback of all cells reading the net is
  summed into it.
* **Logic level only.** The cell is written at logic level. The method
  proposes a transmission-gate circuit, which is not modelled.
* **Search control.** These are added to make the loop terminate and escape
  local minima:
  * the random half-subset update order;
  * forward settling of the good copy during propagation;
  * perturbation by random inversion;
  * all timeouts and the `RES_ABORT` outcome.
* **Sizes.** All array sizes and memory depths are chosen here.
* **Programming.** The programming ports and the result memory are chosen
  here. Computing the netlist and the collapsed fault list belongs to host
  software, which is not part of the RTL.
