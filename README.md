# Repetitive-addition multiplier (FSMD)

This unit multiplies two unsigned 4-bit numbers the slow way. It adds the
multiplicand to an accumulator once per clock, *multiplier* times:
5 × 4 = 5 + 5 + 5 + 5. It is a textbook example of a **finite state machine
with datapath** (FSMD). A three-state controller decides *when* to compute. A
datapath of three registers, an adder, a decrementer and a zero detector does
the computing. The two halves talk through two wires:

```
            calc (controller -> datapath): "add and count down now"
 +-------------+  --------------------------------->  +----------------+
 | control FSM |                                       |    datapath    |
 | Idle/Run/   |  <---------------------------------  | multiplicand,  |
 |   Finish    |   done (datapath -> controller):      | multiplier,    |
 +-------------+   "the multiplier count is zero"      | result regs    |
        | complete                                     +----------------+
        v                                                   | result
   o_complete ----------------enable (when low)-------> output register
                                                            |
                                                      o_result_latched
```

The latency depends on the data. A multiplication by M takes M additions. The
unit is busy for M+1 cycles: 1 cycle for 0 × anything, 16 cycles for 15 × 15.

## The handshake between controller and datapath

The controller (`mult_rep_add_fsm`) is a Moore machine. Its outputs depend
only on its state:

| state  | calc | complete | leaves when                  | goes to |
|--------|------|----------|------------------------------|---------|
| Idle   | 0    | 1        | `i_startb` is low at an edge | Run     |
| Run    | 1    | 0        | `done` is high at an edge    | Finish  |
| Finish | 0    | 1        | always, after one cycle      | Idle    |

The datapath (`mult_rep_add_datapath`) does one of two things at each rising
edge, depending on `calc`:

* **calc = 0 (load):** copy both operands from the inputs into registers and
  clear the result.
* **calc = 1 (step):** if the multiplier register is not zero, add the
  multiplicand to the result and subtract one from the multiplier. If it is
  zero, hold everything.

`done` is purely combinational. It is high whenever the multiplier register
is zero. So while the controller waits in Idle, the datapath keeps loading
fresh operands every cycle. Once the controller enters Run, the datapath
counts the multiplier down to zero. The controller sees `done` on the
following edge.

## Cycle by cycle

Take 9 × 5, with `i_startb` pulled low for one edge while the unit is idle.
Edge E0 is the edge that samples the start:

| after edge | FSM state | multiplier reg | result reg | o_result_latched | o_complete |
|------------|-----------|----------------|------------|------------------|------------|
| E0         | Run       | 5              | 0          | (previous)       | 0          |
| E1         | Run       | 4              | 9          | 0                | 0          |
| E2         | Run       | 3              | 18         | 9                | 0          |
| E3         | Run       | 2              | 27         | 18               | 0          |
| E4         | Run       | 1              | 36         | 27               | 0          |
| E5         | Run       | 0 (done)       | 45         | 36               | 0          |
| E6         | Finish    | 0              | 45         | **45**           | 1          |
| E7         | Idle      | reloaded       | 0          | 45 (held)        | 1          |

`o_complete` is low for exactly M+1 cycles. The extra cycle is the Run cycle
in which the controller sees `done`.

The top level carries concurrent assertions for these handshake rules:

* `calc` and `complete` are always complementary.
* `calc` stays high until `done`.
* Exactly one Finish cycle follows `done`.
* The product is stable after `done`.

Build with `--assert` to have Verilator check them.

## Why there is an output register

The datapath clears its own result as soon as `calc` falls. That happens on the
edge that leaves Finish, when it starts loading operands again. On its own, the
product would therefore be visible for only one cycle. The top level
(`mult_rep_add_fsmd`) adds a 2·WIDTH-bit register, enabled while `complete`
is low:

* **During a multiplication** the register follows the accumulator, one cycle
  behind. The partial sums 0, a, 2a, … therefore appear on
  `o_result_latched`.
* **When `o_complete` rises** the register holds the product. It keeps it
  until the next multiplication starts.

Read the product when `o_complete` rises, not while it is low. If you need to
detect the end of a multiplication, look for the rising edge of `o_complete`:
the signal is also high when the unit is idle.

## Rules for the user

* **Hold the operands steady.** Keep both operands stable from the start
  request until `o_complete` rises. The multiplicand register reloads from
  `i_multiplicand` on *every* edge, including during Run. Changing it
  mid-multiplication changes what gets added.
* **Start is a level.** `i_startb` is sampled only in Idle. If it stays low
  through Finish, a new multiplication starts on the edge after the unit
  returns to Idle. `o_complete` is then high for two cycles between the two
  multiplications.
* **Reset.** `i_rstb` is an asynchronous active-low reset, and it resets only
  the controller. It aborts a running multiplication: `o_complete` rises at
  once and the output register keeps the last partial sum.
* **Uninitialised output.** The datapath registers have no reset. They
  initialise themselves through the load cycles in Idle. The output register
  also has no reset, so `o_result_latched` is undefined until the first
  multiplication ends.
* **Unsigned operands.** Both operands are unsigned. A signed product would
  need operands sign-extended to the full product width and a different
  datapath. This one does not do that.

## Parameters

| parameter | default | meaning |
|-----------|---------|---------|
| `WIDTH` (on `mult_rep_add_datapath` and `mult_rep_add_fsmd`) | 4 | operand width; the product is `2*WIDTH` bits |

The original design is fixed at 4 bits. `WIDTH` is a generalisation; the
datapath testbench also runs it at 8 bits. Latency grows with the value of
the multiplier, up to 2^WIDTH cycles, so wide operands make this unit very
slow. That is the point of the example, not a flaw to fix.

## Files

| file | contents |
|------|----------|
| `rtl/mult_rep_add_pkg.sv` | default width, controller state type |
| `rtl/mult_rep_add_fsm.sv` | controller (Idle / Run / Finish) |
| `rtl/mult_rep_add_datapath.sv` | operand, count-down and accumulator registers |
| `rtl/mult_rep_add_fsmd.sv` | top level: controller + datapath + output register |
| `tb/mult_rep_add_fsm_tb.sv` | random start/done/reset against a reference state machine |
| `tb/mult_rep_add_datapath_tb.sv` | all 256 4-bit operand pairs plus random 8-bit pairs: latency, partial sums, product, hold, clear |
| `tb/mult_rep_add_fsmd_tb.sv` | end to end at default parameters (see below) |

Each testbench checks itself against values it computes on its own, uses a
cycle-count watchdog, and ends by printing
`TB_RESULT checks=<n> failures=<n>`.

The end-to-end testbench does the following:

* Replays the sequence 0×4, 1×1, 4×0, 15×15, 9×5.
* Runs all 256 operand pairs.
* Runs a back-to-back start and a reset in the middle of a multiplication.
* Checks the busy time (M+1 cycles) of every multiplication.
* Checks every partial sum shown, the final product, and the hold afterwards.
* Counts each of these behaviours and fails if one never occurred: zero
  multiplier, partial sums, hold, back-to-back start, reset abort.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl \
  rtl/mult_rep_add_pkg.sv rtl/mult_rep_add_fsm.sv rtl/mult_rep_add_datapath.sv \
  rtl/mult_rep_add_fsmd.sv tb/mult_rep_add_fsmd_tb.sv \
  --top-module mult_rep_add_fsmd_tb
./obj_dir/Vmult_rep_add_fsmd_tb
```

For the block testbenches, swap in `tb/mult_rep_add_fsm_tb.sv` or
`tb/mult_rep_add_datapath_tb.sv` and the matching `--top-module`. Each run
takes well under a second.

`verilator --lint-only -Wall` reports two harmless warnings. The
controller does not use the package's width constant: it imports the package
only for its state type. The reset also appears in the assertions' disable
condition, besides being the controller's asynchronous reset.

## Where this RTL follows the original and where it chooses

**Follows the original design:**

* the three states, their transitions and outputs;
* the active-low start and asynchronous active-low reset;
* the datapath's load/step behaviour and its zero test;
* the multiplicand being reloaded on every edge;
* the output register enabled by `complete` being low, with no reset;
* the port names.

The sequence in the end-to-end test and the expected partial sums come from
the original design's verification run.

In one place the original descriptions disagree. Its flow chart loads the
multiplicand only while `calc` is low. Its register-level description and
netlist reload it on every edge. This RTL does the latter. The two behave the
same as long as the operands are held steady, which is the rule above.

**This design's own choices:**

* the `WIDTH` parameter;
* the 2-bit state encoding;
* sending the unused fourth state code to Idle;
* SystemVerilog packaging: an enum for the states, and a package for the
  shared type and width;
* the handshake assertions.
