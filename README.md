# Sequential shift-and-add multiplier (FSMD)

This unit multiplies two 32-bit unsigned numbers using one adder, spread over
many clock cycles. It runs this program in hardware:

```
idle:  Out = prod; done = 1; wait for start
       a = A; b = B; prod = 0
loop:  if (b == 0) goto idle
       if (b is odd) prod = prod + a
       a = a * 2; b = b / 2; goto loop
```

The design is a *finite state machine with data* (FSMD). It has two parts:

- a **controller**, a small state machine with one state per block of the program;
- a **datapath** that holds the program's variables `prod`, `a` and `b`.

The controller sends six control signals to the datapath. The datapath sends
back two status bits. The point of the split is that each basic block and
each decision of the program becomes one controller state, and each arc of
the program becomes one transition.

## Files

| file | contents |
|---|---|
| `rtl/seq_mult_pkg.sv` | state enum, control/status structs, transition and output equations as functions |
| `rtl/load_reg.sv` | W-bit register with a load enable (`Reg_prod`, `Reg_a`, `Reg_b`) |
| `rtl/mult_datapath.sv` | the three registers, their input muxes, the adder, the two shifters and the status bits |
| `rtl/mult_controller.sv` | the 3-bit state register and the equations from the package |
| `rtl/seq_mult.sv` | top: controller and datapath wired together |
| `tb/*_tb.sv` | one self-checking testbench per module |

## Interface and handshake

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock; everything changes on the rising edge |
| `rst` | in | 1 | synchronous, active high. Sends the controller to idle and clears the three registers |
| `start` | in | 1 | begin a job (only looked at while idle) |
| `a_in`, `b_in` | in | W | operands A and B |
| `prod_out` | out | W | Out, the low W bits of A·B |
| `done` | out | 1 | 1 = idle, and Out holds the last job's product |
| `state` | out | 3 | controller state, for debugging |

The protocol:

1. While `done` is 1, raise `start` with A and B on the inputs.
2. On the next cycle `done` falls. The datapath captures A and B in this
   cycle, **so keep A and B stable for the start cycle and the cycle after
   it**. After that they are free to change.
3. Any `start` pulses while the unit is busy are ignored.
4. When `done` rises again, `prod_out` holds the product. It stays there until
   the next job begins.

If `start` is held at 1, a new job begins in the first idle cycle.

**Latency.** Let L be the number of bits in B up to its highest 1 (L = 0 for
B = 0), and let k be the number of 1 bits in B. Then `done` stays 0 for
exactly

    2 + 3·L + k   cycles

This ranges from 2 cycles (B = 0) up to 130 cycles (B = 0xFFFFFFFF). The
operand A has no effect on the time taken.

## Controller

The controller has a 3-bit state S. Only codes 0 to 5 are used:

| S | stands for | next state | outputs that are 1 |
|---|---|---|---|
| 0 | idle: Out=prod, done=1, test start | 1 if start, else 0 | `done` |
| 1 | a=A; b=B; prod=0 | 2 | `p_load`, `a_load`, `b_load` (all selects 0) |
| 2 | test b == 0 | 0 if `b_zero`, else 3 | — |
| 3 | test b odd | 4 if `b_odd`, else 5 | — |
| 4 | prod = prod + a | 5 | `p_load`, `p_sel` |
| 5 | a = a·2; b = b/2 | 2 | `a_load`, `a_sel`, `b_load`, `b_sel` |
| 6, 7 | unused | 0 | none (`done` = 0) |

The outputs depend on the state only (a Moore machine). Some selects are
"don't care" because their register is not loaded in that state. They are
driven as 0.

Codes 6 and 7 cannot be reached after reset. They still return to idle, and
they load nothing, so a corrupted state register cannot change a variable.

`a` and `b` always receive the same load and select values. The control
bundle still carries them as separate fields, and an assertion in
`mult_controller` checks that they match. A second assertion checks that the
state stays within codes 0 to 5.

The equations are the functions `next_state`, `done_out` and `ctrl_out` in
`seq_mult_pkg`. That way the testbench can check every code, 6 and 7
included.

## Datapath

```
prod <= p_sel ? prod + a : 0        when p_load
a    <= a_sel ? a << 1   : A        when a_load
b    <= b_sel ? b >> 1   : B        when b_load
b_zero = (b == 0)      b_odd = b[0]      Out = prod
```

- The multiply by 2 and divide by 2 are one-bit logical shifts.
- All arithmetic is unsigned and wraps at W bits. The result is therefore
  A·B mod 2^W. No upper half of the product is kept.
- `Out` is wired straight to the `prod` register. During a job it shows the
  partial sum, so read it only while `done` is 1.

After synthesis at W = 32, the design has one 32-bit adder, three 32-bit
muxes, 96 register bits for the datapath and 3 for the controller.

## Departures and choices

These points are not fixed by the source description, so this design
chooses them:

- **Reset.** `rst` is synchronous and active high. It resets the controller
  to state 0 and clears `prod`, `a` and `b` to 0, so Out reads 0 before the
  first job.
- **Operand capture.** A and B are captured one cycle after `start` is seen
  (in state 1), not in the start cycle itself.
- **Don't cares.** Every "don't care" entry in the output table is driven as 0.
- **Shared controls.** The shared `a_load`/`b_load` and `a_sel`/`b_sel`
  signals are kept as separate wires of equal value, not merged into one.
- **Product width.** The product is truncated to W bits.
- **Debug port.** The `state` output port is an addition for debugging.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself.
Each also has a watchdog that counts a failure if the test hangs. For
example, run the end-to-end test like this:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  --top-module seq_mult_tb rtl/seq_mult_pkg.sv tb/seq_mult_tb.sv
./obj_dir/Vseq_mult_tb
```

For the other tests, replace `seq_mult_tb` with `load_reg_tb`,
`mult_datapath_tb` or `mult_controller_tb`.

What each testbench does:

- **`seq_mult_tb`** runs the top at its default size (W = 32). It covers the
  edge cases (B = 0, A = 0, B = 1, all ones, single top bit) and 400 random
  jobs. For every job it checks the product and the exact latency formula
  above, and that Out does not move while idle. During a job it changes A and
  B and toggles `start` at random; neither may disturb the job. It counts idle
  waits, job starts, ignored starts, add steps, skipped adds and exits on
  b == 0, and fails if any of them never happened.
- **`mult_controller_tb`** checks the equations for all 8 codes × 8 input
  combinations against the tables above. It then runs the module with random
  inputs and compares state and outputs every cycle.
- **`mult_datapath_tb`** drives random control bundles and compares against a
  register-level model. It finishes with one multiplication that the
  testbench sequences by hand.
- **`load_reg_tb`** checks load, hold and reset priority.

## Changing it

- **Width.** `W` sets the width of both operands and the product. The
  controller does not depend on W. The latency formula still holds, with
  L ≤ W.
- **Full product.** To return the full 2W-bit product, widen `prod` and `a`
  to 2W bits and leave `b` at W bits.
