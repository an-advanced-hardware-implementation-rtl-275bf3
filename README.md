# Trial-division divider for the RISC-V M extension

This is a small, iterative 32-bit integer divider that executes the four RISC-V
division instructions: `DIV`, `DIVU`, `REM` and `REMU`. It uses binary trial
division, which is the pencil-and-paper method. Each clock, the divider brings
the next dividend bit into a partial remainder and tries to subtract the
divisor. If the subtraction does not borrow, the quotient bit is 1 and the
difference is kept. Otherwise the quotient bit is 0 and the partial remainder
is kept unchanged. A 32-bit divide takes 32 such steps, plus three clocks of
set-up and wrap-up.

Signed operations run on the same unsigned core. Negative operands are turned
into magnitudes before the loop starts. The sign of the result is restored
afterwards.

The design aims for the least hardware, not the highest speed. It uses one
33-bit subtractor, four 32-bit registers and a four-state controller.

## Block structure

```
                      trial_divider (top)
  dividend_i ─┐  ┌───────────────┐  ┌──────────────┐  ┌────────────────┐
  divisor_i  ─┼─►│ operand regs  ├─►│div_operand_abs├─►│  div_datapath  │
  op_i       ─┤  │ (IDLE→START)  │  │ sign + 2's   │  │ divisor,remain,│
  reg_waddr_i─┘  └──────┬────────┘  │ complement   │  │ dividend,quot. │
                        │           └──────┬───────┘  │ 33-bit subtr.  │
                 ┌──────▼──────┐    sign flags        └───────┬────────┘
                 │div_op_decode│           │          quotient│remainder
                 └──────┬──────┘    ┌──────▼──────────────────▼───┐
                   mode │           │ div_result_sel: 2's compl.  │
                        └──────────►│ of div / rem, op mux        ├─► result_o reg
  start_i ─► div_ctrl (IDLE/START/CALC/END, counter, busy, ready) └─► ready_o, busy_o
```

| File | Role |
|---|---|
| `rtl/div_pkg.sv` | Op codes (`div_op_e`), state type (`div_state_e`), mode struct, widths |
| `rtl/div_op_decode.sv` | op code → the four instruction strobes and `{is_signed, is_rem}` |
| `rtl/div_ctrl.sv` | The state machine, the iteration counter, `busy_o` and `ready_o` |
| `rtl/div_operand_abs.sv` | Sign bit → two's complement mux for the dividend and the divisor |
| `rtl/div_datapath.sv` | Trial-division registers and the compare/subtract/shift step |
| `rtl/div_result_sel.sv` | Restores the sign of the quotient or remainder and picks the result |
| `rtl/trial_divider.sv` | Top: operand, sign-flag and result registers, and the wiring |

## Interface

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk` | in | 1 | clock |
| `rst` | in | 1 | **active-low** asynchronous clear |
| `start_i` | in | 1 | start level. It must stay high until the result appears. |
| `op_i` | in | 3 | `100` div, `101` divu, `110` rem, `111` remu (this is the RISC-V funct3 field) |
| `dividend_i` | in | 32 | rs1 |
| `divisor_i` | in | 32 | rs2 |
| `reg_waddr_i` | in | 5 | destination register rd. It travels with the operation. |
| `result_o` | out | 32 | quotient or remainder. It is a register and holds its value while idle. |
| `ready_o` | out | 1 | a result is on `result_o` |
| `busy_o` | out | 1 | an operation is in progress |
| `reg_waddr_o` | out | 5 | rd of the operation now running, or of the last one |

The width is set by the parameter `XLEN` (default 32). The op and register-address
widths are the constants `OP_W` and `REG_ADDR_W` in `div_pkg`.

## The control sequence and its timing

The controller has four states. It moves through them as long as `start_i`
stays high.

| State | Clocks | What happens |
|---|---|---|
| IDLE | 1 | `start_i` is sampled. The op, both operands and `reg_waddr_i` are captured. `busy_o` is set. |
| START | 1 | A zero divisor ends the operation here. Otherwise the sign stage's magnitudes and sign flags are loaded, and the counter is set to `XLEN`. |
| CALC | `XLEN` | One trial-division step per clock. The counter counts down. The step that reaches zero moves on to END. |
| END | 1 | The result stage output is written into `result_o`. `ready_o` is set and `busy_o` is cleared. |

The result is on `result_o` **35 clocks** (`XLEN + 3`) after the clock edge
that first sampled `start_i`. At that point `ready_o = 1` and `busy_o = 0`.

- **Back-to-back operations.** If `start_i` is still high when a result
  appears, the divider captures whatever is on its inputs in that same cycle
  and starts again. `busy_o` is then low for exactly one cycle, and `ready_o`
  stays high. To issue a stream of operations, keep `start_i` high and change
  the inputs in the cycle where `busy_o` is low.
- **Single operation.** Drop `start_i` in the cycle where the result appears.
  `ready_o` is cleared one clock later. `result_o` keeps its value.
- **Abort.** If `start_i` falls during START or CALC, the divider returns to
  IDLE. `busy_o` is cleared and no result is written.
- **Zero divisor.** The divider leaves START after 2 clocks. It returns the
  RISC-V values: all ones for div/divu, and the dividend for rem/remu.
  `ready_o` is set.

## The trial-division step

The datapath keeps four registers: `divisor`, `remain`, `dividend` and
`quotient`. The dividend shifts left into `remain`, one bit per step. Each step
works as follows:

```
partial  = {remain, dividend[MSB]}          // 33 bits
diff     = partial - {0, divisor}
fits     = no borrow out of diff            // partial >= divisor
remain   = fits ? diff[31:0] : partial[31:0]
quotient = {quotient[30:0], fits}
dividend = dividend << 1
```

The subtractor is 33 bits wide. `partial` can reach `2*divisor - 1`, which
does not fit in 32 bits. A single subtraction does both the comparison (through
its borrow) and the new remainder. After 32 steps, `quotient` holds
`dividend / divisor` and `remain` holds `dividend % divisor`, both unsigned.

Each step shifts the next dividend bit in first, and only then compares. A
description that compares first and shifts afterwards would need one more step
to reach the same result.

## Signs

For `div` and `rem`, the sign stage negates a negative operand by two's
complement. The core therefore always divides magnitudes. The result stage
then applies the RISC-V rules (truncating division, rounding toward zero):

- the quotient is negated when the two operand signs differ;
- the remainder takes the sign of the dividend.

`divu` and `remu` ignore the sign bits.

The most negative value `-2^31` has no positive counterpart in 32 bits, but
read as an unsigned magnitude it is exactly `2^31`, so no special case is
needed. Signed overflow (`-2^31 / -1`) therefore returns quotient `-2^31` and
remainder 0, as RISC-V requires.

Examples: `div -8, 3 = -2` (`fffffffe`), `rem -8, 3 = -2` (`fffffffe`),
`divu 8, 3 = 2`, `remu 8, 3 = 2`.

## Where this design makes its own choices

The following are not fixed by the algorithm description this design follows.
They are decisions of this implementation:

- Reset is active low and asynchronous. The outputs and all registers clear to zero, except the captured op code, which resets to divu.
- The result for a zero divisor follows the RISC-V specification.
- `busy_o` and `ready_o` are registers with the behaviour described above.
- Both `start_i`-low exits (from START and from CALC) abort the operation.
- Op codes `000` to `011` are not division instructions. They raise no
  instruction strobe, and they compute like `100` to `111` (only `op[1:0]` is
  used).
- The state encoding is binary. `div_ctrl` exposes the state and the counter for
  debugging.

The divider does not include the processor around it. Operand fetch,
instruction decode and register-file write-back are outside this block. The
`op_i`, `reg_waddr_i` and `reg_waddr_o` ports are where such a core connects.

## Verification

Each module has a self-checking testbench in `tb/`. Every testbench ends by
printing `TB_RESULT checks=N failures=M`:

| Testbench | What it checks |
|---|---|
| `tb_div_op_decode` | all 8 op codes |
| `tb_div_operand_abs` | corner values and 500 random operand pairs, in signed and unsigned mode |
| `tb_div_result_sel` | random magnitudes with every combination of mode and sign |
| `tb_div_datapath` | 308 unsigned divisions of exactly 32 steps each, compared against `/` and `%` |
| `tb_div_ctrl` | the clock-by-clock schedule (one latch, one load, 32 steps, one finish), back-to-back, zero divisor, abort |
| `tb_trial_divider` | the full design at its default 32-bit size, described below |
| `tb_div_instr_sequence` | the divu/div/rem/remu demonstration sequence (8 and −8 by 3, rd = 5) at a 10 ns clock, with `start_i` held high: results, `ready_o`, `reg_waddr_o`, 35-clock latency |

`tb_trial_divider` runs the full design at its default 32-bit size:

- the sequence divu 8/3, div −8/3, rem −8/3, remu 8/3 with `start_i` held high;
- corner cases for every op;
- an abort;
- 400 random operations.

It compares every result with a reference model of the RISC-V semantics that
uses 64-bit arithmetic. It also checks:

- the latency: 35 clocks, or 2 for a zero divisor;
- the number of `busy_o` cycles;
- `ready_o`;
- the `reg_waddr_o` passthrough.

It counts how often each mechanism was exercised: negative-operand
complement, quotient and remainder sign restoration, zero divisor, overflow,
abort, back-to-back restart and `ready_o` clearing. A mechanism that never
occurs counts as a failure.

Concurrent assertions check the following:

- `div_ctrl`: a step is issued only in CALC, and the counter stays in range;
- `trial_divider`: the instruction strobes are one-hot.

To simulate with Verilator, for example the top-level testbench:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
  rtl/div_pkg.sv tb/tb_trial_divider.sv --top-module tb_trial_divider -o sim
./obj_dir/sim
```

The same command works for any other testbench: change the file and the top
module name.
