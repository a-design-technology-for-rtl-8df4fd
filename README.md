# A small re-configurable 8-bit MPU driving a PWM motor controller

This is a small microprocessor (MPU) meant to sit inside an FPGA next to
application hardware. Its modules are separate and can be swapped. The idea is
that a time-critical function can live either in software or in hardware. The
RTL shows this with a DC-motor speed loop. The processor reads an indicated
speed Wi from its input port and a measured speed Wd from the motor unit. It
computes a revolution acceleration Aw and writes Wo = Wd + Aw to the PWM
generator. Aw can be computed in two ways:

* **hardware model**: a dedicated unit inside the ALU, used by one extra command
  (`ACW`);
* **software model**: a 36-word subroutine of ordinary commands (compare, branch, shift, and a
  subroutine call).

Both models are the same MPU. The hardware unit is present when
`HW_ACCEL = 1`. The software program runs on either build.

The published design gives the block structure, what each block does, the
motor-unit registers and the control rule. It does not give an instruction
set, bit widths other than 8, timing or encodings. Everything of that kind
here is this implementation's own choice, and the section
[What is the original and what is not](#what-is-the-original-and-what-is-not)
lists those choices.

## The system

```
             pm_we/pm_waddr/pm_wdata (external bus: program loading)
                         |
                  +--------------+   command bus   +-----------------------------+
                  |program_memory|---------------->|          mpu_core           |
                  |  256 x 16    |<----------------|  PC, command reg/decoder/   |
                  +--------------+    pm_addr      |  controller, register file, |
                                                   |  selector, A reg, ALU, stack|
 gpio_in --> ext_io --(R10 every clock)----------->|                             |
 gpio_out <- ext_io <--(R15)-----------------------|   register file R0..R15     |
 speed_in -> pwm_controller --(R14 every clock)--->|                             |
 pwm_out  <- pwm_controller <--(R11,R12,R13)-------|                             |
                  +----------------+               +-----------------------------+
 arst_n -------->|reset_controller|--> rst of every block
```

The application hardware does not share a bus with the processor. Each signal
goes through its own one-direction register in the register file, so no bus
arbitration is needed:

| Register | Direction | Meaning |
|---|---|---|
| R10 | hardware to MPU | general-purpose input: indicated speed Wi (two-flop synchroniser) |
| R11 | MPU to hardware | PWM speed control register: Wo, the duty value |
| R12 | MPU to hardware | PWM timer register: prescaler; a new value takes effect at the next period end |
| R13 | MPU to hardware | PWM setup register: bit 0 enables the output |
| R14 | hardware to MPU | detected speed Wd from the 8-bit A/D input (two-flop synchroniser) |
| R15 | MPU to hardware | general-purpose output |
| R0-R9 | - | free |

The hardware writes R10 and R14 on every clock. A store by the program to
either register is overwritten on the next clock.

Two more access paths come from the original design's goals. An external
unit may write any register directly (`ext_we`/`ext_wdata` on `mpu_core`). It
may also load the program counter directly (`ext_pc_load`). `mpu_system` uses
the first for R10 and R14 and ties the second off.

## How a command runs

Every command is one 16-bit word:

```
 15   12 11    8 7            0
+-------+-------+--------------+
|opcode |   r   |  imm / addr  |
+-------+-------+--------------+
```

The MPU is an accumulator machine. The A register is one input of the ALU. The
other ALU input is the *operand bus*. The `selector` drives the operand bus
from one of three sources: the immediate field, register `R[r]`, or the top of
the stack. The ALU output is the *result bus*. Depending on the command, it is
written into A, into `R[r]`, or into the PC.

| op | mnemonic | effect | flags |
|---|---|---|---|
| 0 | NOP  | - | - |
| 1 | LDI  | A <- imm | Z |
| 2 | LD   | A <- R[r] | Z |
| 3 | ST   | R[r] <- A | - |
| 4 | ADD  | A <- A + R[r] | Z, C = carry |
| 5 | SUB  | A <- A - R[r] | Z, C = borrow |
| 6/7/8 | AND/OR/XOR | A <- A op R[r] | Z |
| 9 | SHR  | A <- A >> 1 (logical) | Z, C = bit shifted out |
| A | ADDI | A <- A + imm | Z, C |
| B | JMP  | PC <- imm | - |
| C | JCC  | if cond then PC <- imm; cond = r[1:0]: 0 Z, 1 NZ, 2 C, 3 NC | - |
| D | CALL | push PC of the next command; PC <- imm | - |
| E | RET  | PC <- pop | - |
| F | ACW  | A <- Wd + Aw, with Wd = A and Wi = R[r] (hardware model only) | Z |

The `command_controller` spends three clocks on each command:

1. **FETCH**: the program memory reads the word at PC. The read is
   synchronous, like FPGA block RAM.
2. **LOAD**: the word goes into the command register and the PC increments.
3. **EXEC**: the decoded controls are applied for one clock.

There is no pipelining and nothing stalls, so a program's run time is exactly
3 clocks times the number of commands executed. The `tb_mpu_core` testbench
checks this. While `run = 0` the controller waits in FETCH. An external PC
load sends it back to FETCH and drops any command already fetched from the
old address. If the external load lands on an EXEC clock, that command still
completes, but the external PC value wins over any jump.

The stack is 4 entries deep. A push when it is full or a pop when it is empty
is ignored and sets the sticky `stack_overflow` output. With `HW_ACCEL = 0`,
executing `ACW` does nothing and sets the sticky `illegal_cmd` output. With
`HW_ACCEL = 1` all 16 opcodes are defined, so `illegal_cmd` stays 0.

To add hardware to the MPU, change two places. Add a command in
`command_decoder`, and add an ALU operation, or another unit, in `mpu_core`.
`ACW` was added this way.

## The acceleration rule (`accel_unit`)

With Diff = Wd - Wi computed as a signed 9-bit value:

| Diff | Aw |
|---|---|
| > 8 | +1 |
| 1 .. 8 | Diff/2, but +1 when that is 0 (Diff = 1) |
| 0 | 0 |
| -8 .. -1 | -1 |
| < -8 | Diff/2 |

Wo = Wd + Aw, modulo 256. The division truncates toward zero. The two halves
of the rule are not mirror images: a large positive error steps by 1, but a
large negative error steps by half the error. That asymmetry is the original
rule and is kept exactly. Wo wraps at 8 bits; it does not saturate. Both
models (`ACW` and the program in `tb/mpu_programs.sv`) give the same Wo for
every pair of 8-bit inputs. The hardware unit is checked against all 65,536
pairs.

The loop applies Wo to the PWM generator directly. Whether the motor then
settles at Wi depends on how the measured back-EMF speed relates to the duty
value. The RTL only guarantees the arithmetic above.

## PWM controller

An 8-bit counter runs through 0..255 once per PWM period. The counter
advances every `timer + 1` clocks, so a period lasts `256 * (timer + 1)`
clocks. `pwm_out` is registered and is high while the counter is below the
speed value. It is therefore high for `speed * (timer + 1)` clocks of each
period. A speed of 0 gives 0 % duty and 255 gives 255/256.

Speed and setup changes take effect on the next clock. A timer change is held
back until the current period ends. `period_end` pulses for one clock at the
last clock of each period. Clearing setup bit 0 forces the output low and
resets the counter.

## Running the system

1. Hold `run = 0` and pulse `arst_n` low. The reset is released 4 clocks after
   `arst_n` rises.
2. Write the program word by word with `pm_we`/`pm_waddr`/`pm_wdata`.
3. Raise `run`. Execution starts at address 0.

The control loop in `tb/mpu_programs.sv` works as follows:

1. It sets the timer to 3 and enables the PWM.
2. It then repeats forever:
   * read R10 (Wi) and R14 (Wd);
   * compute Wo;
   * write Wo to R11;
   * increment R15, so each pass of the loop is visible on `gpio_out`.

In the hardware model one pass takes 9 commands, which is 27 clocks. In the
software model it takes 20 to 32 commands, which is 60 to 96 clocks.

## Files

| File | Contents |
|---|---|
| `rtl/mpu_pkg.sv` | widths, command, ALU and selector enums, the `ctrl_t` control word, register map |
| `rtl/mpu_system.sv` | top: MPU, program memory, I/O, PWM unit, reset |
| `rtl/mpu_core.sv` | the MPU: wires its modules together |
| `rtl/program_counter.sv`, `command_register.sv`, `command_decoder.sv`, `command_controller.sv` | command path |
| `rtl/register_file.sv`, `selector.sv`, `a_register.sv`, `alu.sv`, `accel_unit.sv`, `stack_unit.sv` | data path |
| `rtl/program_memory.sv` | program SRAM |
| `rtl/pwm_controller.sv`, `ext_io.sv`, `reset_controller.sv` | application hardware |
| `tb/mpu_programs.sv` | the two control programs, a stack-overflow program, the integer reference model of Wo |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_models.sv` | hardware and software models side by side: results and loop times |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. A
watchdog makes it fail if it hangs. For example, the whole system:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl \
    rtl/mpu_pkg.sv tb/mpu_programs.sv tb/tb_mpu_system.sv --top-module tb_mpu_system
./obj_dir/Vtb_mpu_system
```

`tb_mpu_system` runs the system at its default parameters. It has three
phases:

1. Load the hardware-model program and run it on 40 (Wi, Wd) pairs. The pairs
   cover every row of the rule table, both ends of the 8-bit range and
   random values. It also measures one PWM period and its high time.
2. Reset, load the software-model program, and run the same checks.
3. Load a self-calling routine and check that `stack_overflow` rises.

`tb_models` runs the two models side by side on the same inputs. One system
is built with the hardware unit and runs the `ACW` program. The other is
built with `HW_ACCEL = 0` and runs the software program. For each input
pair it checks Wo from both systems. It also times one pass of each loop: 27
clocks for the hardware model, and 3 clocks per command on the branch the
software takes for the software model. Last, it checks that `ACW` is
reported illegal on the build without the unit.

`tb_mpu_system` also counts how often each branch of the rule, each model, the PWM
measurement and the overflow occurred, and fails if any count is zero. The
per-module testbenches compare against independent models. The models are
exhaustive for `accel_unit` and random or directed for the others.

## Parameters

| Module | Parameter | Default | Notes |
|---|---|---|---|
| `mpu_system`, `mpu_core` | `HW_ACCEL` | 1 | 1 builds the hardware acceleration unit and decodes `ACW`; 0 is the software-only model |
| `mpu_core` and its data-path modules | `DATA_W` | 8 | bus, A and register width; the immediate and the PC are zero-extended, and `ACW` uses the low 8 bits; `mpu_system` keeps 8 because its I/O is 8-bit |
| `mpu_system`, `mpu_core`, `register_file` | `NREGS` | 16 | register count; the register map needs at least 16 |
| `mpu_system`, `program_memory` | `PROG_DEPTH` / `DEPTH` | 256 | program words; the PC is 8 bits |
| `mpu_system`, `mpu_core`, `stack_unit` | `STACK_DEPTH` / `DEPTH` | 4 | return-address entries |
| `reset_controller` | `HOLD` | 4 | reset release delay in clocks; at least 2 |

## What is the original and what is not

Taken from the original design:

* the module set and how values flow between the modules (block diagram);
* the 8-bit data width, and a configurable bus and A-register width;
* the stack unit saving the PC;
* the direct connection of external units to the register file and the PC;
* the motor unit's three registers, with only the timer register not taking
  effect immediately;
* the 8-bit speed input and the 8-bit general-purpose I/O, both reflected into
  MPU registers;
* the two models, with acceleration in hardware or in software;
* the acceleration rule;
* Wi read from R10 and Wo written to R11.

This implementation's own choices:

* the command format, opcodes and flags;
* three clocks per command and the synchronous program memory;
* the register numbers other than R10 and R11;
* the register count and the stack depth;
* how the timer and setup registers are used, beyond their names;
* the synchronisers;
* the reset controller's behaviour;
* the program-loading port;
* the meaning of an external PC load for a command in flight.

Not built:

* several ALUs working in parallel. The original mentions this as a possible
  extension; only one ALU is built.
* the option of connecting application hardware to the MPU's internal bus.
* the A/D converter and the motor. They are analog or external. `speed_in` is
  the converter's 8-bit output.
