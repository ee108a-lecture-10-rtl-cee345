# Microcoded traffic-light controllers

A finite-state machine needs next-state logic and output logic. This design
takes that logic out of gates and puts it in a memory. The memory holds a
*microprogram*, and the same small piece of hardware runs any controller you
can write as a program. A traffic-light controller is worked out in three
styles, each a refinement of the one before:

| style | module | ROM word | ROM depth | what it buys |
|---|---|---|---|---|
| flat state table | `ucode_tlc` | {next state, outputs} | 2^(state bits + input bits) | no logic at all besides two registers |
| sequenced, with branches | `ucode_is` | {branch instr, target, outputs} | one word per state | depth no longer grows with the number of inputs |
| two instruction types | `ucode_mi` | {1, condition, target} or {0, register, value} | one word per step | narrow words; outputs held in registers, a timer for delays |

`microcode_top` places five controllers side by side. Each runs one of five
microprograms: two flat programs, two sequenced ones and one brx/ldx program.
They share the clock and the synchronous reset and nothing else.

All lights are 3-bit `{green, yellow, red}` fields with exactly one bit set:
`100` is green, `010` yellow, `001` red. Inputs are car sensors. `car_ew` is a
car waiting east-west. In the two-input controllers, `in[0]` is a left-turn
car and `in[1]` an east-west car.

## 1. The flat microcoded FSM (`ucode_tlc`)

```
            +--------------------------+
 {state,in} |  ROM  2^(K+N) x (K+M)    | {next, outputs}
 ---------->|                          |------+---------> state register --> state
            +--------------------------+      |               (K bits)
                 ^                            +---------> output register --> out
                 +-- state ---------------------------------------+  (M bits)
```

The ROM address is `{state, inputs}` and the word is `{next state, outputs}`.
The ROM is the full truth table of the FSM's combinational logic. Both
registers load at the same clock edge. `out` is therefore always the output
field of the state held *one cycle earlier*. While `rst` is high the next
state is forced to 0, so reset is synchronous.

The cost is the size: 2^(K+N) x (K+M) bits. Every extra input doubles the ROM.

Programs (in `ucode_pkg`):

* `TLC_BASIC_CODE` (K=2, N=1, M=6; 8 x 8 bits). States are gns=0, yns=1,
  gew=2, yew=3. The controller stays in gns while no east-west car waits,
  then steps yns -> gew -> yew -> gns. Outputs are `{ns, ew}`.
* `TLC_IMPROVED_CODE` (K=3; 16 x 9 bits). North-south green lasts at least
  three states (GNS1, GNS2, GNS3), and GNS3 holds until an east-west car
  arrives. East-west green (GEW) holds as long as the car is there. After
  each yellow, one all-red state (RNS, REW) comes before the other direction
  turns green.

## 2. Sequencing with a micro-program counter (`ucode_is`)

Most states simply go on to the next one, and those that do not usually
branch on a single input. So the ROM holds one word per state, indexed by a
micro-program counter (uPC):

```
 word = { br_inst[2:0] | br_target[3:0] | ns[2:0] lt[2:0] ew[2:0] }   (16 bits)
```

`ucode_sequencer` picks the next uPC through a three-way multiplexer:

* 0 while in reset;
* `br_target` when `is_branch_logic` says branch;
* uPC + 1 otherwise.

The branch condition is `(br[0] & in[0] | br[1] & in[1]) ^ br[2]`. Each low
bit selects an input and the top bit inverts the result. That gives:

| code | name | branches when |
|---|---|---|
| 000 | nop | never |
| 100 | br | always |
| 001 / 101 | brlt / brnlt | left-turn car / no left-turn car |
| 010 / 110 | brew / brnew | east-west car / no east-west car |
| 111 | bna | no car at all |
| 011 | (unnamed) | any car |

The output field is registered as in the flat design, so the lights lag the
uPC by one clock. The ROM read is combinational. The branch decision, the
next uPC and the registered lights all happen in the same cycle. The
controller takes one state per clock.

Programs:

* `IS_LEFT_TURN_CODE` (8 words):
  * NS1 branches to the left-turn sequence LT1..LT3 on a left-turn car.
  * Otherwise NS2 returns to NS1 unless an east-west car waits.
  * With a car, EW1..EW3 runs: yellow NS, then green EW while the car stays,
    then yellow EW.
* `IS_ALTERNATE_CODE` (6 words):
  * `bna` keeps NS1 green until any car arrives.
  * NS2 is the single yellow state and chooses left-turn or east-west.

Unused words hold `br 0` with all lights red.

## 3. Branch-or-load microcode (`ucode_mi`)

Words shrink further if an instruction either branches *or* changes an
output, not both:

```
 brx  { 1 | cond[2:0] | target[4:0] }    branch to target if cond
 ldx  { 0 | dest[2:0] | value[4:0]  }    register[dest] <= value
```

A program now needs more words, but each is 9 bits instead of 16. Outputs
live in enable-registers that only an `ldx` changes. `mi_output_decode`
turns `dest` into a one-hot enable for four registers:

| dest | register |
|---|---|
| 0 | NS light |
| 1 | EW light |
| 2 | LT light |
| 3 | timer |

A light register takes the low 3 bits of `value`. The timer
(`ucode_timer`) takes all 5 bits and counts down to zero. Its `done` output
is high at zero. A load never branches, so the uPC just steps.

Branch conditions (`mi_branch_logic`). `cond[1:0]` selects one of four:

| cond[1:0] | condition |
|---|---|
| 0 | left-turn car |
| 1 | east-west car |
| 2 | either car |
| 3 | timer done |

`cond[2]` inverts the selected condition. The program uses:

| mnemonic | code | branches when |
|---|---|---|
| `blt` | 000 | left-turn car |
| `brnle` | 110 | no car at all |
| `bntz` | 111 | timer not yet zero |

### How a timed wait works, cycle by cycle

Each instruction takes one clock. A register write becomes visible one clock
after the `ldx` that makes it.

```
 c      ltim T        timer <= T at the end of c
 c+1    bntz self     count = T   -> branch (stay)
 ...                  count = T-1, ... 1 -> stay
 c+1+T  bntz self     count = 0   -> fall through
```

So `ltim T ; bntz .` takes T + 2 cycles. With one cycle for the `ldx` that
sets a light, the phases of the program come out as:

| phase | cycles |
|---|---|
| NS green | T_GREEN + 4, plus each cycle spent in `brnle` waiting for a car |
| every yellow | T_YELLOW + 3 |
| all red before EW or LT green | T_RED + 4 |
| EW or LT green | T_GREEN + 3 |
| all red before NS green | 2 |

T_GREEN, T_YELLOW and T_RED are 8, 3 and 1 cycles. They live in `ucode_pkg`
and can be anything up to 31.

### The program (`MI_CODE`, 31 of 32 words)

| addr | instruction |
|---|---|
| 0-1 | LT and EW red |
| 2-5 | NS green; wait T_GREEN; wait for a car (`brnle`) |
| 6-9 | NS yellow; wait T_YELLOW; NS red |
| 10 | `blt` to 21 on a left-turn car |
| 11-20 | wait T_RED; EW green / wait / yellow / wait / red; back to 2 |
| 21-30 | same for LT; back to 2 |
| 31 | spare (`br 0`) |

The loop-back branch at 20 and 30 is an unconditional `br`. The condition
decode above has no always-true code, so `br` is encoded as `btd` (branch if
timer done). At both places it is used, the timer has just run out and
nothing has reloaded it, so the branch is always taken. A program that needs
an unconditional jump while the timer is running must keep that in mind.

## Where this RTL goes beyond or departs from its source

The controller structures, the instruction formats, the branch encodings and
all five microprograms follow the lecture on microcode this design is
based on. The following are this design's own choices:

* **Basic flat state numbering.** The state table of the source numbers the
  states gns=00, yns=01, gew=11, yew=10. Its ROM image and simulation number
  them 0, 1, 2, 3 in order. This design uses the ROM image (0..3).
* **Left-turn program, word 7.** Two tables disagree on LT3's lights. This
  design uses `001 010 001` (yellow left turn). That value matches the data
  column and the state's meaning.
* **brx/ldx value field.** The format drawing shows 4 bits. The program
  needs 5-bit addresses, so K = 5 (9-bit words).
* **brx/ldx branch decode.** The source's expression, read with Verilog
  operator precedence, would invert only the left-turn term. That would make
  `bntz` branch forever. Here the invert applies to the selected condition.
* **`br` in the brx/ldx program** is encoded as `btd` (see above).
* **Timer.** Only its ports and role are given. This design's timer is a
  load-and-count-down counter with `done = (count == 0)`. Reset clears it.
* **Timer constants** 8 / 3 / 1 are not given.
* **brx/ldx light registers** reset to red. The source leaves them unreset
  and has its program clear LT and EW first.
* **Unused ROM words** jump to address 0 with all lights red.
* **ROM contents** are parameters (`CODE`), filled from `ucode_pkg`.
* **Generalised branch logic.** `is_branch_logic` takes N inputs (one select
  bit each plus an invert bit). At N = 2 it is exactly the source's
  expression.

## Parameters and reuse

Every controller takes its microprogram as an unpacked-array parameter
`CODE`, one word per ROM address, plus the field widths.

| module | parameters |
|---|---|
| `ucode_tlc` | N, M, K (inputs, outputs, state bits) |
| `ucode_is` | N, M, K, J (J must be N + 1) |
| `ucode_mi` | N, M, O, K, J (M/O light registers plus the timer; supports N = 2, J = 4) |

To run a different controller, write a new `CODE` array. `ucode_pkg` shows
the style: small functions (`is_op`, `mi_ld`, `mi_br`) assemble words from
named fields. Nothing else in the RTL changes.

## Files

| file | what |
|---|---|
| `rtl/ucode_pkg.sv` | light codes, instruction encodings (enums), the five microprograms |
| `rtl/ucode_rom.sv` | microcode store, asynchronous read |
| `rtl/ucode_sequencer.sv` | uPC register, incrementer, 3-way next-uPC mux |
| `rtl/is_branch_logic.sv` | branch condition, sequenced controller |
| `rtl/mi_branch_logic.sv` | branch condition, brx/ldx controller |
| `rtl/mi_output_decode.sv` | ldx destination to one-hot enable |
| `rtl/ucode_timer.sv` | loadable down-counter |
| `rtl/ucode_tlc.sv`, `rtl/ucode_is.sv`, `rtl/ucode_mi.sv` | the three controllers |
| `rtl/microcode_top.sv` | all five configurations side by side |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/ref_flat_tlc.sv`, `tb/ref_seq_tlc.sv`, `tb/ref_mi_tlc.sv` | reference models used by the testbenches |

## Verification

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself with
a watchdog if it hangs.

The controllers are checked cycle by cycle against reference models written
independently of the microcode:

* The flat and sequenced controllers are compared with state-diagram models.
  The testbenches also replay the simulation traces from the source: uPC
  0, 1, 0, 5, 6, ... for the left-turn program, and lights 41, 21, 14, 12
  (octal) for the basic flat program.
* The brx/ldx controller is compared with a model that knows only the phase
  lengths listed above, so the timer's cycle count is checked too.

The ROM testbench compares every word of the programs with the published
binary words. The leaf blocks are checked exhaustively or against random
stimulus.

`tb_microcode_top` runs all five controllers for 6000 cycles with random
inputs at their default sizes. It fails if any mechanism never happened:

* ROM holds and leaves;
* branches taken and not taken, including `bna`;
* timer waits and register loads;
* a wait for a car;
* both the east-west and the left-turn phase.

Run a testbench with Verilator 5 from the folder that holds `rtl/` and
`tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/ucode_pkg.sv tb/tb_microcode_top.sv --top tb_microcode_top -o sim
./obj_dir/sim
```

Replace `tb_microcode_top` with any other `tb_*` name to run that block's
test.

## Limits

* The design is the lecture's teaching example. The lights are raw
  one-hot outputs and the car inputs are taken as synchronous. There is no
  input synchronizer and no protection against an illegal ROM word beyond
  what the programs themselves do.
* The brx/ldx controller supports exactly two inputs and a 3-bit
  destination field.
