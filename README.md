# A time-bomb hardware Trojan in a wired microsequencer

This is a small, complete example of a *sequentially triggered* hardware
Trojan. The victim is the controller of a two-LED railway semaphore, built as a
wired microsequencer: a state register that can count up, load or reset,
a one-hot decoder, and a few gates. The Trojan is a free-running 8-bit counter
whose all-ones value, once every 256 clocks, inverts one wire inside the
controller through an XOR gate. Between firings the circuit is
indistinguishable from the clean ("golden") design, so a short functional test
almost never sees it; when it fires in the right state the semaphore takes a
transition it should not.

The RTL follows the paper "Sequentially Triggering 'Time-Bomb' Trojan into
Hardware Wired Microsequencer". The state machine, its equations, the 4-bit
register, the 1-of-8 decoder, the 8-bit counter trigger and the XOR payload
placement come from there; the choices made where it says nothing are listed
under *Design choices* below.

## The semaphore machine

Two buttons B1 and B0 give the inputs x1, x0 (1 = pushed); a third button,
Bres, is the hard reset. The green LED (z1) lights only after the button pairs
B1B0 go

    00 -> 01 -> 11 -> 10 -> 00      (green: state S3)

and the red LED (z0) only after

    00 -> 10 -> 11 -> 01 -> 00      (red: state S6)

Either LED then stays on until the hard reset. The machine has six states; the
outputs depend on the state only (Moore):

| state | x1x0 | next | register operation |
|-------|------|------|--------------------|
| S1 | 0- | S1 | reset |
| S1 | 10 | S4 | load 4 |
| S1 | 11 | S2 | increment |
| S2 | 00 | S3 | increment |
| S2 | 01 | S1 | load 1 |
| S2 | 1- | S2 | hold |
| S3 (green) | -- | S3 | hold |
| S4 | 00 | S1 | reset |
| S4 | 01 | S5 | increment |
| S4 | 1- | S4 | hold |
| S5 | 00 | S6 | increment |
| S5 | 01, 10 | S5 | hold |
| S5 | 11 | S4 | load 4 |
| S6 (red) | -- | S6 | hold |

## How the wired microsequencer works

The state is stored as its number: Sk is the value k in a 4-bit register
(`usq_reg`). A decoder (`usq_dec`) produces one line per value, S0..S7, and
the gate network (`usq_ctrl`) only has to say which of four things the
register does next. The states are numbered so that most moves are
"S(k) to S(k+1)" (an increment) or "back to S1" (a reset); the remaining moves
are parallel loads of a constant:

    INC  = S1 x1 x0  + S2 /x1 + S4 /x1 x0 + S5 /x1 /x0
    /PL  = not( S1 x1 /x0 + S2 /x1 x0 + S5 x1 x0 )
    /RES = not( S1 /x1 + S4 /x1 /x0 )
    Y    = { 0, S1 + S5, 0, S2 }        (load 4 from S1 and S5, load 1 from S2)
    Z1   = S3,  Z0 = S6

The register obeys /RES first, then /PL, then INC; with none of them asserted
it holds. /RES and the hard reset both put the register at S1 (value 1). In
S2 with 01 both INC and /PL are active and the load wins, which is why the
priority matters.

All of it is one clock domain. Each rising edge performs one step; z1 and z0
are decoded from the register and change right after the edge. The button
sequences above therefore take one clock per button pair.

## The time-bomb Trojan

Trigger (`ht_trigger`): an 8-bit synchronous up counter that runs on every
clock. The AND of its eight bits is high only while the count is 255, so the
trigger is high for one clock in 256. In this RTL the counter is cleared by
the hard reset, so the first firing is in the 256th clock after reset
(edge number 255 counting from 0) and every 256 clocks after that.

Payload (`ht_payload`): an XOR in a victim wire. With the trigger low the wire
passes; with it high the wire is inverted.

Insertion point: the default Trojan (`HIJACK = HJ_DEFAULT`) inverts x1 only
where it enters the `S5 x1 x0` term of /PL. The effect is confined to state S5,
the state just before the red signal:

* S5 with x1x0 = 01 at the trigger: the load term fires and the machine jumps
  back to S4 instead of waiting in S5.
* S5 with x1x0 = 11 at the trigger: the load is suppressed and the machine
  stays in S5 instead of returning to S4.
* In every other state, or with 00 or 10 in S5, nothing changes.

So the corrupted transitions need state S5, particular buttons and the one
clock in 256 at once, which is why random or directed testing of the
controller rarely exposes the Trojan.

How often it fires depends only on the clock. For the 21 MHz maximum clock of
a 74HC590-class 8-bit counter, the counter makes 21e6 x 3600 = 7.56e10 counts
per hour, and the trigger fires every 256 / 21 MHz = 12.2 us, about 2.95e8
times per hour. A slower clock makes the bomb go off less often.

### Other hijack points

The same trigger and XOR can be put on other wires of the controller. The
top's `HIJACK` parameter is a bit mask (positions defined in `usq_pkg`):

| bit | constant | wire inverted while triggered |
|-----|----------|-------------------------------|
| 0 | `HJ_X1_S5PL` | x1 in the S5 term of /PL only (default) |
| 1 | `HJ_X1` | x1 everywhere in the gate network |
| 2 | `HJ_X0` | x0 everywhere in the gate network |
| 3 | `HJ_INC` | INC at the register |
| 4 | `HJ_PL` | /PL at the register |
| 5 | `HJ_RES` | /RES at the register |

`HJ_NONE` (all zeros) removes every payload gate and gives the golden model.
All payloads share the one counter. Hijacking INC or /PL can move the
register to S0 or S7, values the golden machine never uses: those states
drive neither LED and have no way out except the hard reset.

## Module map

    semaphore_top            parameters HIJACK, HT_WIDTH (counter width, 8)
      ht_trigger   u_trigger   8-bit counter + AND
      ht_payload   u_pay_*     six XOR positions, each kept or left out by HIJACK
      usq_ctrl     u_ctrl      gate network
      usq_reg      u_reg       4-bit state register
      usq_dec      u_dec       1-of-8 decoder
    usq_pkg                  state numbers, reset state, hijack mask bits, reg_ctl_t

Top ports: `clk`, `bres_n` (active-low asynchronous hard reset), `x1`, `x0`,
`z1` (green), `z0` (red), and `state` (the register contents, for observation).
The pull-up resistors of the buttons and the transistor stages that drive the
LEDs are analog parts and are not modelled; z1 and z0 are the logic signals
that would drive them.

## Design choices not fixed by the paper

* One clock for the register and the Trojan counter. A separately clocked
  counter would feed an unsynchronised signal into the load logic.
* The counter is cleared by the hard reset, so firing times are reproducible.
  A real Trojan would more likely run from power-up without a clear.
* The buttons are active-high logic levels (1 = pushed) and are assumed to be
  already debounced and synchronous to the clock. A button wired to ground
  with a pull-up, as drawn in the paper's schematic, reads 0 when pushed; that
  inversion is left to the pad.
* The hard reset is asynchronous and puts the machine in S1 (both LEDs off).
* Register priority /RES > /PL > INC; the functional reset loads S1, not 0.
* The decoder drives no line for register values 8..15.
* The paper's transition table lists outputs 01 on the S5-to-S6 row and calls
  one S2 hold row "reset"; this RTL follows the equations (Z0 = S6, and a
  hold where no control line is active).
* `HIJACK`, the payload enable `EN` and the observation port `state` are
  additions for choosing hijack points and for testing.

## Verification

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

| testbench | what it checks |
|-----------|----------------|
| `tb_usq_reg` | 2000 random steps of INC, /PL, /RES against a reference register, plus asynchronous hard resets |
| `tb_usq_dec` | all 16 inputs |
| `tb_usq_ctrl` | every state line, button pair and value of the separate x1 tap, against the transition table above |
| `tb_ht_trigger` | firing exactly at count 255 (and at 7 for a 3-bit copy), period, and restart after a clear |
| `tb_ht_payload` | the XOR and the left-out gate |
| `tb_semaphore_top` | the default design end to end: both LED sequences with one clock per step, the Trojan hijacking S5 with 01 and with 11, then 20,000 random button changes with hard resets, against a reference model; every register operation, the hard reset, the trigger and a hijacked transition must each occur |
| `tb_semaphore_hijack` | seven copies side by side (golden, default and each single hijack point) with a 4-bit counter, each against the equations with the chosen wire inverted; every Trojan copy must diverge from the golden path at least once, the golden copy never |

`tb_semaphore_top` runs the top with all parameters at their defaults. In
the golden configuration (`HIJACK = HJ_NONE`) the top also carries a
concurrent assertion that the register never leaves S1..S6; the golden copy
in `tb_semaphore_hijack` exercises it.

To run one with Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb rtl/usq_pkg.sv \
        tb/tb_semaphore_top.sv --top-module tb_semaphore_top -Mdir obj
    ./obj/Vtb_semaphore_top

Lint a module with `verilator --lint-only -Wall -Irtl rtl/usq_pkg.sv rtl/semaphore_top.sv`.
The only lint warnings are unused package constants and the unused decoder
lines S0 and S7, which no equation needs.
