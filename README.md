# A security-alarm controller and a 4-bit ALU: two FPGA teaching designs

This RTL holds two small designs from an introductory digital-design course
that moves from TTL breadboards to FPGAs and HDLs. They share nothing but the
top-level wrapper.

* **Security system.** This is the larger design. An intrusion alarm for a
  Spartan-3E-class demo board with a 50 MHz clock. An arm switch and three
  sensor switches (front door, rear door, window) come in. A siren output,
  four indicator LEDs and a two-digit multiplexed 7-segment display go out.
  Once the system is armed, an opened sensor starts an entry delay of seven
  timer ticks. The display counts the elapsed ticks. If nobody disarms the
  system before the delay runs out, the siren sounds until it is disarmed.
* **4-bit ALU.** This is the combinational ALU of a small teaching CPU. It is
  built from two stages in series: *NOT/NEG*, which passes A or takes its
  one's or two's complement, and *AND/ADD*, which passes that value or
  combines it with B. Three control lines pick one of eight functions.

`lab_top` places both side by side. It also holds `twos_comp4`, the
introductory two's-complement circuit that the ALU's first stage grows out
of. ALU ports carry an `alu_` prefix and the two's-complement ports a `tc_`
prefix.

## Security system

```
            +---------+ ce_sig (1 clk every 2^DIV_BITS)
  clk ----->| clk_div |-------------+---------------------+
            +---------+             |                     |
                                    v tick                v ce
  arm, front_door,        +--------------+ run_sig  +---------------+ addr_bus[4:0] +------+
  rear_door, window ----->| security_fsm |--------->| addr_cntr_cat |-------------->| mem5 |--> leds[7:0]
                          +--------------+          +---------------+               +------+
                                 | siren                    | cat_control
  arm/front/rear/window ----------------------------------------------------------> *_ind LEDs
```

All logic runs on `clk`. `clk_div` does not make a slow clock. It makes a
one-clock-wide enable pulse, `ce_sig`. The state machine and the display
counter both use that pulse as a clock enable.

### The alarm state machine (`security_fsm`)

| state      | leaves to         | when                               | outputs            |
|------------|-------------------|------------------------------------|--------------------|
| DISARMED   | ARMED             | `arm` = 1                          | all 0              |
| ARMED      | WAIT_DELAY        | any of the three sensors is 1      | all 0              |
| WAIT_DELAY | ALARM             | the delay timer has reached 7      | `run_timer` = 1    |
| WAIT_DELAY | DISARMED          | `arm` = 0                          |                    |
| ALARM      | DISARMED          | `arm` = 0                          | `siren` = 1        |

The outputs depend only on the state (a Moore machine). Two points need care:

* **`arm` is also the reset.** `arm` = 0 clears the state register
  *asynchronously*. The machine falls back to DISARMED at once, from any
  state, without waiting for a clock. This is also how the system starts at
  power-up, because there is no other reset. For the same reason `arm` also
  feeds the next-state logic, and lint tools report it as "flopped both
  synchronous and async". That double use is intended.
* **The delay timer.** A 3-bit counter advances on each tick while the
  machine is in WAIT_DELAY. In every other state it is held at 0. The clock
  after the counter reaches 7, the machine enters ALARM. The 7-check comes
  before the `arm` check, so a timer that has just run out wins over a
  disarm in the same cycle. The sensor can open at any point in a tick
  period. The delay is therefore 6 to 7 tick periods: 4.0 to 4.7 s at the
  default 1.49 Hz. The original state diagram labels the delay "7 s". The
  counter it describes, though, counts seven ticks of the 1.49 Hz divider.
  This design follows the counter.

The sensors are sampled raw, with no synchronizer flip-flops. A sensor only
has to be open for one clock edge while the system is ARMED to start the
delay. Closing it again does not stop the delay.

### Tick and display (`clk_div`, `addr_cntr_cat`, `mem5`)

* `clk_div` is a free-running `DIV_BITS`-bit counter. `ce` is high while the
  counter is all ones. With the default 25 bits that gives
  50 MHz / 2^25 = 1.49 Hz.
* `addr_cntr_cat` holds two counters:
  * A 4-bit tick count. It advances on `ce` while `run_timer` is high and
    clears while `run_timer` is low.
  * A scan divider. Its top bit is `cat_control`, the digit select of the
    two-digit display. It toggles every 2^`SCAN_BITS` clocks: 381 Hz at the
    default, so each digit refreshes at about 190 Hz.

  The memory address is `{count[3:0], cat_control}`.
* `mem5` is a 32 x 8 read-only table, computed at elaboration. Word
  `{n, 0}` holds the pattern of the units digit of n. Word `{n, 1}` holds
  the pattern of its tens digit. Patterns are active high: bit 0 = segment
  a, ..., bit 6 = segment g, bit 7 (decimal point) = 0.

During the delay the display reads 00, 01, ..., 06. It shows 07 for a single
clock, because the machine is then already entering ALARM. Outside the delay
it reads 00.

### Fire-sensor variant

`security` and `security_fsm` take a `FIRE_SENSOR` parameter. The default is
0, the main design. With `FIRE_SENSOR` = 1:

* The `rear_door` input becomes a fire sensor.
* Fire drives `siren` and the extra `sprinkler` output at once, in every
  state, armed or not.
* Fire no longer counts as an intrusion.

`lab_top` builds only the main configuration.

## 4-bit ALU (`alu4`)

```
            invert   logic_n_arith            n_a_only   cin
               |        |      |                  |       |
               v        v      v                  v       v
  a[3:0] --> +-----------+  z  +-------------------------+ --> y[3:0]
             |  not_neg  |---->|         and_add         | --> cout
             +-----------+     +-------------------------+
                   |                ^
                   v neg_cry        | b[3:0]
```

| n_a_only | logic_n_arith | invert | y              |
|:--------:|:-------------:|:------:|----------------|
| 0        | 0             | 0      | a              |
| 0        | 0             | 1      | -a (two's complement) |
| 0        | 1             | 0      | a              |
| 0        | 1             | 1      | ~a (one's complement) |
| 1        | 0             | 0      | a + b + cin    |
| 1        | 0             | 1      | -a + b + cin   |
| 1        | 1             | 0      | a & b          |
| 1        | 1             | 1      | ~a & b         |

One control line, `logic_n_arith`, steers both stages. "Logic" pairs the
one's complement with AND. "Arithmetic" pairs the two's complement with
addition.

* **`not_neg`** XORs every bit of A with `invert`. Its result goes through an
  incrementer (`inc4`), whose increment input is `invert & ~logic_n_arith`.
  So 1 is added only for the two's complement. `neg_cry` is that
  incrementer's carry. It is 1 only for the two's complement of 0.
* **`and_add`** has an adder (`fa4`) and four AND gates, which work in
  parallel. A first 2:1 multiplexer (`mux4`) picks AND or sum. A second one
  picks that result, or A unchanged when `n_a_only` = 0. `cout` is the
  adder's carry in every mode. It is meaningful only in the two add rows.

The original schematic draws an inverter on the invert input. Its function
table, however, gives invert = 1 as the complementing setting, and its worked
examples (for instance two's complement of C = 4) agree with the table. This
design follows the table: `invert` is active high. For the two AND rows the
testbenches expect the results of the named functions: F AND 8 = 8, and
(NOT 2) AND 5 = 5.

`twos_comp4` is the introductory circuit on its own. Four inverters feed
`inc4`, whose increment input is tied to 1, so `y = -a`.

`inc4`, `fa4` and `mux4` were given only as boxes with a function. They are
written as plain ripple chains and a multiplexer. All ALU modules take a
width parameter `W`, default 4.

## Files

| file | contents |
|------|----------|
| `rtl/security_pkg.sv` | state enum `sec_state_t`, `seg7()` digit-to-segment function |
| `rtl/security.sv` | security system top |
| `rtl/security_fsm.sv` | alarm state machine and delay timer |
| `rtl/clk_div.sv`, `rtl/addr_cntr_cat.sv`, `rtl/mem5.sv` | tick, display counter and scan, segment memory |
| `rtl/alu4.sv`, `rtl/not_neg.sv`, `rtl/and_add.sv` | ALU and its two stages |
| `rtl/inc4.sv`, `rtl/fa4.sv`, `rtl/mux4.sv` | incrementer, adder, 2:1 multiplexer |
| `rtl/twos_comp4.sv` | stand-alone two's complement (inverters + incrementer) |
| `rtl/lab_top.sv` | all designs side by side |
| `tb/tb_<module>.sv` | self-checking testbench per module |
| `tb/tb_security_fire.sv` | security system in the fire-sensor variant |
| `tb/tb_lab_top_full.sv` | one full alarm cycle at the default sizes |

## Simulating

Every testbench checks itself. Each one prints
`TB_RESULT checks=N failures=M` and stops, and each has a watchdog. With
Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/security_pkg.sv \
          tb/tb_lab_top.sv --top-module tb_lab_top -o sim
./obj_dir/sim
```

Replace `tb_lab_top` by any other testbench. Run times:

* The module testbenches and `tb_lab_top` use short dividers
  (`DIV_BITS` = 4, `SCAN_BITS` = 2) and finish in well under a second.
* `tb_lab_top_full` runs the top with its default parameters. It simulates
  about 2.4e8 clocks, which takes about 45 s.

What the tests cover:

* **ALU.** The ALU testbenches run all eight function-table examples and
  every operand, carry and control combination against an arithmetic model.
* **`tb_security`.** It compares the whole security system with a
  cycle-level reference model under random switch activity.
* **`tb_security_fsm`.** It walks every arc of the state diagram, checks the
  exact tick count of the delay and the asynchronous disarm, and checks the
  fire variant.
* **`tb_security_fire`.** It runs the whole system in the fire variant.
* **`tb_lab_top`.** It counts that every mechanism occurred: all eight ALU
  functions, arming, each sensor, alarm, disarm from ALARM, disarm during the
  delay (the delay then restarts in full), display digits 0..7 and digit
  scanning.

## Power-up and reset

There is no reset pin, because the original system has none. The counters
(`clk_div`, `addr_cntr_cat`, the delay timer) take their power-up value 0 from
their declarations, as an FPGA configuration loads them. Lint reports these
initialised registers. The state machine is cleared by `arm` = 0. For an ASIC
or a device without initial values, add a reset to those three counters.

## Not included

* **Indicator LEDs.** They repeat the switches, so they are plain assignments
  in `security`, not a module of their own.
* **Pin assignments.** The demo-board constraint file is not included.
* **The teaching CPU around the ALU.** Its program counter, address register,
  accumulator, instruction register, control unit and memory are only named
  in a block diagram. No instruction set or control sequence is specified, so
  it is not included.
