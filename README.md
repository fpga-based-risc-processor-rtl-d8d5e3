# 8-bit accumulator processor with a built-in PID level controller

This design holds a water tank at a set level. Two 8-bit numbers come in
from an external ADC: the wanted level (set point) and the measured level.
A PID controller on the FPGA turns the difference into an 8-bit drive value.
A PWM stage turns that value into a pulse train for the pump motor, which
goes out through an opto-isolator and a motor driver. The gains Kp, Ki and
Kd are not fixed in logic. A very small 8-bit processor computes them from
its ROM after reset, writes them into three output registers and halts. The
PID then runs from those registers for good. A serial link reports the set point
and the PID output to a monitoring PC.

The RTL follows a published FPGA design: "FPGA based RISC Processor with
Inbuilt Auto tuned PID Controller for Liquid Level Control System". From it
this design takes the block structure, the instance and port names, the
instruction names, the 16 x 8 ROM, the 8-bit widths, and the presence of a
frequency divider, a PID block and a complementary PWM output. The source
gives the function of most blocks but not their internals. Everything below
the block level is this design's own choice, and the sections say where.

## Block structure

```
            +------------------ W bus (8 bit, multiplexer) ------------------+
            |        |          |           |           |          |       |
   PC --Ep--+  ROM --CE--+  IR --Ei--+  AC --Ea--+  ALU --Eu--+       |
   ^Cp      MAR<-Lm     IR<-Li     AC<-La     B<-Lb     O<-Lo  O1<-Lo1  O2<-Lo2
                                                         |       |        |
                                                        Kp      Ki       Kd
   CU (ring counter T1..T6) -> control word            \       |        /
   IRDec: ADD HLT LDA OUTPUT OUTPUT1 OUTPUT2 SUB        pid (clocked by pidclk)
   FRE_DIV: clk / 1024 -> pidclk                   q4, q5 --^     |
                                                                  q3 -> PWM -> pwm_out, pwm_n_out
```

| Instance | Module | Role |
|---|---|---|
| `PC` | `program_counter` | 4-bit instruction address, `+1` on Cp |
| `MAR` | `memory_address_reg` | 4-bit ROM address, loaded from bus bits 3:0 |
| `ROM_16_8` | `rom_16_8` | 16 x 8 program and data, combinational read |
| `IR` | `instruction_register` | opcode (7:4) to the decoder, operand (3:0) to the bus |
| `IRDec` | `ir_decoder` | one line per instruction |
| `CU` | `control_unit` | six-state ring counter and control word |
| `AC` | `accumulator` | A register |
| `B_Reg` | `b_register` | second ALU operand |
| `ALU` | `add_sub` | A + B or A - B, modulo 256 |
| `O`, `O1`, `O2` | `output_register` | hold Kp, Ki, Kd |
| `FRE_DIV` | `freq_divider` | PID sample clock |
| `pid1` | `pid` | the controller |
| `pwm1` | `pwm` | motor drive |
| `uart1` | `uart_link` (with `uart_tx`) | serial frames to the monitoring PC |

Types shared between modules are in `mp_pkg`: the opcode enum, the decoder
struct `dec_t`, the control-word struct `con_t` and the widths.

## The processor

### Instruction set

An instruction is one byte: opcode in bits 7:4 and a ROM address in bits
3:0. The source names the seven instructions but gives no encodings. The
five classic accumulator-machine instructions keep their usual codes. The
two extra output instructions use codes chosen here.

| Opcode | Mnemonic | Effect |
|---|---|---|
| 0 | LDA addr | A = ROM[addr] |
| 1 | ADD addr | A = A + ROM[addr] |
| 2 | SUB addr | A = A - ROM[addr] |
| C | OUT2 | O2 = A (Kd) |
| D | OUT1 | O1 = A (Ki) |
| E | OUT | O = A (Kp) |
| F | HLT | stop |

Any other opcode does nothing for its six clocks.

### Timing: six T-states per instruction

`control_unit` holds a one-hot ring counter. It advances on every clock
and clears to T1. The control word depends only on the T-state and the
decoded instruction:

| T | Fetch / execute | Control signals |
|---|---|---|
| T1 | MAR = PC | Ep Lm |
| T2 | PC = PC + 1 | Cp |
| T3 | IR = ROM[MAR] | CE Li |
| T4 | LDA/ADD/SUB: MAR = operand; OUTx: Ox = A | Ei Lm, or Ea Lo/Lo1/Lo2 |
| T5 | LDA: A = ROM; ADD/SUB: B = ROM | CE La, or CE Lb (Su for SUB) |
| T6 | ADD/SUB: A = ALU | Eu La (Su for SUB) |

Every instruction therefore takes 6 clocks. The source's general
description of RISC promises single-cycle, pipelined execution. Its
schematic, however, has one shared bus, a memory address register and a
control unit that issues a control word, and that structure needs several
bus transfers per instruction. This design follows the schematic, so it
does not pipeline. In this system the processor only runs a few
instructions after reset, so its speed does not affect the control loop. HLT stops the ring counter in
T4, where the control word is all zeros. The processor then stays halted,
with `hlt` high, until `clr`.

The source draws a 12-bit control word, which is the classic accumulator
machine's word. Here the word has 14 bits, because the second and third
output registers need load strobes Lo1 and Lo2 of their own. Every signal
is active high.

### The W bus

The source shows the registers sharing one bus. Here the bus is a
multiplexer in `mp`, not a set of tri-state drivers, and its select lines
are the enables Ep, CE, Ei, Ea and Eu. An assertion checks that at most one
enable is high in any cycle.

### The gain program

`rom_16_8` holds its contents in the parameter `PROGRAM`: word i is bits
`[8*i +: 8]`. The default program is this design's own:

```
0: LDA 9      1: OUT         Kp = ROM[9]               = 0x30 (3.0)
2: LDA A      3: OUT1        Ki = ROM[A]               = 0x02 (0.125)
4: LDA B      5: ADD C       6: SUB D      7: OUT2     Kd = 0x0C + 0x08 - 0x04 = 0x10 (1.0)
8: HLT
```

It runs every instruction type once. It halts on the 51st clock edge after
`clr`: 8 instructions of 6 clocks each, plus the 3 clocks that fetch HLT.
The PID's first sample comes 512 clocks after `clr`, so the PID never uses
the zero gains that `clr` leaves behind. To use other gains, override
`PROGRAM` on `ROM_16_8`, or change its default.

## The PID controller

`pid` is clocked by `pidclk`, which is `clk` divided by `DIV` (1024 by
default) with a 50 % duty cycle. On every rising edge it computes:

```
e      = setpoint - actual                    9-bit signed
sum    = clamp(sum + e, -8192, 8191)          14-bit signed, saturating
u      = clamp((Kp*e + Ki*sum + Kd*(e - e_prev)) >>> 4, 0, 255)
e_prev = e
```

The sum used in `u` is the one just updated. `u` is a register and holds
its value between samples. The gains are unsigned 8-bit numbers with 4
fractional bits (`FRAC`), so 0x10 is 1.0 and the largest gain is 15.94.
`>>> 4` rounds towards minus infinity.

The source defines only what the three terms mean. The number format, the
limits on the integral and the output, and the choice of derivative on
error (rather than derivative on measurement) are this design's choices.
Two things follow from them:

- A negative `u` is clamped to 0. The pump can only add water, so the
  controller lowers the level by switching the pump off and letting the
  tank drain.
- The integral is bounded only by its 14-bit limits. With Ki = 0.125, the
  integral term alone can reach 1023 output counts, four times full scale,
  so it can wind up far past saturation. After a long climb, this wind-up
  is the main cause of overshoot.

The source calls the controller "auto-tuned" but gives no tuning method.
Nothing here adapts the gains: they are whatever the program wrote.

## PWM

`pwm` runs an 8-bit counter while `ena` is high. The output `pwm_out` is
high while the counter is below the duty, so the pump is on for `q3` of
every 256 clocks. Duty 0 is always off, and 255 is on for 255 of 256 clocks.
The duty is captured once per period, when the counter wraps. A new PID
value therefore takes effect at the next period boundary, up to 256 clocks
later, and never cuts a period short. `pwm_n_out` is the exact complement
of `pwm_out`, with no dead time. When `ena` is low the counter stops and
`pwm_out` is held low.

## Serial monitor link

`uart_link` sends four-byte frames back to back, for as long as the design
runs:

```
65 ('A')   set point (q4)   66 ('B')   PID output (q3)
```

The bytes are 8N1: a start bit, 8 data bits sent LSB first, and a stop bit,
with no idle time between bytes. Each bit lasts `CLKS_PER_BIT` clocks. The
default of 10417 gives 9600 baud from a 100 MHz clock, and both numbers are
assumptions. Both values are captured together as the first tag byte
starts, so a frame is a consistent snapshot. The receiving side finds a tag
byte and keeps the byte that follows it. That is how the PC model the link
was built for splits the stream: it compares each byte with 65 and with 66,
delays the result by one byte and samples the byte after a match.

That PC model labels its second channel "actual value". The source text,
however, says the PC shows the PID output, and the link follows the text.
To report the measured level instead, connect `value` to `q5` in `mp`.

Only the transmitter exists. The source names a UART receiver, but nothing
in the design uses received data.

## Top-level ports (`mp`)

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk` | in | 1 | system clock, which also clocks the PWM |
| `clr` | in | 1 | asynchronous clear, active high |
| `ena` | in | 1 | PWM enable |
| `q4` | in | 8 | set point from the ADC |
| `q5` | in | 8 | measured level from the ADC |
| `q3` | out | 8 | PID output, also the PWM duty |
| `ADC_out` | out | 8 | copy of `q4`, for a display |
| `pwm_out`, `pwm_n_out` | out | 1 | motor drive and its complement |
| `hlt` | out | 1 | processor halted, meaning the gains are loaded |
| `pidclk` | out | 1 | PID sample clock |
| `txd` | out | 1 | serial monitor frames, idle high |

The port names are the source's, except `txd`, which is added here. The
source does not say which of `q4` and `q5` is the set point, or which output is the PID value. The mapping in the
table is this design's reading. `q4` and `q5` are used directly, with no
synchroniser. They come from an external converter that is assumed to hold
them steady. If yours does not, add a register stage.

`pid` runs on the derived clock `pidclk`, while `pwm` and `uart_link` run on
`clk`, so `q3` crosses from one clock to the other. Because `pidclk` is produced by a register
clocked by `clk`, the two clocks are related. On an FPGA, either route
`pidclk` through a clock buffer or turn it into a clock enable.

## Outside the RTL

The complete system also has:

- the set-point and feedback potentiometers;
- the microcontroller that digitises them;
- an opto-isolator from 3.3 V to 5 V;
- the motor driver, pump motor and tank;
- the level sensor, an LED display and a PC that plots the PID output.

None of these is logic, and none is modelled here, except the tank in the
testbench. The source also names a counter among the processor's
peripherals but says nothing about what it counts, so no counter is built.
It calls the controller auto-tuned but gives no tuning method, so no
tuning logic is built either.

## Simulating

Every testbench checks its own results. Each prints
`TB_RESULT checks=N failures=M` and stops on a watchdog if it hangs. For
example, with Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl -y tb +libext+.sv \
          rtl/mp_pkg.sv tb/tb_mp.sv --top-module tb_mp -Mdir obj_tb_mp
./obj_tb_mp/Vtb_mp
```

Replace `tb_mp` with any other testbench name.

| Testbench | What it checks |
|---|---|
| `tb_mp` | The whole design at default parameters, in a closed loop with `tank_model`. It clears the design, checks halt after 51 clocks and gains 0x30/0x02/0x10, compares `q3` with an integer PID model at every sample and the PWM high time with the duty every period, and requires the level to settle within 2 counts of the set point. Cases: set point/start level 33/15, 45/0, 50/0, 170/84, and 100/170 (level above the set point, pump off). It also decodes the serial line at the default baud rate and checks each frame. It requires that each instruction, the halt, PID outputs of 255 and 0, and a serial frame all occurred. |
| `tb_pid` | 3000 samples with random inputs and gains against an integer model, including both integral limits and both output clamps |
| `tb_control_unit` | the control word in every T-state of every instruction, the 6-clock period, HLT and clear |
| `tb_pwm` | high time equals duty over a full period for several duties, the complement output, and `ena` low |
| `tb_uart_link` | 30 frames at 16 clocks per bit: tags, values captured at frame start while the inputs change every 37 clocks, start and stop bits, frame period of exactly 40 bit times |
| `tb_freq_divider` | period and duty for DIV = 8 and 1024 |
| `tb_add_sub` | all 2 x 256 x 256 cases |
| others | the registers, decoder and ROM against reference values |

`tank_model` is a behavioural model used only by the testbench. Every 256
clocks the level changes by `0.004*(pump-on clocks) - 0.002*level - load`.
Its constants are made up. On it the loop settles in about 70 to 110 PID
samples, with 7 to 18 % overshoot. The source reports rise times of 1 to
2 s, settling times of 4 to 4.5 s and overshoot of 2 to 5 % on its own
tank. Those figures depend on a plant this model does not reproduce, so
the two sets of numbers cannot be compared.

## Changing it

- **Gains:** edit the data words 9 to D of `PROGRAM`, or the whole program.
  Keep within 16 words.
- **Baud rate:** `mp #(.CLKS_PER_BIT(f_clk / baud))`.
- **Sample rate:** `mp #(.DIV(n))`. `n` must be even and at least 2.
- **PID number format:** the `FRAC` and `INT_W` parameters of `pid`. The
  testbench models assume 4 and 14.
- **Instruction encodings:** `mp_pkg::opcode_e`. The decoder and the
  testbenches follow it, except the ROM default and the decoder table in
  `tb_ir_decoder`, which are written out as numbers.
