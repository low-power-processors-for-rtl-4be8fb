# Nimbus: a low-power AVR microcontroller, and a de-synchronised loop

Nimbus is an 8-bit microcontroller for sensor-network motes. A mote spends
almost all its life asleep, so the design is built around stopping clocks. It
runs the ATmega103 instruction set and uses its I/O map. A SLEEP instruction
hands control to a small power controller. That controller gates three
separate clocks, one per sleep mode's worth of hardware, and restarts them when
an interrupt that is allowed to wake the chip arrives. Programs compiled for
the ATmega103 (avr-gcc, `-mmcu=atmega103`) run unchanged, provided they use
only the peripherals listed below.

Beside the microcontroller, in the same top module but not connected to it,
sits a small asynchronous circuit. It is a self-timed loop built with the
*de-synchronisation* technique: every flip-flop becomes a pair of latches,
each with its own handshake controller, and no clock is needed. This is the
first step towards an asynchronous version of the same processor. The loop
shows the building blocks working together.

The source report gives a full block diagram for the microcontroller. For the
asynchronous processor it gives only its parts; those parts were never
assembled into a core. This RTL does the same: the asynchronous side stops at
the design-study loop.

## Top level

`nimbus_top` contains:

| Instance | Module | Clock | Role |
|---|---|---|---|
| `u_core` | `avr_core` | `clk_core` | AVR core |
| `u_rom` | `prog_rom` | `clk_core` | 8192 x 16 program memory |
| `u_ram` | `data_ram` | `clk_core` | 4096-byte data memory |
| `u_xmux` | `external_mux` | — | data-bus multiplexer, interrupt lines |
| `u_svc` | `service_module` | `clk_dev` | MCUCR, EIMSK, external interrupts |
| `u_porta`, `u_portb` | `avr_port` | `clk_dev` | parallel ports A and B |
| `u_uart` | `uart` | `clk_dev` | UART |
| `u_timer` | `timer_counter` | `clk_timer` | Timer/Counter0 |
| `u_power` | `power_control` | `clk` (free) | sleep state machine |
| `u_cg_core`, `u_cg_dev`, `u_cg_timer` | `clock_gate` | `clk` (free) | clock gates |
| `u_disa` | `desyn_loop` | none | self-timed design-study loop |

Top-level inputs:
- `clk`, the internal clock, which always runs;
- `clk_ext`, a slow external clock for the timer;
- `rst_n`;
- eight active-low interrupt pins;
- the port pins, split into input, output value and direction (DDR);
- the UART lines.

For observation it also brings out:
- `pc`, `inst`;
- the sleep status and mode flags;
- the core and device clock enables.

The `disa_*` ports belong to the loop alone (see the last sections).

Parameters: `ROM_WORDS` (8192), `RAM_BYTES` (4096), `ROM_INIT` (a hex file
for `$readmemh`, empty by default).

## The core

`avr_core` is wired from six parts:
- `pm_fetch_dec`: program counter, decoder and sequencer;
- `alu_avr`: 8-bit ALU plus ADIW/SBIW;
- `bit_processor`: single-bit operations;
- `reg_file`: 32 registers with X/Y/Z pointer outputs;
- `io_reg_file`: SREG and the stack pointer;
- `io_adr_dec`: separates the core's own I/O registers from the external bus.

### Sequencing and cycle counts

The sequencer *prefetches*: while one instruction executes, the next word is
read from the ROM. It has three states:
- FETCH, used after reset and after a jump;
- EXEC, with a cycle counter for multi-cycle instructions;
- IRQ, for interrupt entry.

On its last cycle an instruction latches the prefetched word as the next
instruction and moves the PC. The cycle counts are those of the ATmega103,
and the core testbench checks them:

| Cycles | Instructions |
|---|---|
| 1 | ALU and immediate operations, MOV, IN/OUT, bit operations on SREG and registers, branch not taken |
| 2 | branch taken, RJMP, IJMP, LD/ST/LDD/STD/LDS/STS, PUSH/POP, SBI/CBI, ADIW/SBIW |
| 3 | JMP, RCALL, ICALL, LPM |
| 4 | CALL, RET, RETI, interrupt entry |
| 1/2/3 | skips (CPSE, SBRC/SBRS, SBIC/SBIS): 1 if not skipped, 2 over one word, 3 over a two-word instruction |

A two-word instruction (JMP, CALL, LDS, STS) reads its second word in its
first EXEC cycle.

### Interrupts

An interrupt is taken between instructions when I is set. It behaves like a
CALL to the vector:
- the return address is pushed low byte first;
- I is cleared;
- the PC goes to word `2*(line+1)`.

So, as in the ATmega103, the Timer0 compare vector (line 14) is word 0x1E,
byte address 0x3C. The acknowledge, with the line number, goes out on
`irqack`/`irqackad`. Flags that clear on acknowledge (timer, UART transmit
complete) use it.

After RETI or SEI one more instruction always runs before another interrupt
is taken.

Instructions the ATmega103 lacks, and a few it has but this core leaves out,
execute as NOP:
- ELPM;
- WDR (there is no watchdog);
- the MUL family, MOVW and the other later additions.

### Data space

The core drives a 16-bit data-space address:

| Range | Target |
|---|---|
| 0x00–0x1F | the register file (handled inside the core) |
| 0x20–0x5F | I/O addresses 0x00–0x3F |
| 0x60 and up | RAM (byte index = address bits 11:0) |

IN/OUT and SBI/CBI/SBIC/SBIS use I/O addresses directly. SREG (0x3F), SPH
(0x3E) and SPL (0x3D) live in the core. Every other I/O address goes out on
the external bus (`iore`/`iowe`, `io_addr`, `dbusout`). The answer comes back
through `external_mux`:
- RAM if the address is 0x60 or above;
- otherwise the device that claims the I/O address (`hit`);
- otherwise 0.

### Memories on the falling edge

ROM and RAM are synchronous memories that act on the **falling** clock edge.
An address issued at a rising edge therefore has its data half a cycle
later, in time for the next rising edge. This is what keeps instruction
fetch, and loads and stores, within the cycle counts above without
asynchronous memories. It also means the core clock's low phase must cover a
memory access.

## Sleep modes and clock gating

Three gated clocks are made from `clk` by `clock_gate` cells. Each cell
samples its enable on the falling edge and ANDs it with the clock. A clock
therefore stops low and restarts with a full high phase, and no shortened
pulse can occur.

| Clock | Drives | Idle | Power-save | Power-down |
|---|---|---|---|---|
| `clk_core` | core, ROM, RAM | stopped | stopped | stopped |
| `clk_dev` | service registers, ports, UART | runs | stopped | stopped |
| `clk_timer` | Timer/Counter0 | runs | runs | stopped |
| wakes on | | any interrupt | external or timer interrupt | external interrupt only |

The mode comes from MCUCR:
- SE is bit 5;
- SM1:SM0 are bits 4:3: 00 idle, 10 power-down, 11 power-save;
- the reserved value 01 acts as idle.

When the core executes SLEEP with SE set, `power_control` decides in the same
cycle:
- It drops the enables for the chosen mode, and the gates apply them at the
  next falling edge.
- It records the mode in `sleep_status` and the `mode_*` outputs.
- If an interrupt that would wake the chip is already pending, it does not
  sleep at all.

A waking interrupt raises the enables again at once (combinationally). The
core then takes the interrupt as its next action, and after RETI it continues
after the SLEEP.

Two details make power-down and power-save work with their clocks stopped:
- **External interrupts need no clock.** They are level-low pins masked by
  EIMSK, combined without any register, so a pin can wake the chip from
  power-down. The handler should clear EIMSK or the pin, or the level
  retriggers the interrupt.
- **The timer can run from the external clock.** With ASSR.AS0 set, the
  timer counts rising edges of `clk_ext`. It takes them through a two-stage
  synchroniser in the timer clock domain. The external clock must be slower
  than half of `clk`; a 32 kHz watch crystal is the intended source.

## Peripherals

All registers, bit positions and addresses are the ATmega103 ones. The shared
constants are in `nimbus_pkg`.

- **Service registers** (`service_module`): MCUCR (0x35) and EIMSK (0x39).
  Outputs SE and the sleep mode. Also produces the masked external interrupt
  requests.
- **Ports** (`avr_port`): PORTx, DDRx and PINx.
  - Port A is at 0x1B/0x1A/0x19 and port B at 0x18/0x17/0x16.
  - PIN reads the pins through one register stage, so it shows them one
    clock late.
- **Timer/Counter0** (`timer_counter`):
  - registers: TCNT0 0x32, OCR0 0x31, TCCR0 0x33 (CS02:0 in bits 2:0, CTC0
    in bit 3), TIMSK 0x37, TIFR 0x36, ASSR 0x30;
  - prescaler: 1, 8, 32, 64, 128, 256 or 1024;
  - interrupts: compare (line 14) and overflow (line 15);
  - flags clear by writing 1 or when the interrupt is acknowledged.
- **UART** (`uart`): 8 data bits, no parity, 1 stop bit.
  - Registers: UDR 0x0C, USR 0x0B, UCR 0x0A, UBRR 0x09.
  - Bit time is 16 x (UBRR+1) clocks.
  - Flags: RXC, TXC, UDRE, FE (framing error) and OR (overrun).
  - Interrupts: receive (17), data register empty (18) and transmit
    complete (19).
  - The receiver samples each bit once, in its middle.

Interrupt lines: INT0–INT7 = 0–7, Timer0 compare 14, Timer0 overflow 15,
UART 17/18/19. There are 23 lines.

## The self-timed loop

This half of the RTL has no clock. Data moves in tokens, using **4-phase
bundled data**:
1. The sender sets the data and raises a request.
2. The receiver takes the data and raises an acknowledge.
3. Both then return to zero.

The request is "bundled" with the data. It must arrive later than any data
bit. On the loop path this is guaranteed by a **matched delay**: a delay
element longer than the logic it accompanies. That delay is a timing part,
not logic. It lies outside the RTL, between `req_to_delay` and
`req_from_delay`, and the testbenches model it with `delay_line` (a transport
delay).

### C-elements

`c_element` is the state-holding gate of all the controllers. Its output is
set when its set function is true, cleared when its reset function is true,
and held otherwise. There are three variants:

| VARIANT | set | reset | use |
|---|---|---|---|
| 0 | a·b | ā·b̄ | symmetric Muller C-element |
| 1 | a·b̄ | ā·b·c | first element of the latch controller |
| 2 | a·b̄ | ā | second element of the latch controller |

The state is held in a level-sensitive latch whose enable is "set or reset".
This survives synthesis, which a gate with a feedback wire might not.

### Semi-decoupled latch controller

`semi_decoupled_ctrl` controls one latch. It is made of two C-elements:

- A = C1(rin, rout, aout). It is set by rin and not rout, and cleared by not
  rin, rout and aout. A is the input acknowledge. A high closes the latch.
- rout = C2(A, aout). It is set by A and not aout, and cleared by not A.

So the latch closes and acknowledges as soon as a request arrives and the
previous output request has been withdrawn. The output request follows once
the receiver has finished its last handshake. The latch reopens only when
both the input request has gone and the receiver has acknowledged.

This "semi-decoupling" lets neighbouring latches overlap their handshakes.
That is what a de-synchronised circuit needs in order to carry a token in
every latch pair, as a clocked master-slave register does.

`FULL` sets the reset state:
- FULL = 0: empty, latch open;
- FULL = 1: holding a token, latch closed and rout high.

### Desyn-element

`desyn_element` is the asynchronous replacement for a register. It is a
master latch and a slave latch, each with its controller. The master resets
empty. The slave resets full, holding `INIT`. Its first output token is
therefore the reset value, as a flip-flop holds its reset value before the
first clock.

### Fork and join

- `hs_fork` sends one request to N receivers. It acknowledges through an
  N-input C-element of their acknowledges, so both phases wait for all of
  them.
- `hs_join` makes one request out of N with an N-input C-element, and copies
  the acknowledge back to all senders.

### The loop

`desyn_loop` works as follows:
1. The element's output q goes through an incrementer and back to its input.
2. Its output request is forked:
   - one branch goes to an observer channel (`obs_req`/`obs_ack`);
   - the other goes through the matched delay.
3. The delayed request is joined with an external token channel
   (`ext_req`/`ext_ack`) before it re-enters the element.

Each token offered therefore produces one loop cycle and one new count
value, which the observer sees. Without tokens the loop stops. With tokens
always offered it runs at the speed set by the delay.

Linters report the controllers and this data loop as circular combinational
logic. That is the nature of a self-timed circuit: each loop passes through a
C-element or a latch that only changes when its handshake allows.

## How the design relates to its source

Taken from the source report:
- the block structure of the microcontroller;
- the ATmega103 instruction set and I/O map;
- the 4096-byte RAM and the 8192-word ROM;
- ROM and RAM access on the falling clock edge;
- the three sleep modes and which parts each one stops;
- the three gated clock domains and the names of the sleep signals;
- the timer's internal/external clock choice;
- the C-element equations, the semi-decoupled controller, the desyn-element
  and the design-study loop.

This design's own choices:
- **Register-level behaviour.** Where the report gives a block only by name
  (ports, UART) or by function (core parts, timer), the ATmega103 behaviour
  is used.
- **Clock-gate circuit and timing.** The report names clock gating but not a
  gate circuit. The gate circuit, and the one-cycle timing of entering and
  leaving sleep, are this design's.
- **Controller form.** The latch controller is built from the C-element
  equations rather than from the gate-level even/odd netlist. The latch is
  taken to be transparent while A is low.
- **Loop contents.** The loop's incrementer, the observer fork and the token
  join are additions that make the loop observable and controllable.

Not built:
- **Data-bus register and "simple timer".** The report only names them.
- **Oscillators.** They are analog parts.
- **Watchdog, ELPM, the ATmega128 extras.** These are the extra timers,
  second UART, SPI and the standby modes.
- **External interrupt edge modes.**
- **The asynchronous processor itself.** Its parts are here, but no routing
  of forks, joins and delays for a whole core exists to build from.

Known limits:
- The external timer clock must be slower than half the internal clock.
- The ports have no pull-ups or alternate pin functions.

## Simulating

All testbenches are self-checking. Each prints
`TB_RESULT checks=N failures=M` and stops itself, with a watchdog.

With Verilator 5:

```
verilator --binary --timing -Irtl -Itb rtl/nimbus_pkg.sv tb/avr_asm_pkg.sv \
          tb/tb_nimbus_top.sv --top-module tb_nimbus_top -Mdir obj -o sim
./obj/sim
```

For other testbenches, change the testbench and top names. Add
`tb/avr_ref_pkg.sv` for `tb_alu_avr` and `tb_avr_core`. Verilator finds
modules in `rtl/` and `tb/` by file name.

The testbenches:
- **`tb_nimbus_top`** runs the whole chip at its default sizes. A program,
  assembled inside the testbench with the encoders in `tb/avr_asm_pkg.sv`,
  is loaded into the ROM array. It:
  - blinks PORTB6 from the Timer0 compare interrupt;
  - sleeps four times in idle and three times in power-save, with the
    timer on the external clock;
  - sleeps once in power-down, woken by INT0;
  - sends a UART byte and receives one;
  - reads PINA.

  The testbench counts every mechanism: sleeps per mode, wake-ups,
  interrupts per source, gated-clock cycles, external-clock timer ticks and
  UART frames. It checks that the PC stands still during sleep, and that the
  timer runs in power-save and stops in power-down. In parallel it drives
  100 tokens through the self-timed loop.
- **`tb_avr_core`** runs a program of about 60 random ALU operations against
  a reference model. The program also exercises:
  - every addressing mode, the stack, LPM, skips and bit operations;
  - an interrupt.

  It measures the cycle count of each instruction class.
- **`tb_workload_sum`** runs a memory-bound program on the whole chip. It
  fills a 200-byte table in RAM, then sums it, storing every partial sum.
  It checks the RAM contents byte by byte and the 200 reads and 400 writes.
  It also checks the loop timing against the cycle counts given under
  "Sequencing and cycle counts": 6 cycles
  per fill iteration and 8 per sum iteration.
- **The other testbenches** test one block each. They use random stimulus
  against a model, and check latencies where a block has one (memory
  half-cycle, prescaler periods, UART bit times, sleep enables).

To run your own program, assemble it with avr-gcc for the ATmega103. Convert
the binary to one 16-bit hex word per line, and pass the file name as
`ROM_INIT`.
