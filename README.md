# An event-driven, power-aware data-flow processor

This is synthesizable SystemVerilog for a small processor that has **no instruction set**.
The processor is a set of coarse-grained functional units (timer, ADC, adder, multiplier,
splitter, delay line, comparator, …) on one shared event bus. Each unit waits until all of its
operands have arrived as *data events*. It then computes and sends each result to a configured
destination unit, after a configured number of cycles.

An application is a data-flow graph, and running it needs no program. The network loads a
*configuration* into the units through an input FIFO:

- for each use of a unit, where its results go and when;
- unit settings such as a coefficient or a timer period.

After that, the events drive themselves. A timer tick starts each schedule period. Samples flow
from unit to unit, and results leave through an output FIFO.

Because every send time is fixed offline, the schedule decides when each unit is busy. A unit
can therefore switch off its parts the rest of the time. The configuration registers are meant
to be flash cells that keep their contents without power, so the whole unit can power down
between uses. This RTL computes the per-domain power enables and counts busy and idle cycles.
It cannot model the power switches themselves.

The design is aimed at small sensor and control applications: a FIR filter, a threshold
detector, a temperature controller.

## The 16-bit packet

Everything on the bus, configuration and data alike, is one 16-bit packet. `ADDRESS_BITS`
(default 4) sets how many units can be addressed. The bit after the address is the
*event-mode* bit.

```
data event           [15 .. 12] dest address | [11] 0 | [10 .. 0] data (11 bits)
configuration event  [15 .. 12] unit address | [11] 1 | [10] WR/I' | register address | value
```

| Field | Width |
|---|---|
| data word, `DW` | `15 - ADDRESS_BITS` bits, so 11 by default |
| register address | `WR_CONFIG_BITS` bits when WR/I' = 1 (wrapper register); `INT_CONFIG_BITS` bits when WR/I' = 0 (internal register) |
| value | the remaining `14 - ADDRESS_BITS - <register bits>` bits, so 7 with the defaults |

Wider values, such as a timer period or a constant, are split over two registers (see below).

The package `dfp_pkg` holds these width functions, the power-state struct and the unit-kind
enum.

## One functional unit (`fu_template`)

Every unit is the same wrapper around a small *internal module*. The parameter `FU_KIND`
chooses the internal module.

```
 bus ──► input_bus_if (per operand) ──► data sub-packet ─────────► internal module ──► result
                    │                                                                   │
                    ├──► wrapper config sub-packet ──► wrapper_config ──► dest, delay ──┤
                    └──► internal config sub-packet ─► internal_config ─► settings      ▼
                                                                      output_bus_if (per output)
                                                                                 │
                                                                        bus_tx ──► event bus
                                        power_manager ◄── activity of all of the above
```

### Input bus-interface (`input_bus_if`)

- It collects a packet from the bus: `16 / BUS_WIDTH` beats, address first.
- It keeps the packet only if the address equals its `MOD_ID`.
- It splits a kept packet into one of three sub-packets: data, wrapper configuration or
  internal configuration.

Each sub-packet is offered with a **ready/used handshake**. `ready` stays high until the
consumer pulses `used`. A packet that arrives while the previous one of the same kind is still
held is dropped and flagged as `overrun`. With a correct schedule that does not happen.

A unit with two operands has **two input bus-interfaces, at `MOD_ID` and `MOD_ID+1`**. A
multiplier at address 5 therefore takes operand A at 5 and operand B at 6. Configuration is
accepted only at `MOD_ID`.

### Execution rule

A unit starts when all of these hold:

- it is marked ready (wrapper register 0, bit 0);
- every operand is held;
- it is not already running;
- every output register is free.

The operands are consumed at the start. When the internal module pulses `done`, the result
is loaded into every output register in that same cycle. No result ever waits inside the
unit.

### Reuse

One physical unit can stand for several nodes of the application graph. The unit keeps an
**execution index**:

- The index selects which destinations, delays and internal settings apply.
- It advances after every execution.
- It wraps to 0 after the *reuse count* (wrapper register 1) or after `NUM_REUSE`, whichever
  comes first. A reuse count of 0 or 1 means the unit is not reused.

So a multiplier with reuse count 3 multiplies by coefficient 0, 1 and 2 in turn, and sends
each product to its own destination.

### Wrapper configuration registers (`wrapper_config`)

There are `2^WR_CONFIG_BITS` registers, each one value wide.

| register | meaning |
|---|---|
| 0 | bit 0: unit ready for operation |
| 1 | reuse count |
| 2 + 2·(i·NUM_OUTPUTS + k) | destination address of output register k for execution index i |
| 3 + 2·(i·NUM_OUTPUTS + k) | delay of output register k for execution index i |

An output register whose destination was never written sends nothing for that index. This is
how a unit sends a result to some uses and not others.

With `WR_CONFIG_BITS = 3` there are 8 registers. That is room for three uses of one output
register, which is where `NUM_REUSE = 3` comes from.

### Internal configuration registers (`internal_config`)

There are `2^INT_CONFIG_BITS` registers. For execution index i the internal module sees
register `2i` and register `2i+1`. Wide settings use the pair as `{reg[2i+1], reg[2i]}`.

| Unit | Setting | Registers used |
|---|---|---|
| Multiplier | right shift applied to the product | `reg[2i]` |
| ADC | resolution in bits | `reg[0]` |
| Constant, Comparator | constant or threshold | `{reg[2i+1], reg[2i]}` |
| Timer | period | `{reg[1], reg[0]}` |

### Output registers and send timing (`output_bus_if`, `bus_tx`)

Each output register holds one result together with its destination and delay. It counts the
delay down, then asks the bus for a grant and sends `{dest, 0, data}`.

**Timing:** with delay `d` and an immediate grant, the first beat of the packet is on the bus
`d + 2` cycles after the result was loaded. Any wait for the grant adds to this.

The delays are how a static schedule places events on chosen cycles. In the example below,
they make the three taps of the delay line leave 24 cycles apart, so that one multiplier can
serve all three.

### Power manager (`power_manager`)

Each unit has four power domains: input bus-interface, wrapper configuration, internal module,
and output registers. The power manager turns each one on only while it is active:

- **input domain:** on while a packet is being assembled or an operand is held;
- **wrapper domain:** on only in the cycles a configuration register is written, or read to
  load the output registers;
- **internal domain:** on from start to done;
- **output domain:** on while a result waits or is being sent.

The resulting state `(input, wrapper, internal, output)` walks through the following
sequence:

| Phase | State |
|---|---|
| configuration | `(ON, ON, OFF, OFF)` |
| operand receive | `(ON, OFF, OFF, OFF)` |
| computing | `(OFF, OFF, ON, OFF)` |
| send | `(OFF, OFF, OFF, ON)` |
| idle | `(OFF, OFF, OFF, OFF)` |

Only the flash-based wrapper can be off between uses. `FLASH_CONFIG = 0` models
conventional registers instead: the wrapper domain is then always on, so the unit is never
fully off. The manager also counts:

- `busy_cycles`: cycles with any domain on;
- `free_cycles`: cycles with the whole unit off.

These counts are what a schedule-based power estimate needs.

In the single cycle where a result is loaded, the wrapper, internal and output domains are on
together. The input domain is also on in that cycle if a new operand is arriving.

## The event bus (`event_bus`)

The bus lines are the OR of all drivers. A driver that is not sending drives zeros.
`bus_busy` marks a valid beat.

The static schedule is supposed to keep senders apart. The bus still has an arbiter:

- fixed priority, lowest driver index first;
- a grant holds the bus for a whole packet.

An imperfect schedule therefore delays events instead of corrupting them. The bus counts
cycles in which a request had to wait (`grant_waits`). `collision` asserts that two drivers
never send at once.

## The processor instance (`dfp_processor`)

The top holds one input FIFO, one output FIFO, the event bus and nine units:

| address | unit | operands | output registers | reuse | WR / INT config bits |
|---|---|---|---|---|---|
| 0 | Timer | – | 1 | 1 | 3 / 2 (16-bit period) |
| 1 | ADC | 1 (trigger) | 1 | 1 | 3 / 3 |
| 2 | Delay-generator | 1 | 3 | 1 | 3 / 3 |
| 3 | Splitter | 1 | 2 | 3 | 4 / 3 |
| 4 | Constant | 1 (trigger) | 1 | 3 | 3 / 3 |
| 5, 6 | Multiplier | 2 | 1 | 3 | 3 / 3 |
| 7, 8 | Adder | 2 | 1 | 3 | 3 / 3 |
| 9 | output FIFO | – | – | – | – |
| 10, 11 | Subtractor | 2 | 1 | 3 | 3 / 3 |
| 12 | Comparator | 1 | 1 | 3 | 3 / 3 |

- The input FIFO has no address: it only sends.
- The output FIFO takes data events sent to address 9 and hands their 11-bit values to the
  network with valid/ready. It discards configuration events sent to it.
- The ADC's analog half is outside the design. The top outputs the DAC code (`adc_dac_code`)
  and takes the comparator result (`adc_comp`) back.

Other ports of the top:

- per unit: `pwr_state`, `busy_cycles`, `free_cycles`, `exec_count`, `dropped`;
- bus and FIFOs: `bus_busy`, `bus_collision`, `bus_grant_waits`, `out_fifo_overrun`;
- FIFO power domains: `in_fifo_pwr` (network interface, storage, bus interface) and
  `out_fifo_pwr` (bus input, storage, network output).

The FIFOs' domains follow the same idea as the units' domains:

- **input FIFO:** the network side is always on, the storage only while it holds packets, and
  the bus side only while it sends;
- **output FIFO:** the bus input is on while a packet is on the bus, the storage while it holds
  values, and the network output while it offers one.

The unit sizes are parameters of `fu_template`, set in a table inside `dfp_processor.sv`.
Changing that table (or adding a row) is how the instance is adapted to a larger application.

### Unit internals

| Unit | Function | Latency start→done |
|---|---|---|
| Adder / Subtractor | `a ± b`, wraps modulo 2^11 | 1 cycle |
| Comparator | 1 if `a > threshold`, else 0 | 1 cycle |
| Constant | emits its constant when any data event arrives | 1 cycle |
| Splitter | copies its input to every output register | 1 cycle |
| Delay-generator | tapped delay line: output k = input of k executions ago | 1 cycle |
| Multiplier | shift-and-add, one multiplier bit per cycle; `(a·b) >> shift`, low 11 bits | `DW + 1` cycles |
| ADC | successive approximation: one bit per cycle against the external comparator | resolution + 1 cycles |
| Timer | once the unit is ready, emits a tick every `period` cycles | (free running) |

For the ADC:

- The trial code goes out on `adc_dac_code` left-aligned to 11 bits.
- The result of resolution r is right-aligned (0 to 2^r - 1).
- Resolution 0 or more than 11 means 11.

### Example: a three-tap FIR filter

The end-to-end testbench maps `y[n] = Σ (x[n-i]·c_i) >> 7` for three taps onto the instance.
One multiplier and one adder serve all three taps through reuse.

1. The Timer ticks every period. The ADC converts one sample.
2. The Delay-generator sends `x[n]`, `x[n-1]` and `x[n-2]` with delays 0, 24 and 48, so the
   three taps reach the Splitter in separate time slots.
3. Three times, the Splitter sends each tap to the Multiplier (operand A) and to the Constant.
   The Constant answers with coefficient i (operand B).
4. The Multiplier's three products go to the Adder.
5. The Adder runs twice. Its first sum is sent back to its own operand A; the second goes to
   the output FIFO.

The same run also checks two other things:

- a Subtractor → Comparator chain, driven directly from the network;
- a coefficient changed through the network while the filter is running;
- a reconfiguration of the same units into a two-tap filter, which then runs as well.

## Verification

Every block has a self-checking testbench in `tb/`, named `tb_<module>.sv`. Each testbench
compares the block with a model worked out independently in the testbench. Each one ends by
printing `TB_RESULT checks=N failures=M`, and each has a watchdog.

| Testbench | What it covers |
|---|---|
| `tb_fu_*` | the internal modules: random operands, exact latencies |
| `tb_input_bus_if` | address filtering, sub-packet split, ready/used, overrun, at 16- and 4-bit bus widths |
| `tb_wrapper_config`, `tb_internal_config` | register map, per-index selection |
| `tb_bus_tx`, `tb_output_bus_if`, `tb_event_bus` | beats, the `d+2` send time, priority, whole-packet grants |
| `tb_power_manager` | the domain enables and the counters, with and without flash |
| `tb_input_fifo`, `tb_output_fifo` | order, back-pressure, no loss when full, power-domain enables |
| `tb_fu_template` | a reused two-output multiplier unit: destinations, values, send cycle of every packet, index wrap, the ready flag |
| `tb_dfp_processor` | the whole processor at its default parameters (the FIR, two-tap FIR and comparator runs above) |

`tb_dfp_processor` checks every output against the formula. It also fails if any of these
never happened:

- a configuration write;
- a reuse-index wrap;
- a multi-output send;
- a bus arbitration wait;
- a unit fully powered off;
- an execution with the wrapper domain off;
- the configuration, operand-receive, computing and send states of the table above;
- three power states of each FIFO.

Simulate with plain Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/dfp_pkg.sv tb/tb_dfp_processor.sv --top-module tb_dfp_processor -o sim
./obj_dir/sim            # add +trace to print every bus beat
```

Replace the testbench name to run any other test. All tests take seconds. The simulator is
two-state, and every register that is read is reset.

## Where this design goes beyond, or stops short of, its source architecture

Taken from the architecture:

- the packet format and its three width parameters, with their defaults (4 address bits, 3
  wrapper register bits);
- the five-part unit template and the meaning of wrapper registers 0 and 1;
- destination and delay per output register;
- start-when-all-operands-arrived;
- the four power domains and their phase sequence;
- the unit set of the filter architecture, plus the subtractor and comparator.

Choices made here, not given by the source:

- operand addressing `MOD_ID + i`;
- the register numbering for reuse;
- pairs of internal registers per index;
- the `d + 2` send timing;
- the bus arbiter and its priority order;
- ready/used as level and pulse;
- the internals of every unit: SAR ADC, shift-and-add multiplier, tapped delay line,
  event-triggered constant, strict `>` comparator;
- FIFO depths of 8;
- `NUM_REUSE = 3` and `INT_CONFIG_BITS = 3` as defaults.

Not built:

- **State-machine, shifter and ALU units.** They appear in the source's other architecture
  instances, but their behaviour is not specified. The temperature controller, multiplier,
  square-root and path-follower applications need them, so they do not run on this instance.
- **Multiple event buses.** The source mentions them, but does not describe how units attach
  to two buses or how the buses exchange events. One bus is built.
- **Input-FIFO self-configuration.** The source names a FIFO configuration phase, a packet
  mask and a count-down that wakes units for scheduled input. These are not described, so
  the input FIFO is a plain buffer.
- **Flash cells and power switches.** These are process-specific. The wrapper registers are
  flip-flops. "Powered down" exists only as the enable signals and the cycle counters, so no
  power saving can be measured in simulation.
- **The analog front end of the ADC.**

Capacity at the defaults: nine units with up to three uses each.

| Application | Nodes | Fits at the defaults? |
|---|---|---|
| 2-tap FIR filter | 11 | yes |
| 3-tap FIR filter | 15 | yes |
| 8-tap FIR filter | 35 | no |
| free-fall detector | 32 | no |

The 8-tap FIR filter and the free-fall detector use only unit types that exist here, but need
more uses per unit. They need a larger `WR_CONFIG_BITS` (and `NUM_REUSE`) on the busiest
units, which is a one-line change in the unit table of `dfp_processor.sv`.

## Files

The files are in `rtl/`, one module per file:

| File | Contents |
|---|---|
| `dfp_pkg` | packet width functions, power-state struct and unit-kind enum |
| `dfp_processor` | top |
| `fu_template` | unit wrapper |
| `input_bus_if`, `wrapper_config`, `internal_config` | input side of a unit |
| `output_bus_if`, `bus_tx` | output side of a unit |
| `power_manager` | power domain enables and counters |
| `event_bus` | bus and arbiter |
| `input_fifo`, `output_fifo` | network FIFOs |
| `sync_fifo` | shared storage used by both FIFOs |
| `fu_adder`, `fu_subtractor`, `fu_comparator`, `fu_constant`, `fu_splitter`, `fu_delay`, `fu_multiplier`, `fu_timer`, `fu_adc` | internal modules |
