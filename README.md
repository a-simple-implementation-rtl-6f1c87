# A single-bus, microprogrammed MIPS-subset processor

This is the classic "textbook" processor: something that could be built
from a pile of TTL parts. It is slow on purpose, taking many clock cycles
per instruction, and simple enough to follow signal by signal. Every
register inside the processor hangs on **one shared bus**. A **control
state machine** decides, one state per clock, which register drives the
bus and which registers latch it. Each state is written as a line of
named control signals, such as `PCout, MARin, MEMread, Yin`. Main memory
sits beside the processor behind a small handshake: a strobe, a
read/~write line, an address, a bidirectional data line, and **MFC**
("memory fetch complete").

The processor runs four MIPS instructions: `add`, `and`, `lw` and `sw`.
Any other instruction halts it. The datapath has every control signal of
the full signal set: eight ALU operations, the jump-address and
branch-offset drivers, and a conditional PC load. Adding an instruction
therefore means adding control-store lines, not hardware.

```
            +-------------------- processor ---------------------+
            |  control  --(control word u, one state per clock)-->|
            |     ^  IR                                           |
            |  datapath:  IR  PC  MAR  MDR  Y  Z  ALU  regfile    |        +--------+
            |             all on one 32-bit bus (cpu_bus)         |  MFC   |        |
            |                                                     |<-------| memory |
            |                                                     | strobe |        |
            |                                                     |------->|        |
            |                                                     | r/~w   |        |
            |                                                     |------->|        |
            |                                                     | addr   |        |
            |                                                     |------->|        |
            |                                                     | data   |        |
            |                                                     |<======>|        |
            +-----------------------------------------------------+ (rw_data_bus)
```

## The bus and its drivers

Each bus source has its own tri-state driver, enabled by that source's
"out" signal. `cpu_bus` writes the drivers as an AND-OR of the enabled
sources. If two enables were on at once, two drivers would short each
other; an assertion (`a_one_driver`) forbids it. With no driver enabled,
the bus reads as zero.

| out signal    | value on the bus                                    |
|---------------|-----------------------------------------------------|
| `PCout`       | PC                                                  |
| `MARout`      | MAR                                                 |
| `MDRout`      | MDR                                                 |
| `Yout`        | Y                                                   |
| `Zout`        | Z                                                   |
| `REGout`      | register chosen by `SELrs` / `SELrt` / `SELrd`      |
| `IRaddout`    | `{PC[31:26], IR[25:0]}` (J-format target)           |
| `IRimmedout`  | `IR[15:0]` sign-extended                            |
| `IRoffsetout` | `IR[15:0]` sign-extended, shifted left by 2          |
| `CONST(v)`    | the constant `v` from the control word              |

Every "in" signal (`IRin`, `PCin`, `MARin`, `MDRin`, `Yin`, `Zin`, `REGin`)
latches at the rising clock edge that ends the state. `PCinif0` loads the
PC only when Z is zero. The ALU always computes on Y and the bus. Only
`Zin` keeps its result:

| op       | result            | op       | result                    |
|----------|-------------------|----------|---------------------------|
| `ALUadd` | Y + bus           | `ALUsl`  | bus << Y[4:0]             |
| `ALUand` | Y & bus           | `ALUslt` | Y < bus, signed, as 0 / 1 |
| `ALUxor` | Y ^ bus           | `ALUsrl` | bus >> Y[4:0]             |
| `ALUor`  | Y \| bus          | `ALUsub` | Y - bus                   |

Only one value can cross the bus per cycle. A two-operand operation
therefore parks its first operand in Y, then puts the second on the bus
with the ALU operation and `Zin`. It takes a third cycle to move Z
to its destination.

## The control store

The control state machine is a table of microinstructions
(`simple_pkg::ucode`), one per state. A microinstruction is a packed
struct, `uinstr_t`: the out-enables, a constant, the in-enables, the ALU
operation, the register select, the memory requests, `UNTILmfc`, `HALT`,
and a next-state rule. The complete program:

| state | label   | signals                                  |
|-------|---------|------------------------------------------|
| 0     | Start   | PCout, MARin, MEMread, Yin               |
| 1     |         | CONST(4), ALUadd, Zin, UNTILmfc          |
| 2     |         | MDRout, IRin                             |
| 3     |         | JUMPop, Zout, PCin                       |
| 4     |         | HALT (illegal instruction)               |
| 5-7   | Add     | SELrs,REGout,Yin / SELrt,REGout,ALUadd,Zin / Zout,SELrd,REGin,JUMP(Start) |
| 8-10  | And     | as Add with ALUand                       |
| 11-15 | Lw      | SELrs,REGout,Yin / IRimmedout,ALUadd,Zin / Zout,MARin,MEMread / UNTILmfc / MDRout,SELrt,REGin,JUMP(Start) |
| 16-19 | Sw      | SELrt,REGout,MDRin / SELrs,REGout,Yin / IRimmedout,ALUadd,Zin / Zout,MARin,MEMwrite,JUMP(Start) |

The fetch computes PC+4 in the ALU while the memory is busy: state 0
copies PC into Y, and state 1 adds the constant 4 into Z. It writes Z
back to the PC in the same state that dispatches.

Next-state rules, applied in this order:

1. **UNTILmfc** repeats the state while MFC is low.
2. **JUMP(label)** goes to the label.
3. **JUMPop** scans a decode table of `(mask, match, label)` entries and
   goes to the first one with `(IR & mask) == match`. With no match it
   falls through to the next state, which is the `HALT` in state 4.
   The table holds the standard MIPS encodings: `add` (opcode 0, funct
   0x20), `and` (funct 0x24), `lw` (opcode 0x23) and `sw` (opcode 0x2B).
4. Otherwise the next state in the store follows.

`HALT` takes effect at the end of its state. `halt` rises, the
control word becomes idle, and the machine stays there until reset.

**To add an instruction**, append its lines to `ucode`, give it a label
constant, and add a decode-table entry (`NDEC`, `DEC_MASK`, `DEC_MATCH`,
`DEC_LABEL`). Widen `UPC_W` once the store passes 32 states.

## Talking to memory

This is the part that needs the most care. In a MEMread or MEMwrite
state, MAR is loaded in that same state (`Start: PCout, MARin, MEMread`).
It only holds the new address after the state's closing edge. For that
reason the datapath **registers the request**: the memory sees `strobe`
as a one-cycle pulse in the *next* cycle, when MAR (and MDR) are already
valid. `read_not_write` is set together with the strobe and held until the
next request.

The memory samples the strobe at the clock edge that ends the strobe
cycle:

- **Read.** `mfc` drops, and the addressed word appears on `dread` after
  `READ_CYCLES` edges, with `mfc` rising. Both then hold until the next
  request. `mfc` is also forced low during a strobe cycle, so the
  processor never mistakes the previous read's `mfc` for the new one.
- **Write.** The data on the line is stored at that edge, so a write takes
  one cycle. `mfc` stays low afterwards.

The processor loads MDR from the data line at the edge ending the cycle
in which a read is pending and `mfc` is high. An `UNTILmfc` state leaves
in that same cycle, so the next state can use `MDRout`.

With the default `READ_CYCLES = 1`, MFC is seen two cycles after the
MEMread state:

```
cycle      k           k+1              k+2              k+3
state      Start       fetch-1          fetch-1 (again)  fetch-2
           MEMread     UNTILmfc: mfc=0  UNTILmfc: mfc=1  MDRout, IRin
memory                 strobe, r/~w=1   mfc=1, dread     
MDR                                     <- data at end
```

This gives fixed cycle counts. The testbenches check them instruction
by instruction:

| instruction | fetch | own states | waits | total |
|-------------|-------|------------|-------|-------|
| add, and    | 4 + 1 | 3          | -     | 8     |
| lw          | 4 + 1 | 5          | 1     | 11    |
| sw          | 4 + 1 | 4          | -     | 9     |
| illegal     | 4 + 1 | HALT       | -     | 6     |

A `sw` needs no wait. Its last state issues the write and jumps straight
to Start. The write's strobe cycle then overlaps the next fetch's
Start state, and the read strobe follows one cycle later.

A slower memory only changes `READ_CYCLES`: the `UNTILmfc` states simply
repeat longer. `tb_processor` checks this with a memory that answers
after a random 1 to 4 edges. A new request must not arrive while a read
is still in flight (assertion `a_no_overlap`). The control store never
does this, because every read is followed by an `UNTILmfc`.

### The bidirectional data line

`rw_data_bus` has one data line between the two sides. Each side has a
driver onto the line and reads the line as its input. `read_not_write`
enables the memory's driver when high and the processor's driver (MDR)
when low. The two enables are complements, so the line always has
exactly one driver. It is written as a two-way selection.

### The memory array

`memory` holds the handshake and delegates storage to `simple_memory`. That
module is a plain decoder-and-registers memory. The address is decoded;
each decoder line, combined with "strobe and write", loads one word
register. The addressed word is selected onto `data_out`. Each word is a
`dff`, the same register cell used for IR, PC and the general registers.
A drawing of this structure would gate each word's clock; here the gate
drives a load enable, and all flip-flops share one clock.

## The system and its host port

`simple_system` is the top. It joins `processor`, `rw_data_bus` and
`memory` (2^`ABITS` = 256 words of 32 bits by default). It indexes the
memory with byte-address bits `[ABITS+1:2]`; the low two bits and the
bits above are ignored.

A **host port** (`host_strobe`, `host_read_not_write`, `host_addr`,
`host_wdata` / `host_rdata`, `host_mfc`) owns the memory interface while
`reset` or `halt` is high. Use it to load a program during reset and
to read results after the halt. It follows the same handshake as the
processor. After reset the processor fetches from address 0.

## Files

| file | contents |
|------|----------|
| `rtl/simple_pkg.sv` | types, control-word struct, control store, decode table |
| `rtl/simple_system.sv` | top: processor + data line + memory + host port |
| `rtl/processor.sv` | control + datapath |
| `rtl/control.sv` | state register, next-state rules, halt |
| `rtl/datapath.sv` | IR, PC, MAR, MDR, Y, Z, IR field drivers, memory request |
| `rtl/cpu_bus.sv` | the internal bus |
| `rtl/alu.sv`, `rtl/regfile.sv` | ALU; 32 x 32 register file (register 0 reads 0) |
| `rtl/memory.sv` | strobe / MFC handshake |
| `rtl/simple_memory.sv`, `rtl/decoder.sv`, `rtl/dff.sv` | memory array and its parts |
| `rtl/rw_data_bus.sv` | bidirectional data line |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_simple_system_slow.sv` | the whole system with a slower memory |
| `tb/mips_prog_pkg.sv` | random-program generator, instruction encoders, reference model |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself.
For example, the end-to-end test:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/simple_pkg.sv tb/mips_prog_pkg.sv tb/tb_simple_system.sv \
    --top-module tb_simple_system -o sim
./obj_dir/sim
```

For any other block, replace the testbench file and top module. The
include paths let Verilator find the modules by file name.

`tb_simple_system` runs the design at its default sizes. For five random
programs it does the following:

- loads 256 words through the host port;
- runs each program to its halt, which takes about 1100 cycles;
- reads the whole memory back and compares it with an instruction-level
  reference model.

Each program ends by storing registers 1 to 31 to memory, so the
comparison covers the registers as well. The testbench also checks the
total cycle count and each instruction's count. It counts how often
each mechanism happened: fetch waits, lw waits, each dispatch, reads,
writes, each direction of the data line, and halts. It fails if any of
them never happened.

`tb_simple_system_slow` runs the same kind of programs with
`READ_CYCLES = 4`. Every read then waits three more cycles in its
`UNTILmfc` state. The test checks that the results are unchanged and
that the cycle count grows by exactly three per fetch and per `lw`.
With this memory, CPI rises from about 9.1 to about 12.7.

## Choices made here, and limits

These points were chosen for this implementation rather than taken from
a fixed specification:

- The request register between a MEMread/MEMwrite state and the memory
  strobe.
- `mfc` forced low in the strobe cycle, and MDR loading on `mfc`.
- A synchronous, clocked memory in place of one triggered by the strobe
  edge with a time delay.
- The memory counts its answer delay in clock edges (`READ_CYCLES`).
- Register 0 reads zero; all registers and the PC reset to zero.
- The floating bus reads zero.
- ALU shifts use Y[4:0]; `ALUslt` is signed.
- Word addressing of memory, and the host port.
- The encodings of the control word and of the states.

One point follows the signal list exactly although it differs from MIPS:
`IRaddout` places the top **6** PC bits next to the 26-bit field. It does
not shift the field by two as MIPS `j` does.

The datapath supports branches and jumps (`IRoffsetout`, `IRaddout`,
`PCinif0`) and all eight ALU operations. The control store, however,
only holds the fetch and the `add`, `and`, `lw` and `sw` sequences.
Other instructions halt the processor.

The circuit-level pictures behind the design are not modelled as
separate parts: the transistor output stage of a tri-state driver, the
open-collector variant, and the one-transistor DRAM cell. Their logic
function, where they have one, lives in `cpu_bus`, `rw_data_bus` and the
flip-flop memory.
