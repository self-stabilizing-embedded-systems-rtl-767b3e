# A self-stabilizing embedded node

Small embedded devices built cheaply and densely suffer temporary hardware
faults: a burst of radiation, heat or mechanical stress flips bits in RAM and
registers, or makes the ALU compute garbage for a while. When the disturbance
ends, the hardware works again, but the machine is in an arbitrary state and
nobody is there to press a reset button. This design is a 32-bit node that
returns by itself, within a bounded time, to running its program correctly
on fresh data, whatever state the fault left behind.

It does not try to detect or mask every fault. Instead, a few cheap hardware
rules make sure that every corrupted state either is repaired by the normal
flow of the program or leads to a reset:

| What a fault can corrupt | What brings the node back |
|---|---|
| PC points into the middle of an instruction | opcode marker bit check, reset |
| PC points past the end of the program | unused ROM is filled with RESET |
| PC, registers or flags make the program loop forever or wait forever | watchdog reset |
| SP, general registers, N/Z flags, age register | cleared or reloaded by `WDR` in every main-loop iteration |
| a pointer or index leaves its memory area | segment check, reset |
| RAM contents (ring buffer, index) | overwritten by new samples within one ring length; the index is masked before use |
| clock time | keeps counting at the right rate; timestamps are relative to it |

The program ROM itself is taken to be fault-free (only reads of it may be
disturbed); the segment table lives in the same kind of storage.

## Instruction format and PC repair

The part most worth understanding is the instruction encoding, because it is
what makes a wild PC detectable.

An instruction is one 16-bit opcode halfword, optionally followed by two
halfwords holding four data bytes (a 32-bit immediate). The PC counts
halfwords, so it can only ever point at the opcode, at the first data
halfword or at the second one. The encoding marks which is which:

```
halfword at PC     1  d31 d15  op[4:0] rd[3:0] rs[3:0]     opcode, marker bit 15 = 1
halfword at PC+1   0  d30 ... d16                          Data0, Data1
halfword at PC+2   0  d14 ... d0                           Data2, Data3
```

The top bit of the opcode halfword is always 1 and the top bit of both data
halfwords is always 0. The two data bits that these markers displace
(bits 31 and 15 of the immediate) are stuffed into bits 14 and 13 of the
opcode halfword, which leaves 13 bits for the opcode field and a full
32-bit immediate. Example: opcode field `0x0006` with immediate `0xFFFFFFFF`
is stored as `E006 7FFF 7FFF`.

`insn_check` looks at the halfword at the PC; if its top bit is 0, the PC is
inside an instruction and the core requests a reset. Because the PC is exactly
as wide as the ROM address, it cannot point anywhere but the ROM, and every
ROM location after the program holds `8000`, the RESET instruction. So after
any fault the PC either points at a real instruction of the program or the
node resets within one cycle. It can still point at the *wrong* real
instruction; the watchdog and the main-loop discipline below handle that.

## The main loop and the watchdog

Programs are written as an event loop:

```
main:  WEV  r1            ; wait for a sensor sample
       ...                ; process it, using the heap
       OUT  ...           ; drive actuators
       WDR                ; reset_watchdog()
       JMP  main
```

`WDR` does more than kick the watchdog. Since the stack is empty at that
point, it puts SP back to the end of RAM, clears N and Z and all sixteen
general registers, and loads the age register with the clock time. So every
pass through the main loop wipes out any corruption of processor state. If a
fault sends the program into an endless loop, or it waits for an event that
never comes, the watchdog expires after `WDT_TICKS` clock ticks without a
`WDR` and resets the node.

The hardware clock (`clock_watchdog`) counts ticks of `TICK_DIV` cycles. A
system reset restarts the watchdog but does not clear the time; only power-on
does. Timestamps and the age register are in ticks.

## Memory, segments and the heap

The data RAM (256 words of 32 bits) is never reset. Every access names a
segment and an offset; `segment_unit` checks the offset against a constant
table and translates it, and an access outside its segment resets the node
instead of reaching the RAM:

| Segment | Words | Use |
|---|---|---|
| 0 | 0-3 | ring-buffer head index (first word of RAM) |
| 1 | 4-67 | ring buffer / heap block headers |
| 2 | 68-191 | heap block contents |
| 3 | 192-255 | stack, grows down from the end of RAM |

Keeping block headers and block contents in different segments means that a
dangling pointer into the contents can never overwrite a header. `PUSH`,
`POP`, `CALL` and `RET` always use segment 3, so a corrupted SP resets the
node at its next stack access.

## Age register

Data must not live forever: a value corrupted by an undetected fault has to
leave the system within a bounded time. The age register AR tracks the
timestamp of the oldest data read since the last `WDR`. The program reads a
block's timestamp along with the block and executes `ARMIN` to take the
minimum; blocks it writes are stamped with `ARGET`'s value, so results are
never younger than their inputs. Sensor input does not change AR (`WDR` sets
it to the current time, since everything at the main loop is fresh).
Updating AR and the timestamps is left to the program, not done by tagged
memory.

## Instruction set

`op[4]` = 1 means the instruction carries the 32-bit immediate. Flags are
set by `ADD SUB AND ADDI CMP CMPI` (N = bit 31, Z = result zero).

| op | name | effect | op | name | effect |
|---|---|---|---|---|---|
| 00 | RESET | reset the node | 10 | LDI | rd := imm |
| 01 | WDR | kick, SP := 256, regs/flags := 0, AR := time | 11 | JMP | PC := imm |
| 02 | MOV | rd := rs | 12 | JZ | if Z, PC := imm |
| 03 | ADD | rd += rs | 13 | JN | if N, PC := imm |
| 04 | SUB | rd -= rs | 14 | CALL | push PC+3, PC := imm |
| 05 | AND | rd &= rs | 15 | ADDI | rd += imm |
| 06 | PUSH | push rs | 16 | LD | rd := seg imm : [rs] |
| 07 | POP | pop rd | 17 | ST | seg imm : [rd] := rs |
| 08 | RET | pop PC | 18 | CMPI | flags of rd - imm |
| 09 | IN | rd := sensor data | 19 | JNZ | if !Z, PC := imm |
| 0A | OUT | actuator port rd := rs | 1A-1F | - | undefined: reset |
| 0B | ARMIN | AR := min(AR, rs) | | | |
| 0C | ARGET | rd := AR | | | |
| 0D | CLK | rd := time | | | |
| 0E | WEV | wait for a sample, rd := sample | | | |
| 0F | CMP | flags of rd - rs | | | |

Every instruction takes one cycle, except `WEV`, which holds until
`sensor_valid` and then acknowledges with `sensor_ack`. The ROM and the RAM
are read combinationally; writes happen at the clock edge. Assertions in
`cpu_core` check the sample handshake (`sensor_ack` only with `sensor_valid`)
and that the core is silent while held in reset.

## The example program

`rtl/ss_program.hex` is loaded into the ROM by default. It keeps the last
8 samples in a ring buffer (segment 1, words 0-7) with the time each was
stored (words 8-15), and after each sample sends the sum of the ring on port
0 and the age of the oldest sample on port 1:

```
 0  main: WEV   r1               ; wait_for_event
 1        LD    r2, seg0:[r0]    ; head index
 4        ADDI  r2, 1
 7        LDI   r3, 7
10        AND   r2, r3           ; head = (head + 1) mod 8
11        ST    seg0:[r0], r2
14 store: ST    seg1:[r2], r1    ; ring[head] = sample
17        CLK   r4
18        MOV   r6, r2
19        ADDI  r6, 8
22        ST    seg1:[r6], r4    ; stamp[head] = time
25 call:  CALL  sum
28        OUT   0, r7            ; sum of the ring
29        ARGET r8
30        OUT   1, r8            ; age of the oldest sample used
31        WDR                    ; reset_watchdog()
32        JMP   main
35 sum:   LDI   r5, 8
38        LDI   r7, 0
41        LDI   r9, 0
44 loop:  LD    r10, seg1:[r9]
47        ADD   r7, r10
48        MOV   r11, r9
49        ADDI  r11, 8
52        LD    r12, seg1:[r11]
55        ARMIN r12
56        ADDI  r9, 1
59        ADDI  r5, -1
62        JNZ   loop
65        RET
```

The head index is masked to 0-7 before use, so a corrupted index in RAM is
repaired at the next sample; a wrong sum lasts at most 8 samples, until the
ring has been refilled. This is the static heap layout: a ring buffer just
large enough for the samples of one stabilization period, and no tail
pointer, since after one period the ring is always full.

## The dynamic heap program

`tb/ss_heap_program.hex` shows the same hardware carrying a dynamic heap with
`malloc`/`free` semantics, the harder case. The heap has 16 blocks of 4
words. Segment 1 holds one header per block (a kind word and a timestamp
word); segment 2 holds the block contents, so no pointer into the contents
can damage a header. Kind 0 is a free block, `0x100 + n` the first block of
an allocation of n blocks, `0x200` each further block of that allocation.

- Boot (address 0, reached after every reset): mark all headers free, `WDR`.
- Heap check, at the top of every main-loop pass: walk the headers; each must
  be free or start an allocation that fits in the heap and is followed by
  exactly n - 1 continuation headers; each allocation's timestamp must be
  neither later than the clock nor more than K = 10 ticks earlier. Any
  violation executes `RESET`, and the boot code rebuilds an empty heap.
- The application: wait for a sample, free every allocation at least 2 ticks
  old, allocate (sample mod 4) + 1 consecutive blocks first fit, stamp the
  header with AR and store the sample in the first word; then send the
  number of allocated blocks and the sum of the stored samples, `WDR`.

A corrupted header or timestamp, or a clock that jumps, therefore costs one
reset and an empty heap; corrupted block contents are not detected but are
released within K ticks because every allocation is. The program assumes a
correct application frees its memory in time; one that does not is reset.
The size granularity is one block, so requests waste on average half a block,
and there is no compaction, so the heap can fragment.

To run another program, assemble it to one hex halfword per line and pass
its path as `INIT_FILE`.

## Modules

| Module | Role |
|---|---|
| `ss_top` | the node: core, ROM, RAM, segment unit, clock/watchdog, reset combining |
| `cpu_core` | register machine, decode and execute, reset requests |
| `insn_check` | opcode marker check and immediate reassembly |
| `age_reg` | the age register |
| `prog_rom` | RESET-filled program ROM, three halfwords per cycle |
| `data_ram` | 256 x 32 RAM, never reset |
| `segment_unit` | segment table, bounds check, address translation |
| `clock_watchdog` | time counter and watchdog |
| `ss_pkg` | widths, instruction set, reset causes, segment table |

`ss_top` ports: `clk`, `por` (synchronous power-on reset), the sample
handshake `sensor_data`/`sensor_valid`/`sensor_ack`, the actuator write
`act_valid`/`act_port`/`act_data`, and for observation `time_now`, `age`,
`sys_rst` and `reset_cause` (last reason: power, watchdog, bad PC, RESET
instruction, undefined operation, segment). Reset requests from the core,
the segment unit and the watchdog are ORed and registered into a one-cycle
system reset; the RAM write and all other side effects of the requesting
cycle are suppressed. Parameters: `ROM_HW` (1024), `INIT_FILE`,
`TICK_DIV` (1000 cycles per tick), `WDT_TICKS` (4).

Sensors, actuators and the radio are outside the design. The network layers
that such nodes run on top of (spanning-tree overlay, publish/subscribe
routing, role assignment) are software and not part of this RTL.

## What is fixed by the concept and what is chosen here

Taken from the concept: opcode halfwords of 16 bits with a set top bit,
zero top bits in the first and third data byte, two stuffed data bits, 13
opcode bits, 32-bit data, the PC without its lowest bit and unable to leave
the ROM, RESET fill of unused ROM, a watchdog clock, a `reset_watchdog()`
that resets SP to the end of RAM and clears flags and registers, segments
with a table in ROM, separate segments for stack, heap headers and heap
contents, the first RAM word as ring index, and the age register with its
min rule.

Chosen here: which stuffed bit sits in bit 14 and which in bit 13; the
instruction set and its field layout; that undefined operations reset; 16
registers; RAM and ROM sizes; the segment table contents; tick length and
watchdog timeout; single-cycle execution with combinational memories;
clearing the age register to 0 at reset; the reset combining; the example
program and its ring length of 8.

## Simulation

Each module has a self-checking testbench in `tb/` that ends by printing
`TB_RESULT checks=N failures=M`. From the directory that holds `rtl/` and
`tb/`:

```
verilator --binary --timing --assert -Irtl -y rtl --top-module tb_ss_top \
          rtl/ss_pkg.sv tb/tb_ss_top.sv -o sim
./obj_dir/sim +verilator+rand+reset+2
```

`tb_ss_top` runs the node at its default parameters with RAM starting at
random values. It feeds random samples, checks every sum and age output
against its own model once the node has been stable for 8 samples, and
injects one fault after another: PC onto a data halfword, PC into the
RESET fill, an endless loop, withheld sensor events, a corrupted SP before a
`CALL`, a corrupted ring index, trashed RAM and a trashed age register. It
checks that each produces the expected reset cause (or none) and that
correct outputs resume, and fails if any of these mechanisms never
happened, and a disturbed ROM read that returns an undefined operation.
It finishes in well under a second.

`tb_ss_heap` runs the dynamic heap program (clock tick shortened to 500
cycles). After every output it scans the heap in RAM itself and checks that
it is well formed, that all timestamps are within K ticks of the clock and
that the reported count and sum match. It then corrupts a header kind, a
timestamp (into the future and into the past), a free header, the clock time
and a block's contents, and checks the reset and the release that follow.

The other testbenches: `tb_cpu_core` (a test program assembled inside the
testbench: arithmetic, branches, stack, segment loads and stores, `WEV`,
`CLK`, age register, `WDR`, and the three core reset requests),
`tb_insn_check` (random encode/decode and misaligned PCs), `tb_prog_rom`,
`tb_data_ram`, `tb_segment_unit`, `tb_clock_watchdog`, `tb_age_reg`.

Limits: the testbenches inject faults by overwriting state between clock
edges; faults during the clock edge itself, or a malfunctioning ALU, are not
modelled. Nothing has been checked on an FPGA or in a gate-level flow.
