# A pin-timed 8031 core for register-addressing instructions

The Intel 8031 is the ROM-less member of the MCS-51 family. It fetches every
code byte from an external EPROM over a multiplexed bus: port 0 carries the
low address byte and then the code byte, port 2 carries the high address
byte, ALE strobes the low address into a latch, and PSENn enables the EPROM.
This design models the 8031 at the instruction-set level, but the pins are
cycle-exact: every T state of the real part shows up on ALE, PSENn, P0 and P2.
That means a board that used an obsolete 8031 could, in principle, take this
core unchanged.

The core runs a subset of the instruction set. It covers every instruction
that works on a working register R0..R7 (128 opcodes), plus the few
instructions a program needs to get started and to make its results visible:

| group | instructions |
|---|---|
| arithmetic on Rn | `ADD A,Rn`, `ADDC A,Rn`, `SUBB A,Rn`, `INC Rn`, `DEC Rn` |
| logic on Rn | `ORL A,Rn`, `ANL A,Rn`, `XRL A,Rn` |
| moves | `MOV A,Rn`, `MOV Rn,A`, `MOV Rn,#d`, `MOV dir,Rn`, `MOV Rn,dir`, `XCH A,Rn` |
| branches | `DJNZ Rn,rel`, `CJNE Rn,#d,rel`, `LJMP addr16` |
| others | `MOV A,#d`, `ADD A,#d`, `MOV dir,A`, `CLR C`, `SETB C`, `NOP` |

All other opcodes run as one-byte, one-cycle no-operations.

The top level, `min_system`, is the smallest working 8031 board. It holds the
core, a 74LS373-style transparent latch for A0..A7, and an 8K x 8 EPROM in
the style of the NMC26C64.

## Machine cycle and bus

A machine cycle is 12 oscillator periods, T1..T12; one clock of `xtal2` is
one T state. Each machine cycle reads two code bytes:

| T | 1 | 2 | 3 | 4 | 5 | 6 | 7 | 8 | 9 | 10 | 11 | 12 |
|---|---|---|---|---|---|---|---|---|---|---|---|---|
| ALE   | 0 | 1 | 1 | 0 | 0 | 0 | 0 | 1 | 1 | 0 | 0 | 0 |
| PSENn | 0 | 1 | 1 | 1 | 0 | 0 | 0 | 1 | 1 | 1 | 0 | 0 |
| P0    | code in | | addr | addr | float | | code in | | addr | addr | float | |

- PAR, the program address register, is loaded from PC in T2 and T8.
- The core drives the low address byte on P0 in T3/T4 and T9/T10.
- P2 takes the high address byte at the end of T3 and T9.
- The EPROM output is sampled at the end of T1 (the byte addressed in the
  previous T9/T10) and at the end of T7 (the byte addressed in T3/T4).
- The latch is transparent while ALE is high and holds A0..A7 from ALE's
  falling edge. Because PSENn is high whenever ALE is high, the latch only
  ever sees the core's address. In `min_system` its input therefore comes
  straight from the core's address drive. This keeps the EPROM output out of
  its own address path.

On the two-valued bus a floating P0 reads as `FF`. An assertion in the core
checks that the core never drives P0 while PSENn is low.

## Instruction schedule

This is the part that takes the most care. The positions of the PC
increments decide which addresses appear on the bus. They were chosen so
that the bus shows the same address sequence a real 8031 produces.

| when | action |
|---|---|
| M1 T1 | opcode → IR; PC + 1; P1/P3 pins take their SFR latches |
| M1 T2 | IR decoded into the control word |
| M1 T6 | `CLR C` / `SETB C` |
| M1 T7 | second byte → byte2; PC + 1 if this byte belongs to a 2-byte one-cycle or a 3-byte instruction |
| M1 T9 | RAR ← address of Rn (bank bits from PSW) or byte2; Tmp2 ← ACC (byte2 for CJNE) |
| M1 T10 | Tmp1 ← RAM/SFR(RAR), or byte2 for immediates |
| M1 T11 | ALU result and flags registered |
| M1 T12 | result written to ACC, Rn or a direct address; CY/AC/OV written |
| M2 T1 | third byte → byte3 (LJMP, CJNE) |
| M2 T7 | PC + 1 for the last byte, plus rel if DJNZ/CJNE branches; LJMP loads {byte2, byte3} |

Some consequences:

- A one-byte instruction reads the byte after its opcode and discards it.
  The next opcode is then fetched again from that same address.
- In M2, a two-cycle, two-byte instruction fetches its second byte twice
  more.
- `LJMP 000Ah` at 0000h produces the fetches 0000, 0001, 0002, 0002, 000A.
- `MOV 90h,R0` at 0015h produces 0015, 0016, 0016, 0016, then the next
  opcode at 0017.

Execution in T9..T12 follows the register-transfer table given for `ADD A,Rn`
and is used for every instruction. Two-cycle instructions also finish their
data work in M1. M2 only fetches and moves the PC.

Machine cycles per instruction follow the MCS-51 data book. The instructions
`MOV dir,Rn`, `MOV Rn,dir`, `DJNZ`, `CJNE` and `LJMP` take two cycles; every
other instruction takes one.

Decoding works in two levels, as in the original model. The low nibble of the
opcode selects the addressing mode: bit 3 set means register Rn, with the
register number in bits 2..0. The high nibble then selects the operation.

## Internal data space

- `data_ram`: the 128 bytes at 00h..7Fh. Four register banks take
  00h..1Fh, selected by PSW bits RS1/RS0. The RAM is cleared at reset.
- `sfr_file`: the upper 128 bytes at 80h..FFh, reached only by direct
  addresses.
  - Every byte is storable, so a program may park a value at an unused
    address such as B3h.
  - The named SFRs take their reset values: SP = 07h, P0..P3 = FFh, all
    others 0.
  - ACC and the PSW flags have private write ports that the datapath uses.
  - PSW bit 0 always reads as the parity of ACC.
  - Writing to P1 or P3 changes the latch. The pins follow at the next
    M1 T1.
  - Reading a port address returns the latch; the port input pins are not
    modelled.

The ALU (`mcs51_alu`) computes ADD/ADDC/SUBB with CY, AC and OV as the
MCS-51 defines them. It also provides the logic operations, INC/DEC, and the
CJNE compare (CY = register < immediate).

## Files

| file | content |
|---|---|
| `rtl/mcs51_pkg.sv` | opcode nibbles, SFR addresses, control word, monitor struct |
| `rtl/timing_control.sv` | T-state/machine-cycle sequencer, ALE, PSENn, P0 drive window |
| `rtl/instr_decoder.sv` | IR → control word |
| `rtl/program_counter.sv` | PC, incrementer, relative add, jump load, PAR |
| `rtl/mcs51_alu.sv` | ALU |
| `rtl/data_ram.sv` | lower 128 bytes |
| `rtl/sfr_file.sv` | upper 128 bytes / SFRs |
| `rtl/cpu8031.sv` | the core |
| `rtl/addr_latch_373.sv` | transparent octal latch (contains a real latch on purpose) |
| `rtl/eprom_26c64.sv` | 8K x 8 program memory with a load port |
| `rtl/min_system.sv` | top: core + latch + EPROM |
| `tb/mcs51_iss_pkg.sv` | reference instruction-set simulator and a small program builder |
| `tb/*_tb.sv` | one self-checking testbench per module |

## Verification

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself
through a watchdog if something hangs.

The core and the full system are checked in lockstep against the
instruction-set simulator in `tb/mcs51_iss_pkg.sv`. This simulator was
written separately from the RTL. For every instruction it predicts:

- the code addresses fetched;
- the clock count (12 per machine cycle);
- ACC and PSW afterwards;
- the port 1 pins.

`min_system_tb` runs at the default sizes with three programs:

1. The eight-instruction demonstration program. It selects register bank 1,
   stores 04h in R0 and R1, and adds them to ACC, which must end at 0Ch.
   Its first fetches must match the LJMP sequence above.
2. A 54-instruction test of register R0. It exercises every R0 instruction
   and writes each result to P1. P1 must then show FF, 01, 02, 01, 02, 04,
   05, 01, 00, 20, 0B, 14, 22, 03, 0C, 05, 04.
3. A random program of 1500 instructions over the whole supported set.

It also checks ALE and PSENn in every clock. It counts each mechanism and
fails if any never happens. The mechanisms are LJMP, DJNZ and CJNE both
taken and not taken, two-cycle instructions, discarded fetches, a non-zero
register bank, carry in, CLR/SETB C, XCH, borrow, and port writes.

To simulate with Verilator 5, from the directory that holds `rtl/` and
`tb/`:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -Itb \
  rtl/mcs51_pkg.sv tb/mcs51_iss_pkg.sv tb/min_system_tb.sv \
  --top-module min_system_tb -o sim
./obj_dir/sim
```

For the module-level benches, replace the testbench name. Leave out
`tb/mcs51_iss_pkg.sv` for benches that do not import it; only `cpu8031_tb`
and `min_system_tb` do.

Known lint output:

- Unused parameters in the package (SFR addresses no instruction uses).
- An unused bit of the ALU's nibble sum.
- A COMBDLY warning on the latch, which is the intended level-sensitive
  storage of the '373.

## Where this departs from the original model, and what is missing

- **Execution timing.** The register-transfer table for `ADD A,Rn` and the
  original model's code disagree on when operands are read and results
  written. The code writes RAM results in the next M1 T1. This design follows
  the table (T9..T12) for every instruction. IR is loaded at the end of
  M1 T1 and decoded in M1 T2, as in the original code. The table's "IR ←
  P0Lat at T8" is not used.
- **Cycle counts.** Cycle counts and PC increment positions are taken from
  the MCS-51 data book and from observed bus sequences, not from a table of
  the original. `MOV R0,A` is one byte and one cycle. One example in the
  original describes it as a two-cycle instruction.
- **Clock edge.** Everything acts on the rising edge of `xtal2`; the original
  model acts on the falling edge. Reset is synchronous and active high.
- **First fetch.** Reset parks the sequencer at M2 T8, so the first fetch
  after reset is address 0000h.
- **Flags.** AC, OV and P follow the MCS-51 definitions. The original model
  only shows CY being updated.
- **Not implemented:**
  - timers/counters, the serial port, interrupts, power control and the EA
    pin;
  - port input pins;
  - indirect, bit, DPTR, stack, MOVC/MOVX, multiply/divide and relative-jump
    instructions other than DJNZ/CJNE.

  These are the non-register half of the instruction set. Unsupported
  opcodes do not trap; they behave as NOPs.
- **EPROM.** The EPROM model has no programming algorithm. It is loaded
  through a plain write port while the core is held in reset.
- **Register bank for the R0 test program.** The test program's listing
  addresses R0 directly as 08h, which is R0 only in register bank 1. Its
  start-up bytes were therefore taken to select bank 1, as the demonstration
  program does.

Trust: the bus sequences above match the documented fetch patterns. The
two reference programs give the expected results, and random programs agree
with an independently written simulator cycle by cycle. Only the first
fetches of CJNE were not compared against a recorded bus trace.
